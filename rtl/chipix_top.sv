// chipix_top: digital part of the 64x64-pixel readout chip demonstrator.
//
// The pixel matrix is NMC macro columns of NPR pixel regions of 4x4 pixels.
// Each macro column has its drainer in the periphery; the dispatcher merges
// the drainers' packets into a stream of 20-bit words, which the serializer
// sends out one bit per bit clock. Configuration comes in over SPI: the
// global registers set the 16 bias DAC codes, the autozeroing cycle and the
// ADC multiplexer; the end of column registers set the readout options; the
// pixel registers are written through each macro column's configuration bus.
// The periphery timing block provides the bunch-crossing timestamp and the
// trigger timestamp.
//
// The analog parts are outside this module and meet it at its ports: the
// front-end discriminator outputs (fe_disc) and per-pixel configuration
// bits (pix_cfg), the autozero signal of the synchronous front ends, the
// voltage at the ADC input multiplexer output (vin_uv), the bias DAC output
// currents, and the serial output, which drives the SLVS pad. The bias DAC
// current cells and the ADC integrator are behavioural models.
//
// Clocks: clk is the 40 MHz bunch-crossing clock; clk_ser is the serializer
// bit clock, 20 times clk and edge-aligned with it.
module chipix_top
  import chipix_pkg::*;
#(
  parameter int unsigned NMC          = N_MC,
  parameter int unsigned NPR          = PR_PER_MC,
  parameter int unsigned DEPTH        = BUF_DEPTH,
  parameter int unsigned EXPIRE_SLACK = 64
) (
  input  logic        clk,
  input  logic        clk_ser,
  input  logic        rst_n,
  // SPI configuration
  input  logic        sclk,
  input  logic        cs_n,
  input  logic        mosi,
  // trigger
  input  logic        trig_in,
  // pixel matrix, indexed [macro column][region], bit = 4*row+col in region
  input  hitmap_t     fe_disc [NMC][NPR],
  input  hitmap_t     dbg_inj [NMC][NPR],
  output logic [7:0]  pix_cfg [NMC][NPR][NPIX],
  output logic        az,
  // bias network
  input  logic [15:0] i_lsb_na,
  output logic [31:0] bias_ioutp_na [N_DAC],
  output logic [31:0] bias_ioutn_na [N_DAC],
  // monitoring ADC
  input  logic [19:0] vin_uv,
  input  logic        adc_start,
  output logic [3:0]  adc_mux_sel,
  output logic [9:0]  adc_iref_trim,   // reference current trim to the ADC
  output logic [11:0] adc_code,
  output logic        adc_done,
  // data output
  output logic        ser_out,
  // status
  output logic        evt_overflow,    // a region buffer was full
  output logic        data_overflow,   // a drainer data buffer was full
  output logic        trig_overflow    // a drainer trigger buffer was full
);

  // ---------------- configuration ----------------
  logic [19:0]            frame;
  logic                   frame_valid;
  logic [GCR_WORDS*16-1:0] gcr;
  eccr_t                  eccr;
  pcr_wr_t                pcr_wr [N_MC];

  spi_slave u_spi (.clk, .rst_n, .sclk, .cs_n, .mosi, .frame, .frame_valid);
  config_ctrl u_cfg (.clk, .rst_n, .frame, .frame_valid, .gcr, .eccr, .pcr_wr);

  // ---------------- timing ----------------
  ts_t  ts, trig_ts;
  logic trig;

  periphery_timing u_tim (
    .clk, .rst_n, .trig_in, .latency(eccr.latency),
    .gray_bypass(eccr.gray_bypass), .ts, .trig, .trig_ts
  );

  az_gen u_az (.clk, .rst_n, .period(gcr[167:160]), .width(gcr[171:168]), .az);

  // ---------------- matrix and drainers ----------------
  packet_t        pkt [NMC];
  logic [NMC-1:0] pkt_valid, pkt_ready, d_ovf, t_ovf, col_ovf;

  for (genvar m = 0; m < NMC; m++) begin : g_mc
    logic             mc_trig, col_busy;
    ts_t              mc_trig_ts;
    pr_data_t         col_data;
    logic [NPR-1:0]   ovf;

    macro_column #(.NPR(NPR), .DEPTH(DEPTH), .EXPIRE_SLACK(EXPIRE_SLACK)) u_col (
      .clk, .rst_n,
      .fe_disc (fe_disc[m]),
      .dbg_inj (dbg_inj[m]),
      .ts, .trig(mc_trig), .trig_ts(mc_trig_ts), .cfg(eccr),
      .pcr_in  (pcr_wr[m]),
      .col_busy, .col_data,
      .pix_cfg (pix_cfg[m]),
      .overflow(ovf)
    );

    mcd #(.MC_ADDR(ADDR_W'(m)), .FREE_MIN(NPR)) u_mcd (
      .clk, .rst_n, .trig_in(trig), .trig_ts_in(trig_ts),
      .triggerless(eccr.triggerless), .masked(eccr.mc_mask[m]),
      .trig_out(mc_trig), .trig_ts_out(mc_trig_ts), .col_busy, .col_data,
      .pkt(pkt[m]), .pkt_valid(pkt_valid[m]), .pkt_ready(pkt_ready[m]),
      .trig_overflow(t_ovf[m]), .data_overflow(d_ovf[m])
    );

    assign col_ovf[m] = |ovf;
  end

  assign evt_overflow  = |col_ovf;
  assign data_overflow = |d_ovf;
  assign trig_overflow = |t_ovf;

  // ---------------- output ----------------
  logic [19:0] tx_word;
  logic        tx_sop, tx_idle, ser_load;

  dispatcher #(.NMC(NMC)) u_disp (
    .clk, .rst_n, .pkt, .pkt_valid, .pkt_ready, .enc_bypass(eccr.enc_bypass),
    .tx_word, .tx_sop, .tx_idle
  );

  serializer u_ser (.clk_ser, .rst_n, .par_in(tx_word), .ser_out, .load(ser_load));

  // ---------------- bias network and monitoring ----------------
  for (genvar d = 0; d < N_DAC; d++) begin : g_dac
    global_bias_dac u_dac (
      .code(gcr[d*DAC_W +: DAC_W]), .i_lsb_na,
      .ioutp_na(bias_ioutp_na[d]), .ioutn_na(bias_ioutn_na[d])
    );
  end

  logic adc_rst_int, adc_charge, adc_discharge, adc_comp, adc_busy;

  assign adc_mux_sel   = gcr[175:172];
  assign adc_iref_trim = gcr[185:176];

  adc_ctrl u_adc (
    .clk, .rst_n, .start(adc_start), .comp(adc_comp), .rst_int(adc_rst_int),
    .charge(adc_charge), .discharge(adc_discharge), .code(adc_code),
    .done(adc_done), .busy(adc_busy)
  );

  adc_analog u_adc_an (
    .clk, .vin_uv, .rst_int(adc_rst_int), .charge(adc_charge),
    .discharge(adc_discharge), .comp(adc_comp)
  );

endmodule
