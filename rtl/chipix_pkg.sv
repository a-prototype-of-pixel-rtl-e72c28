// chipix_pkg: types and constants shared by the pixel-region readout chip.
//
// The numbers that come from the chip description are the 4x4 pixel region,
// 16 regions per macro column, 16 macro columns, 5-bit ToT, 6 ToTs kept per
// event, 16 buffer rows per region and the 64-bit output packet layout
// (63:60 macro column, 59:50 timestamp, 49:46 region, 45:30 hit map, 29:0 ToTs).
// The 10-bit timestamp width is taken from that packet layout. Everything
// else in here (configuration register layout, configuration bus fields) is
// this implementation's own choice.
package chipix_pkg;

  localparam int unsigned NPIX       = 16;   // pixels per region (4x4)
  localparam int unsigned TOT_W      = 5;    // ToT precision
  localparam int unsigned NTOT       = 6;    // ToTs kept per region event
  localparam int unsigned TS_W       = 10;   // timestamp width
  localparam int unsigned BUF_DEPTH  = 16;   // shared buffer rows per region
  localparam int unsigned PR_PER_MC  = 16;   // regions per macro column
  localparam int unsigned N_MC       = 16;   // macro columns
  localparam int unsigned ADDR_W     = 4;    // region / macro column address
  localparam int unsigned DT_LOW     = 6;    // deadtime, low mode (clock cycles)
  localparam int unsigned DT_HIGH    = 16;   // deadtime, high mode (clock cycles)
  localparam int unsigned GCR_WORDS  = 14;   // 224 global configuration bits
  localparam int unsigned N_DAC      = 16;   // global bias DACs
  localparam int unsigned DAC_W      = 10;   // global bias DAC resolution

  typedef logic [TS_W-1:0]       ts_t;
  typedef logic [TOT_W-1:0]      tot_t;
  typedef logic [NPIX-1:0]       hitmap_t;
  typedef logic [NTOT*TOT_W-1:0] tots_t;

  // One stored region event: what a shared-buffer row holds.
  typedef struct packed {
    ts_t     ts;
    hitmap_t hitmap;
    tots_t   tots;      // tots[4:0] belongs to the lowest-index hit pixel
  } event_t;

  // What a pixel region places on the column drain bus.
  typedef struct packed {
    logic [ADDR_W-1:0] pr;
    event_t            ev;
  } pr_data_t;

  // The 64-bit output packet.
  typedef struct packed {
    logic [ADDR_W-1:0] mc;      // 63:60
    ts_t               ts;      // 59:50
    logic [ADDR_W-1:0] pr;      // 49:46
    hitmap_t           hitmap;  // 45:30
    tots_t             tots;    // 29:0
  } packet_t;

  // End of column configuration (readout options).
  typedef struct packed {
    logic [TS_W-1:0] latency;       // trigger latency in clock cycles
    logic            triggerless;
    logic            dt_high;       // 1: 16-cycle deadtime, 0: 6-cycle
    logic            binary_only;
    logic            enc_bypass;    // 8b10b bypass (simple filling instead)
    logic            gray_bypass;   // timestamps in plain binary
    logic            debug;         // front ends bypassed, injection inputs used
    logic [N_MC-1:0] mc_mask;       // 1 masks the macro column from readout
  } eccr_t;

  // Pixel configuration write, passed from region to region.
  typedef struct packed {
    logic              we;
    logic [ADDR_W-1:0] pr;     // region within the macro column
    logic              right;  // 0: left half (cols 0-1), 1: right half (cols 2-3)
    logic [1:0]        idx;    // register batch index = pixel row in the region
    logic [15:0]       data;   // 8 bits per pixel, [7:0] for the even column
  } pcr_wr_t;

  function automatic logic [TS_W-1:0] bin2gray(logic [TS_W-1:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [TS_W-1:0] gray2bin(logic [TS_W-1:0] g);
    logic [TS_W-1:0] b;
    b[TS_W-1] = g[TS_W-1];
    for (int i = TS_W - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

endpackage
