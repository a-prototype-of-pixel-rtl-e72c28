// dispatcher: collects the packets of all macro column drainers and turns them
// into 20-bit words for the serializer.
//
// Collection: each cycle a round-robin arbiter takes one packet from the
// drainers that offer one and stores it in the internal buffer. Transmission:
// one 20-bit word leaves per clock cycle. With the internal buffer empty the
// word is IDLE (K28.5 K28.5). Otherwise a packet is sent as a Start of Packet
// word (K27.7 K27.7) followed by its four 16-bit chunks, bits 63:48 first. A
// 16-bit chunk is two bytes, high byte first, each 8b10b coded with a running
// disparity carried from word to word. With enc_bypass set, a chunk is sent
// as simple filling instead: {high byte, 2'b01, low byte, 2'b01}, while SOP
// and IDLE keep their coded form for negative disparity. A packet therefore
// takes 5 words on the link.
//
// From the description: the internal buffer, the state machine that splits
// packets into 16-bit chunks, 8b10b coding or filling, the 20-bit words, the
// Start of Packet word and the IDLE character. Own choices: which control
// characters are used, the filling pattern, round-robin collection and the
// buffer depth.
module dispatcher
  import chipix_pkg::*;
#(
  parameter int unsigned NMC      = N_MC,
  parameter int unsigned IQ_DEPTH = 32
) (
  input  logic           clk,
  input  logic           rst_n,
  input  packet_t        pkt       [NMC],
  input  logic [NMC-1:0] pkt_valid,
  output logic [NMC-1:0] pkt_ready,
  input  logic           enc_bypass,
  output logic [19:0]    tx_word,    // registered, one per cycle, bit 19 first
  output logic           tx_sop,     // tx_word is a Start of Packet word
  output logic           tx_idle     // tx_word is an IDLE word
);

  localparam int unsigned PW = $bits(packet_t);
  localparam logic [7:0]  K28_5 = 8'hBC;
  localparam logic [7:0]  K27_7 = 8'hFB;

  // ---------------- collection ----------------
  logic [$clog2(NMC)-1:0] rr, pick;
  logic                   any, iq_full, iq_empty, iq_pop;
  packet_t                iq_dout;
  logic [$clog2(IQ_DEPTH+1)-1:0] iq_count;

  always_comb begin
    pick = rr;
    any  = 1'b0;
    for (int i = NMC - 1; i >= 0; i--) begin
      int unsigned j;
      j = (int'(rr) + i) % NMC;
      if (pkt_valid[j]) begin
        pick = j[$clog2(NMC)-1:0];
        any  = 1'b1;
      end
    end
  end

  always_comb begin
    pkt_ready = '0;
    if (any && !iq_full) pkt_ready[pick] = 1'b1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                rr <= '0;
    else if (any && !iq_full)  rr <= pick + 1'b1;
  end

  sync_fifo #(.W(PW), .DEPTH(IQ_DEPTH)) u_iq (
    .clk, .rst_n, .push(any && !iq_full), .din(pkt[pick]), .pop(iq_pop),
    .dout(iq_dout), .empty(iq_empty), .full(iq_full), .count(iq_count)
  );

  // ---------------- transmission ----------------
  typedef enum logic {T_IDLE, T_DATA} tstate_e;
  tstate_e    tstate;
  logic [1:0] chunk;          // chunk being sent, 3 = bits 63:48
  logic       rd;             // running disparity, 1 = positive
  logic [7:0] b_hi, b_lo;
  logic       k_char, rd_mid, rd_next;
  logic [9:0] c_hi, c_lo;
  logic [15:0] chunk_data;

  assign chunk_data = iq_dout[chunk*16 +: 16];
  assign iq_pop     = (tstate == T_DATA) && (chunk == 2'd0);

  always_comb begin
    if (tstate == T_DATA) begin
      {b_hi, b_lo} = chunk_data;
      k_char       = 1'b0;
    end else if (!iq_empty) begin
      {b_hi, b_lo} = {K27_7, K27_7};
      k_char       = 1'b1;
    end else begin
      {b_hi, b_lo} = {K28_5, K28_5};
      k_char       = 1'b1;
    end
  end

  logic bypass_word;
  assign bypass_word = enc_bypass && !k_char;

  enc8b10b u_enc_hi (.din(b_hi), .k(k_char),
                     .rd_in(enc_bypass ? 1'b0 : rd),     .code(c_hi), .rd_out(rd_mid));
  enc8b10b u_enc_lo (.din(b_lo), .k(k_char),
                     .rd_in(enc_bypass ? 1'b0 : rd_mid), .code(c_lo), .rd_out(rd_next));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tstate  <= T_IDLE;
      chunk   <= 2'd3;
      rd      <= 1'b0;
      tx_word <= '0;
      tx_sop  <= 1'b0;
      tx_idle <= 1'b0;
    end else begin
      tx_word <= bypass_word ? {b_hi, 2'b01, b_lo, 2'b01} : {c_hi, c_lo};
      tx_sop  <= (tstate == T_IDLE) && !iq_empty;
      tx_idle <= (tstate == T_IDLE) && iq_empty;
      rd      <= enc_bypass ? 1'b0 : rd_next;
      unique case (tstate)
        T_IDLE: if (!iq_empty) begin
          tstate <= T_DATA;
          chunk  <= 2'd3;
        end
        T_DATA: if (chunk == 2'd0) tstate <= T_IDLE;
                else               chunk  <= chunk - 2'd1;
        default: tstate <= T_IDLE;
      endcase
    end
  end

endmodule
