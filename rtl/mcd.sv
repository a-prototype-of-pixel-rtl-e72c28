// mcd: macro column drainer, the end-of-column readout of one macro column.
//
// Triggers arriving from the chip periphery are queued together with their
// trigger timestamps. A small state machine polls that queue: it takes the
// oldest trigger, sends it to all regions of the column for one cycle (SEND),
// and looks at the column busy flag in the next cycle (CHECK). If a region
// matched, busy is high from that cycle on and the machine stays in READ until
// busy falls; otherwise it goes back to polling. In triggerless mode the
// machine is held in LISTEN. In any state, every cycle the column busy is high
// one region word is stored in the data buffer, completed with the macro
// column address into a 64-bit packet. The dispatcher empties the data buffer
// through a valid/ready port.
//
// From the description: the trigger buffer, the polling machine, the check of
// the busy flag and the store-while-busy data buffer. Own choices: buffer
// depths, holding a trigger back until the data buffer has FREE_MIN free
// words (a trigger can bring one word per region), dropping words into a full
// buffer with an overflow pulse, and a masked column storing nothing.
module mcd
  import chipix_pkg::*;
#(
  parameter logic [ADDR_W-1:0] MC_ADDR    = '0,
  parameter int unsigned       TRIG_DEPTH = 8,
  parameter int unsigned       DATA_DEPTH = 32,
  parameter int unsigned       FREE_MIN   = PR_PER_MC
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     trig_in,
  input  ts_t      trig_ts_in,
  input  logic     triggerless,
  input  logic     masked,
  // to / from the regions
  output logic     trig_out,
  output ts_t      trig_ts_out,
  input  logic     col_busy,
  input  pr_data_t col_data,
  // to the dispatcher
  output packet_t  pkt,
  output logic     pkt_valid,
  input  logic     pkt_ready,
  output logic     trig_overflow,
  output logic     data_overflow
);

  typedef enum logic [2:0] {IDLE, SEND, CHECK, READ, LISTEN} state_e;
  state_e state;

  logic                              tq_empty, tq_full, tq_pop;
  ts_t                               tq_ts;
  logic [$clog2(TRIG_DEPTH+1)-1:0]   tq_count;
  logic                              dq_empty, dq_full, dq_push;
  logic [$clog2(DATA_DEPTH+1)-1:0]   dq_count;
  packet_t                           dq_din;
  logic                              room;

  sync_fifo #(.W(TS_W), .DEPTH(TRIG_DEPTH)) u_tq (
    .clk, .rst_n, .push(trig_in && !triggerless), .din(trig_ts_in),
    .pop(tq_pop), .dout(tq_ts), .empty(tq_empty), .full(tq_full),
    .count(tq_count)
  );

  assign room   = (DATA_DEPTH - int'(dq_count)) >= int'(FREE_MIN);
  assign tq_pop = (state == IDLE) && !tq_empty && room && !triggerless;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= IDLE;
      trig_ts_out <= '0;
    end else begin
      unique case (state)
        IDLE:   if (triggerless) state <= LISTEN;
                else if (tq_pop) begin
                  state       <= SEND;
                  trig_ts_out <= tq_ts;
                end
        SEND:   state <= CHECK;
        CHECK:  state <= col_busy ? READ : IDLE;
        READ:   if (!col_busy) state <= IDLE;
        LISTEN: if (!triggerless) state <= IDLE;
        default: state <= IDLE;
      endcase
    end
  end

  assign trig_out = (state == SEND);

  assign dq_push = col_busy && !masked;
  assign dq_din  = '{mc: MC_ADDR, ts: col_data.ev.ts, pr: col_data.pr,
                     hitmap: col_data.ev.hitmap, tots: col_data.ev.tots};

  sync_fifo #(.W($bits(packet_t)), .DEPTH(DATA_DEPTH)) u_dq (
    .clk, .rst_n, .push(dq_push), .din(dq_din), .pop(pkt_valid && pkt_ready),
    .dout(pkt), .empty(dq_empty), .full(dq_full), .count(dq_count)
  );

  assign pkt_valid     = !dq_empty;
  assign trig_overflow = trig_in && !triggerless && tq_full;
  assign data_overflow = dq_push && dq_full;

endmodule
