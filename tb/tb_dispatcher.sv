// tb_dispatcher: self-checking test of the dispatcher.
// Random packets are offered by the 16 drainer ports. The 20-bit output words
// are decoded with a reverse table of the 8b10b code, built at the start from
// a separate encoder instance, tracking the running disparity across words.
// Checked: IDLE words when there is nothing to send, every packet framed as
// SOP plus four chunks (63:48 first) in 5 consecutive words, the packets of
// each port arriving complete and in order, back-to-back packets when the
// buffer holds several, and the filling format with 8b10b bypassed.
module tb_dispatcher;
  import chipix_pkg::*;

  logic clk = 0, rst_n = 0;
  packet_t pkt [16];
  logic [15:0] pkt_valid = 0, pkt_ready;
  logic enc_bypass = 0;
  logic [19:0] tx_word;
  logic tx_sop, tx_idle;
  int checks = 0, failures = 0;

  dispatcher dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // reverse 8b10b table
  logic [7:0] e_din; logic e_k, e_rd, e_rdo; logic [9:0] e_code;
  enc8b10b ref_enc (.din(e_din), .k(e_k), .rd_in(e_rd), .code(e_code), .rd_out(e_rdo));
  int dec [2][1024];     // value 0..255 data, 256+byte for K, -1 invalid
  logic dec_rd [2][1024];

  packet_t q [16][$];    // packets offered, per port
  int      n_sent = 0, n_recv = 0, n_b2b = 0;

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  logic       rd = 0;
  int         phase = -1;    // -1: between packets, 0..3 chunk index expected
  logic [63:0] acc;
  int         offered_total = 0;
  logic [15:0] pending;

  function automatic int dec_word(logic [19:0] w, ref logic r, output bit ok);
    int hi, lo;
    ok = 1;
    hi = dec[r][w[19:10]]; if (hi < 0) ok = 0; else r = dec_rd[r][w[19:10]];
    lo = dec[r][w[9:0]];   if (lo < 0) ok = 0; else r = dec_rd[r][w[9:0]];
    return (hi << 16) | lo;
  endfunction

  // receiver
  always @(posedge clk) if (rst_n) begin
    bit ok; int v; logic [15:0] data;
    #1;
    if (!enc_bypass) begin
      v = dec_word(tx_word, rd, ok);
      check(ok, $sformatf("word %h decodes", tx_word));
      data = {v[23:16], v[7:0]};
      if (v == ((256 + 8'hBC) << 16 | (256 + 8'hBC))) begin
        check(phase == -1 && tx_idle, "IDLE only between packets");
      end else if (v == ((256 + 8'hFB) << 16 | (256 + 8'hFB))) begin
        check(phase == -1 && tx_sop, "SOP only between packets");
        phase = 3;
      end else begin
        check(phase >= 0 && v[24] == 0 && v[8] == 0, "data chunk inside a packet");
      end
    end else begin
      data = {tx_word[19:12], tx_word[9:2]};
      if (tx_sop) phase = 3;
      else if (!tx_idle) check(tx_word[11:10] == 2'b01 && tx_word[1:0] == 2'b01, "filling bits");
    end
    if (!tx_sop && !tx_idle && phase >= 0) begin
      acc[phase*16 +: 16] = data;
      if (phase == 0) begin
        packet_t p; bit found = 0;
        p = packet_t'(acc);
        check(q[p.mc].size() > 0 && q[p.mc][0] == p, $sformatf("packet %h expected from port %0d head %h bypass %b t=%0t", acc, p.mc, q[p.mc][0], enc_bypass, $time));
        if (q[p.mc].size() > 0) void'(q[p.mc].pop_front());
        n_recv++;
      end
      phase--;
    end
  end

  logic prev_data = 0;
  always @(posedge clk) begin
    if (rst_n && tx_sop && prev_data) n_b2b++;
    prev_data <= !tx_idle && !tx_sop;
  end

  initial begin
    for (int r = 0; r < 2; r++) for (int c = 0; c < 1024; c++) dec[r][c] = -1;
    for (int r = 0; r < 2; r++) begin
      for (int d = 0; d < 256; d++) begin
        e_din = 8'(d); e_k = 0; e_rd = 1'(r); #1;
        dec[r][e_code] = d; dec_rd[r][e_code] = e_rdo;
      end
      e_din = 8'hBC; e_k = 1; e_rd = 1'(r); #1; dec[r][e_code] = 256 + 8'hBC; dec_rd[r][e_code] = e_rdo;
      e_din = 8'hFB; e_k = 1; e_rd = 1'(r); #1; dec[r][e_code] = 256 + 8'hFB; dec_rd[r][e_code] = e_rdo;
    end
    for (int m = 0; m < 16; m++) pkt[m] = '0;
    repeat (3) @(posedge clk); #2 rst_n = 1;
    repeat (10) @(posedge clk);
    for (int n = 0; n < 4000; n++) begin
      @(posedge clk); #2;
      // a port whose packet was taken at this edge offers a new one or nothing
      for (int m = 0; m < 16; m++) begin
        if (pkt_valid[m] && pending[m]) begin
          pkt_valid[m] = 0;
        end
      end
      // quiet from 2500 to 3100 to let the link drain, then filling mode
      if (n == 3100) enc_bypass = 1;
      if (n < 2500 || n >= 3100)
      for (int m = 0; m < 16; m++) if (!pkt_valid[m] && ($urandom % 40 == 0)) begin
        pkt[m] = packet_t'({$urandom, $urandom});
        pkt[m].mc = 4'(m);
        pkt_valid[m] = 1;
        q[m].push_back(pkt[m]);
        offered_total++;
      end
    end
    repeat (1000) begin
      @(posedge clk); #2;
      pkt_valid = pkt_valid & ~pending;
    end
    check(n_recv == offered_total && offered_total > 100, $sformatf("received %0d of %0d", n_recv, offered_total));
    check(n_b2b > 10, $sformatf("back-to-back packets %0d", n_b2b));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // remember which ports were granted at the last edge
  always @(posedge clk) pending <= pkt_valid & pkt_ready;
endmodule
