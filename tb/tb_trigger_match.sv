// tb_trigger_match: self-checking test of trigger matching and validation.
// The testbench owns the buffer side (valid bits, row timestamps, a running
// timestamp) and keeps its own model of the marked rows. Random triggers,
// often aimed at a stored timestamp, random grants and rows of random age are
// applied in triggered mode (binary and Gray timestamps) and in triggerless
// mode; sel_row, trig_status and the rows freed (read or expired) are
// compared with the model every cycle.
module tb_trigger_match;
  import chipix_pkg::*;

  localparam int SLACK = 8;
  logic clk = 0, rst_n = 0;
  logic [15:0] valid;
  ts_t row_ts [16];
  ts_t cur_ts, trig_ts;
  logic trig = 0, triggerless = 0, gray_bypass = 1, grant = 0;
  ts_t latency = 20;
  logic [3:0] sel_row;
  logic trig_status;
  logic [15:0] clr;
  int checks = 0, failures = 0, n_match = 0, n_expire = 0, n_read = 0;

  trigger_match #(.EXPIRE_SLACK(SLACK)) dut (.*);

  always #5 clk = ~clk;

  logic [15:0] m_marked;
  ts_t bx;
  ts_t row_bin [16];

  function automatic ts_t enc(ts_t b);
    return gray_bypass ? b : bin2gray(b);
  endfunction

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    valid = '0; m_marked = '0; bx = 100;
    for (int i = 0; i < 16; i++) begin row_ts[i] = '0; row_bin[i] = '0; end
    repeat (2) @(posedge clk); #1 rst_n = 1;
    for (int n = 0; n < 6000; n++) begin
      logic [15:0] eff, exp_match, exp_exp, exp_clr, sel1h;
      int exp_sel;
      if (n == 2000) gray_bypass = 0;
      if (n == 4000) begin triggerless = 1; m_marked = '0; end
      cur_ts = enc(bx);
      for (int i = 0; i < 16; i++) row_ts[i] = enc(row_bin[i]);
      trig    = !triggerless && ($urandom % 4 == 0);
      trig_ts = ($urandom % 2) ? row_ts[$urandom % 16] : enc(ts_t'($urandom));
      grant   = ($urandom % 3 != 0);
      // model
      exp_match = '0; exp_exp = '0;
      for (int i = 0; i < 16; i++) begin
        exp_match[i] = trig && valid[i] && row_ts[i] == trig_ts;
        exp_exp[i]   = !triggerless && valid[i] && !m_marked[i] && !exp_match[i]
                       && int'(ts_t'(bx - row_bin[i])) > int'(latency) + SLACK;
      end
      eff = triggerless ? valid : m_marked;
      exp_sel = 0; sel1h = '0;
      for (int i = 15; i >= 0; i--) if (eff[i]) begin exp_sel = i; sel1h = 16'(1) << i; end
      exp_clr = exp_exp | (grant && eff != 0 ? sel1h : '0);
      #1;
      checks++;
      if (trig_status !== (eff != 0) || (eff != 0 && sel_row !== 4'(exp_sel)) || clr !== exp_clr) begin
        failures++;
        $display("FAIL: n=%0d status %b sel %0d exp %0d clr %h exp %h", n, trig_status, sel_row, exp_sel, clr, exp_clr);
      end
      n_match  += $countones(exp_match);
      n_expire += $countones(exp_exp);
      if (grant && eff != 0) n_read++;
      @(posedge clk); #1;
      m_marked = (m_marked | exp_match) & valid & ~exp_clr;
      valid    = valid & ~exp_clr;
      // new rows appear with an age of 0..40 cycles
      if ($urandom % 2 == 0) begin
        for (int i = 0; i < 16; i++) if (!valid[i]) begin
          valid[i] = 1'b1; row_bin[i] = bx - ts_t'($urandom % 40); break;
        end
      end
      bx = bx + 1;
    end
    checks += 3;
    if (n_match == 0)  begin failures++; $display("FAIL: no trigger match"); end
    if (n_expire == 0) begin failures++; $display("FAIL: no expiry"); end
    if (n_read == 0)   begin failures++; $display("FAIL: no read"); end
    $display("INFO matches=%0d expired=%0d reads=%0d", n_match, n_expire, n_read);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
