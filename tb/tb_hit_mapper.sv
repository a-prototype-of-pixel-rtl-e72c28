// tb_hit_mapper: self-checking test of the ToT compression.
// Random hit patterns with random ToTs; the expected hit map and the six ToT
// slots are computed here by scanning the pattern from pixel 0 upwards.
module tb_hit_mapper;
  import chipix_pkg::*;

  hitmap_t hit_flags;
  tot_t    tots_in [NPIX];
  hitmap_t hitmap;
  tots_t   tots_out;
  logic    latch_en;
  int checks = 0, failures = 0;

  hit_mapper dut (.*);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      logic [29:0] exp_tots;
      int k;
      hit_flags = (n < 17) ? hitmap_t'((1 << n) - 1) : hitmap_t'($urandom);
      if (n % 3 == 0 && n >= 17) hit_flags = hit_flags & hitmap_t'($urandom) & hitmap_t'($urandom);
      for (int p = 0; p < 16; p++) tots_in[p] = tot_t'($urandom);
      #1;
      exp_tots = '0; k = 0;
      for (int p = 0; p < 16; p++)
        if (hit_flags[p]) begin
          if (k < 6) exp_tots[k*5 +: 5] = tots_in[p];
          k++;
        end
      checks++;
      if (hitmap != hit_flags || tots_out != exp_tots || latch_en != (hit_flags != 0)) begin
        failures++;
        $display("FAIL: flags %h tots %h exp %h", hit_flags, tots_out, exp_tots);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
