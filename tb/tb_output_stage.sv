// tb_output_stage: self-checking test of the column-drain link.
// Exhaustive over the two busy inputs with random data: the busy OR, the
// data multiplexer (preceding region first) and the grant are checked.
module tb_output_stage;
  import chipix_pkg::*;

  logic my_busy, busy_prev, busy_out, grant;
  pr_data_t my_data, data_prev, data_out;
  int checks = 0, failures = 0;

  output_stage dut (.*);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 400; n++) begin
      my_busy = n[0]; busy_prev = n[1];
      my_data = pr_data_t'({$urandom, $urandom});
      data_prev = pr_data_t'({$urandom, $urandom});
      #1;
      checks++;
      if (busy_out !== (my_busy | busy_prev) ||
          data_out !== (busy_prev ? data_prev : my_data) ||
          grant !== (my_busy && !busy_prev)) begin
        failures++;
        $display("FAIL: busy %b/%b out %b grant %b", my_busy, busy_prev, busy_out, grant);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
