// tb_div2_gates - exhaustive self-checking test of the gate-level divider.
//
// Applies all 16 dividend/divisor pairs and compares quotient and
// zero_flag with integer division worked out in the testbench (quotient 0
// and flag 0 for a zero divisor). Purely combinational, so each vector is
// checked after a 1 ns settle time; a watchdog ends the run if it hangs.
module tb_div2_gates;
  import div2_pkg::*;

  operand_t   dividend, divisor;
  logic [1:0] quotient;
  logic       zero_flag;
  int checks = 0, failures = 0;

  div2_gates dut (.dividend, .divisor, .quotient, .zero_flag);

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4; n++) begin
      for (int m = 0; m < 4; m++) begin
        logic [1:0] exp_q;
        logic       exp_f;
        dividend = operand_t'(n);
        divisor  = operand_t'(m);
        exp_q = (m == 0) ? 2'd0 : 2'(n / m);
        exp_f = (m != 0);
        #1;
        checks += 2;
        if (quotient !== exp_q) begin
          failures++;
          $display("FAIL %0d/%0d: quotient %0d, expected %0d", n, m, quotient, exp_q);
        end
        if (zero_flag !== exp_f) begin
          failures++;
          $display("FAIL %0d/%0d: zero_flag %0b, expected %0b", n, m, zero_flag, exp_f);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
