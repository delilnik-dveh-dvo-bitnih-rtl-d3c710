// div2_gates - combinational 2-bit by 2-bit integer divider (gate level).
//
// Computes the quotient of dividend {a,b} / divisor {c,d} from the
// simplified sum-of-products form of the divider's truth table:
//   R1 = a c' d
//   R0 = a b c + b c' d + a c d'
// Each three-literal product is built as two cascaded two-input ANDs, the
// way the reference gate diagram draws it (AC'D, ABC, ACD', BC'D), and R0
// is the OR of the three R0 products. zero_flag = c | d, so it is 0 only
// for a zero divisor; in that case both quotient bits are 0 as well.
// The equations and the flag behaviour follow the original design; the
// port names and the packed operand buses are this implementation's.
//
// Interface: dividend, divisor in; quotient, zero_flag out.
// Timing: purely combinational, no clock.
module div2_gates
  import div2_pkg::*;
(
  input  operand_t   dividend,   // {a, b}
  input  operand_t   divisor,    // {c, d}
  output logic [1:0] quotient,   // {R1, R0}
  output logic       zero_flag   // 0 when divisor == 0
);

  logic a, b, c, d;
  logic c_n, d_n;
  logic p_acnd, p_abc, p_acdn, p_bcnd;

  assign {a, b} = dividend;
  assign {c, d} = divisor;

  always_comb begin
    c_n    = ~c;
    d_n    = ~d;
    // Two-input AND pairs, then the third literal.
    p_acnd = (a & c_n) & d;   // AC'D
    p_abc  = (a & b)   & c;   // ABC
    p_acdn = (a & c)   & d_n; // ACD'
    p_bcnd = (b & c_n) & d;   // BC'D
    quotient[1] = p_acnd;
    quotient[0] = p_abc | p_acdn | p_bcnd;
    zero_flag   = c | d;
  end

endmodule
