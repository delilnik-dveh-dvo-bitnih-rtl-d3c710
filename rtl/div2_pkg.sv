// div2_pkg - types and constants shared by the 2-bit divider modules.
//
// A 2-bit dividend {a,b} is divided by a 2-bit divisor {c,d} (a and c are
// the most significant bits). The result is the 2-bit integer quotient
// {R1,R0}, with no remainder, and a zero flag that is 0 exactly when the
// divisor is zero. On a zero divisor the quotient bits come out as 0.
//
// The QCA realisation builds every AND and OR from a three-input majority
// gate whose third input is a cell held at a fixed polarization: -1 makes
// the gate an AND, +1 makes it an OR. MAJ_AND / MAJ_OR are those fixed
// inputs as logic levels. QCA_LATENCY is the QCA divider's delay in clocks,
// as the original design gives it. The operand/result types and the
// majority-gate encoding are this implementation's own choices.
package div2_pkg;

  typedef logic [1:0] operand_t;

  typedef struct packed {
    logic [1:0] quotient;   // {R1, R0}
    logic       zero_flag;  // 0 when the divisor is zero
  } div2_result_t;

  // Fixed-polarization input of a majority gate: -1.00 -> AND, +1.00 -> OR.
  localparam logic MAJ_AND = 1'b0;
  localparam logic MAJ_OR  = 1'b1;

  // Clocks from an input vector to its result in the QCA divider.
  localparam int unsigned QCA_LATENCY = 4;

endpackage
