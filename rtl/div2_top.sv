// div2_top - the 2-bit divider in both of its forms, side by side.
//
// One pair of operand buses, dividend {a,b} and divisor {c,d}, feeds
//   - div2_gates, the gate-level divider, whose quotient and zero flag
//     follow the inputs combinationally (gate_* outputs), and
//   - qca_divider, the clocked model of the QCA layout of the same
//     circuit, whose results appear 4 clocks later (qca_* outputs).
// After the pipeline has filled, qca_quotient/qca_zero_flag equal the
// gate_* outputs of 4 samples earlier. Placing the two side by side is
// this implementation's choice; the original design presents the gate
// circuit first and then redraws it in QCA.
//
// Interface: clk, rst_n (synchronous, active low), in_valid, dividend,
// divisor; gate_quotient, gate_zero_flag; qca_valid, qca_quotient,
// qca_zero_flag. The zero flags are 0 when the divisor is zero.
module div2_top
  import div2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  operand_t   dividend,
  input  operand_t   divisor,
  output logic [1:0] gate_quotient,
  output logic       gate_zero_flag,
  output logic       qca_valid,
  output logic [1:0] qca_quotient,
  output logic       qca_zero_flag
);

  div2_gates u_gates (
    .dividend  (dividend),
    .divisor   (divisor),
    .quotient  (gate_quotient),
    .zero_flag (gate_zero_flag)
  );

  qca_divider u_qca (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (in_valid),
    .dividend  (dividend),
    .divisor   (divisor),
    .out_valid (qca_valid),
    .quotient  (qca_quotient),
    .zero_flag (qca_zero_flag)
  );

endmodule
