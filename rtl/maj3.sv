// maj3 - three-input majority gate, the basic logic element of a QCA layout.
//
// y is 1 when at least two of a, b, m are 1. With m tied to 0 (a cell fixed
// at -1.00 polarization) it is a two-input AND of a and b; with m tied to 1
// (+1.00) it is a two-input OR. Combinational.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic m,
  output logic y
);

  always_comb y = (a & b) | (a & m) | (b & m);

endmodule
