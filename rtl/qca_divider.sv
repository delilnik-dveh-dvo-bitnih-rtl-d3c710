// qca_divider - clocked model of the quantum-dot cellular automata (QCA)
// 2-bit divider.
//
// Same function as div2_gates (quotient {R1,R0} of {a,b}/{c,d} and a zero
// flag that is 0 for a zero divisor), but built the way the QCA layout
// builds it: eleven three-input majority gates (maj3), eight with a fixed
// -1.00 input acting as ANDs and three with a fixed +1.00 input acting as
// ORs, and a result that leaves the circuit 4 clocks after its inputs went
// in. A QCA wire only carries a value forward one clock zone per clock
// phase, so the layout is a pipeline; here each of the four clocks is one
// register stage, placed after each gate level:
//
//   stage 1: a&c', a&b, a&c, b&c'   and the flag c|d
//   stage 2: (a&c')&d = R1, (a&b)&c, (a&c)&d', (b&c')&d
//   stage 3: abc | bc'd
//   stage 4: (abc | bc'd) | acd' = R0
//
// R1 and the flag are ready after 2 and 1 gate levels; like the layout,
// which lengthens their wires so all outputs arrive on the same clock,
// they are carried through balancing registers to stage 4. The 4-clock
// delay, the gate count and fixed polarizations, and the order of the two
// ORs follow the original design; one register per clock at each gate
// level, the valid bit and the synchronous reset are this model's own.
//
// Interface: clk, rst_n (synchronous, active low, clears every stage),
// in_valid/dividend/divisor in; out_valid/quotient/zero_flag out.
// Timing: a new operand pair every clock; the result of the pair sampled at
// clock edge n is on the outputs after edge n+3, i.e. QCA_LATENCY = 4
// samples later (out_valid marks it, so the first results after reset are
// ignored, as in the original simulation where results are read 4 clocks
// late).
module qca_divider
  import div2_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       in_valid,
  input  operand_t   dividend,   // {a, b}
  input  operand_t   divisor,    // {c, d}
  output logic       out_valid,
  output logic [1:0] quotient,   // {R1, R0}
  output logic       zero_flag   // 0 when divisor == 0
);

  // ---------------------------------------------------------------- stage 1
  logic a, b, c, d;
  assign {a, b} = dividend;
  assign {c, d} = divisor;

  logic g_acn, g_ab, g_ac, g_bcn, g_flag;
  maj3 u_and_acn (.a(a), .b(~c), .m(MAJ_AND), .y(g_acn));
  maj3 u_and_ab  (.a(a), .b(b),  .m(MAJ_AND), .y(g_ab));
  maj3 u_and_ac  (.a(a), .b(c),  .m(MAJ_AND), .y(g_ac));
  maj3 u_and_bcn (.a(b), .b(~c), .m(MAJ_AND), .y(g_bcn));
  maj3 u_or_flag (.a(c), .b(d),  .m(MAJ_OR),  .y(g_flag));

  typedef struct packed {
    logic acn, ab, ac, bcn;
    logic c, d;
    logic flag;
  } s1_t;
  s1_t s1;

  // ---------------------------------------------------------------- stage 2
  logic g_r1, g_abc, g_acdn, g_bcnd;
  maj3 u_and_acnd (.a(s1.acn), .b(s1.d),  .m(MAJ_AND), .y(g_r1));
  maj3 u_and_abc  (.a(s1.ab),  .b(s1.c),  .m(MAJ_AND), .y(g_abc));
  maj3 u_and_acdn (.a(s1.ac),  .b(~s1.d), .m(MAJ_AND), .y(g_acdn));
  maj3 u_and_bcnd (.a(s1.bcn), .b(s1.d),  .m(MAJ_AND), .y(g_bcnd));

  typedef struct packed {
    logic r1, abc, acdn, bcnd;
    logic flag;
  } s2_t;
  s2_t s2;

  // ---------------------------------------------------------------- stage 3
  logic g_or1;
  maj3 u_or_abc_bcnd (.a(s2.abc), .b(s2.bcnd), .m(MAJ_OR), .y(g_or1));

  typedef struct packed {
    logic r1, or1, acdn;
    logic flag;
  } s3_t;
  s3_t s3;

  // ---------------------------------------------------------------- stage 4
  logic g_r0;
  maj3 u_or_r0 (.a(s3.or1), .b(s3.acdn), .m(MAJ_OR), .y(g_r0));

  div2_result_t s4;

  logic [QCA_LATENCY-1:0] vld;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s1  <= '0;
      s2  <= '0;
      s3  <= '0;
      s4  <= '0;
      vld <= '0;
    end else begin
      s1  <= '{acn: g_acn, ab: g_ab, ac: g_ac, bcn: g_bcn,
               c: c, d: d, flag: g_flag};
      s2  <= '{r1: g_r1, abc: g_abc, acdn: g_acdn, bcnd: g_bcnd,
               flag: s1.flag};
      s3  <= '{r1: s2.r1, or1: g_or1, acdn: s2.acdn, flag: s2.flag};
      s4  <= '{quotient: {s3.r1, g_r0}, zero_flag: s3.flag};
      vld <= {vld[QCA_LATENCY-2:0], in_valid};
    end
  end

  assign quotient  = s4.quotient;
  assign zero_flag = s4.zero_flag;
  assign out_valid = vld[QCA_LATENCY-1];

endmodule
