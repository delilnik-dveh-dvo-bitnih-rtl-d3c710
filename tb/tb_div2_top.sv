// tb_div2_top - end-to-end test of the divider top at its default
// parameters.
//
// Replays the reference simulation sequence: the dividend steps 0,1,2,3
// and, for each, the divisor steps 0,1,2,3, one pair per clock, the whole
// sweep run twice back to back, then 200 random pairs. Each clock it
// checks
//   - the gate-level outputs against integer division of the pair now on
//     the inputs (quotient 0 and zero flag 0 for a zero divisor), and
//   - the QCA outputs against the pair applied QCA_LATENCY (4) clocks
//     earlier, and qca_valid against that pair's in_valid.
// It counts how often each mechanism happened: a zero divisor flagged,
// each product term (ac'd, abc, bc'd, acd') deciding a quotient bit, the
// pipeline filling (qca_valid first rising exactly 4 clocks after the
// first valid input) and a QCA result that differs from the gate result
// shown at the same time (so the delay is visible). A mechanism that never
// happened counts as a failure. A watchdog bounds the run.
module tb_div2_top;
  import div2_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  operand_t   dividend, divisor;
  logic [1:0] gate_quotient;
  logic       gate_zero_flag;
  logic       qca_valid;
  logic [1:0] qca_quotient;
  logic       qca_zero_flag;
  int checks = 0, failures = 0;
  int n_div0 = 0, n_acnd = 0, n_abc = 0, n_bcnd = 0, n_acdn = 0;
  int n_fill = 0, n_delay_seen = 0;
  int cycle = 0, first_in = -1, first_out = -1;

  div2_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef struct packed {
    logic       v;
    logic [1:0] q;
    logic       f;
  } exp_t;
  exp_t hist [QCA_LATENCY];

  function automatic exp_t expect_of(logic v, int n, int m);
    exp_t e;
    e.v = v;
    e.q = (m == 0) ? 2'd0 : 2'(n / m);
    e.f = (m != 0);
    return e;
  endfunction

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL cycle %0d %s: got %0d expected %0d", cycle, what, got, exp);
    end
  endtask

  task automatic step(logic v, int n, int m);
    exp_t e;
    logic a, b, c, d;
    in_valid = v;
    dividend = operand_t'(n);
    divisor  = operand_t'(m);
    #1;
    e = expect_of(v, n, m);
    check("gate_quotient", gate_quotient, e.q);
    check("gate_zero_flag", gate_zero_flag, e.f);
    {a, b} = 2'(n);
    {c, d} = 2'(m);
    if (m == 0 && gate_zero_flag == 1'b0) n_div0++;
    if (a & ~c & d)  n_acnd++;
    if (a & b & c)   n_abc++;
    if (b & ~c & d)  n_bcnd++;
    if (a & c & ~d)  n_acdn++;
    if (v && first_in < 0) first_in = cycle;
    @(posedge clk);
    #1;
    cycle++;
    for (int k = QCA_LATENCY - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = e;
    check("qca_valid", qca_valid, hist[QCA_LATENCY-1].v);
    if (hist[QCA_LATENCY-1].v) begin
      check("qca_quotient", qca_quotient, hist[QCA_LATENCY-1].q);
      check("qca_zero_flag", qca_zero_flag, hist[QCA_LATENCY-1].f);
    end
    if (qca_valid && first_out < 0) begin
      first_out = cycle;
      if (first_out - first_in == QCA_LATENCY) n_fill++;
    end
  endtask

  initial begin
    for (int k = 0; k < QCA_LATENCY; k++) hist[k] = '0;
    in_valid = 1'b0;
    dividend = '0;
    divisor  = '0;
    rst_n    = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    rst_n = 1'b1;
    for (int rep = 0; rep < 2; rep++)
      for (int n = 0; n < 4; n++)
        for (int m = 0; m < 4; m++) begin
          step(1'b1, n, m);
          // QCA outputs now belong to an older pair than the gate outputs.
          if (qca_valid && {qca_quotient, qca_zero_flag} != {gate_quotient, gate_zero_flag})
            n_delay_seen++;
        end
    for (int i = 0; i < 200; i++)
      step(1'b1, $urandom_range(0, 3), $urandom_range(0, 3));
    repeat (QCA_LATENCY) step(1'b0, 0, 0);

    $display("mechanisms: div_by_zero=%0d ac'd=%0d abc=%0d bc'd=%0d acd'=%0d pipeline_fill=%0d delay_visible=%0d",
             n_div0, n_acnd, n_abc, n_bcnd, n_acdn, n_fill, n_delay_seen);
    checks += 7;
    if (n_div0 == 0)       failures++;
    if (n_acnd == 0)       failures++;
    if (n_abc == 0)        failures++;
    if (n_bcnd == 0)       failures++;
    if (n_acdn == 0)       failures++;
    if (n_fill == 0)       failures++;
    if (n_delay_seen == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
