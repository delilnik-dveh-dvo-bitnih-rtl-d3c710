// tb_qca_divider - self-checking test of the clocked QCA divider model.
//
// After reset, streams one operand pair per clock: first all 16 pairs in
// order, then 300 random pairs with in_valid toggled at random. Every pair
// sent is queued with its expected result (integer division, quotient 0
// and flag 0 for a zero divisor); each clock the output is compared with
// the entry sent exactly QCA_LATENCY (4) clocks earlier, including
// out_valid, so both function and delay are checked. A second reset in the
// middle checks that it clears the pipeline. A watchdog bounds the run.
module tb_qca_divider;
  import div2_pkg::*;

  logic       clk = 1'b0;
  logic       rst_n;
  logic       in_valid;
  operand_t   dividend, divisor;
  logic       out_valid;
  logic [1:0] quotient;
  logic       zero_flag;
  int checks = 0, failures = 0;

  qca_divider dut (.clk, .rst_n, .in_valid, .dividend, .divisor,
                   .out_valid, .quotient, .zero_flag);

  always #5 clk = ~clk;

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Expected output history: entry k is what the outputs must show k clocks
  // after the pair was sampled.
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

  task automatic drive(logic v, int n, int m);
    in_valid = v;
    dividend = operand_t'(n);
    divisor  = operand_t'(m);
    @(posedge clk);
    #1;
    // Shift history: the pair just sampled enters at index 0.
    for (int k = QCA_LATENCY - 1; k > 0; k--) hist[k] = hist[k-1];
    hist[0] = rst_n ? expect_of(v, n, m) : '0;
    if (!rst_n) for (int k = 0; k < QCA_LATENCY; k++) hist[k] = '0;
    checks++;
    if (out_valid !== hist[QCA_LATENCY-1].v) begin
      failures++;
      $display("FAIL t=%0t out_valid %0b expected %0b", $time, out_valid, hist[QCA_LATENCY-1].v);
    end
    if (hist[QCA_LATENCY-1].v || !rst_n) begin
      checks++;
      if (quotient !== hist[QCA_LATENCY-1].q || zero_flag !== hist[QCA_LATENCY-1].f) begin
        failures++;
        $display("FAIL t=%0t q=%0d f=%0b expected q=%0d f=%0b", $time,
                 quotient, zero_flag, hist[QCA_LATENCY-1].q, hist[QCA_LATENCY-1].f);
      end
    end
  endtask

  initial begin
    for (int k = 0; k < QCA_LATENCY; k++) hist[k] = '0;
    rst_n = 1'b0;
    drive(1'b1, 3, 1);
    drive(1'b1, 3, 1);
    rst_n = 1'b1;
    for (int n = 0; n < 4; n++)
      for (int m = 0; m < 4; m++)
        drive(1'b1, n, m);
    for (int i = 0; i < 300; i++) begin
      if (i == 150) begin
        rst_n = 1'b0;
        drive(1'b1, 3, 1);
        rst_n = 1'b1;
      end
      drive(1'($urandom_range(0, 3) != 0), $urandom_range(0, 3), $urandom_range(0, 3));
    end
    repeat (QCA_LATENCY) drive(1'b0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
