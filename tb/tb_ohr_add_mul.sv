// tb_ohr_add_mul: end-to-end test of the adder/multiplier at its default
// size (modulus 5, two outputs), with no parameter overrides.
//
// Applies every pair of one-hot operands, 25 pairs, plus the four ways an
// operand can be absent (all lines low), and compares add_out and mul_out
// against a reference table typed in from the printed modulus-5 switch
// labels (multiply line / add line of each switch), not computed from the
// design's own formula. The same table is then cross-checked against
// plain integer arithmetic. The circuit is combinational and its latency
// is a single switch, so every result is checked within the same clock
// cycle its operands are applied, before the next edge.
//
// Mechanisms counted, each of which must occur at least once: every one
// of the 25 switches conducting, an addition that wraps past the modulus,
// a multiplication reduced by the modulus, a zero product, and the idle
// case of a missing operand. A watchdog ends a hung run.
module tb_ohr_add_mul;

  localparam int M = 5;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic [M-1:0] a = '0;
  logic [M-1:0] b = '0;
  logic [M-1:0] add_out, mul_out, sub_out;

  ohr_add_mul dut (.a(a), .b(b), .add_out(add_out), .mul_out(mul_out), .sub_out(sub_out));

  // Printed labels of the modulus-5 adder/multiplier grid, row j (operand b)
  // by column i (operand a), written column 4 down to column 0 as drawn.
  // Each entry is {multiply line, add line}.
  int fig_mul [M][M];
  int fig_add [M][M];
  initial begin
    // row 0:  0/4 0/3 0/2 0/1 0/0
    fig_mul[0] = '{0, 0, 0, 0, 0};  fig_add[0] = '{4, 3, 2, 1, 0};
    // row 1:  4/0 3/4 2/3 1/2 0/1
    fig_mul[1] = '{4, 3, 2, 1, 0};  fig_add[1] = '{0, 4, 3, 2, 1};
    // row 2:  3/1 1/0 4/4 2/3 0/2
    fig_mul[2] = '{3, 1, 4, 2, 0};  fig_add[2] = '{1, 0, 4, 3, 2};
    // row 3:  2/2 4/1 1/0 3/4 0/3
    fig_mul[3] = '{2, 4, 1, 3, 0};  fig_add[3] = '{2, 1, 0, 4, 3};
    // row 4:  1/3 2/2 3/1 4/0 0/4
    fig_mul[4] = '{1, 2, 3, 4, 0};  fig_add[4] = '{3, 2, 1, 0, 4};
  end

  // Column i of the table: entries are listed from column M-1 down to 0,
  // and an unpacked '{...} fills index 0 first.
  function automatic int col(int i);
    return M - 1 - i;
  endfunction

  task automatic check(string what, logic [M-1:0] got, logic [M-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  int n_switch [M][M];
  int n_add_wrap = 0, n_mul_reduce = 0, n_mul_zero = 0, n_idle = 0;

  initial begin
    #1;
    // The printed table must agree with modular arithmetic.
    for (int j = 0; j < M; j++)
      for (int i = 0; i < M; i++) begin
        checks++;
        if (fig_add[j][col(i)] != (i + j) % M || fig_mul[j][col(i)] != (i * j) % M) begin
          failures++;
          $display("FAIL reference table entry i=%0d j=%0d", i, j);
        end
        n_switch[j][i] = 0;
      end

    @(negedge clk);
    for (int j = 0; j < M; j++)
      for (int i = 0; i < M; i++) begin
        a = M'(1) << i;
        b = M'(1) << j;
        #1;  // same cycle: one switch of delay only
        check($sformatf("add a=%0d b=%0d", i, j), add_out, M'(1) << fig_add[j][col(i)]);
        check($sformatf("mul a=%0d b=%0d", i, j), mul_out, M'(1) << fig_mul[j][col(i)]);
        check($sformatf("sub a=%0d b=%0d (off)", i, j), sub_out, '0);
        if (add_out == (M'(1) << fig_add[j][col(i)]) && mul_out == (M'(1) << fig_mul[j][col(i)]))
          n_switch[j][i]++;
        if (i + j >= M)          n_add_wrap++;
        if (i * j >= M)          n_mul_reduce++;
        if ((i * j) % M == 0)    n_mul_zero++;
        @(negedge clk);
      end

    // Missing operands: no switch conducts, every output line stays low.
    for (int k = 0; k < 4; k++) begin
      a = (k == 0 || k == 2) ? '0 : M'(1) << (k % M);
      b = (k == 1 || k == 2) ? '0 : M'(1) << ((k + 2) % M);
      if (k == 3) a = '0;
      #1;
      check($sformatf("idle add k=%0d", k), add_out, '0);
      check($sformatf("idle mul k=%0d", k), mul_out, '0);
      n_idle++;
      @(negedge clk);
    end

    // Worked example: line 2 of input 1 and line 3 of input 2 give add
    // line 0 and multiply line 1.
    a = M'(1) << 2;
    b = M'(1) << 3;
    #1;
    check("example add 2+3", add_out, M'(1) << 0);
    check("example mul 2*3", mul_out, M'(1) << 1);

    for (int j = 0; j < M; j++)
      for (int i = 0; i < M; i++)
        if (n_switch[j][i] == 0) begin
          failures++;
          $display("FAIL switch i=%0d j=%0d never conducted correctly", i, j);
        end
    if (n_add_wrap == 0)   begin failures++; $display("FAIL no wrapping addition"); end
    if (n_mul_reduce == 0) begin failures++; $display("FAIL no reduced product"); end
    if (n_mul_zero == 0)   begin failures++; $display("FAIL no zero product"); end
    if (n_idle == 0)       begin failures++; $display("FAIL no idle case"); end
    $display("mechanisms: add_wrap=%0d mul_reduce=%0d mul_zero=%0d idle=%0d switches=%0d",
             n_add_wrap, n_mul_reduce, n_mul_zero, n_idle, M * M);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
