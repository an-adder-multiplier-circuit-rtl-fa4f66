// tb_ohr_cell: self-checking test of the grid switch, ohr_cell.
//
// Builds all 25 switches of a modulus-5 grid (with the subtract fan-out
// enabled) and all 49 of a modulus-7 grid, and for each switch applies
// the four combinations of its two input lines. A switch must drive
// nothing unless both lines are high, and then exactly one add line,
// one multiply line and one subtract line, whose indices the testbench
// works out from its own arithmetic on the switch position. The cell is
// combinational, so each result is checked in the same clock cycle the
// inputs change. A watchdog ends the run if it hangs.
module tb_ohr_cell;

  localparam int unsigned M5 = 5;
  localparam int unsigned M7 = 7;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  logic a_i = 1'b0;
  logic b_j = 1'b0;

  logic [M5-1:0] add5 [M5][M5];
  logic [M5-1:0] mul5 [M5][M5];
  logic [M5-1:0] sub5 [M5][M5];
  logic [M7-1:0] add7 [M7][M7];
  logic [M7-1:0] mul7 [M7][M7];
  logic [M7-1:0] sub7 [M7][M7];

  for (genvar j = 0; j < M5; j++) begin : g5r
    for (genvar i = 0; i < M5; i++) begin : g5c
      ohr_cell #(.M(M5), .I(i), .J(j), .WITH_SUB(1'b1)) dut (
        .a_i(a_i), .b_j(b_j),
        .add_drv(add5[j][i]), .mul_drv(mul5[j][i]), .sub_drv(sub5[j][i]));
    end
  end

  for (genvar j = 0; j < M7; j++) begin : g7r
    for (genvar i = 0; i < M7; i++) begin : g7c
      ohr_cell #(.M(M7), .I(i), .J(j), .WITH_SUB(1'b1)) dut (
        .a_i(a_i), .b_j(b_j),
        .add_drv(add7[j][i]), .mul_drv(mul7[j][i]), .sub_drv(sub7[j][i]));
    end
  end

  // One-hot vector with line k set, width 32 (callers truncate).
  function automatic logic [31:0] line(int unsigned k);
    return 32'd1 << k;
  endfunction

  task automatic check(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %b expected %b", what, got, exp);
    end
  endtask

  initial begin
    @(negedge clk);
    for (int c = 0; c < 4; c++) begin
      a_i = c[0];
      b_j = c[1];
      #1;
      for (int j = 0; j < M5; j++)
        for (int i = 0; i < M5; i++) begin
          logic on;
          on = a_i & b_j;
          check($sformatf("m5 add i=%0d j=%0d a=%b b=%b", i, j, a_i, b_j), 32'(add5[j][i]),
                on ? 32'(M5'(line((i + j) % M5))) : 32'd0);
          check($sformatf("m5 mul i=%0d j=%0d a=%b b=%b", i, j, a_i, b_j), 32'(mul5[j][i]),
                on ? 32'(M5'(line((i * j) % M5))) : 32'd0);
          check($sformatf("m5 sub i=%0d j=%0d a=%b b=%b", i, j, a_i, b_j), 32'(sub5[j][i]),
                on ? 32'(M5'(line((i - j + M5) % M5))) : 32'd0);
        end
      for (int j = 0; j < M7; j++)
        for (int i = 0; i < M7; i++) begin
          logic on;
          on = a_i & b_j;
          check($sformatf("m7 add i=%0d j=%0d a=%b b=%b", i, j, a_i, b_j), 32'(add7[j][i]),
                on ? 32'(M7'(line((i + j) % M7))) : 32'd0);
          check($sformatf("m7 mul i=%0d j=%0d a=%b b=%b", i, j, a_i, b_j), 32'(mul7[j][i]),
                on ? 32'(M7'(line((i * j) % M7))) : 32'd0);
          check($sformatf("m7 sub i=%0d j=%0d a=%b b=%b", i, j, a_i, b_j), 32'(sub7[j][i]),
                on ? 32'(M7'(line((i - j + M7) % M7))) : 32'd0);
        end
      @(negedge clk);
    end
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
