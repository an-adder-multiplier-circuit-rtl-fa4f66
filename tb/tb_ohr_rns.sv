// tb_ohr_rns: the adder/multiplier at other moduli, with the subtract
// fan-out, and used as the channels of a residue number system.
//
// Part 1 checks single channels exhaustively over all one-hot operand
// pairs for moduli 2, 3, 5 (with subtraction), 7 (with subtraction), 8
// and 16, against integer arithmetic done in the testbench.
//
// Part 2 builds a three-channel residue number system with the pairwise
// prime moduli {3, 5, 7}, dynamic range M = 105. For every pair of
// integers X, Y in [0, 105) it converts both to one-hot residues, lets the
// three channels work independently, and rebuilds the sum, product and
// difference from the output residues with the Chinese remainder theorem:
//   Z = < sum_i < z_i * N_i >_{m_i} * M_i >_M,  M_i = M / m_i,
//   N_i = < M_i^{-1} >_{m_i}.
// Each rebuilt value must equal (X o Y) mod 105. All outputs are
// combinational and are checked in the cycle the operands are applied.
// A watchdog ends a hung run.
module tb_ohr_rns;

  logic clk;
  initial clk = 1'b0;
  always #5 clk = ~clk;

  int checks   = 0;
  int failures = 0;

  // One-hot helpers (the conversion to and from one-hot is not part of
  // the design under test).
  function automatic logic [31:0] oh(int unsigned v);
    return 32'd1 << v;
  endfunction

  function automatic int dec(logic [31:0] v);
    int n = 0;
    int r = -1;
    for (int k = 0; k < 32; k++)
      if (v[k]) begin
        n++;
        r = k;
      end
    return (n == 1) ? r : -1;
  endfunction

  // ---------------------------------------------------------------- part 1
  logic [31:0] a2, b2, a3, b3, a5, b5, a7, b7, a8, b8, a16, b16;
  logic [1:0]  add2, mul2, sub2;
  logic [2:0]  add3, mul3, sub3;
  logic [4:0]  add5, mul5, sub5;
  logic [6:0]  add7, mul7, sub7;
  logic [7:0]  add8, mul8, sub8;
  logic [15:0] add16, mul16, sub16;

  ohr_add_mul #(.M(2))                   u2  (.a(a2[1:0]),   .b(b2[1:0]),   .add_out(add2),  .mul_out(mul2),  .sub_out(sub2));
  ohr_add_mul #(.M(3))                   u3  (.a(a3[2:0]),   .b(b3[2:0]),   .add_out(add3),  .mul_out(mul3),  .sub_out(sub3));
  ohr_add_mul #(.M(5), .WITH_SUB(1'b1))  u5  (.a(a5[4:0]),   .b(b5[4:0]),   .add_out(add5),  .mul_out(mul5),  .sub_out(sub5));
  ohr_add_mul #(.M(7), .WITH_SUB(1'b1))  u7  (.a(a7[6:0]),   .b(b7[6:0]),   .add_out(add7),  .mul_out(mul7),  .sub_out(sub7));
  ohr_add_mul #(.M(8))                   u8  (.a(a8[7:0]),   .b(b8[7:0]),   .add_out(add8),  .mul_out(mul8),  .sub_out(sub8));
  ohr_add_mul #(.M(16))                  u16 (.a(a16[15:0]), .b(b16[15:0]), .add_out(add16), .mul_out(mul16), .sub_out(sub16));

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  task automatic check_zero(string what, logic [31:0] got);
    checks++;
    if (got != 0) begin
      failures++;
      $display("FAIL %s: got %b expected all zero", what, got);
    end
  endtask

  // Drives all six channels with residues x mod m, y mod m of their own m.
  task automatic drive_all(int x, int y);
    a2  = oh(x % 2);  b2  = oh(y % 2);
    a3  = oh(x % 3);  b3  = oh(y % 3);
    a5  = oh(x % 5);  b5  = oh(y % 5);
    a7  = oh(x % 7);  b7  = oh(y % 7);
    a8  = oh(x % 8);  b8  = oh(y % 8);
    a16 = oh(x % 16); b16 = oh(y % 16);
  endtask

  // ---------------------------------------------------------------- part 2
  localparam int RANGE = 3 * 5 * 7;
  localparam int M_1 = RANGE / 3, M_2 = RANGE / 5, M_3 = RANGE / 7;  // 35, 21, 15
  localparam int N_1 = 2, N_2 = 1, N_3 = 1;  // inverses: 35*2=70=1 mod 3, 21=1 mod 5, 15=1 mod 7

  function automatic int crt(int z1, int z2, int z3);
    return ((((z1 * N_1) % 3) * M_1) + (((z2 * N_2) % 5) * M_2) + (((z3 * N_3) % 7) * M_3)) % RANGE;
  endfunction

  int n_add_wrap = 0, n_mul_reduce = 0, n_sub_borrow = 0;

  initial begin
    drive_all(0, 0);
    @(negedge clk);
    // Part 1: exhaustive single channels.
    for (int x = 0; x < 16; x++)
      for (int y = 0; y < 16; y++) begin
        drive_all(x, y);
        #1;
        if (x < 2 && y < 2) begin
          check_int($sformatf("m2 add %0d %0d", x, y), dec(32'(add2)), (x + y) % 2);
          check_int($sformatf("m2 mul %0d %0d", x, y), dec(32'(mul2)), (x * y) % 2);
          check_zero($sformatf("m2 sub off %0d %0d", x, y), 32'(sub2));
        end
        if (x < 3 && y < 3) begin
          check_int($sformatf("m3 add %0d %0d", x, y), dec(32'(add3)), (x + y) % 3);
          check_int($sformatf("m3 mul %0d %0d", x, y), dec(32'(mul3)), (x * y) % 3);
        end
        if (x < 5 && y < 5) begin
          check_int($sformatf("m5 add %0d %0d", x, y), dec(32'(add5)), (x + y) % 5);
          check_int($sformatf("m5 mul %0d %0d", x, y), dec(32'(mul5)), (x * y) % 5);
          check_int($sformatf("m5 sub %0d %0d", x, y), dec(32'(sub5)), (x - y + 5) % 5);
          if (x < y) n_sub_borrow++;
        end
        if (x < 7 && y < 7) begin
          check_int($sformatf("m7 add %0d %0d", x, y), dec(32'(add7)), (x + y) % 7);
          check_int($sformatf("m7 mul %0d %0d", x, y), dec(32'(mul7)), (x * y) % 7);
          check_int($sformatf("m7 sub %0d %0d", x, y), dec(32'(sub7)), (x - y + 7) % 7);
        end
        if (x < 8 && y < 8) begin
          check_int($sformatf("m8 add %0d %0d", x, y), dec(32'(add8)), (x + y) % 8);
          check_int($sformatf("m8 mul %0d %0d", x, y), dec(32'(mul8)), (x * y) % 8);
        end
        check_int($sformatf("m16 add %0d %0d", x, y), dec(32'(add16)), (x + y) % 16);
        check_int($sformatf("m16 mul %0d %0d", x, y), dec(32'(mul16)), (x * y) % 16);
        check_zero($sformatf("m16 sub off %0d %0d", x, y), 32'(sub16));
        @(negedge clk);
      end

    // Part 2: RNS {3, 5, 7} over the whole dynamic range.
    for (int x = 0; x < RANGE; x++)
      for (int y = 0; y < RANGE; y++) begin
        drive_all(x, y);
        #1;
        check_int($sformatf("rns add %0d %0d", x, y),
                  crt(dec(32'(add3)), dec(32'(add5)), dec(32'(add7))), (x + y) % RANGE);
        check_int($sformatf("rns mul %0d %0d", x, y),
                  crt(dec(32'(mul3)), dec(32'(mul5)), dec(32'(mul7))), (x * y) % RANGE);
        // Channel 3 has no subtract output here, so its residue is computed.
        check_int($sformatf("rns sub %0d %0d", x, y),
                  crt((x - y + 3 * RANGE) % 3, dec(32'(sub5)), dec(32'(sub7))),
                  (x - y + RANGE) % RANGE);
        if (x + y >= RANGE) n_add_wrap++;
        if (x * y >= RANGE) n_mul_reduce++;
        @(negedge clk);
      end

    if (n_add_wrap == 0)   begin failures++; $display("FAIL no RNS sum past the range"); end
    if (n_mul_reduce == 0) begin failures++; $display("FAIL no RNS product past the range"); end
    if (n_sub_borrow == 0) begin failures++; $display("FAIL no negative difference"); end
    $display("mechanisms: rns_add_wrap=%0d rns_mul_reduce=%0d sub_borrow=%0d",
             n_add_wrap, n_mul_reduce, n_sub_borrow);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Watchdog.
  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
