// ohr_add_mul: one-hot residue adder/multiplier for one modulus M.
//
// Operands and results are one-hot residues on M lines each. A classic
// one-hot adder is a barrel shifter: an M x M grid of switches, the switch
// at column i (operand a, "data") and row j (operand b, "shift") connecting
// to output line (i+j) mod M. A one-hot multiplier is the same grid with
// the switches wired to line (i*j) mod M instead. Because the operands are
// one-hot, exactly one switch of the grid conducts for any valid pair of
// inputs, so a single grid can serve both operations: each switch gets two
// output connections, one into the add-out lines and one into the
// multiply-out lines. The result is both sums and products from M*M
// switches, where two separate circuits would need 2*M*M.
//
// The grid is built from M*M ohr_cell instances; each output line is the
// OR of the drives of the cells wired to it, the gate-level form of the
// wired pass-transistor outputs. The modulus 5 default and the line
// routing follow the published modulus-5 circuit, and the structure holds
// for any M >= 2. WITH_SUB = 1 adds a third fan-out per switch for
// (a - b) mod M on sub_out; this is an extension for the three-operation
// case, off by default, in which case sub_out stays all zero.
//
// Interface: a, b one-hot (or all zero for "no operand"); add_out, mul_out
// and sub_out one-hot, all zero when either operand has no active line.
// Inputs with more than one active line are outside the code and give
// several active output lines; an assertion reports them in simulation.
//
// Timing: purely combinational, no clock or state. Results are valid one
// switch delay after the operands (zero cycles in a clocked system).
module ohr_add_mul #(
  parameter int unsigned M        = 5,    // modulus = number of lines per residue
  parameter bit          WITH_SUB = 1'b0  // also produce (a - b) mod M
) (
  input  logic [M-1:0] a,        // operand 1 (data), one-hot
  input  logic [M-1:0] b,        // operand 2 (shift), one-hot
  output logic [M-1:0] add_out,  // (a + b) mod M, one-hot
  output logic [M-1:0] mul_out,  // (a * b) mod M, one-hot
  output logic [M-1:0] sub_out   // (a - b) mod M, one-hot (WITH_SUB only)
);

  // Drive vectors of every switch, indexed [row j][column i].
  logic [M-1:0] add_drv [M][M];
  logic [M-1:0] mul_drv [M][M];
  logic [M-1:0] sub_drv [M][M];

  for (genvar j = 0; j < M; j++) begin : g_row
    for (genvar i = 0; i < M; i++) begin : g_col
      ohr_cell #(
        .M       (M),
        .I       (i),
        .J       (j),
        .WITH_SUB(WITH_SUB)
      ) u_cell (
        .a_i    (a[i]),
        .b_j    (b[j]),
        .add_drv(add_drv[j][i]),
        .mul_drv(mul_drv[j][i]),
        .sub_drv(sub_drv[j][i])
      );
    end
  end

  // Wired connection of the switch outputs on each line.
  always_comb begin
    add_out = '0;
    mul_out = '0;
    sub_out = '0;
    for (int j = 0; j < M; j++) begin
      for (int i = 0; i < M; i++) begin
        add_out |= add_drv[j][i];
        mul_out |= mul_drv[j][i];
        sub_out |= sub_drv[j][i];
      end
    end
  end

  // One-hot code rule: at most one active line per operand.
  always_comb begin
    assert ($onehot0(a)) else $error("ohr_add_mul: operand a is not one-hot");
    assert ($onehot0(b)) else $error("ohr_add_mul: operand b is not one-hot");
  end

endmodule
