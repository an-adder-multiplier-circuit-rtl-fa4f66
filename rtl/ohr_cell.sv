// ohr_cell: one switch of the one-hot adder/multiplier grid.
//
// In the circuit this is a single pass transistor: line a_i of operand a
// drives its gate, line b_j of operand b its drain, and its source is
// wired to two output lines at once, add-out line (I+J) mod M and
// multiply-out line (I*J) mod M. When both a_i and b_j are high the
// transistor conducts and raises both lines; otherwise it leaves them alone.
//
// At gate level the switch is the AND of a_i and b_j, placed on the two
// bits of its drive vectors that match its output lines; every other bit
// is 0. The enclosing grid ORs the drive vectors of all its cells, which
// models the wired connection of many switch outputs on one line (lines
// that no conducting switch drives read 0, which assumes the lines are
// pulled low). With WITH_SUB = 1 the switch also drives subtract-out line
// (I-J) mod M: a third fan-out of the same switch, this design's own
// extension for the three-operation case; it is off by default, as the
// two-output circuit is the main one.
//
// Purely combinational: outputs follow inputs with no clock.
module ohr_cell
  import ohr_pkg::*;
#(
  parameter int unsigned M        = 5,    // modulus (number of lines)
  parameter int unsigned I        = 0,    // column: line index of operand a
  parameter int unsigned J        = 0,    // row: line index of operand b
  parameter bit          WITH_SUB = 1'b0  // also drive a subtract-out line
) (
  input  logic         a_i,      // gate: line I of operand a
  input  logic         b_j,      // drain: line J of operand b
  output logic [M-1:0] add_drv,  // drive onto add-out lines
  output logic [M-1:0] mul_drv,  // drive onto multiply-out lines
  output logic [M-1:0] sub_drv   // drive onto subtract-out lines
);

  localparam int unsigned ADD_LINE = add_line(I, J, M);
  localparam int unsigned MUL_LINE = mul_line(I, J, M);
  localparam int unsigned SUB_LINE = sub_line(I, J, M);

  logic on;  // the switch conducts
  assign on = a_i & b_j;

  always_comb begin
    add_drv           = '0;
    mul_drv           = '0;
    sub_drv           = '0;
    add_drv[ADD_LINE] = on;
    mul_drv[MUL_LINE] = on;
    if (WITH_SUB) sub_drv[SUB_LINE] = on;
  end

  initial begin
    assert (M >= 2) else $error("ohr_cell: modulus M must be at least 2");
    assert (I < M && J < M) else $error("ohr_cell: I and J must be below M");
  end

endmodule
