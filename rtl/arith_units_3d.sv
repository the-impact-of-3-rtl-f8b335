// Arithmetic functional units of the two-die (3D) study, side by side.
//
// The top holds the four 64-bit units that the study compares: a Brent-Kung,
// a Sklansky and a Kogge-Stone adder, which are limited mainly by gate delay,
// and a logarithmic barrel shifter, which is limited mainly by wire delay.
// The three adders share the operand bus (a, b, cin) and each drives its own
// result, so their sums can be compared directly; the shifter takes a as its
// data operand. In the 3D form every unit is bit-sliced: odd bit columns sit
// on one die and even bit columns on the other, joined by die-to-die vias.
// That is a floorplan decision; the logic here is the same for 2D and 3D.
//
// Interface: a, b, cin, shamt, shift_left in; one sum/cout pair per adder
// and shift_out. Purely combinational, no clock or reset.
// Sharing the operand bus among the units is this design's choice.
module arith_units_3d
  import arith_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  localparam int unsigned SHW  = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  input  logic [SHW-1:0]   shamt,
  input  logic             shift_left,
  output logic [WIDTH-1:0] bk_sum,
  output logic             bk_cout,
  output logic [WIDTH-1:0] sk_sum,
  output logic             sk_cout,
  output logic [WIDTH-1:0] ks_sum,
  output logic             ks_cout,
  output logic [WIDTH-1:0] shift_out
);

  bk_adder #(.WIDTH(WIDTH)) u_bk (
    .a(a), .b(b), .cin(cin), .sum(bk_sum), .cout(bk_cout)
  );

  sk_adder #(.WIDTH(WIDTH)) u_sk (
    .a(a), .b(b), .cin(cin), .sum(sk_sum), .cout(sk_cout)
  );

  ks_adder #(.WIDTH(WIDTH)) u_ks (
    .a(a), .b(b), .cin(cin), .sum(ks_sum), .cout(ks_cout)
  );

  barrel_shifter #(.WIDTH(WIDTH)) u_shift (
    .data_in(a), .shamt(shamt), .shift_left(shift_left), .data_out(shift_out)
  );

endmodule
