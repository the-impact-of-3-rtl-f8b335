// Kogge-Stone parallel-prefix adder, WIDTH bits (64 by default).
//
// Bit cells form g = a & b and p = a ^ b; the carry-in is folded into bit 0
// so that the prefix tree delivers, for every bit i, the carry out of bit i.
// The tree has log2(WIDTH) levels. At level l (distance d = 2**l) every
// bit i >= d combines its running span with the span that ends d bits below
// it, so every node drives exactly two wires (fan-out two) and each level
// doubles the span of every column. Columns below d simply pass their value
// down. After the last level every column holds the span [i:0]; sums are
// p_i ^ c_i with c_0 = cin and c_i = G[i-1:0].
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// Tree shape follows the Kogge-Stone carry tree; the carry-in port and the
// way it enters bit 0 are this design's choice. The two-die placement of the
// 3D version (odd bits on one die, even bits on the other) is a physical
// floorplan and leaves the logic unchanged.
module ks_adder
  import arith_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W
) (
  input  logic [WIDTH-1:0] a,
  input  logic [WIDTH-1:0] b,
  input  logic             cin,
  output logic [WIDTH-1:0] sum,
  output logic             cout
);

  localparam int unsigned LEVELS = $clog2(WIDTH);

  pg_t             bit_pg [WIDTH];   // level 0: bit cells
  pg_t             pre    [WIDTH];   // last level: span [i:0]
  logic [WIDTH-1:0] p_bit;
  logic [WIDTH-1:0] carry;   // carry into each bit

  for (genvar i = 0; i < WIDTH; i++) begin : g_bit
    assign p_bit[i] = a[i] ^ b[i];
    if (i == 0) begin : g_cin
      assign bit_pg[i].g = (a[i] & b[i]) | (p_bit[i] & cin);
    end else begin : g_plain
      assign bit_pg[i].g = a[i] & b[i];
    end
    assign bit_pg[i].p = p_bit[i];
  end

  for (genvar l = 0; l < LEVELS; l++) begin : g_level
    pg_t cur [WIDTH];  // spans entering this level
    pg_t nxt [WIDTH];  // spans leaving it
    if (l == 0) begin : g_first
      assign cur = bit_pg;
    end else begin : g_chain
      assign cur = g_level[l-1].nxt;
    end
    localparam int unsigned D = 1 << l;
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if (i >= D) begin : g_node
        pg_node u_node (.hi(cur[i]), .lo(cur[i-D]), .out(nxt[i]));
      end else begin : g_pass
        assign nxt[i] = cur[i];
      end
    end
  end

  assign pre = g_level[LEVELS-1].nxt;

  for (genvar i = 0; i < WIDTH; i++) begin : g_sum
    if (i == 0) begin : g_c0
      assign carry[i] = cin;
    end else begin : g_ci
      assign carry[i] = pre[i-1].g;
    end
  end

  assign sum  = p_bit ^ carry;
  assign cout = pre[WIDTH-1].g;

endmodule
