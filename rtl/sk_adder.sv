// Sklansky (divide-and-conquer) parallel-prefix adder, WIDTH bits (64 by
// default).
//
// Bit cells form g = a & b and p = a ^ b, with the carry-in folded into bit 0.
// The tree has log2(WIDTH) levels. At level l the bits are split into blocks
// of 2**(l+1); every bit in the upper half of a block combines its span with
// the span held by the top bit of the lower half, which already covers the
// block's lower half down to bit 0. That one node therefore drives 2**l nodes:
// fan-out and wire length double at each level, while the depth stays at the
// minimum log2(WIDTH). After the last level column i holds span [i:0];
// sums are p_i ^ c_i with c_0 = cin and c_i = G[i-1:0].
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// Tree shape follows the Sklansky carry tree; the carry-in port is this
// design's choice. The 3D (two-die) placement does not change the logic.
module sk_adder
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

  pg_t              bit_pg [WIDTH];  // level 0: bit cells
  pg_t              pre    [WIDTH];  // last level: span [i:0]
  logic [WIDTH-1:0] p_bit;
  logic [WIDTH-1:0] carry;

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
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      // Top bit of the lower half of the block that holds bit i.
      localparam int unsigned SRC = ((i >> l) << l) - 1;
      if (((i >> l) & 1) == 1) begin : g_node
        pg_node u_node (.hi(cur[i]), .lo(cur[SRC]), .out(nxt[i]));
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
