// Brent-Kung parallel-prefix adder, WIDTH bits (64 by default).
//
// Bit cells form g = a & b and p = a ^ b, with the carry-in folded into bit 0.
// The carries are found in two passes over a shared tree of nodes:
//   * reduction pass, log2(WIDTH) levels: at level l (d = 2**l) every bit i
//     with (i+1) a multiple of 2d combines its span with the span ending at
//     i-d. Bit 2**k-1 ends up holding [2**k-1:0]; the others hold partial
//     spans. This is the binary tree of the carry-tree figure.
//   * distribution pass, log2(WIDTH)-1 levels: from the widest distance down,
//     at level l every bit i = 3d-1, 5d-1, ... combines its partial span with
//     the complete prefix ending at i-d, filling in the missing prefixes.
// Each node has low fan-out and the node count is about 2*WIDTH, at the cost
// of 2*log2(WIDTH)-1 node levels. Column i finally holds [i:0]; sums are
// p_i ^ c_i with c_0 = cin and c_i = G[i-1:0].
//
// Interface: a, b, cin in; sum, cout out. Purely combinational.
// The two passes follow the Brent-Kung scheme; the carry-in port is this
// design's choice. The 3D (two-die) placement does not change the logic.
module bk_adder
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

  pg_t              bit_pg [WIDTH];  // bit cells
  pg_t              pre    [WIDTH];  // after both passes: span [i:0]
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

  // Reduction pass, distance 1, 2, 4, ... WIDTH/2.
  for (genvar l = 0; l < LEVELS; l++) begin : g_up
    localparam int unsigned D = 1 << l;
    pg_t cur [WIDTH];
    pg_t nxt [WIDTH];
    if (l == 0) begin : g_first
      assign cur = bit_pg;
    end else begin : g_chain
      assign cur = g_up[l-1].nxt;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if (((i + 1) % (2 * D)) == 0) begin : g_node
        pg_node u_node (.hi(cur[i]), .lo(cur[i-D]), .out(nxt[i]));
      end else begin : g_pass
        assign nxt[i] = cur[i];
      end
    end
  end

  // Distribution pass, distance WIDTH/4 down to 1. Block g_down[l] works at
  // distance 2**(l-1).
  for (genvar l = LEVELS - 1; l >= 1; l--) begin : g_down
    localparam int unsigned D = 1 << (l - 1);
    pg_t cur [WIDTH];
    pg_t nxt [WIDTH];
    if (l == LEVELS - 1) begin : g_first
      assign cur = g_up[LEVELS-1].nxt;
    end else begin : g_chain
      assign cur = g_down[l+1].nxt;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_col
      if ((((i + 1) % (2 * D)) == D) && (i > D)) begin : g_node
        pg_node u_node (.hi(cur[i]), .lo(cur[i-D]), .out(nxt[i]));
      end else begin : g_pass
        assign nxt[i] = cur[i];
      end
    end
  end

  if (LEVELS > 1) begin : g_pre_down
    assign pre = g_down[1].nxt;
  end else begin : g_pre_up
    assign pre = g_up[0].nxt;
  end

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
