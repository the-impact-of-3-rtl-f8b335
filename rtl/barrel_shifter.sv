// Logarithmic barrel shifter, WIDTH bits (64 by default), left or right.
//
// The shifter is a stack of log2(WIDTH) multiplexer levels. Level k looks at
// bit k of the shift amount: if it is clear every bit passes straight down,
// if it is set every bit takes the value 2**k positions to its right (left
// shift) or to its left (right shift). Levels are ordered from the shortest
// distance (1) to the longest (WIDTH/2), so the longest wires sit at the
// deepest level. Bits shifted in from outside the word are zero.
//
// Interface: data_in, shamt (log2(WIDTH) bits), shift_left (1 = left,
// 0 = right) in; data_out out. Purely combinational.
// The level structure and the left/right control follow the planar shifter
// diagram; zero fill (a logical shift) and the polarity of shift_left are
// this design's choices. The 3D version places odd and even bit columns on
// the two dies, which halves the wires but not the logic.
module barrel_shifter
  import arith_pkg::*;
#(
  parameter int unsigned WIDTH = DATA_W,
  localparam int unsigned SHW  = $clog2(WIDTH)
) (
  input  logic [WIDTH-1:0] data_in,
  input  logic [SHW-1:0]   shamt,
  input  logic             shift_left,
  output logic [WIDTH-1:0] data_out
);

  for (genvar k = 0; k < SHW; k++) begin : g_level
    localparam int unsigned D = 1 << k;
    logic [WIDTH-1:0] cur;  // word entering level k
    logic [WIDTH-1:0] nxt;  // word leaving it
    if (k == 0) begin : g_first
      assign cur = data_in;
    end else begin : g_chain
      assign cur = g_level[k-1].nxt;
    end
    for (genvar i = 0; i < WIDTH; i++) begin : g_mux
      logic from_lower;  // bit i-D, used by a left shift
      logic from_upper;  // bit i+D, used by a right shift
      if (i >= D) begin : g_lo
        assign from_lower = cur[i-D];
      end else begin : g_lo0
        assign from_lower = 1'b0;
      end
      if (i + D < WIDTH) begin : g_up
        assign from_upper = cur[i+D];
      end else begin : g_up0
        assign from_upper = 1'b0;
      end
      // Three-input multiplexer of level k, bit i.
      always_comb begin
        if (!shamt[k])       nxt[i] = cur[i];
        else if (shift_left) nxt[i] = from_lower;
        else                 nxt[i] = from_upper;
      end
    end
  end

  assign data_out = g_level[SHW-1].nxt;

endmodule
