// decoder_suite_top: top level of the decoder family, with each decoder
// brought out on its own pins so that all of them can be exercised at once.
//
//   a     -> y_n     : dec5to32, the 5:32 decoder as a tree of five 3:8
//                      decoders and four inverters (the main design)
//   b     -> yb_n    : dec5to32_fig3, the same function from four 3:8
//                      decoders whose enables decode the upper bits directly
//   c     -> yc_n    : dec4to16, the 4:16 tree of three 3:8 decoders
//   x,y,z -> d       : decoder3to8, the basic active-high AND-gate decoder
//   sel[2:0], g1, g2a_n, g2b_n -> ys_n : one stand-alone ac11138, so that its
//                      enable pins, unused inside the trees, are reachable
//
// All paths are combinational; there is no clock and no state.
module decoder_suite_top (
  input  logic [4:0]  a,
  output logic [31:0] y_n,
  input  logic [4:0]  b,
  output logic [31:0] yb_n,
  input  logic [3:0]  c,
  output logic [15:0] yc_n,
  input  logic        x,
  input  logic        y,
  input  logic        z,
  output logic [7:0]  d,
  input  logic [2:0]  sel,
  input  logic        g1,
  input  logic        g2a_n,
  input  logic        g2b_n,
  output logic [7:0]  ys_n
);
  dec5to32      u_dec5to32      (.a(a), .y_n(y_n));
  dec5to32_fig3 u_dec5to32_fig3 (.a(b), .y_n(yb_n));
  dec4to16      u_dec4to16      (.a(c), .y_n(yc_n));
  decoder3to8   u_decoder3to8   (.x(x), .y(y), .z(z), .d(d));
  ac11138       u_ac11138       (.a(sel[0]), .b(sel[1]), .c(sel[2]),
                                 .g1(g1), .g2a_n(g2a_n), .g2b_n(g2b_n),
                                 .y_n(ys_n));
endmodule
