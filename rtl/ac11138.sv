// ac11138: 3-line to 8-line decoder/demultiplexer with the function and pin
// set of the 74AC11138 (a 74x138-type part).
//
// Select inputs A, B, C form the code C*4 + B*2 + A. The three enable inputs
// are combined into one internal enable: G1 must be high and both G2A_n and
// G2B_n low. G2A_n and G2B_n are inverted and ANDed with G1 in a 3-input AND.
// Three inverters give the complemented select bits, and eight 4-input NAND
// gates, each taking the internal enable and the true or complemented form of
// A, B and C, drive the eight outputs. The selected output goes low; with the
// part disabled every output is high. Used as a demultiplexer, the data goes
// into one enable pin and appears, inverted or not, on the selected line.
//
// Package pin numbers of the real part, for reference: A=15, B=14, C=13,
// G2B_n=9, G2A_n=10, G1=11, Y0=16, Y1..Y3=1..3, Y4..Y7=5..8.
//
// Ports: a, b, c (select), g1, g2a_n, g2b_n (enables), y_n[7:0] (outputs,
// active low). Timing: combinational; the enable path is inverter + AND +
// NAND deep, the select path inverter + NAND. Supply pins are not modelled.
module ac11138 (
  input  logic       a,
  input  logic       b,
  input  logic       c,
  input  logic       g1,
  input  logic       g2a_n,
  input  logic       g2b_n,
  output logic [7:0] y_n
);
  logic a_n, b_n, c_n;
  logic g2a, g2b;
  logic en;

  inv_cell u_inv_a   (.a(a),     .y(a_n));
  inv_cell u_inv_b   (.a(b),     .y(b_n));
  inv_cell u_inv_c   (.a(c),     .y(c_n));
  inv_cell u_inv_g2a (.a(g2a_n), .y(g2a));
  inv_cell u_inv_g2b (.a(g2b_n), .y(g2b));

  and3_cell u_enable (.a(g2a), .b(g2b), .c(g1), .y(en));

  for (genvar i = 0; i < 8; i++) begin : g_out
    nand4_cell u_nand (
      .a(i[2] ? c : c_n),
      .b(i[1] ? b : b_n),
      .c(i[0] ? a : a_n),
      .d(en),
      .y(y_n[i])
    );
  end

  // At most one output line is ever active.
  always_comb assert ($countones(~y_n) <= 1)
    else $error("ac11138: more than one output active, y_n=%b", y_n);
endmodule
