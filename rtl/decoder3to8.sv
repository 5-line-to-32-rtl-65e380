// decoder3to8: basic active-high binary-to-octal (3-line to 8-line) decoder.
//
// Each of the three inputs is complemented by an inverter; eight 3-input AND
// gates then form the eight minterms, so exactly one output is 1 for every
// input code: d[0] = x'y'z', d[1] = x'y'z, ..., d[7] = xyz. X is the most
// significant input bit and Z the least significant, as in the decoder's
// truth table. This is the textbook decoder without an enable input; the
// enable belongs to the 74AC11138 variant (see ac11138).
//
// Ports: x, y, z (inputs, x most significant), d[7:0] (outputs, active high).
// Timing: combinational, one inverter and one AND gate deep.
module decoder3to8 (
  input  logic       x,
  input  logic       y,
  input  logic       z,
  output logic [7:0] d
);
  logic x_n, y_n, z_n;

  inv_cell u_inv_x (.a(x), .y(x_n));
  inv_cell u_inv_y (.a(y), .y(y_n));
  inv_cell u_inv_z (.a(z), .y(z_n));

  // Minterm i takes the true input where bit of i is 1, the complement where 0.
  for (genvar i = 0; i < 8; i++) begin : g_minterm
    and3_cell u_and (
      .a(i[2] ? x : x_n),
      .b(i[1] ? y : y_n),
      .c(i[0] ? z : z_n),
      .y(d[i])
    );
  end
endmodule
