// dec5to32_fig3: 5-line to 32-line decoder from four 3:8 decoders (ac11138)
// and a single inverter, the classic application of a '138-type part.
//
// No first decoding stage is needed: the three enable inputs of each decoder
// already form a small AND of a3 and a4 with either polarity.
//   decoder 0 (outputs 0..7):   G1 = VCC, G2A_n = a3,  G2B_n = a4   -> a4a3 = 00
//   decoder 1 (outputs 8..15):  G1 = a3,  G2A_n = a4,  G2B_n = GND  -> a4a3 = 01
//   decoder 2 (outputs 16..23): G1 = a4,  G2A_n = a3,  G2B_n = GND  -> a4a3 = 10
//   decoder 3 (outputs 24..31): G1 = a3,  G2A_n = ~a4, G2B_n = GND  -> a4a3 = 11
// The inverter produces ~a4 for decoder 3. All four decode a0, a1, a2 on their
// A, B, C inputs (weights 1, 2, 4).
//
// Ports: a[4:0] (address, a[0] least significant), y_n[31:0] (active low,
// y_n[i] low exactly when a == i). Timing: combinational, one level of
// decoders, plus the inverter on the a4 path of decoder 3.
module dec5to32_fig3 (
  input  logic [4:0]  a,
  output logic [31:0] y_n
);
  logic a4_n;

  inv_cell u_inv_a4 (.a(a[4]), .y(a4_n));

  ac11138 u_dec0 (.a(a[0]), .b(a[1]), .c(a[2]),
                  .g1(1'b1), .g2a_n(a[3]), .g2b_n(a[4]), .y_n(y_n[7:0]));
  ac11138 u_dec1 (.a(a[0]), .b(a[1]), .c(a[2]),
                  .g1(a[3]), .g2a_n(a[4]), .g2b_n(1'b0), .y_n(y_n[15:8]));
  ac11138 u_dec2 (.a(a[0]), .b(a[1]), .c(a[2]),
                  .g1(a[4]), .g2a_n(a[3]), .g2b_n(1'b0), .y_n(y_n[23:16]));
  ac11138 u_dec3 (.a(a[0]), .b(a[1]), .c(a[2]),
                  .g1(a[3]), .g2a_n(a4_n), .g2b_n(1'b0), .y_n(y_n[31:24]));

  always_comb assert ($countones(~y_n) == 1)
    else $error("dec5to32_fig3: expected exactly one active output, y_n=%h", y_n);
endmodule
