// decoder_suite_top_tb: end-to-end test of the whole decoder family through
// the top level, at its only (default) configuration.
//
// For every 5-bit code the two 5:32 decoders get the same address and must
// agree with each other and with the reference "all ones except bit i"; the
// 4:16 decoder and the active-high 3:8 decoder get the low bits of the same
// code; the stand-alone 3:8 decoder gets the low three bits and a random
// enable pattern. Then the transient pulse stimulus of the 5:32 decoder is
// replayed and random codes follow. Each mechanism of the design is counted,
// and a mechanism that never occurred counts as a failure:
//   - each of the four banks of the 5:32 tree selected,
//   - each of the 32 + 32 + 16 + 8 output lines selected,
//   - the stand-alone decoder enabled, and disabled by G1, by G2A_n and by G2B_n,
//   - data passed through the enable inputs (demultiplexer use).
module decoder_suite_top_tb;
  logic [4:0]  a, b;
  logic [3:0]  c;
  logic        x, y, z;
  logic [2:0]  sel;
  logic        g1, g2a_n, g2b_n;
  logic [31:0] y_n, yb_n;
  logic [15:0] yc_n;
  logic [7:0]  d, ys_n;

  int checks = 0, failures = 0;
  int hits_a [32], hits_b [32], hits_c [16], hits_d [8];
  int bank_hits [4];
  int en_on = 0, off_g1 = 0, off_g2a = 0, off_g2b = 0, demux_data = 0;

  decoder_suite_top dut (.*);

  task automatic expect_eq(string what, logic [31:0] got, logic [31:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  task automatic apply(logic [4:0] code, logic [2:0] en_bits);
    logic [31:0] e32;
    logic [15:0] e16;
    logic [7:0]  e8, es;
    a = code; b = code; c = code[3:0]; {x, y, z} = code[2:0];
    sel = code[2:0]; {g1, g2a_n, g2b_n} = en_bits;
    #1;
    e32 = '1; e32[code] = 1'b0;
    e16 = '1; e16[code[3:0]] = 1'b0;
    e8  = '0; e8[code[2:0]] = 1'b1;
    es  = '1;
    if (en_bits == 3'b100) es[code[2:0]] = 1'b0;
    expect_eq("5:32 tree",        y_n, e32);
    expect_eq("5:32 enable-decoded", yb_n, e32);
    expect_eq("5:32 agree",       y_n, yb_n);
    expect_eq("4:16",             32'(yc_n), 32'(e16));
    expect_eq("3:8 active high",  32'(d),    32'(e8));
    expect_eq("3:8 stand-alone",  32'(ys_n), 32'(es));
    for (int i = 0; i < 32; i++) begin
      if (!y_n[i])  hits_a[i]++;
      if (!yb_n[i]) hits_b[i]++;
    end
    for (int i = 0; i < 16; i++) if (!yc_n[i]) hits_c[i]++;
    for (int i = 0; i < 8; i++)  if (d[i])     hits_d[i]++;
    if (y_n[7:0]   != 8'hff) bank_hits[0]++;
    if (y_n[15:8]  != 8'hff) bank_hits[1]++;
    if (y_n[23:16] != 8'hff) bank_hits[2]++;
    if (y_n[31:24] != 8'hff) bank_hits[3]++;
    if (en_bits == 3'b100) en_on++;
    if (!en_bits[2])       off_g1++;
    if (en_bits[1])        off_g2a++;
    if (en_bits[0])        off_g2b++;
  endtask

  task automatic require(string what, int count);
    checks++;
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (hits_a[i]) begin hits_a[i] = 0; hits_b[i] = 0; end
    foreach (hits_c[i]) hits_c[i] = 0;
    foreach (hits_d[i]) hits_d[i] = 0;
    foreach (bank_hits[i]) bank_hits[i] = 0;

    // Every code with every enable pattern of the stand-alone decoder.
    for (int code = 0; code < 32; code++)
      for (int e = 0; e < 8; e++)
        apply(5'(code), 3'(e));

    // Pulse-source stimulus of the 5:32 characterisation run, 20 steps.
    for (int t = 0; t < 20; t++) begin
      int ph;
      ph = t % 10;
      apply({ph < 5, ph < 2, ph < 7, ph < 4, ph < 1}, 3'b100);
    end

    // Demultiplexer use: a data bit on G1 must appear, inverted, on line sel.
    for (int i = 0; i < 64; i++) begin
      logic data;
      data = 1'($urandom);
      apply(5'($urandom), {data, 2'b00});
      checks++;
      if (ys_n[sel] !== ~data) begin
        failures++;
        $display("FAIL demux: data %b not on line %0d", data, sel);
      end else demux_data++;
    end

    for (int i = 0; i < 300; i++) apply(5'($urandom), 3'($urandom));

    for (int i = 0; i < 4; i++) require($sformatf("bank %0d of the 5:32 tree", i), bank_hits[i]);
    for (int i = 0; i < 32; i++) begin
      require($sformatf("5:32 tree line %0d", i), hits_a[i]);
      require($sformatf("5:32 enable-decoded line %0d", i), hits_b[i]);
    end
    for (int i = 0; i < 16; i++) require($sformatf("4:16 line %0d", i), hits_c[i]);
    for (int i = 0; i < 8; i++)  require($sformatf("3:8 line %0d", i), hits_d[i]);
    require("stand-alone decoder enabled", en_on);
    require("disabled by G1", off_g1);
    require("disabled by G2A_n", off_g2a);
    require("disabled by G2B_n", off_g2b);
    require("demultiplexer data", demux_data);

    $display("mechanisms: banks %0d/%0d/%0d/%0d, enabled %0d, off by G1 %0d, G2A_n %0d, G2B_n %0d, demux %0d",
             bank_hits[0], bank_hits[1], bank_hits[2], bank_hits[3],
             en_on, off_g1, off_g2a, off_g2b, demux_data);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
