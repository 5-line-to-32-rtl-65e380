// ac11138_tb: exhaustive check of the '138-type 3:8 decoder over all 64
// combinations of the three select and three enable inputs, followed by a
// demultiplexer run in which a random data stream is fed into G1 (and then
// into G2A_n) and must appear on the selected output only.
//
// Reference: the part is enabled when G1 = 1 and G2A_n = G2B_n = 0; then only
// output C*4+B*2+A is low, otherwise all outputs are high.
module ac11138_tb;
  logic a, b, c, g1, g2a_n, g2b_n;
  logic [7:0] y_n;
  int checks = 0, failures = 0;
  int enabled_seen = 0, disabled_seen = 0;

  ac11138 dut (.*);

  function automatic logic [7:0] model(logic [2:0] s, logic e1, logic e2a_n, logic e2b_n);
    logic [7:0] r;
    r = 8'hff;
    if (e1 && !e2a_n && !e2b_n) r[s] = 1'b0;
    return r;
  endfunction

  task automatic check(string what);
    logic [7:0] exp;
    exp = model({c, b, a}, g1, g2a_n, g2b_n);
    checks++;
    if (y_n !== exp) begin
      failures++;
      $display("FAIL %s: cba=%b g1=%b g2a_n=%b g2b_n=%b y_n=%b expected %b",
               what, {c, b, a}, g1, g2a_n, g2b_n, y_n, exp);
    end
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 64; i++) begin
      {g1, g2a_n, g2b_n, c, b, a} = 6'(i);
      #1;
      check("truth table");
      if (g1 && !g2a_n && !g2b_n) enabled_seen++;
      else                        disabled_seen++;
    end

    // Demultiplexer through G1 (outputs follow the data, inverted).
    g2a_n = 0; g2b_n = 0;
    for (int i = 0; i < 40; i++) begin
      {c, b, a} = 3'($urandom);
      g1 = 1'($urandom);
      #1;
      check("demux G1");
      checks++;
      if (y_n[{c, b, a}] !== ~g1) begin
        failures++;
        $display("FAIL demux G1 data not on line %0d", {c, b, a});
      end
    end

    // Demultiplexer through G2A_n (outputs follow the data, true).
    g1 = 1; g2b_n = 0;
    for (int i = 0; i < 40; i++) begin
      {c, b, a} = 3'($urandom);
      g2a_n = 1'($urandom);
      #1;
      check("demux G2A_n");
    end

    checks++;
    if (enabled_seen != 8 || disabled_seen != 56) begin
      failures++;
      $display("FAIL enable coverage %0d/%0d", enabled_seen, disabled_seen);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
