// dec4to16_tb: checks the 4:16 decoder tree over all sixteen addresses,
// ascending, descending and then at random. The expected output is
// "all ones except bit a", and each of the sixteen lines must be selected.
module dec4to16_tb;
  logic [3:0]  a;
  logic [15:0] y_n;
  int checks = 0, failures = 0;
  int line_hits [16];

  dec4to16 dut (.a(a), .y_n(y_n));

  task automatic check(string what);
    logic [15:0] exp;
    exp = '1;
    exp[a] = 1'b0;
    checks++;
    if (y_n !== exp) begin
      failures++;
      $display("FAIL %s: a=%0d y_n=%h expected %h", what, a, y_n, exp);
    end
    for (int i = 0; i < 16; i++) if (!y_n[i]) line_hits[i]++;
  endtask

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    foreach (line_hits[i]) line_hits[i] = 0;
    for (int i = 0; i < 16; i++) begin a = 4'(i);  #1; check("ascending");  end
    for (int i = 15; i >= 0; i--) begin a = 4'(i); #1; check("descending"); end
    for (int i = 0; i < 100; i++) begin a = 4'($urandom); #1; check("random"); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (line_hits[i] == 0) begin
        failures++;
        $display("FAIL output %0d never selected", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
