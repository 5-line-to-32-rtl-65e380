// dec5to32_tb: checks the 5:32 decoder tree.
//
// Phase 1 walks all 32 addresses up and then down. Phase 2 replays the
// transient stimulus used to characterise the transistor-level circuit: five
// pulse sources of period 10 us, all starting high at t = 0, high for 1, 4, 7,
// 2 and 5 us on a0, a1, a2, a3 and a4 respectively, observed for 20 us at
// 1 us steps (one testbench time unit here stands for 1 us). Phase 3 applies
// random addresses. The expected output is computed independently as
// "all ones except bit a".
module dec5to32_tb;
  logic [4:0]  a;
  logic [31:0] y_n;
  int checks = 0, failures = 0;
  int line_hits [32];

  dec5to32 dut (.a(a), .y_n(y_n));

  task automatic check(string what);
    logic [31:0] exp;
    exp = '1;
    exp[a] = 1'b0;
    checks++;
    if (y_n !== exp) begin
      failures++;
      $display("FAIL %s: a=%0d y_n=%h expected %h", what, a, y_n, exp);
    end
    for (int i = 0; i < 32; i++) if (!y_n[i]) line_hits[i]++;
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

    for (int i = 0; i < 32; i++) begin a = 5'(i);      #1; check("ascending");  end
    for (int i = 31; i >= 0; i--) begin a = 5'(i);     #1; check("descending"); end

    // Pulse-source stimulus, sampled in the middle of each 1 us step.
    for (int t = 0; t < 20; t++) begin
      int ph;
      ph = t % 10;
      a[0] = (ph < 1);
      a[1] = (ph < 4);
      a[2] = (ph < 7);
      a[3] = (ph < 2);
      a[4] = (ph < 5);
      #1;
      check("pulse stimulus");
    end

    for (int i = 0; i < 200; i++) begin a = 5'($urandom); #1; check("random"); end

    for (int i = 0; i < 32; i++) begin
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
