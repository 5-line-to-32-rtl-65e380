// inv_cell_tb: exhaustive check of the inverter cell against its two-row
// truth table (0 -> 1, 1 -> 0), written out as constants.
module inv_cell_tb;
  logic a, y;
  int checks = 0, failures = 0;
  localparam logic [1:0] EXPECT = 2'b01;   // EXPECT[a] is y

  inv_cell dut (.a(a), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2; i++) begin
      a = i[0];
      #1;
      checks++;
      if (y !== EXPECT[i]) begin
        failures++;
        $display("FAIL a=%b y=%b expected %b", a, y, EXPECT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
