// and3_cell_tb: exhaustive check of the 3-input AND cell over all eight
// input codes; the expected output column is written out as a constant.
module and3_cell_tb;
  logic a, b, c, y;
  int checks = 0, failures = 0;
  localparam logic [7:0] EXPECT = 8'b1000_0000;  // EXPECT[{a,b,c}] is y

  and3_cell dut (.a(a), .b(b), .c(c), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 8; i++) begin
      {a, b, c} = i[2:0];
      #1;
      checks++;
      if (y !== EXPECT[i]) begin
        failures++;
        $display("FAIL abc=%b y=%b expected %b", {a, b, c}, y, EXPECT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
