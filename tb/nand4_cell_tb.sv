// nand4_cell_tb: exhaustive check of the 4-input NAND cell over all sixteen
// input codes; the expected output column is written out as a constant.
module nand4_cell_tb;
  logic a, b, c, d, y;
  int checks = 0, failures = 0;
  localparam logic [15:0] EXPECT = 16'h7fff;   // EXPECT[{a,b,c,d}] is y

  nand4_cell dut (.a(a), .b(b), .c(c), .d(d), .y(y));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 16; i++) begin
      {a, b, c, d} = i[3:0];
      #1;
      checks++;
      if (y !== EXPECT[i]) begin
        failures++;
        $display("FAIL abcd=%b y=%b expected %b", {a, b, c, d}, y, EXPECT[i]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
