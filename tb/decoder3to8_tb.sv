// decoder3to8_tb: checks the active-high 3:8 decoder against its truth table,
// row by row. The table is written out as constants (row XYZ, outputs D7..D0)
// rather than computed, so the check does not share the decoder's logic.
module decoder3to8_tb;
  logic x, y, z;
  logic [7:0] d;
  int checks = 0, failures = 0;

  localparam logic [7:0] TABLE [8] = '{
    8'b0000_0001, 8'b0000_0010, 8'b0000_0100, 8'b0000_1000,
    8'b0001_0000, 8'b0010_0000, 8'b0100_0000, 8'b1000_0000
  };

  decoder3to8 dut (.x(x), .y(y), .z(z), .d(d));

  initial begin
    #1000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // Two passes: ascending and descending, so each output both rises and falls.
    for (int pass = 0; pass < 2; pass++) begin
      for (int j = 0; j < 8; j++) begin
        logic [2:0] i;
        i = 3'((pass == 0) ? j : 7 - j);
        {x, y, z} = i;
        #1;
        checks++;
        if (d !== TABLE[i]) begin
          failures++;
          $display("FAIL xyz=%b d=%b expected %b", {x, y, z}, d, TABLE[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
