// dec5to32_pulse_tb: replays the transient characterisation run of the 5:32
// decoder on both 5:32 implementations.
//
// Five free-running pulse sources drive the address: period 10 us, all high
// at t = 0, staying high for 1, 4, 7, 2 and 5 us on a0, a1, a2, a3 and a4.
// One STEP of simulation time stands for 1 us. The run lasts 20 us. In the
// middle of every microsecond both decoders must show exactly the line listed
// in EXPECT_LINE low; that sequence was worked out by hand from the pulse
// widths (31, 30, 22, 22, 20, 4, 4, 0, 0, 0, then repeating).
module dec5to32_pulse_tb;
  localparam int STEP = 10;
  localparam int PW [5] = '{1, 4, 7, 2, 5};          // high time of a0..a4, us
  localparam int EXPECT_LINE [10] = '{31, 30, 22, 22, 20, 4, 4, 0, 0, 0};

  logic [4:0]  a;
  logic [31:0] y_tree_n, y_fig3_n;
  int checks = 0, failures = 0;

  dec5to32      u_tree (.a(a), .y_n(y_tree_n));
  dec5to32_fig3 u_fig3 (.a(a), .y_n(y_fig3_n));

  for (genvar k = 0; k < 5; k++) begin : g_src
    initial begin
      forever begin
        a[k] = 1'b1;
        #(PW[k] * STEP);
        a[k] = 1'b0;
        #((10 - PW[k]) * STEP);
      end
    end
  end

  initial begin
    #(100 * STEP);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #(STEP / 2);
    for (int t = 0; t < 20; t++) begin
      logic [31:0] exp;
      exp = '1;
      exp[EXPECT_LINE[t % 10]] = 1'b0;
      checks += 2;
      if (y_tree_n !== exp) begin
        failures++;
        $display("FAIL t=%0d us tree: a=%0d y_n=%h expected %h", t, a, y_tree_n, exp);
      end
      if (y_fig3_n !== exp) begin
        failures++;
        $display("FAIL t=%0d us enable-decoded: a=%0d y_n=%h expected %h", t, a, y_fig3_n, exp);
      end
      #STEP;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
