// maj3_tb - exhaustive test of the three-input majority voter.
//
// Applies all eight input combinations and compares the output with the
// population count of the inputs (1 when two or more inputs are 1).
module maj3_tb;

  logic a, b, c, f;
  int   checks = 0;
  int   failures = 0;

  maj3 dut (.a_i(a), .b_i(b), .c_i(c), .f_o(f));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if (f !== ($countones(3'(v)) >= 2)) begin
        failures++;
        $display("FAIL abc=%03b f=%b", 3'(v), f);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
