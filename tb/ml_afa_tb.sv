// ml_afa_tb - exhaustive test of the majority-logic approximate full adder.
//
// Compares the cell with its published truth table (Cout-Sum per input
// combination ABCin = 000..111: 00 00 00 10 01 11 11 11), then measures the
// cell's error against an exact full adder over all eight combinations and
// checks the error rate (0.5) and the mean error distance normalised to the
// largest output value 3 (NMED = 1/6, about 0.166).
module ml_afa_tb;

  logic a, b, c, s, co;
  int   checks = 0;
  int   failures = 0;

  // {Cout, Sum} for ABCin = 000 .. 111
  localparam logic [1:0] TABLE [8] = '{2'b00, 2'b00, 2'b00, 2'b10,
                                       2'b01, 2'b11, 2'b11, 2'b11};

  ml_afa dut (.a_i(a), .b_i(b), .c_i(c), .s_o(s), .c_o(co));

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n_err;
    int sum_ed;
    real er, nmed;
    n_err  = 0;
    sum_ed = 0;
    for (int v = 0; v < 8; v++) begin
      int exact, approx, ed;
      {a, b, c} = 3'(v);
      #1;
      checks++;
      if ({co, s} !== TABLE[v]) begin
        failures++;
        $display("FAIL abc=%03b got %b%b expected %b", 3'(v), co, s, TABLE[v]);
      end
      exact  = int'(a) + int'(b) + int'(c);
      approx = 2 * int'(co) + int'(s);
      ed     = (exact > approx) ? exact - approx : approx - exact;
      if (ed != 0) n_err++;
      sum_ed += ed;
    end
    er   = real'(n_err) / 8.0;
    nmed = (real'(sum_ed) / 8.0) / 3.0;
    $display("error rate %0.3f  NMED %0.3f", er, nmed);
    checks++;
    if (er != 0.5) begin
      failures++;
      $display("FAIL error rate %0.3f, expected 0.5", er);
    end
    checks++;
    if (nmed < 0.166 || nmed > 0.167) begin
      failures++;
      $display("FAIL NMED %0.4f, expected 0.166", nmed);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
