// ml_addsub_tb - test of the approximate adder/subtractor.
//
// Six instances cover addition and subtraction with 3 approximate bits
// (the default), with none (an exact unit) and with 5. Each is compared with
// a reference worked out from integers: the exact sum or difference modulo
// 2^W with bits 1..K replaced by the same bits of the first operand (the
// approximate cell passes A to its sum and keeps the carry exact). 9-bit
// units are tested exhaustively, the 12-bit ones with random operands. The
// test also checks that the error stays below 2^(K+1) and that the
// approximate units do differ from exact arithmetic somewhere.
module ml_addsub_tb;

  int checks = 0;
  int failures = 0;
  int n_differ = 0;

  logic [8:0]  a9, b9;
  logic [11:0] a12, b12;
  logic [8:0]  s_add3, s_sub3, s_add0, s_sub0;
  logic [11:0] s_add5, s_sub5;

  ml_addsub #(.W(9),  .APPROX_BITS(3), .SUB(1'b0)) u_add3 (.a_i(a9),  .b_i(b9),  .s_o(s_add3));
  ml_addsub #(.W(9),  .APPROX_BITS(3), .SUB(1'b1)) u_sub3 (.a_i(a9),  .b_i(b9),  .s_o(s_sub3));
  ml_addsub #(.W(9),  .APPROX_BITS(0), .SUB(1'b0)) u_add0 (.a_i(a9),  .b_i(b9),  .s_o(s_add0));
  ml_addsub #(.W(9),  .APPROX_BITS(0), .SUB(1'b1)) u_sub0 (.a_i(a9),  .b_i(b9),  .s_o(s_sub0));
  ml_addsub #(.W(12), .APPROX_BITS(5), .SUB(1'b0)) u_add5 (.a_i(a12), .b_i(b12), .s_o(s_add5));
  ml_addsub #(.W(12), .APPROX_BITS(5), .SUB(1'b1)) u_sub5 (.a_i(a12), .b_i(b12), .s_o(s_sub5));

  // reference: exact result with bits 1..k taken from a
  function automatic longint ref_as(longint a, longint b, bit sub, int w, int k);
    longint full, mask, exact;
    full  = (longint'(1) << w) - 1;
    mask  = (((longint'(1) << k) - 1) << 1) & full;
    exact = (sub ? (a - b) : (a + b)) & full;
    return (exact & ~mask) | (a & mask);
  endfunction

  task automatic check(string name, longint got, longint a, longint b, bit sub, int w, int k);
    longint exp_v, exact, err, full;
    full  = (longint'(1) << w) - 1;
    exp_v = ref_as(a, b, sub, w, k);
    exact = (sub ? (a - b) : (a + b)) & full;
    checks++;
    if (got != exp_v) begin
      failures++;
      if (failures < 20)
        $display("FAIL %s a=%0h b=%0h got %0h expected %0h", name, a, b, got, exp_v);
    end
    // error as a signed W-bit difference
    err = (got - exact) & full;
    if (err >= (longint'(1) << (w - 1))) err = err - (full + 1);
    if (err < 0) err = -err;
    checks++;
    if (err >= (longint'(1) << (k + 1))) begin
      failures++;
      $display("FAIL %s error %0d too large", name, err);
    end
    if (got != exact) n_differ++;
  endtask

  initial begin : watchdog
    #10_000_000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int ia = 0; ia < 512; ia++) begin
      for (int ib = 0; ib < 512; ib++) begin
        a9 = 9'(ia);
        b9 = 9'(ib);
        #1;
        check("add k=3", longint'(s_add3), ia, ib, 1'b0, 9, 3);
        check("sub k=3", longint'(s_sub3), ia, ib, 1'b1, 9, 3);
        check("add k=0", longint'(s_add0), ia, ib, 1'b0, 9, 0);
        check("sub k=0", longint'(s_sub0), ia, ib, 1'b1, 9, 0);
      end
    end
    for (int t = 0; t < 20000; t++) begin
      a12 = 12'($urandom);
      b12 = 12'($urandom);
      #1;
      check("add k=5", longint'(s_add5), longint'(a12), longint'(b12), 1'b0, 12, 5);
      check("sub k=5", longint'(s_sub5), longint'(a12), longint'(b12), 1'b1, 12, 5);
    end
    checks++;
    if (n_differ == 0) begin
      failures++;
      $display("FAIL approximate units never differed from exact arithmetic");
    end
    $display("results differing from exact arithmetic: %0d", n_differ);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
