// ml_dct8_tb - end-to-end test of the pipelined approximate 8-point DCT at
// its default parameters (8-bit inputs, 3 approximate bits per adder).
//
// Random input vectors, extreme vectors and idle cycles are streamed into
// the unit. Each output vector is compared with two references computed in
// the testbench:
//   - a model of the datapath in which every adder/subtractor is replaced by
//     its arithmetic description (exact result with bits 1..K taken from the
//     first operand); the outputs must match it bit for bit;
//   - the exact signed DCT, y_k = sum_n sign(cos((2n+1)k*pi/16)) * x_n,
//     computed with $cos; the approximation error must stay within the bound
//     that follows from the adder error (below 2^(K+1) per adder).
// The test also checks the three-cycle latency of every vector, that the
// valid bit follows the input valid with idle cycles in between, and that a
// reset in the middle of a stream empties the pipeline. It counts how often
// each situation occurred (back-to-back vectors, idle cycles, outputs that
// differ from the exact transform, outputs that equal it, extreme inputs,
// mid-stream reset) and counts a failure for any that never did.
module ml_dct8_tb;
  import ml_dct_pkg::*;

  localparam int DW = 8;
  localparam int K  = 3;
  localparam int OW = DW + 3;
  localparam int N_VEC = 3000;

  logic                 clk = 1'b0;
  logic                 rst_n;
  logic                 in_valid;
  logic signed [DW-1:0] x [N_PTS];
  logic                 out_valid;
  logic signed [OW-1:0] y [N_PTS];

  int checks = 0;
  int failures = 0;
  int cycle = 0;

  // mechanism counters
  int n_back_to_back = 0;
  int n_idle = 0;
  int n_approx_differs = 0;
  int n_approx_exact = 0;
  int n_extreme = 0;
  int n_reset_flush = 0;
  int max_err = 0;

  ml_dct8 dut (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid), .x_i(x),
    .out_valid_o(out_valid), .y_o(y)
  );

  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  initial begin : watchdog
    repeat (N_VEC * 4 + 1000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ references
  // approximate adder/subtractor on w-bit two's complement words, returned
  // sign-extended
  function automatic longint aas(longint a, longint b, bit sub, int w);
    longint full, mask, exact, r;
    full  = (longint'(1) << w) - 1;
    mask  = (((longint'(1) << K) - 1) << 1) & full;
    exact = (sub ? (a - b) : (a + b)) & full;
    r     = (exact & ~mask) | (a & full & mask);
    if (r >= (longint'(1) << (w - 1))) r = r - (full + 1);
    return r;
  endfunction

  typedef longint vec_t [N_PTS];

  function automatic vec_t model_approx(vec_t xv);
    vec_t   yv;
    longint a [4], d [4], b [4], o [4];
    for (int n = 0; n < 4; n++) begin
      a[n] = aas(xv[n], xv[7-n], 1'b0, DW + 1);
      d[n] = aas(xv[n], xv[7-n], 1'b1, DW + 1);
    end
    b[0] = aas(a[0], a[3], 1'b0, DW + 2);
    b[1] = aas(a[1], a[2], 1'b0, DW + 2);
    b[2] = aas(a[0], a[3], 1'b1, DW + 2);
    b[3] = aas(a[1], a[2], 1'b1, DW + 2);
    o[0] = aas(d[0], d[1], 1'b0, DW + 2);   // s
    o[1] = aas(d[0], d[1], 1'b1, DW + 2);   // p
    o[2] = aas(d[2], d[3], 1'b0, DW + 2);   // q
    o[3] = aas(d[2], d[3], 1'b1, DW + 2);   // r
    yv[0] = aas(b[0], b[1], 1'b0, OW);
    yv[4] = aas(b[0], b[1], 1'b1, OW);
    yv[2] = aas(b[2], b[3], 1'b0, OW);
    yv[6] = aas(b[2], b[3], 1'b1, OW);
    yv[1] = aas(o[0], o[2], 1'b0, OW);
    yv[5] = aas(o[1], o[2], 1'b0, OW);
    yv[3] = aas(o[1], o[2], 1'b1, OW);
    yv[7] = aas(o[1], o[3], 1'b0, OW);
    return yv;
  endfunction

  function automatic vec_t model_exact(vec_t xv);
    vec_t yv;
    for (int k = 0; k < N_PTS; k++) begin
      yv[k] = 0;
      for (int n = 0; n < N_PTS; n++) begin
        if ($cos(real'((2 * n + 1) * k) * 3.14159265358979 / 16.0) > 0.0)
          yv[k] += xv[n];
        else
          yv[k] -= xv[n];
      end
    end
    return yv;
  endfunction

  // largest possible output error: 14 per adder of stage 1, then each
  // stage adds its own error to the sum of two operand errors
  localparam int E1 = (1 << (K + 1)) - 2;
  localparam int E3 = E1 + 2 * (E1 + 2 * E1);

  // ------------------------------------------------------------ scoreboard
  typedef struct {
    vec_t xv;
    int   issue_cycle;
  } item_t;
  item_t sb[$];

  always @(negedge clk) begin
    if (rst_n && out_valid) begin
      item_t it;
      vec_t  ya, ye;
      checks++;
      if (sb.size() == 0) begin
        failures++;
        $display("FAIL output without input at cycle %0d", cycle);
      end else begin
        it = sb.pop_front();
        checks++;
        if (cycle - it.issue_cycle != LATENCY) begin
          failures++;
          $display("FAIL latency %0d", cycle - it.issue_cycle);
        end
        ya = model_approx(it.xv);
        ye = model_exact(it.xv);
        for (int k = 0; k < N_PTS; k++) begin
          int err;
          checks++;
          if (longint'(y[k]) != ya[k]) begin
            failures++;
            if (failures < 20)
              $display("FAIL y[%0d] = %0d, expected %0d", k, y[k], ya[k]);
          end
          err = int'(longint'(y[k]) - ye[k]);
          if (err < 0) err = -err;
          if (err > max_err) max_err = err;
          checks++;
          if (err > E3) begin
            failures++;
            $display("FAIL y[%0d] error %0d above bound %0d", k, err, E3);
          end
          if (err != 0) n_approx_differs++;
          else          n_approx_exact++;
        end
      end
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic drive(bit valid, vec_t xv);
    @(negedge clk);
    in_valid = valid;
    for (int n = 0; n < N_PTS; n++) x[n] = DW'(xv[n]);
    if (valid) begin
      item_t it;
      it.xv = xv;
      it.issue_cycle = cycle;
      sb.push_back(it);
    end
  endtask

  function automatic vec_t rand_vec();
    vec_t v;
    for (int n = 0; n < N_PTS; n++) v[n] = longint'($signed(DW'($urandom)));
    return v;
  endfunction

  function automatic vec_t const_vec(longint c, bit alternate);
    vec_t v;
    for (int n = 0; n < N_PTS; n++) v[n] = (alternate && n[0]) ? -c - 1 : c;
    return v;
  endfunction

  initial begin
    vec_t zero;
    bit   prev_valid;
    zero = const_vec(0, 1'b0);
    rst_n    = 1'b0;
    in_valid = 1'b0;
    for (int n = 0; n < N_PTS; n++) x[n] = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;

    // extreme vectors
    drive(1'b1, const_vec(-(1 << (DW - 1)), 1'b0));
    drive(1'b1, const_vec((1 << (DW - 1)) - 1, 1'b0));
    drive(1'b1, const_vec((1 << (DW - 1)) - 1, 1'b1));
    drive(1'b1, const_vec(-(1 << (DW - 1)), 1'b1));
    n_extreme += 4;
    n_back_to_back += 3;
    prev_valid = 1'b1;

    // random stream with idle cycles
    for (int t = 0; t < N_VEC; t++) begin
      bit v;
      v = ($urandom_range(0, 3) != 0);
      if (v) begin
        if (prev_valid) n_back_to_back++;
        drive(1'b1, rand_vec());
      end else begin
        n_idle++;
        drive(1'b0, zero);
      end
      prev_valid = v;
    end

    // reset in the middle of a stream: pending vectors are dropped
    drive(1'b1, rand_vec());
    drive(1'b1, rand_vec());
    @(negedge clk);
    in_valid = 1'b0;
    rst_n = 1'b0;
    sb.delete();
    @(negedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < 4; c++) begin
      checks++;
      if (out_valid) begin
        failures++;
        $display("FAIL output valid after reset");
      end
      @(negedge clk);
    end
    n_reset_flush++;
    // the pipeline works again after the reset
    drive(1'b1, rand_vec());
    drive(1'b0, zero);
    repeat (LATENCY + 2) @(negedge clk);

    checks++;
    if (sb.size() != 0) begin
      failures++;
      $display("FAIL %0d vectors never came out", sb.size());
    end

    $display("back-to-back %0d, idle %0d, extreme %0d, reset flush %0d",
             n_back_to_back, n_idle, n_extreme, n_reset_flush);
    $display("coefficients differing from exact %0d, equal %0d, max error %0d (bound %0d)",
             n_approx_differs, n_approx_exact, max_err, E3);
    checks += 6;
    if (n_back_to_back == 0)   begin failures++; $display("FAIL no back-to-back vectors"); end
    if (n_idle == 0)           begin failures++; $display("FAIL no idle cycles"); end
    if (n_approx_differs == 0) begin failures++; $display("FAIL approximation never visible"); end
    if (n_approx_exact == 0)   begin failures++; $display("FAIL no exact coefficient"); end
    if (n_extreme == 0)        begin failures++; $display("FAIL no extreme inputs"); end
    if (n_reset_flush == 0)    begin failures++; $display("FAIL no reset flush"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
