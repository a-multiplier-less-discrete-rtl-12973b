// ml_dct8_exact_tb - the DCT datapath with every adder exact.
//
// With no approximate bits the unit must compute the signed DCT exactly:
// y_k = sum_n sign(cos((2n+1)k*pi/16)) * x_n. Two instances are checked
// against that formula, evaluated with $cos: one with 8-bit inputs and one
// with 12-bit inputs, each on random vectors streamed one per cycle, and
// each output must appear exactly three cycles after its input.
module ml_dct8_exact_tb;
  import ml_dct_pkg::*;

  localparam int N_VEC = 2000;

  logic              clk = 1'b0;
  logic              rst_n;
  logic              in_valid;
  logic signed [7:0]  x8  [N_PTS];
  logic signed [11:0] x12 [N_PTS];
  logic              ov8, ov12;
  logic signed [10:0] y8  [N_PTS];
  logic signed [14:0] y12 [N_PTS];

  int checks = 0;
  int failures = 0;

  ml_dct8 #(.DATA_W(8), .APPROX_BITS(0)) u_dct8 (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid), .x_i(x8),
    .out_valid_o(ov8), .y_o(y8)
  );
  ml_dct8 #(.DATA_W(12), .APPROX_BITS(0)) u_dct12 (
    .clk_i(clk), .rst_ni(rst_n), .in_valid_i(in_valid), .x_i(x12),
    .out_valid_o(ov12), .y_o(y12)
  );

  always #5 clk = ~clk;

  initial begin : watchdog
    repeat (N_VEC + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  typedef longint vec_t [N_PTS];
  vec_t hist8  [LATENCY];
  vec_t hist12 [LATENCY];

  function automatic vec_t sdct(vec_t xv);
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

  initial begin
    rst_n = 1'b0;
    in_valid = 1'b0;
    for (int n = 0; n < N_PTS; n++) begin
      x8[n] = '0;
      x12[n] = '0;
    end
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int t = 0; t < N_VEC + LATENCY; t++) begin
      @(negedge clk);
      // outputs now belong to the vector driven LATENCY cycles ago
      if (t >= LATENCY) begin
        vec_t e8, e12;
        e8  = sdct(hist8[LATENCY-1]);
        e12 = sdct(hist12[LATENCY-1]);
        checks += 2;
        if (!ov8 || !ov12) begin
          failures++;
          $display("FAIL output not valid at step %0d", t);
        end
        for (int k = 0; k < N_PTS; k++) begin
          checks += 2;
          if (longint'(y8[k]) != e8[k]) begin
            failures++;
            $display("FAIL 8-bit y[%0d]=%0d expected %0d", k, y8[k], e8[k]);
          end
          if (longint'(y12[k]) != e12[k]) begin
            failures++;
            $display("FAIL 12-bit y[%0d]=%0d expected %0d", k, y12[k], e12[k]);
          end
        end
      end
      for (int s = LATENCY - 1; s > 0; s--) begin
        hist8[s]  = hist8[s-1];
        hist12[s] = hist12[s-1];
      end
      in_valid = (t < N_VEC);
      for (int n = 0; n < N_PTS; n++) begin
        x8[n]  = 8'($urandom);
        x12[n] = 12'($urandom);
        hist8[0][n]  = longint'(x8[n]);
        hist12[0][n] = longint'(x12[n]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
