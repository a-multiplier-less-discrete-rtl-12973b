// ml_dct8 - pipelined multiplier-less 8-point approximate DCT.
//
// The unit computes the 8-point signed DCT, the transform whose matrix
// entries are the signs of the DCT-II cosines, sign(cos((2n+1)k*pi/16)):
//   y0 = sum of all x                y4 = a0 - a1 - a2 + a3
//   y2 = a0 + a1 - a2 - a3           y6 = a0 - a1 + a2 - a3
//   y1 = d0 + d1 + d2 + d3           y3 = d0 - d1 - d2 - d3
//   y5 = d0 - d1 + d2 + d3           y7 = d0 - d1 + d2 - d3
// with a_n = x_n + x_(7-n) and d_n = x_n - x_(7-n). All coefficients are
// +1 or -1, so no multiplier is needed, and the fast form below uses exactly
// 24 adder/subtractors in three stages of eight:
//   stage 1  butterflies     a0..a3, d0..d3
//   stage 2  even: b0 = a0+a3, b1 = a1+a2, b2 = a0-a3, b3 = a1-a2
//            odd:  s = d0+d1,  p = d0-d1,  q = d2+d3,  r = d2-d3
//   stage 3  y0 = b0+b1, y4 = b0-b1, y2 = b2+b3, y6 = b2-b3,
//            y1 = s+q,   y5 = p+q,   y3 = p-q,   y7 = p+r
// Every adder/subtractor is an ml_addsub whose low bits use the majority-
// logic approximate full adder, so the outputs are approximate; with
// APPROX_BITS = 0 the unit is the exact signed DCT.
//
// The 8-point size, the 24 adder/subtractors, the multiplier-less pipelined
// organisation and the adder cell follow the design this RTL documents. The
// choice of the signed DCT as the transform, the three-stage pipeline, the
// word widths, the valid bit and the reset are this design's own.
//
// Interface: x_i holds eight signed DATA_W-bit samples, qualified by
// in_valid_i. y_o holds eight signed (DATA_W+3)-bit coefficients in natural
// order (y_o[k] is coefficient k), qualified by out_valid_o. No back-pressure.
// Timing: a register after each stage; a vector given in cycle t appears at
// the outputs after the third rising edge (latency 3), one vector per cycle.
// rst_ni is asynchronous and active low and clears every register.
module ml_dct8
  import ml_dct_pkg::*;
#(
  parameter int unsigned DATA_W      = 8,
  parameter int unsigned APPROX_BITS = 3
) (
  input  logic                     clk_i,
  input  logic                     rst_ni,
  input  logic                     in_valid_i,
  input  logic signed [DATA_W-1:0] x_i [N_PTS],
  output logic                     out_valid_o,
  output logic signed [DATA_W+2:0] y_o [N_PTS]
);

  localparam int unsigned W1 = stage_w(DATA_W, 1);
  localparam int unsigned W2 = stage_w(DATA_W, 2);
  localparam int unsigned W3 = stage_w(DATA_W, 3);

  // valid_q[s] is set when the register after stage s+1 holds a vector
  logic [LATENCY-1:0] valid_q;

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) valid_q <= '0;
    else         valid_q <= {valid_q[LATENCY-2:0], in_valid_i};
  end

  // ---------------------------------------------------------------- stage 1
  logic [W1-1:0] xe   [N_PTS];        // sign-extended inputs
  logic [W1-1:0] a_c  [N_PTS/2];      // a_n = x_n + x_(7-n)
  logic [W1-1:0] d_c  [N_PTS/2];      // d_n = x_n - x_(7-n)
  logic [W1-1:0] a_q  [N_PTS/2];
  logic [W1-1:0] d_q  [N_PTS/2];

  for (genvar n = 0; n < N_PTS; n++) begin : g_ext
    assign xe[n] = W1'(x_i[n]);
  end

  for (genvar n = 0; n < N_PTS/2; n++) begin : g_bfly
    ml_addsub #(.W(W1), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_add (
      .a_i(xe[n]), .b_i(xe[N_PTS-1-n]), .s_o(a_c[n])
    );
    ml_addsub #(.W(W1), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_sub (
      .a_i(xe[n]), .b_i(xe[N_PTS-1-n]), .s_o(d_c[n])
    );
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int n = 0; n < N_PTS/2; n++) begin
        a_q[n] <= '0;
        d_q[n] <= '0;
      end
    end else begin
      if (in_valid_i) begin
        a_q <= a_c;
        d_q <= d_c;
      end
    end
  end

  // ---------------------------------------------------------------- stage 2
  logic [W2-1:0] ae [N_PTS/2];
  logic [W2-1:0] de [N_PTS/2];
  // even part b0..b3, odd part s, p, q, r
  logic [W2-1:0] b_c [4];
  logic [W2-1:0] o_c [4];             // o[0]=s, o[1]=p, o[2]=q, o[3]=r
  logic [W2-1:0] b_q [4];
  logic [W2-1:0] o_q [4];

  for (genvar n = 0; n < N_PTS/2; n++) begin : g_ext2
    assign ae[n] = W2'($signed(a_q[n]));
    assign de[n] = W2'($signed(d_q[n]));
  end

  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_b0 (
    .a_i(ae[0]), .b_i(ae[3]), .s_o(b_c[0]));
  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_b1 (
    .a_i(ae[1]), .b_i(ae[2]), .s_o(b_c[1]));
  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_b2 (
    .a_i(ae[0]), .b_i(ae[3]), .s_o(b_c[2]));
  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_b3 (
    .a_i(ae[1]), .b_i(ae[2]), .s_o(b_c[3]));
  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_s (
    .a_i(de[0]), .b_i(de[1]), .s_o(o_c[0]));
  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_p (
    .a_i(de[0]), .b_i(de[1]), .s_o(o_c[1]));
  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_q (
    .a_i(de[2]), .b_i(de[3]), .s_o(o_c[2]));
  ml_addsub #(.W(W2), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_r (
    .a_i(de[2]), .b_i(de[3]), .s_o(o_c[3]));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int n = 0; n < 4; n++) begin
        b_q[n] <= '0;
        o_q[n] <= '0;
      end
    end else begin
      if (valid_q[0]) begin
        b_q <= b_c;
        o_q <= o_c;
      end
    end
  end

  // ---------------------------------------------------------------- stage 3
  logic [W3-1:0] be [4];
  logic [W3-1:0] oe [4];
  logic [W3-1:0] y_c [N_PTS];
  logic [W3-1:0] y_q [N_PTS];

  for (genvar n = 0; n < 4; n++) begin : g_ext3
    assign be[n] = W3'($signed(b_q[n]));
    assign oe[n] = W3'($signed(o_q[n]));
  end

  // even coefficients
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_y0 (
    .a_i(be[0]), .b_i(be[1]), .s_o(y_c[0]));
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_y4 (
    .a_i(be[0]), .b_i(be[1]), .s_o(y_c[4]));
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_y2 (
    .a_i(be[2]), .b_i(be[3]), .s_o(y_c[2]));
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_y6 (
    .a_i(be[2]), .b_i(be[3]), .s_o(y_c[6]));
  // odd coefficients: y1 = s+q, y5 = p+q, y3 = p-q, y7 = p+r
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_y1 (
    .a_i(oe[0]), .b_i(oe[2]), .s_o(y_c[1]));
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_y5 (
    .a_i(oe[1]), .b_i(oe[2]), .s_o(y_c[5]));
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b1)) u_y3 (
    .a_i(oe[1]), .b_i(oe[2]), .s_o(y_c[3]));
  ml_addsub #(.W(W3), .APPROX_BITS(APPROX_BITS), .SUB(1'b0)) u_y7 (
    .a_i(oe[1]), .b_i(oe[3]), .s_o(y_c[7]));

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      for (int k = 0; k < N_PTS; k++) y_q[k] <= '0;
    end else begin
      if (valid_q[1]) y_q <= y_c;
    end
  end

  assign out_valid_o = valid_q[LATENCY-1];

  // every accepted vector leaves the pipeline exactly LATENCY cycles later,
  // and nothing leaves that was not accepted
  a_latency : assert property (@(posedge clk_i) disable iff (!rst_ni)
    in_valid_i |-> ##LATENCY out_valid_o);
  a_no_spurious : assert property (@(posedge clk_i) disable iff (!rst_ni)
    out_valid_o |-> $past(in_valid_i, LATENCY));
  for (genvar k = 0; k < N_PTS; k++) begin : g_out
    assign y_o[k] = $signed(y_q[k]);
  end

endmodule
