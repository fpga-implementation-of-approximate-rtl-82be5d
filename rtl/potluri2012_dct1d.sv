// potluri2012_dct1d - 8-point approximate DCT of Potluri et al. (2012) for RF
// multi-beam imaging: 24 additions and 6 shifts, entries in {0, +-1, +-2}.
//
// Computes y = T5 * x with
//   T5 = [ 1  1  1  1  1  1  1  1 ;   y0 = a0 + a1
//          2  1  1  0  0 -1 -1 -2 ;   y1 = 2d0 + d1 + d2
//          2  1 -1 -2 -2 -1  1  2 ;   y2 = 2b0 + b1
//          1  0 -2 -1  1  2  0 -1 ;   y3 = d0 - 2d2 - d3
//          1 -1 -1  1  1 -1 -1  1 ;   y4 = a0 - a1
//          1 -2  0  1 -1  0  2 -1 ;   y5 = d0 - 2d1 + d3
//          1 -2  2 -1 -1  2 -2  1 ;   y6 = b0 - 2b1
//          0 -1  1 -2  2 -1  1  0 ]   y7 = -d1 + d2 - 2d3
// where s_k = x_k + x_(7-k), d_k = x_k - x_(7-k), a0 = s0 + s3, a1 = s1 + s2,
// b0 = s0 - s3, b1 = s1 - s2. A doubling is a left shift by one bit. The
// diagonal scale matrix is not applied; it belongs to quantisation.
//
// Structure (four register stages): input butterfly; a0, a1, b0, b1 with the
// differences carried along; the even outputs and one two-term partial sum per
// odd output; the third term of each odd output. The even outputs wait one
// stage so that all eight coefficients leave together.
//
// Interface: one vector per clock when in_valid is high; out_valid and y
// follow 4 cycles later. Two's complement samples, OUT_W = IN_W + 4 keeps full
// precision. rst_n (synchronous, active low) clears the valid pipeline only.
// The matrix and the adder-and-shifter network follow the published design;
// the balancing of stages, widths, valid and reset are choices of this design.
module potluri2012_dct1d #(
  parameter int IN_W  = 8,
  parameter int OUT_W = IN_W + 4
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y [8]
);

  typedef logic signed [OUT_W-1:0] word_t;

  word_t s [4], d [4];            // stage 1
  word_t a0, a1, b0, b1;          // stage 2, even part
  word_t d_q [4];                 // stage 2, differences carried along
  word_t e0, e2, e4, e6;          // stage 3, even outputs
  word_t p1, p3, p5, p7;          // stage 3, odd partial sums
  word_t d2_q, d3_q;              // stage 3, third odd terms
  logic  [2:0] vp;

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      s[k] <= word_t'(x[k]) + word_t'(x[7-k]);
      d[k] <= word_t'(x[k]) - word_t'(x[7-k]);
    end
  end

  always_ff @(posedge clk) begin
    a0  <= s[0] + s[3];
    a1  <= s[1] + s[2];
    b0  <= s[0] - s[3];
    b1  <= s[1] - s[2];
    d_q <= d;
  end

  always_ff @(posedge clk) begin
    e0   <= a0 + a1;
    e4   <= a0 - a1;
    e2   <= (b0 <<< 1) + b1;
    e6   <= b0 - (b1 <<< 1);
    p1   <= (d_q[0] <<< 1) + d_q[1];
    p3   <= d_q[0] - (d_q[2] <<< 1);
    p5   <= d_q[0] - (d_q[1] <<< 1);
    p7   <= d_q[2] - d_q[1];
    d2_q <= d_q[2];
    d3_q <= d_q[3];
  end

  always_ff @(posedge clk) begin
    y[0] <= e0;
    y[2] <= e2;
    y[4] <= e4;
    y[6] <= e6;
    y[1] <= p1 + d2_q;
    y[3] <= p3 - d3_q;
    y[5] <= p5 + d3_q;
    y[7] <= p7 - (d3_q <<< 1);
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vp        <= '0;
      out_valid <= 1'b0;
    end else begin
      vp        <= {vp[1:0], in_valid};
      out_valid <= vp[2];
    end
  end

endmodule
