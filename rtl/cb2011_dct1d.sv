// cb2011_dct1d - 8-point approximate DCT of Cintra and Bayer (2011), obtained
// by rounding the exact DCT matrix: 22 additions, entries in {0, +-1}.
//
// Computes y = T3 * x with
//   T3 = [ 1  1  1  1  1  1  1  1 ;   y0 = a0 + a1
//          1  1  1  0  0 -1 -1 -1 ;   y1 = d0 + d1 + d2
//          1  0  0 -1 -1  0  0  1 ;   y2 = b0
//          1  0 -1 -1  1  1  0 -1 ;   y3 = d0 - d2 - d3
//          1 -1 -1  1  1 -1 -1  1 ;   y4 = a0 - a1
//          1 -1  0  1 -1  0  1 -1 ;   y5 = d0 - d1 + d3
//          0 -1  1  0  0  1 -1  0 ;   y6 = -b1
//          0 -1  1 -1  1 -1  1  0 ]   y7 = -d1 + d2 - d3
// where s_k = x_k + x_(7-k), d_k = x_k - x_(7-k), a0 = s0 + s3, a1 = s1 + s2,
// b0 = s0 - s3, b1 = s1 - s2. The diagonal scale matrix is not applied; it
// belongs to quantisation.
//
// Structure (three register stages): input butterfly; then a0, a1, b0, b1 and
// one two-term partial sum per odd output; then the final even sum and
// difference and the third term of each odd output.
//
// Interface: one vector per clock when in_valid is high; out_valid and y
// follow 3 cycles later. Two's complement samples, OUT_W = IN_W + 3 keeps full
// precision. rst_n (synchronous, active low) clears the valid pipeline only.
// The matrix and the three-level adder network follow the published design;
// the split of the odd sums, widths, valid and reset are choices of this
// design.
module cb2011_dct1d #(
  parameter int IN_W  = 8,
  parameter int OUT_W = IN_W + 3
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
  word_t p1, p3, p5, p7;          // stage 2, odd partial sums
  word_t d2_q, d3_q;              // stage 2, third odd terms
  logic  [1:0] vp;

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      s[k] <= word_t'(x[k]) + word_t'(x[7-k]);
      d[k] <= word_t'(x[k]) - word_t'(x[7-k]);
    end
  end

  always_ff @(posedge clk) begin
    a0   <= s[0] + s[3];
    a1   <= s[1] + s[2];
    b0   <= s[0] - s[3];
    b1   <= s[1] - s[2];
    p1   <= d[0] + d[1];
    p3   <= d[0] - d[3];
    p5   <= d[0] - d[1];
    p7   <= d[2] - d[1];
    d2_q <= d[2];
    d3_q <= d[3];
  end

  always_ff @(posedge clk) begin
    y[0] <= a0 + a1;
    y[4] <= a0 - a1;
    y[2] <= b0;
    y[6] <= -b1;
    y[1] <= p1 + d2_q;
    y[3] <= p3 - d2_q;
    y[5] <= p5 + d3_q;
    y[7] <= p7 - d3_q;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      vp        <= '0;
      out_valid <= 1'b0;
    end else begin
      vp        <= {vp[0], in_valid};
      out_valid <= vp[1];
    end
  end

endmodule
