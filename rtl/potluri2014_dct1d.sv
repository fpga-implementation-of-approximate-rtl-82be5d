// potluri2014_dct1d - improved 8-point approximate DCT of Potluri et al.
// (2014): 14 additions, no multiplication and no shift.
//
// Computes y = T6 * x with
//   T6 = [ 1  1  1  1  1  1  1  1 ;   y0 = a0 + a1
//          0  1  0  0  0  0 -1  0 ;   y1 = d1
//          1  0  0 -1 -1  0  0  1 ;   y2 = b0
//          1  0  0  0  0  0  0 -1 ;   y3 = d0
//          1 -1 -1  1  1 -1 -1  1 ;   y4 = a0 - a1
//          0  0  0  1 -1  0  0  0 ;   y5 = d3
//          0 -1  1  0  0  1 -1  0 ;   y6 = -b1
//          0  0  1  0  0 -1  0  0 ]   y7 = d2
// where s_k = x_k + x_(7-k), d_k = x_k - x_(7-k), a0 = s0 + s3, a1 = s1 + s2,
// b0 = s0 - s3, b1 = s1 - s2. The diagonal scale matrix is not applied; it
// belongs to quantisation.
//
// Structure (three register stages): input butterfly, then a0/a1/b0/b1, then
// the sum and difference of a0 and a1. The other outputs pass through
// registers so that all eight coefficients leave in the same cycle.
//
// Interface: one vector per clock when in_valid is high; out_valid and y
// follow 3 cycles later. Two's complement samples, OUT_W = IN_W + 3 keeps full
// precision. rst_n (synchronous, active low) clears the valid pipeline only.
// The matrix and the adder network follow the published design; word widths,
// the valid signal and the reset are choices of this design.
module potluri2014_dct1d #(
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
  word_t o1, o3, o5, o7;          // stage 2, odd part
  logic  [1:0] vp;

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      s[k] <= word_t'(x[k]) + word_t'(x[7-k]);
      d[k] <= word_t'(x[k]) - word_t'(x[7-k]);
    end
  end

  always_ff @(posedge clk) begin
    a0 <= s[0] + s[3];
    a1 <= s[1] + s[2];
    b0 <= s[0] - s[3];
    b1 <= s[1] - s[2];
    o1 <= d[1];
    o3 <= d[0];
    o5 <= d[3];
    o7 <= d[2];
  end

  always_ff @(posedge clk) begin
    y[0] <= a0 + a1;
    y[4] <= a0 - a1;
    y[2] <= b0;
    y[6] <= -b1;
    y[1] <= o1;
    y[3] <= o3;
    y[5] <= o5;
    y[7] <= o7;
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
