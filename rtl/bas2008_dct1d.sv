// bas2008_dct1d - 8-point approximate DCT of Bouguezel, Ahmad and Swamy
// (2008): 18 additions and 2 shifts, no multiplication.
//
// Computes y = T1 * x with
//   T1 = [ 1    1    1    1    1    1    1    1   ;  y0 = a0 + a1
//          1    1    0    0    0    0   -1   -1   ;  y1 = d0 + d1
//          1   1/2 -1/2  -1   -1  -1/2  1/2   1   ;  y2 = b0 + b1/2
//          0    0   -1    0    0    1    0    0   ;  y3 = -d2
//          1   -1   -1    1    1   -1   -1    1   ;  y4 = a0 - a1
//          1   -1    0    0    0    0    1   -1   ;  y5 = d0 - d1
//         1/2  -1    1  -1/2 -1/2   1   -1   1/2  ;  y6 = b0/2 - b1
//          0    0    0   -1    1    0    0    0   ]  y7 = -d3
// where s_k = x_k + x_(7-k), d_k = x_k - x_(7-k), a0 = s0 + s3, a1 = s1 + s2,
// b0 = s0 - s3, b1 = s1 - s2. A halving is an arithmetic right shift by one
// bit, so y2 and y6 are rounded toward minus infinity. The diagonal scale
// matrix is not applied; it belongs to quantisation.
//
// Structure (three register stages, as the published architecture): input
// butterfly; then a0, a1, b0, b1 and the odd terms d0 + d1, d0 - d1, -d2, -d3;
// then the shifters and the last sum and difference of each even pair.
//
// Interface: one vector per clock when in_valid is high; out_valid and y
// follow 3 cycles later. Two's complement samples, OUT_W = IN_W + 3 keeps full
// integer precision. rst_n (synchronous, active low) clears the valid pipeline
// only. The matrix and the adder network follow the published design; word
// widths, rounding, the valid signal and the reset are choices of this design.
module bas2008_dct1d #(
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
    o1 <= d[0] + d[1];
    o5 <= d[0] - d[1];
    o3 <= -d[2];
    o7 <= -d[3];
  end

  always_ff @(posedge clk) begin
    y[0] <= a0 + a1;
    y[4] <= a0 - a1;
    y[2] <= b0 + (b1 >>> 1);
    y[6] <= (b0 >>> 1) - b1;
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
