// vaithy2014_dct1d - 8-point approximate DCT of Vaithyanathan (Dhandapani and
// Ramachandran, 2014): 12 additions, no multiplication and no shift.
//
// Computes y = T7 * x with
//   T7 = [ 1  0  0  0  0  0  0  1 ;   y0 = s0
//          1  1  0  0  0  0  1  1 ;   y1 = s0 + s1
//          0  0  1  0  0  1  0  0 ;   y2 = s2
//          0  0  1  1  1  1  0  0 ;   y3 = s2 + s3
//          0  0  1  1 -1 -1  0  0 ;   y4 = d2 + d3
//          0  0  1  0  0 -1  0  0 ;   y5 = d2
//          1  1  0  0  0  0 -1 -1 ;   y6 = d0 + d1
//          1  0  0  0  0  0  0 -1 ]   y7 = d0
// where s_k = x_k + x_(7-k) and d_k = x_k - x_(7-k). The scale factor 1/2 of
// the published transform is not applied; it belongs to quantisation.
//
// Structure (two register stages, as the published architecture): stage 1
// forms the four sums and four differences, stage 2 the four second-level
// additions. Outputs that need no second addition are registered twice so
// that all eight coefficients of one input vector leave together.
//
// Interface: one vector x0..x7 per clock when in_valid is high; out_valid and
// y0..y7 follow 2 cycles later. All samples are two's complement; OUT_W keeps
// full precision (IN_W + 2). rst_n (synchronous, active low) clears the valid
// pipeline only. The matrix and the stage split follow the published design;
// word widths, the valid signal and the reset are choices of this design.
module vaithy2014_dct1d #(
  parameter int IN_W  = 8,
  parameter int OUT_W = IN_W + 2
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  x [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] y [8]
);

  typedef logic signed [OUT_W-1:0] word_t;

  word_t s [4];  // stage 1: x_k + x_(7-k)
  word_t d [4];  // stage 1: x_k - x_(7-k)
  logic  v1;

  always_ff @(posedge clk) begin
    for (int k = 0; k < 4; k++) begin
      s[k] <= word_t'(x[k]) + word_t'(x[7-k]);
      d[k] <= word_t'(x[k]) - word_t'(x[7-k]);
    end
  end

  always_ff @(posedge clk) begin
    y[0] <= s[0];
    y[1] <= s[0] + s[1];
    y[2] <= s[2];
    y[3] <= s[2] + s[3];
    y[4] <= d[2] + d[3];
    y[5] <= d[2];
    y[6] <= d[0] + d[1];
    y[7] <= d[0];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      v1        <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      v1        <= in_valid;
      out_valid <= v1;
    end
  end

endmodule
