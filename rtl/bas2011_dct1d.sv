// bas2011_dct1d - parametric 8-point approximate DCT of Bouguezel, Ahmad and
// Swamy (2011), with parameter a in {0, 1/2, 1}; no multiplication.
//
// Computes y = T2 * x with
//   T2 = [ 1  1  1  1  1  1  1  1 ;   y0 = a0 + a1
//          1  1  0  0  0  0 -1 -1 ;   y1 = d0 + d1
//          1  a -a -1 -1 -a  a  1 ;   y2 = b0 + a*b1
//          0  0  1  0  0 -1  0  0 ;   y3 = d2
//          1 -1 -1  1  1 -1 -1  1 ;   y4 = a0 - a1
//          0  0  0  1 -1  0  0  0 ;   y5 = d3
//          1 -1  0  0  0  0  1 -1 ;   y6 = d0 - d1
//          a -1  1 -a -a  1 -1  a ]   y7 = a*b0 - b1
// where s_k = x_k + x_(7-k), d_k = x_k - x_(7-k), a0 = s0 + s3, a1 = s1 + s2,
// b0 = s0 - s3, b1 = s1 - s2. With a = 1/2 (the default, A_HALF) the
// multiplication by a is an arithmetic right shift, rounding toward minus
// infinity; a = 0 drops the term and a = 1 adds it unshifted. The diagonal
// scale matrix is not applied; it belongs to quantisation.
//
// Structure (three register stages): input butterfly; a0, a1, b0, b1 and the
// odd sum and difference; then shifters and the last even additions.
//
// Interface: one vector per clock when in_valid is high; out_valid and y
// follow 3 cycles later. Two's complement samples, OUT_W = IN_W + 3 keeps full
// integer precision. rst_n (synchronous, active low) clears the valid pipeline
// only. The matrix and the adder network follow the published design; the
// value of a, widths, rounding, valid and reset are choices of this design.
module bas2011_dct1d
  import approx_dct_pkg::*;
#(
  parameter int     IN_W   = 8,
  parameter int     OUT_W  = IN_W + 3,
  parameter bas_a_e A_MODE = A_HALF
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
  word_t o1, o3, o5, o6;          // stage 2, odd part
  word_t ab0, ab1;                // a*b0, a*b1
  logic  [1:0] vp;

  always_comb begin
    case (A_MODE)
      A_ZERO:  begin ab0 = '0;       ab1 = '0;       end
      A_ONE:   begin ab0 = b0;       ab1 = b1;       end
      default: begin ab0 = b0 >>> 1; ab1 = b1 >>> 1; end
    endcase
  end

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
    o6 <= d[0] - d[1];
    o3 <= d[2];
    o5 <= d[3];
  end

  always_ff @(posedge clk) begin
    y[0] <= a0 + a1;
    y[4] <= a0 - a1;
    y[2] <= b0 + ab1;
    y[7] <= ab0 - b1;
    y[1] <= o1;
    y[3] <= o3;
    y[5] <= o5;
    y[6] <= o6;
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
