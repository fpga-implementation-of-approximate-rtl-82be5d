// approx_dct2d_top - the seven approximate 8x8 2D DCTs side by side.
//
// Holds one row-column 2D engine (approx_dct2d) for each multiplier-free DCT
// approximation, in the order BAS-2008, BAS-2011 (a = 1/2), CB-2011,
// modified CB-2011, Potluri-2012, Potluri-2014, Vaithyanathan-2014 (index
// 0..6, approx_dct_pkg::dct_kind_e). The engines share clock and reset and
// nothing else: each has its own row input and column output, so they can be
// fed the same image or different ones and compared.
//
// Interface, per engine e: in_valid[e]/in_row[e] take rows of an 8x8 block,
// IN_W-bit two's complement samples, one row per clock at most.
// out_valid[e]/out_col[e]/out_idx[e] give coefficient column out_idx of that
// block on 8 consecutive cycles, sign-extended to the common width OUT_W
// (IN_W + 8, enough for the widest, Potluri-2012). Latency from row 0 to
// column 0 is 2*L + 8 cycles, L = 2, 3 or 4 per approx_dct_pkg::latency.
// Building all seven together follows the comparison the design was made
// for; the common width and shared reset are choices of this design.
module approx_dct2d_top
  import approx_dct_pkg::*;
#(
  parameter int IN_W  = 8,
  parameter int OUT_W = IN_W + 8
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic [NUM_KINDS-1:0]    in_valid,
  input  logic signed [IN_W-1:0]  in_row  [NUM_KINDS][8],
  output logic [NUM_KINDS-1:0]    out_valid,
  output logic signed [OUT_W-1:0] out_col [NUM_KINDS][8],
  output logic [2:0]              out_idx [NUM_KINDS]
);

  for (genvar e = 0; e < NUM_KINDS; e++) begin : g_engine
    localparam dct_kind_e KIND = dct_kind_e'(e);
    localparam int        EW   = IN_W + 2 * int'(growth(KIND));

    logic signed [EW-1:0] col [8];

    approx_dct2d #(.KIND(KIND), .IN_W(IN_W), .A_MODE(A_HALF)) u_dct2d (
      .clk, .rst_n,
      .in_valid (in_valid[e]),
      .in_row   (in_row[e]),
      .out_valid(out_valid[e]),
      .out_col  (col),
      .out_idx  (out_idx[e])
    );

    always_comb begin
      for (int i = 0; i < 8; i++) out_col[e][i] = OUT_W'(col[i]);
    end
  end

endmodule
