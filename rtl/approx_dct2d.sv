// approx_dct2d - 8x8 approximate 2D DCT by the row-column method.
//
// Z = Tc * X * Tr^T, Tr and Tc being two of the seven multiplier-free 8-point
// approximations (KIND for the rows, COL_KIND for the columns, the same by
// default). The row core transforms each incoming row of the block, the
// transposition buffer turns the 8 transformed rows into 8 columns, and the
// column core transforms each column. Both cores keep full precision: the
// intermediate word is IN_W + Gr bits, the output IN_W + Gr + Gc, with
// G = approx_dct_pkg::growth of each kind. No scaling by the transforms'
// diagonal matrices is done; it is left to quantisation.
//
// Interface: in_valid/in_row take rows x[j][0..7], j = 0..7 in order, at up
// to one per clock (gaps allowed). out_valid/out_col/out_idx give column k =
// out_idx of Z, i.e. Z[0..7][k], on 8 consecutive cycles. Timing: with Lr and
// Lc the core latencies, column k of a block leaves Lr + 1 + k + Lc cycles
// after its last row entered, i.e. Lr + Lc + 8 cycles after row 0 when rows
// come back to back; blocks can follow each other without gaps. rst_n is
// synchronous and active low. The three-block structure, identical row and
// column transforms as the default, and the freedom to pair two different
// ones follow the published design; widths, latency and handshake are
// choices of this design.
module approx_dct2d
  import approx_dct_pkg::*;
#(
  parameter dct_kind_e KIND     = VAITHY2014,
  parameter dct_kind_e COL_KIND = KIND,
  parameter int        IN_W     = 8,
  parameter bas_a_e    A_MODE   = A_HALF,
  localparam int       MID_W    = IN_W + int'(growth(KIND)),
  localparam int       OUT_W    = MID_W + int'(growth(COL_KIND))
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    in_valid,
  input  logic signed [IN_W-1:0]  in_row [8],
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] out_col [8],
  output logic [2:0]              out_idx
);

  logic                    row_valid, col_valid, col_out_valid;
  logic signed [MID_W-1:0] row_coef [N];
  logic signed [MID_W-1:0] col_in   [N];
  logic [2:0]              col_idx;
  logic [2:0]              idx_pipe [latency(COL_KIND)];

  approx_dct1d #(.KIND(KIND), .IN_W(IN_W), .OUT_W(MID_W), .A_MODE(A_MODE)) u_row (
    .clk, .rst_n, .in_valid, .x(in_row), .out_valid(row_valid), .y(row_coef)
  );

  transpose_buffer #(.N(N), .W(MID_W)) u_tbuf (
    .clk, .rst_n, .in_valid(row_valid), .in_row(row_coef),
    .out_valid(col_valid), .out_col(col_in), .out_idx(col_idx)
  );

  approx_dct1d #(.KIND(COL_KIND), .IN_W(MID_W), .OUT_W(OUT_W), .A_MODE(A_MODE)) u_col (
    .clk, .rst_n, .in_valid(col_valid), .x(col_in), .out_valid(col_out_valid), .y(out_col)
  );

  // The column index travels beside the column core.
  always_ff @(posedge clk) begin
    idx_pipe[0] <= col_idx;
    for (int i = 1; i < latency(COL_KIND); i++) idx_pipe[i] <= idx_pipe[i-1];
  end

  assign out_valid = col_out_valid;
  assign out_idx   = idx_pipe[latency(COL_KIND)-1];

endmodule
