// transpose_buffer - real-time row-parallel transposition buffer between the
// row and the column 1D DCT of the 2D transform.
//
// Takes an N x N block one row per clock (N samples in parallel) and gives it
// out one column per clock (N samples in parallel), so that the column
// transform sees the transposed block. The storage is one N x N array of
// registers, read through N multiplexers of N inputs each (one per output
// sample), steered by a counter: the same parts as the published circuit.
//
// How the stream keeps flowing with only N*N registers: blocks are written in
// alternating orientation. A block written row-wise (row j into register line
// j) is read column-wise, and column k is register column k; the next block is
// therefore written column-wise, its row k going into register column k,
// which is exactly the line that reading column k of the old block has just
// freed. The block after that is again written row-wise, and so on. Reading
// the old block starts in the cycle after its last row is written and takes
// N cycles, never slower than the next block's rows can arrive, so a row never
// overwrites unread data (checked by an assertion) and no stall is needed.
//
// Interface: in_valid/in_row carry rows 0..N-1 of each block in order; gaps
// between rows are allowed. out_valid/out_col/out_idx give column out_idx =
// 0..N-1 of the last complete block on N consecutive cycles, starting the
// cycle after its last row was clocked in. out_col is read combinationally from
// the registers. rst_n (synchronous, active low) restarts at row 0; the data
// registers are not reset. The register array, multiplexers and counter follow
// the published circuit; the alternating orientation, the second (read)
// counter and the timing are choices of this design.
module transpose_buffer #(
  parameter int N = 8,
  parameter int W = 11
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic signed [W-1:0]  in_row [N],
  output logic                 out_valid,
  output logic signed [W-1:0]  out_col [N],
  output logic [$clog2(N)-1:0] out_idx
);

  typedef logic [$clog2(N)-1:0] idx_t;
  localparam idx_t LAST = idx_t'(N - 1);

  logic signed [W-1:0] mem [N][N];  // mem[r][c]: register row r, column c

  idx_t wr_cnt;     // row of the block being written
  logic wr_orient;  // 0: row j -> mem[j][*], 1: row j -> mem[*][j]
  logic rd_busy;    // a complete block is being read out
  idx_t rd_cnt;     // column being read
  logic rd_orient;  // orientation the block being read was written in

  wire block_done = in_valid && (wr_cnt == LAST);

  // Write side: the row counter and the register array.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_cnt    <= '0;
      wr_orient <= 1'b0;
    end else if (in_valid) begin
      wr_cnt <= (wr_cnt == LAST) ? '0 : wr_cnt + 1'b1;
      if (wr_cnt == LAST) wr_orient <= ~wr_orient;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid) begin
      for (int c = 0; c < N; c++) begin
        if (wr_orient) mem[c][wr_cnt] <= in_row[c];
        else           mem[wr_cnt][c] <= in_row[c];
      end
    end
  end

  // Read side: starts when a block completes, then runs N cycles.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      rd_busy   <= 1'b0;
      rd_cnt    <= '0;
      rd_orient <= 1'b0;
    end else if (block_done) begin
      rd_busy   <= 1'b1;
      rd_cnt    <= '0;
      rd_orient <= wr_orient;
    end else if (rd_busy) begin
      rd_cnt <= (rd_cnt == LAST) ? '0 : rd_cnt + 1'b1;
      if (rd_cnt == LAST) rd_busy <= 1'b0;
    end
  end

  // N output multiplexers, each choosing among N registers.
  always_comb begin
    for (int i = 0; i < N; i++)
      out_col[i] = rd_orient ? mem[rd_cnt][i] : mem[i][rd_cnt];
  end

  assign out_valid = rd_busy;
  assign out_idx   = rd_cnt;

  // A row may only go into a register line that has already been read (or
  // is read in this very cycle) when the line still holds the previous block.
  property no_overwrite_unread;
    @(posedge clk) disable iff (!rst_n)
      (in_valid && rd_busy) |-> (wr_cnt <= rd_cnt);
  endproperty
  assert property (no_overwrite_unread)
    else $error("transpose_buffer: row %0d written over unread column %0d", wr_cnt, rd_cnt);

endmodule
