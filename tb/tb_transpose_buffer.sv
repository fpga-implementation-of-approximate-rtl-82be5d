// tb_transpose_buffer - self-checking testbench of transpose_buffer.
//
// Streams 40 random 8x8 blocks of 11-bit words through the buffer: the first
// blocks back to back (rows of the next block written while the previous one
// is read out), later ones with idle cycles inside and between blocks.
// Every output column is compared with the stored block, and must carry the
// right index and appear exactly 1 + k cycles after the block's last row.
// Counts how often rows were written during a read-out and how often the
// input paused, and fails if either never happened.
module tb_transpose_buffer;
  localparam int N = 8;
  localparam int W = 11;
  localparam int NBLK = 40;

  typedef int blk_t [N][N];

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [W-1:0] in_row [N];
  logic                out_valid;
  logic signed [W-1:0] out_col [N];
  logic [2:0]          out_idx;

  int checks = 0, failures = 0, cyc = 0;
  int n_overlap = 0, n_gap = 0, n_cols = 0;
  blk_t blk_q [$];
  int   stamp_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  transpose_buffer #(.N(N), .W(W)) dut (.*);

  initial begin
    for (int i = 0; i < N; i++) in_row[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int b = 0; b < NBLK; b++) begin
      blk_t blk;
      for (int j = 0; j < N; j++) begin
        @(negedge clk);
        if (b >= 10 && $urandom_range(3, 0) == 0) begin
          in_valid = 1'b0;
          n_gap++;
          repeat ($urandom_range(3, 1)) @(negedge clk);
        end
        for (int c = 0; c < N; c++) begin
          blk[j][c] = int'($urandom_range((1 << W) - 1, 0)) - (1 << (W - 1));
          in_row[c] = W'(blk[j][c]);
        end
        in_valid = 1'b1;
        if (out_valid) n_overlap++;
      end
      blk_q.push_back(blk);
      stamp_q.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (N + 4) @(negedge clk);
    checks++;
    if (n_cols != NBLK * N) begin
      failures++;
      $display("FAIL: %0d columns out, expected %0d", n_cols, NBLK * N);
    end
    checks++;
    if (n_overlap == 0) begin
      failures++;
      $display("FAIL: no row was written during a read-out");
    end
    checks++;
    if (n_gap == 0) begin
      failures++;
      $display("FAIL: input never paused");
    end
    $display("rows written during read-out: %0d, input pauses: %0d", n_overlap, n_gap);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k;
      k = n_cols % N;
      n_cols++;
      if (blk_q.size() == 0) begin
        failures++;
        $display("FAIL: column with no block pending");
      end else begin
        checks++;
        if (int'(out_idx) != k || cyc != stamp_q[0] + 1 + k) begin
          failures++;
          $display("FAIL: column %0d at cycle %0d idx %0d, expected cycle %0d", k, cyc, out_idx, stamp_q[0] + 1 + k);
        end
        for (int i = 0; i < N; i++) begin
          checks++;
          if (int'(out_col[i]) != blk_q[0][i][k]) begin
            failures++;
            if (failures < 10) $display("FAIL: column %0d row %0d = %0d, expected %0d", k, i, out_col[i], blk_q[0][i][k]);
          end
        end
        if (k == N - 1) begin
          blk_q.delete(0);
          stamp_q.delete(0);
        end
      end
    end
  end

  initial begin
    repeat (NBLK * N * 4 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
