// dct2d_harness - stimulus and checker for one 8x8 approximate 2D DCT engine.
//
// Drives NBLK blocks of IN_W-bit rows into an engine (first extremes and a
// ramp, then random data), back to back at first and later with idle cycles
// inside and between blocks. Each output column is compared with
// dct_ref_pkg::ref2d, must carry its column index and must leave exactly
// LAT + CLAT + 1 + k cycles after the block's last row went in. Counts rows that
// entered while the engine was still giving out columns (blocks overlapping
// in the pipeline) and input pauses; each must happen at least once. Raises
// done when every column has been seen or after a drain time.
module dct2d_harness #(
  parameter int KIDX  = 6,  // transform, order of approx_dct_pkg::dct_kind_e
  parameter int AMODE = 1,  // BAS-2011 a: 0, 1/2, 1
  parameter int IN_W  = 8,
  parameter int OW    = 12,
  parameter int LAT   = 2,  // row core latency
  parameter int CKIDX = KIDX, // column transform
  parameter int CLAT  = LAT,  // column core latency
  parameter int NBLK  = 20
) (
  input  logic                   clk,
  input  logic                   rst_n,
  output logic                   in_valid,
  output logic signed [IN_W-1:0] in_row [8],
  input  logic                   out_valid,
  input  logic signed [OW-1:0]   out_col [8],
  input  logic [2:0]             out_idx,
  output int                     checks,
  output int                     failures,
  output logic                   done
);
  import dct_ref_pkg::*;

  int   cyc = 0, n_cols = 0, n_overlap = 0, n_gap = 0;
  mat_t exp_q [$];
  int   stamp_q [$];

  initial begin
    checks   = 0;
    failures = 0;
    done     = 1'b0;
    in_valid = 1'b0;
    for (int i = 0; i < 8; i++) in_row[i] = '0;
  end

  always @(posedge clk) cyc <= cyc + 1;

  initial begin
    @(posedge rst_n);
    for (int b = 0; b < NBLK; b++) begin
      mat_t blk;
      for (int j = 0; j < 8; j++) begin
        @(negedge clk);
        if (b >= NBLK / 2 && $urandom_range(3, 0) == 0) begin
          in_valid = 1'b0;
          n_gap++;
          repeat ($urandom_range(4, 1)) @(negedge clk);
        end
        for (int c = 0; c < 8; c++) begin
          blk[j][c] = sample((b < 5) ? b : 0, j * 8 + c, IN_W);
          in_row[c] = IN_W'(blk[j][c]);
        end
        in_valid = 1'b1;
        if (out_valid) n_overlap++;
      end
      exp_q.push_back(ref2d(KIDX, blk, AMODE, CKIDX));
      stamp_q.push_back(cyc);
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + CLAT + 20) @(negedge clk);
    checks++;
    if (n_cols != NBLK * 8) begin
      failures++;
      $display("FAIL kind %0d: %0d columns out, expected %0d", KIDX, n_cols, NBLK * 8);
    end
    checks++;
    if (n_overlap == 0) begin
      failures++;
      $display("FAIL kind %0d: blocks never overlapped in the pipeline", KIDX);
    end
    checks++;
    if (n_gap == 0) begin
      failures++;
      $display("FAIL kind %0d: input never paused", KIDX);
    end
    $display("kind %0d/%0d a_mode %0d: %0d columns, %0d overlapping rows, %0d input pauses",
             KIDX, CKIDX, AMODE, n_cols, n_overlap, n_gap);
    done = 1'b1;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      int k;
      k = n_cols % 8;
      n_cols++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL kind %0d: column with no block pending", KIDX);
      end else begin
        checks++;
        if (int'(out_idx) != k || cyc != stamp_q[0] + LAT + CLAT + 1 + k) begin
          failures++;
          $display("FAIL kind %0d: column %0d at cycle %0d idx %0d, expected cycle %0d",
                   KIDX, k, cyc, out_idx, stamp_q[0] + LAT + CLAT + 1 + k);
        end
        for (int u = 0; u < 8; u++) begin
          checks++;
          if (int'(out_col[u]) != exp_q[0][u][k]) begin
            failures++;
            if (failures < 10)
              $display("FAIL kind %0d: block %0d Z[%0d][%0d] = %0d, expected %0d",
                       KIDX, (n_cols - 1) / 8, u, k, out_col[u], exp_q[0][u][k]);
          end
        end
        if (k == 7) begin
          exp_q.delete(0);
          stamp_q.delete(0);
        end
      end
    end
  end
endmodule
