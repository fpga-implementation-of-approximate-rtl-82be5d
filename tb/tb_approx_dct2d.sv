// tb_approx_dct2d - self-checking testbench of the 2D engine approx_dct2d.
//
// Runs four engines at once: the default one (Vaithyanathan-2014), the two
// BAS-2011 variants that the top level does not use (a = 0 and a = 1), and
// one that pairs two different transforms (CB-2011 on the rows, Potluri-2012
// on the columns). Each is driven and checked by a dct2d_harness against a
// row-then-column reference 2D transform, with latency Lr + Lc + 8 for
// back-to-back rows.
module tb_approx_dct2d;
  import approx_dct_pkg::*;

  localparam int IN_W = 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  // Default engine.
  logic                  iv0, ov0;
  logic signed [7:0]     ir0 [8];
  logic signed [11:0]    oc0 [8];
  logic [2:0]            ox0;
  int                    c0, f0;
  logic                  d0;
  approx_dct2d dut0 (.clk, .rst_n, .in_valid(iv0), .in_row(ir0),
                     .out_valid(ov0), .out_col(oc0), .out_idx(ox0));
  dct2d_harness #(.KIDX(6), .AMODE(1), .IN_W(IN_W), .OW(12), .LAT(2), .NBLK(30)) h0 (
    .clk, .rst_n, .in_valid(iv0), .in_row(ir0), .out_valid(ov0), .out_col(oc0),
    .out_idx(ox0), .checks(c0), .failures(f0), .done(d0));

  // BAS-2011 with a = 0.
  logic                  iv1, ov1;
  logic signed [7:0]     ir1 [8];
  logic signed [13:0]    oc1 [8];
  logic [2:0]            ox1;
  int                    c1, f1;
  logic                  d1;
  approx_dct2d #(.KIND(BAS2011), .A_MODE(A_ZERO)) dut1 (.clk, .rst_n, .in_valid(iv1), .in_row(ir1),
                     .out_valid(ov1), .out_col(oc1), .out_idx(ox1));
  dct2d_harness #(.KIDX(1), .AMODE(0), .IN_W(IN_W), .OW(14), .LAT(3), .NBLK(30)) h1 (
    .clk, .rst_n, .in_valid(iv1), .in_row(ir1), .out_valid(ov1), .out_col(oc1),
    .out_idx(ox1), .checks(c1), .failures(f1), .done(d1));

  // BAS-2011 with a = 1.
  logic                  iv2, ov2;
  logic signed [7:0]     ir2 [8];
  logic signed [13:0]    oc2 [8];
  logic [2:0]            ox2;
  int                    c2, f2;
  logic                  d2;
  approx_dct2d #(.KIND(BAS2011), .A_MODE(A_ONE)) dut2 (.clk, .rst_n, .in_valid(iv2), .in_row(ir2),
                     .out_valid(ov2), .out_col(oc2), .out_idx(ox2));
  dct2d_harness #(.KIDX(1), .AMODE(2), .IN_W(IN_W), .OW(14), .LAT(3), .NBLK(30)) h2 (
    .clk, .rst_n, .in_valid(iv2), .in_row(ir2), .out_valid(ov2), .out_col(oc2),
    .out_idx(ox2), .checks(c2), .failures(f2), .done(d2));

  // CB-2011 rows, Potluri-2012 columns.
  logic                  iv3, ov3;
  logic signed [7:0]     ir3 [8];
  logic signed [14:0]    oc3 [8];
  logic [2:0]            ox3;
  int                    c3, f3;
  logic                  d3;
  approx_dct2d #(.KIND(CB2011), .COL_KIND(POTLURI2012)) dut3 (.clk, .rst_n, .in_valid(iv3), .in_row(ir3),
                     .out_valid(ov3), .out_col(oc3), .out_idx(ox3));
  dct2d_harness #(.KIDX(2), .CKIDX(4), .AMODE(1), .IN_W(IN_W), .OW(15), .LAT(3), .CLAT(4), .NBLK(30)) h3 (
    .clk, .rst_n, .in_valid(iv3), .in_row(ir3), .out_valid(ov3), .out_col(oc3),
    .out_idx(ox3), .checks(c3), .failures(f3), .done(d3));

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (d0 && d1 && d2 && d3);
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", c0 + c1 + c2 + c3, f0 + f1 + f2 + f3 + 1);
    $finish;
  end
endmodule
