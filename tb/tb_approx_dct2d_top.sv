// tb_approx_dct2d_top - end-to-end testbench of approx_dct2d_top at its
// default parameters.
//
// Feeds each of the seven 2D engines its own stream of 8x8 blocks (extremes,
// a ramp, random data; back to back, then with pauses) through a
// dct2d_harness, which checks every coefficient column against a
// row-then-column reference of that engine's transform, the column index and
// the latency 2*L + 8. Every engine must see blocks overlapping in its
// pipeline and input pauses at least once.
module tb_approx_dct2d_top;
  import approx_dct_pkg::*;

  localparam int IN_W  = 8;
  localparam int OUT_W = IN_W + 8;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [NUM_KINDS-1:0]    in_valid, out_valid;
  logic signed [IN_W-1:0]  in_row  [NUM_KINDS][8];
  logic signed [OUT_W-1:0] out_col [NUM_KINDS][8];
  logic [2:0]              out_idx [NUM_KINDS];
  int                      chk [NUM_KINDS];
  int                      fail [NUM_KINDS];
  logic [NUM_KINDS-1:0]    done;

  approx_dct2d_top dut (.*);

  for (genvar e = 0; e < NUM_KINDS; e++) begin : g_h
    dct2d_harness #(.KIDX(e), .AMODE(1), .IN_W(IN_W), .OW(OUT_W),
                    .LAT(int'(latency(dct_kind_e'(e)))), .NBLK(24)) h (
      .clk, .rst_n, .in_valid(in_valid[e]), .in_row(in_row[e]),
      .out_valid(out_valid[e]), .out_col(out_col[e]), .out_idx(out_idx[e]),
      .checks(chk[e]), .failures(fail[e]), .done(done[e]));
  end

  function automatic int total(int a [NUM_KINDS]);
    int s = 0;
    for (int i = 0; i < NUM_KINDS; i++) s += a[i];
    return s;
  endfunction

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    wait (&done);
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail));
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", total(chk), total(fail) + 1);
    $finish;
  end
endmodule
