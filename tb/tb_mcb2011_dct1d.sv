// tb_mcb2011_dct1d - self-checking testbench of mcb2011_dct1d (modified CB-2011 8-point approximate DCT).
//
// Drives 500 vectors (extremes, ramps, then random) with occasional idle
// cycles, compares every output vector with dct_ref_pkg::ref1d (the transform
// matrix written out entry by entry) and checks that each result appears
// exactly 3 cycles after its input. Also checks that every input produced
// one output. A watchdog ends the run if the pipeline stalls.
module tb_mcb2011_dct1d;
  import dct_ref_pkg::*;

  localparam int IN_W  = 8;
  localparam int OUT_W = IN_W + 3;
  localparam int LAT   = 3;
  localparam int NVEC  = 500;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic in_valid = 1'b0;
  logic signed [IN_W-1:0]  x [8];
  logic                    out_valid;
  logic signed [OUT_W-1:0] y [8];

  int checks = 0, failures = 0, cyc = 0, n_in = 0, n_out = 0;
  vec_t exp_q [$];
  int   stamp_q [$];

  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;

  mcb2011_dct1d #(.IN_W(IN_W), .OUT_W(OUT_W)) dut (.*);

  initial begin
    for (int i = 0; i < 8; i++) x[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int n = 0; n < NVEC; n++) begin
      vec_t v;
      @(negedge clk);
      if (n > 20 && $urandom_range(7, 0) == 0) begin
        in_valid = 1'b0;
        @(negedge clk);
      end
      for (int i = 0; i < 8; i++) begin
        v[i] = sample((n < 20) ? (n % 5) : 0, n * 8 + i, IN_W);
        x[i] = IN_W'(v[i]);
      end
      in_valid = 1'b1;
      exp_q.push_back(ref1d(3, v));
      stamp_q.push_back(cyc);
      n_in++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    repeat (LAT + 5) @(negedge clk);
    checks++;
    if (n_out != n_in) begin
      failures++;
      $display("FAIL: %0d inputs gave %0d outputs", n_in, n_out);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (rst_n && out_valid) begin
      vec_t e;
      int   st;
      n_out++;
      if (exp_q.size() == 0) begin
        failures++;
        $display("FAIL: output with no input pending");
      end else begin
        e  = exp_q[0];
        st = stamp_q[0];
        exp_q.delete(0);
        stamp_q.delete(0);
        checks++;
        if (cyc - st != LAT) begin
          failures++;
          $display("FAIL: latency %0d, expected %0d", cyc - st, LAT);
        end
        for (int i = 0; i < 8; i++) begin
          checks++;
          if (int'(y[i]) != e[i]) begin
            failures++;
            if (failures < 10) $display("FAIL: vector %0d y%0d = %0d, expected %0d", n_out - 1, i, y[i], e[i]);
          end
        end
      end
    end
  end

  initial begin
    repeat (NVEC * 3 + 200) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
