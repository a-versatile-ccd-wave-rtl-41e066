// tb_curvature_unit: random frame and dark sums and geometric factors for 19
// subapertures; the expected curvature (G(I-B) - I_S)/I_S is computed in floating
// point and compared with each result to within 2 LSB.  Also checks the order of
// results, that all 19 are derived in under 20 us (400 cycles at 20 MHz) after the
// start, and the no-signal case.
module tb_curvature_unit;
  import wfs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #25 clk = ~clk;

  logic g_we = 0, start = 0;
  logic [4:0] g_addr = '0, nsub = 5'd19, rd_idx, out_idx;
  logic [15:0] g_wdata = '0;
  logic [23:0] res_sum, dark_sum;
  logic out_valid, done, no_signal, busy;
  logic signed [23:0] out_val;
  curvature_unit dut (.*);

  int unsigned I [32], B [32], G [32];
  assign res_sum  = 24'(I[rd_idx]);
  assign dark_sum = 24'(B[rd_idx]);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run_frame(input bit expect_signal);
    real is_sum, e, got;
    int n, cyc;
    is_sum = 0;
    for (int i = 0; i < 19; i++) is_sum += real'(I[i]) - real'(B[i]);
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    n = 0; cyc = 1;
    while (!done) begin
      if (out_valid) begin
        check(out_idx == 5'(n), $sformatf("result order %0d", out_idx));
        e   = expect_signal ? (real'(G[n]) / 256.0 * (real'(I[n]) - real'(B[n])) - is_sum) / is_sum : 0.0;
        got = real'(out_val) / 65536.0;
        check((got - e) < 2.0 / 65536.0 && (e - got) < 2.0 / 65536.0,
              $sformatf("subaperture %0d: %f expected %f", n, got, e));
        n++;
      end
      @(negedge clk); cyc++;
    end
    if (out_valid) begin
      e   = expect_signal ? (real'(G[n]) / 256.0 * (real'(I[n]) - real'(B[n])) - is_sum) / is_sum : 0.0;
      got = real'(out_val) / 65536.0;
      check((got - e) < 2.0 / 65536.0 && (e - got) < 2.0 / 65536.0, $sformatf("subaperture %0d: %f expected %f", n, got, e));
      n++;
    end
    check(n == 19, $sformatf("19 results, got %0d", n));
    check(cyc < 400, $sformatf("all curvatures within 20 us: %0d cycles", cyc));
    check(no_signal == !expect_signal, "no_signal flag");
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1;
    for (int f = 0; f < 6; f++) begin
      for (int i = 0; i < 19; i++) begin
        B[i] = $urandom_range(500, 3000);
        I[i] = B[i] + $urandom_range(0, 60000);
        if (f == 5 && i == 3) I[i] = B[i] - 200;      // a dark-limited subaperture
        G[i] = $urandom_range(256 * 15, 256 * 25);     // about 19 subapertures per aperture
        @(negedge clk); g_we = 1; g_addr = 5'(i); g_wdata = 16'(G[i]);
      end
      @(negedge clk); g_we = 0;
      run_frame(1);
    end
    // no light: I_S <= 0
    for (int i = 0; i < 19; i++) I[i] = B[i];
    run_frame(0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
