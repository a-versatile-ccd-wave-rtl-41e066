// tb_subap_accum: feeds frames of tagged reads whose samples arrive one pixel
// period after their tag (pipelined conversion), computes the subaperture sums
// independently and checks the result array after frame_done, a dark frame landing
// in the dark array, the pixel stream, the clearing between frames, and the error
// flag for a sample that has no tag.
module tb_subap_accum;
  import wfs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic dark = 0, tag_valid = 0, sample_valid = 0, readout_done = 0;
  tag_t tag = '0;
  logic [15:0] sample_l = '0, sample_r = '0;
  logic frame_done, frame_dark, pix_valid, err;
  logic [4:0] rd_idx = '0;
  logic [23:0] res_sum, dark_sum;
  logic [15:0] pix_l, pix_r;
  tag_t pix_tag;
  subap_accum dut (.*);

  int checks = 0, failures = 0, npix = 0, pixbad = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected pixel stream
  logic [15:0] el[$], er[$];
  always @(negedge clk) if (pix_valid) begin
    npix++;
    if (el.size() == 0 || pix_l != el[0] || pix_r != er[0]) pixbad++;
    if (el.size() != 0) begin void'(el.pop_front()); void'(er.pop_front()); end
  end

  longint exp_sum [32];

  task automatic frame(input int nreads, input bit is_dark);
    logic [15:0] l, r;
    tag_t t;
    logic [15:0] pl = 0, pr = 0;
    bit have = 0;
    for (int i = 0; i < 32; i++) exp_sum[i] = 0;
    dark = is_dark;
    for (int k = 0; k <= nreads; k++) begin
      // tag of read k, then (pipelined) the sample of read k-1
      if (k < nreads) begin
        t = '0;
        t.sub_l = 5'($urandom_range(0, 23)); if (t.sub_l > 19) t.sub_l = SUB_NONE;
        t.sub_r = 5'($urandom_range(0, 23)); if (t.sub_r > 19) t.sub_r = SUB_NONE;
        l = 16'($urandom); r = 16'($urandom);
        @(negedge clk); tag_valid = 1; tag = t;
        @(negedge clk); tag_valid = 0;
        if (t.sub_l != SUB_NONE) exp_sum[t.sub_l] += l;
        if (t.sub_r != SUB_NONE) exp_sum[t.sub_r] += r;
      end
      repeat ($urandom_range(2, 8)) @(negedge clk);
      if (have) begin
        sample_valid = 1; sample_l = pl; sample_r = pr;
        el.push_back(pl); er.push_back(pr);
        @(negedge clk); sample_valid = 0;
      end
      if (k == nreads - 1) begin readout_done = 1; @(negedge clk); readout_done = 0; end
      pl = l; pr = r; have = 1;
    end
    while (!frame_done) @(negedge clk);
    check(frame_dark == is_dark, "frame_dark flag");
  endtask

  task automatic check_sums(input bit is_dark, input string what);
    for (int i = 0; i < 20; i++) begin
      rd_idx = 5'(i); #1;
      check((is_dark ? dark_sum : res_sum) == 24'(exp_sum[i]),
            $sformatf("%s sum %0d: %0d expected %0d", what, i, is_dark ? dark_sum : res_sum, 24'(exp_sum[i])));
    end
  endtask

  initial begin
    longint keep [32];
    repeat (3) @(negedge clk);
    rst_n = 1;
    frame(104, 1);
    check_sums(1, "dark");
    for (int i = 0; i < 32; i++) keep[i] = exp_sum[i];
    frame(104, 0);
    check_sums(0, "frame 1");
    frame(37, 0);
    check_sums(0, "frame 2");
    // the dark array is untouched by ordinary frames
    for (int i = 0; i < 20; i++) begin
      rd_idx = 5'(i); #1;
      check(dark_sum == 24'(keep[i]), "dark array kept");
    end
    check(npix == 104 + 104 + 37 && pixbad == 0, $sformatf("pixel stream %0d samples, %0d wrong", npix, pixbad));
    check(!err, "no error in normal operation");
    @(negedge clk); sample_valid = 1; @(negedge clk); sample_valid = 0;
    @(negedge clk);
    check(err, "untagged sample flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
