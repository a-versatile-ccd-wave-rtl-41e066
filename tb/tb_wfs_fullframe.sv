// tb_wfs_fullframe: reads whole frames pixel by pixel through both amplifiers, at the
// controller's default parameters, against the behavioural CCD model:
//   1. 64x64 with frame transfer (raster 64 rows x 32 columns per amplifier, no binning),
//   2. 64x128 without frame transfer (the storage half, then the image half), after
//      replacing the parallel-readout fragment with one that clocks the image-area
//      phases too, so that all 128 lines move toward the serial register,
//   3. 64x64 with frame transfer again, at 10 us per read instead of 20 us: the hold
//      counts of INT+, the serial transfer and INT- are rewritten (both integrations
//      8 us -> 4 us, so every code is half the charge plus the bias).
// Every pixel is compared with the charge placed in the model plus the converter
// bias; the frame readout times are compared with 50 cycles per line plus 400 (or
// 200) per read.
module tb_wfs_fullframe;
  import wfs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #25 clk = ~clk;

  logic [15:0] host_addr = '0;
  logic host_we = 0;
  logic [31:0] host_wdata = '0;
  logic bad_addr;
  clk_word_t clk_word;
  logic adc_busy;
  logic [15:0] adc_l, adc_r;
  logic [1:0] adc_rd_sel = '0;
  logic [7:0] adc_rd_byte;
  logic pix_valid;
  logic [15:0] pix_l, pix_r;
  tag_t pix_tag;
  logic curv_valid, curv_done, no_signal;
  logic [4:0] curv_idx;
  logic signed [23:0] curv_val;
  logic frame_start, readout_done, frame_done, frame_dark, readout_busy, tag_err;

  wfs_controller dut (.*);
  ccd_model #(.BIAS_L(200), .BIAS_R(150)) ccd (.clk, .clk_word, .adc_busy, .adc_l, .adc_r);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (4_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_we = 1;
    @(negedge clk); host_we = 0;
  endtask

  function automatic int img_q(input int r, input int c);
    return 1 + ((r * 31 + c * 17 + r * c) % 251);
  endfunction
  function automatic int sto_q(input int r, input int c);
    return 300 + ((r * 5 + c * 3) % 97);
  endfunction

  // read one raster frame of `rows` lines and compare every pixel
  // (div: integration shortened by this factor, so the codes shrink by it too)
  task automatic read_frame(input int rows, input bit from_storage_first, input int div,
                            output int cycles, output int bad, output int n);
    int t;
    bad = 0; n = 0; t = 0;
    wr(16'h0500 + 16'(CFG_RUN), 32'b10);
    while (!frame_start) @(posedge clk);
    fork
      begin
        @(posedge clk);
        while (!readout_done) begin @(posedge clk); t++; end
        cycles = t + 1;
      end
      begin
        while (n < rows * 32) begin
          @(posedge clk);
          if (pix_valid) begin
            int row, col, wl, wr_;
            row = n / 32; col = n % 32;
            if (from_storage_first && row < 64) begin
              wl = sto_q(row, col); wr_ = sto_q(row, 63 - col);
            end else begin
              wl = img_q(row % 64, col); wr_ = img_q(row % 64, 63 - col);
            end
            wl = wl / div; wr_ = wr_ / div;
            if (pix_l != 16'(wl + 200) || pix_r != 16'(wr_ + 150)) begin
              bad++;
              if (bad < 5) $display("pixel row %0d col %0d: %0d %0d, expected %0d %0d", row, col, pix_l, pix_r, wl + 200, wr_ + 150);
            end
            n++;
          end
        end
      end
    join
    while (!frame_done) @(posedge clk);
  endtask

  initial begin
    int cyc, bad, n;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ---- 1: 64x64 with frame transfer
    for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++) ccd.image[r][c] = img_q(r, c);
    wr(16'h0500 + 16'(CFG_MODE), 32'b101);
    wr(16'h0500 + 16'(CFG_ROWS), 32'd64);
    wr(16'h0500 + 16'(CFG_COLS), 32'd32);
    wr(16'h0500 + 16'(CFG_PBIN), 32'd1);
    wr(16'h0500 + 16'(CFG_SBIN), 32'd1);
    read_frame(64, 0, 1, cyc, bad, n);
    $display("64x64 frame: %0d reads in %0d cycles = %0d ms", n, cyc, cyc / 20000);
    check(n == 2048 && bad == 0, $sformatf("64x64 pixels: %0d read, %0d wrong", n, bad));
    check(cyc >= 1920 + 64 * (50 + 32 * 400) && cyc <= 1920 + 64 * (50 + 32 * 400) + 4,
          $sformatf("64x64 readout %0d cycles", cyc));

    // ---- 2: 64x128 without frame transfer: storage half first, then the image half
    for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++) begin
      ccd.image[r][c] = img_q(r, c);
      ccd.storage[r][c] = sto_q(r, c);
    end
    // parallel readout that moves both areas: frame-transfer words, readout holds
    for (int a = 0; a < 6; a++)
      wr(16'h0000 + 16'(6 + a), {default_frag(6 + a).hold, default_frag(a).word});
    wr(16'h0500 + 16'(CFG_MODE), 32'b001);
    wr(16'h0500 + 16'(CFG_ROWS), 32'd128);
    read_frame(128, 1, 1, cyc, bad, n);
    $display("64x128 frame: %0d reads in %0d cycles = %0d ms", n, cyc, cyc / 20000);
    check(n == 4096 && bad == 0, $sformatf("64x128 pixels: %0d read, %0d wrong", n, bad));
    check(cyc >= 128 * (50 + 32 * 400) && cyc <= 128 * (50 + 32 * 400) + 4,
          $sformatf("64x128 readout %0d cycles", cyc));

    // ---- 3: 64x64 with frame transfer at 10 us per read: INT+ 99, serial 12, INT- 89 cycles
    for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++) ccd.image[r][c] = img_q(r, c);
    for (int a = 6; a < 12; a++) wr(16'h0000 + 16'(a), default_frag(a));   // storage-only readout again
    begin
      int h [46];
      for (int a = 0; a < 46; a++) h[a] = default_frag(a).hold;
      h[18] = 10; h[19] = 5; h[20] = 80; h[21] = 2; h[22] = 2;
      for (int a = 23; a <= 28; a++) h[a] = 2;
      h[29] = 80; h[30] = 3; h[31] = 2; h[32] = 2; h[33] = 2;
      for (int a = 18; a <= 33; a++) wr(16'h0000 + 16'(a), {8'(h[a]), default_frag(a).word});
    end
    wr(16'h0500 + 16'(CFG_MODE), 32'b101);
    wr(16'h0500 + 16'(CFG_ROWS), 32'd64);
    read_frame(64, 0, 2, cyc, bad, n);
    $display("64x64 frame at 10 us per read: %0d reads in %0d cycles = %0d ms", n, cyc, cyc / 20000);
    check(n == 2048 && bad == 0, $sformatf("64x64 fast pixels: %0d read, %0d wrong", n, bad));
    check(cyc >= 1920 + 64 * (50 + 32 * 200) && cyc <= 1920 + 64 * (50 + 32 * 200) + 4,
          $sformatf("64x64 fast readout %0d cycles", cyc));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
