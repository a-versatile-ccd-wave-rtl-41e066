// tb_wfs_controller: end-to-end test of the whole controller at its default
// parameters, against the behavioural CCD / integrator / converter model.
//
// A 19-subaperture pattern (centre, ring of 6, ring of 12) on the 32x32 grid of
// 2x2-binned superpixels is turned into a superpixel list: per line pair two parallel
// readouts, then one entry per run of columns whose left and mirrored right
// superpixels share their subapertures (binned reads), serial flushes where neither
// half is in the pattern, and line pairs outside it shifted in and flushed.  The
// test then
//   0. clears the whole array with parallel flushes (a two-entry list),
//   1. takes a dark frame (dark charge and converter bias only),
//   2. takes a star frame and checks every subaperture's curvature against
//      (G(I-I_B) - I_S)/I_S computed in floating point from the exposed image,
//      and the readout time against the sum of the operations' durations,
//   3. runs continuously at the default 2 ms frame period (500 frames/s),
//   4. reads a 16x16 raster image (4x4 binning, both amplifiers) and checks pixels,
//   5. shortens the serial transfer by rewriting its hold times and reads again,
//   6. shifts the array 5 lines backward from a list entry, then reads the line that
//      was first in the storage area and checks where the other lines went (after
//      host writes just past the fragment table and memory, which must be ignored).
// Every mechanism (frame transfer, parallel readout, backward shift, parallel flush, serial flush,
// serial binning, pipelined conversion, dark frame, curvature, raster, continuous
// pacing, fragment rewrite) is counted, and one that never happened is a failure.
module tb_wfs_controller;
  import wfs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #25 clk = ~clk;   // 20 MHz: 50 ns per cycle

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
    repeat (2_000_000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ---------------------------------------------------------------- mechanism counters
  int m_dark = 0, m_curv = 0, m_raster = 0, m_paced = 0, m_rewrite = 0;
  always @(posedge clk) begin
    if (frame_done && frame_dark) m_dark++;
    if (curv_done) m_curv++;
    if (pix_valid && pix_tag.raster) m_raster++;
  end

  // ---------------------------------------------------------------- host access
  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); host_addr = a; host_wdata = d; host_we = 1;
    @(negedge clk); host_we = 0;
  endtask

  // ---------------------------------------------------------------- subaperture pattern
  logic [4:0] sub_of [32][32];
  int cells [19];
  function automatic logic [4:0] subap(input int i, input int j);
    real x, y, rho, ang;
    int n, k, base;
    x = real'(j) - 15.5; y = real'(i) - 15.5;
    rho = $sqrt(x * x + y * y);
    if (rho < 5.0) return 5'd0;
    if (rho < 10.0) begin n = 6; base = 1; end
    else if (rho < 15.0) begin n = 12; base = 7; end
    else return SUB_NONE;
    ang = $atan2(y, x) + 3.14159265358979;
    k = int'($floor(ang / (2.0 * 3.14159265358979) * real'(n)));
    if (k >= n) k = n - 1;
    return 5'(base + k);
  endfunction

  list_entry_t lst [$];
  longint exp_ro;   // expected readout cycles of the list

  task automatic build_list();
    int pf;
    lst.delete();
    lst.push_back('{kind: K_SFLUSH, par: 7'd0, ser: 7'd32, rsvd: '0, sub_l: SUB_NONE, sub_r: SUB_NONE});
    pf = 0;
    for (int k = 0; k < 32; k++) begin
      bit any;
      int j, first;
      any = 0;
      for (int c = 0; c < 32; c++) if (sub_of[k][c] != SUB_NONE) any = 1;
      if (!any) begin pf += 2; continue; end
      if (pf != 0) begin
        lst.push_back('{kind: K_SFLUSH, par: 7'(pf), ser: 7'd32, rsvd: '0, sub_l: SUB_NONE, sub_r: SUB_NONE});
        pf = 0;
      end
      j = 0; first = 1;
      while (j < 16) begin
        int len;
        logic [4:0] sl, sr;
        sl = sub_of[k][j]; sr = sub_of[k][31-j];
        len = 1;
        while (j + len < 16 && sub_of[k][j+len] == sl && sub_of[k][31-j-len] == sr) len++;
        lst.push_back('{kind: (sl == SUB_NONE && sr == SUB_NONE) ? K_SFLUSH : K_READ,
                        par: first ? 7'd2 : 7'd0, ser: 7'(2 * len), rsvd: '0, sub_l: sl, sub_r: sr});
        first = 0;
        j += len;
      end
    end
    if (pf != 0) lst.push_back('{kind: K_SFLUSH, par: 7'(pf), ser: 7'd32, rsvd: '0, sub_l: SUB_NONE, sub_r: SUB_NONE});
    // durations with the default fragments: line 50, serial 24, INT+ 198, INT- 178
    exp_ro = 64 * 30;
    foreach (lst[i]) begin
      exp_ro += 50 * lst[i].par;
      if (lst[i].kind == K_SFLUSH) exp_ro += 24 * lst[i].ser;
      if (lst[i].kind == K_READ)   exp_ro += 198 + 24 * lst[i].ser + 178;
    end
  endtask

  // ---------------------------------------------------------------- images
  localparam int DARK_Q = 2;
  function automatic int star_q(input int r, input int c);
    // defocused pupil image: light inside the pattern, with a spatial structure
    if (sub_of[r/2][c/2] == SUB_NONE) return 0;
    return 40 + ((r * 7 + c * 13) % 17);
  endfunction

  task automatic expose(input bit with_star);
    for (int r = 0; r < 64; r++)
      for (int c = 0; c < 64; c++)
        ccd.image[r][c] = DARK_Q + (with_star ? star_q(r, c) : 0);
  endtask

  task automatic wait_frame(output int ro_cycles);
    int t;
    t = 0;
    while (!frame_start) @(posedge clk);
    @(posedge clk);
    while (!readout_done) begin @(posedge clk); t++; end
    ro_cycles = t + 1;
    while (!frame_done) @(posedge clk);
  endtask

  // ---------------------------------------------------------------- test
  int G [19];
  initial begin
    int ro, npix, nread, ft0, total;
    real e, got, is_sum;
    real d [19];
    int res [19];
    bit seen [19];
    repeat (3) @(negedge clk);
    rst_n = 1;

    // pattern, list, factors
    total = 0;
    for (int s = 0; s < 19; s++) cells[s] = 0;
    for (int i = 0; i < 32; i++) for (int j = 0; j < 32; j++) begin
      sub_of[i][j] = subap(i, j);
      if (sub_of[i][j] != SUB_NONE) begin cells[sub_of[i][j]]++; total++; end
    end
    build_list();
    $display("pattern: %0d superpixels in 19 subapertures, list of %0d entries", total, lst.size());
    check(lst.size() <= 128, "list fits the list memory");
    foreach (lst[i]) wr(16'h0200 + 16'(i), 32'(lst[i]));
    wr(16'h0500 + 16'(CFG_LISTLEN), 32'(lst.size()));
    for (int s = 0; s < 19; s++) begin
      G[s] = int'(256.0 * real'(total) / real'(cells[s]) + 0.5);
      wr(16'h0400 + 16'(s), 32'(G[s]));
    end
    nread = 0;
    foreach (lst[i]) if (lst[i].kind == K_READ) nread++;

    // ---- 0: array clearing: two list entries of 64 parallel flushes, no frame transfer
    expose(1);
    for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++) ccd.storage[r][c] = 5;
    for (int c = 0; c < 64; c++) ccd.serial[c] = 7;
    begin
      list_entry_t clr;
      clr = '{kind: K_PFLUSH, par: 7'd64, ser: 7'd0, rsvd: '0, sub_l: SUB_NONE, sub_r: SUB_NONE};
      wr(16'h0200, 32'(clr));
      wr(16'h0201, 32'(clr));
    end
    wr(16'h0500 + 16'(CFG_LISTLEN), 32'd2);
    wr(16'h0500 + 16'(CFG_MODE), 32'b000);
    wr(16'h0500 + 16'(CFG_RUN), 32'b10);
    while (!readout_done) @(posedge clk);
    begin
      int left;
      left = 0;
      for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++) left += ccd.storage[r][c] + ccd.image[r][c];
      for (int c = 0; c < 64; c++) left += ccd.serial[c];
      check(left == 0, $sformatf("array cleared by parallel flushes, %0d left", left));
    end
    repeat (10) @(posedge clk);
    foreach (lst[i]) wr(16'h0200 + 16'(i), 32'(lst[i]));
    wr(16'h0500 + 16'(CFG_LISTLEN), 32'(lst.size()));

    // ---- 1: dark frame
    expose(0);
    wr(16'h0500 + 16'(CFG_MODE), 32'b110);           // frame transfer, dark
    ft0 = ccd.n_ft;
    wr(16'h0500 + 16'(CFG_RUN), 32'b10);
    wait_frame(ro);
    check(frame_dark, "dark frame stored");
    check(ccd.n_ft - ft0 == 64, $sformatf("64-line frame transfer, saw %0d", ccd.n_ft - ft0));

    // ---- 2: star frame
    expose(1);
    wr(16'h0500 + 16'(CFG_MODE), 32'b100);
    npix = 0;
    for (int s = 0; s < 19; s++) seen[s] = 0;
    fork
      wr(16'h0500 + 16'(CFG_RUN), 32'b10);
      begin
        while (!curv_done) begin
          @(posedge clk);
          if (pix_valid) npix++;
          if (curv_valid) begin res[curv_idx] = int'(curv_val); seen[curv_idx] = 1; end
        end
      end
      wait_frame(ro);
    join
    $display("list readout: %0d cycles = %0d us (operations add up to %0d)", ro, ro / 20, exp_ro);
    check(ro >= exp_ro && ro <= exp_ro + 4, "readout time is the sum of the operations");
    check(npix == nread, $sformatf("%0d reads, expected %0d", npix, nread));
    check(!no_signal, "signal present");
    // expected curvature from the exposed image
    for (int s = 0; s < 19; s++) d[s] = 0;
    for (int r = 0; r < 64; r++) for (int c = 0; c < 64; c++)
      if (sub_of[r/2][c/2] != SUB_NONE) d[sub_of[r/2][c/2]] += real'(star_q(r, c));
    is_sum = 0;
    for (int s = 0; s < 19; s++) is_sum += d[s];
    for (int s = 0; s < 19; s++) begin
      e = (real'(G[s]) / 256.0 * d[s] - is_sum) / is_sum;
      got = real'(res[s]) / 65536.0;
      check(seen[s] && (got - e) < 3.0 / 65536.0 && (e - got) < 3.0 / 65536.0,
            $sformatf("subaperture %0d curvature %f, expected %f", s, got, e));
    end
    check(!tag_err, "every sample matched a tag");

    // ---- 3: continuous operation: at the default 2 ms period (shorter than this
    //         list's readout, so frames follow back to back), then at 3.5 ms
    begin
      int t;
      wr(16'h0500 + 16'(CFG_RUN), 32'b01);
      for (int n = 0; n < 4; n++) begin
        if (n == 2) wr(16'h0500 + 16'(CFG_PERIOD), 32'd70000);
        while (!frame_start) @(posedge clk);
        t = 0;
        @(posedge clk);
        while (!frame_start) begin @(posedge clk); t++; end
        t++;
        $display("frame period %0d cycles = %0d frames/s", t, 20_000_000 / t);
        if (n < 2) check(t >= exp_ro && t <= exp_ro + 8, "back-to-back frames when the readout is longer than the period");
        else begin
          check(t == 70000, "frames paced at the programmed period");
          if (t == 70000) m_paced++;
        end
      end
      wr(16'h0500 + 16'(CFG_RUN), 32'b00);
      while (readout_busy) @(posedge clk);
      repeat (3000) @(posedge clk);   // last conversion and curvatures
    end

    // ---- 4: 16x16 raster image, 4x4 binning, both amplifiers
    begin
      int want_l, want_r, k, bad;
      expose(1);
      wr(16'h0500 + 16'(CFG_MODE), 32'b101);
      // clear the serial register left over from the frame transfer first
      wr(16'h0500 + 16'(CFG_RUN), 32'b10);
      k = 0; bad = 0;
      fork
        begin
          while (!frame_done) begin
            @(posedge clk);
            if (pix_valid) begin
              int row, col;
              row = k / 8; col = k % 8;
              want_l = 200; want_r = 150;
              for (int r = 4 * row; r < 4 * row + 4; r++)
                for (int c = 4 * col; c < 4 * col + 4; c++) begin
                  want_l += (r < 4 ? 0 : 0) + DARK_Q + star_q(r, c);
                  want_r += DARK_Q + star_q(r, 63 - c);
                end
              // the first line also carries what the frame transfer left in the serial register
              if (row > 0 && (pix_l != 16'(want_l) || pix_r != 16'(want_r))) bad++;
              k++;
            end
          end
        end
        wait_frame(ro);
      join
      $display("raster 16x16 readout: %0d cycles = %0d us", ro, ro / 20);
      check(k == 128, $sformatf("128 reads for 16x16 through two amplifiers, got %0d", k));
      check(bad == 0, $sformatf("%0d raster pixels wrong", bad));

      // ---- 5: faster serial transfer: holds of 4 -> 2 cycles (0.6 us)
      for (int a = 23; a <= 28; a++)
        wr(16'h0000 + 16'(a), {8'd2, default_frag(a).word});
      expose(1);
      begin
        int ro2;
        wr(16'h0500 + 16'(CFG_RUN), 32'b10);
        wait_frame(ro2);
        $display("raster with 0.6 us serial transfers: %0d cycles", ro2);
        check(ro - ro2 == 16 * 8 * 4 * 12, $sformatf("hold rewrite saves %0d cycles, expected %0d", ro - ro2, 16 * 8 * 4 * 12));
        if (ro - ro2 == 16 * 8 * 4 * 12) m_rewrite++;
      end
    end

    // ---- 6: backward parallel shift: 5 lines back, then read storage line 0 (now line 5)
    begin
      int old_sto [64][64];
      int k, bad, ro6, pb0;
      for (int r = 0; r < 64; r++)
        for (int c = 0; c < 64; c++) begin
          old_sto[r][c] = 500 + ((r * 11 + c * 7) % 301);
          ccd.storage[r][c] = old_sto[r][c];
          ccd.image[r][c] = 9;
        end
      for (int c = 0; c < 64; c++) ccd.serial[c] = 0;
      wr(16'h0200, {K_PBACK, 7'd5, 7'd0, 6'd0, SUB_NONE, SUB_NONE});
      wr(16'h0201, {K_READ, 7'd6, 7'd1, 6'd0, SUB_NONE, SUB_NONE});
      for (int i = 2; i < 33; i++) wr(16'h0200 + 16'(i), {K_READ, 7'd0, 7'd1, 6'd0, SUB_NONE, SUB_NONE});
      wr(16'h0500 + 16'(CFG_LISTLEN), 32'd33);
      wr(16'h0500 + 16'(CFG_MODE), 32'b000);
      // writes past the fragment table and memory must not wrap onto the readout fragment
      wr(16'h0109, 32'h0);
      wr(16'h0046, 32'hFFFFFFFF);
      pb0 = ccd.n_pback;
      wr(16'h0500 + 16'(CFG_RUN), 32'b10);
      k = 0; bad = 0;
      fork
        while (k < 32) begin
          @(posedge clk);
          if (pix_valid) begin
            if (pix_l != 16'(old_sto[0][k] + 200) || pix_r != 16'(old_sto[0][63 - k] + 150)) bad++;
            k++;
          end
        end
        wait_frame(ro6);
      join
      $display("backward shift frame: %0d cycles", ro6);
      check(ccd.n_pback - pb0 == 5, $sformatf("5 backward line shifts, saw %0d", ccd.n_pback - pb0));
      check(k == 32 && bad == 0, $sformatf("line read after the backward shift: %0d reads, %0d wrong", k, bad));
      check(ccd.image[0][0] == old_sto[59][0] && ccd.image[4][17] == old_sto[63][17] && ccd.image[5][3] == 9,
            "storage lines 59..63 moved back into the image area");
      // without a frame transfer to hide it, the first list fetch adds 2 cycles
      check(ro6 == 5 * 50 + 6 * 50 + 32 * (198 + 12 + 178) + 4,
            $sformatf("backward frame readout %0d cycles, expected %0d", ro6, 5 * 50 + 6 * 50 + 32 * (198 + 12 + 178) + 4));
    end

    // ---- mechanisms
    $display("mechanisms: ft=%0d pback=%0d pread=%0d pflush=%0d sflush=%0d binned=%0d pipelined=%0d dark=%0d curv=%0d raster=%0d paced=%0d rewrite=%0d",
             ccd.n_ft, ccd.n_pback, ccd.n_pshift, ccd.n_pflush, ccd.n_sflush, ccd.n_binned, ccd.n_pipelined, m_dark, m_curv, m_raster, m_paced, m_rewrite);
    check(ccd.n_ft > 0, "frame transfer happened");
    check(ccd.n_pshift > ccd.n_ft, "parallel readout happened");
    check(ccd.n_pflush > 0, "parallel flush happened");
    check(ccd.n_pback > 0, "backward parallel shift happened");
    check(ccd.n_sflush > 0, "serial flush happened");
    check(ccd.n_binned > 0, "serial binning happened");
    check(ccd.n_pipelined > 0, "pipelined conversion happened");
    check(m_dark > 0, "dark frame happened");
    check(m_curv > 0, "curvature computation happened");
    check(m_raster > 0, "raster readout happened");
    check(m_paced > 0, "frame pacing happened");
    check(m_rewrite > 0, "fragment rewrite happened");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
