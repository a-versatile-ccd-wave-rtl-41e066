// tb_seq_engine: self-checking test of the clock sequencer.
// Checks the parallel-readout fragment word by word against the sequencing table,
// the 20 us (400 cycle) pixel read built from INT+, serial transfer and INT-, the
// 64-line frame transfer time and its P1CD edge count, back-to-back requests, a
// count of zero, the phase order of the backward parallel shift, and fragments and
// table entries rewritten through the host port.
module tb_seq_engine;
  import wfs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #25 clk = ~clk;   // 20 MHz

  logic frag_we = 0, loc_we = 0;
  logic [FRAG_AW-1:0] frag_addr = '0;
  frag_t frag_wdata = '0;
  logic [2:0] loc_addr = '0;
  frag_loc_t loc_wdata = '0;
  logic req_valid = 0, req_ready;
  op_e req_op = OP_FT;
  logic [7:0] req_count = '0;
  clk_word_t clk_word;
  logic active, op_done;

  seq_engine dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // issue one request and wait until it is taken
  task automatic issue(input op_e op, input int n);
    req_op <= op; req_count <= 8'(n); req_valid <= 1;
    do @(posedge clk); while (!req_ready);
    req_valid <= 0;
  endtask

  task automatic wait_idle(output int cycles);
    cycles = 0;
    @(posedge clk);
    while (active) begin cycles++; @(posedge clk); end
  endtask

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected parallel readout: columns of the sequencing table and their holds
  localparam logic [23:0] PR_W [6] = '{24'h406850, 24'h606850, 24'h206850, 24'hA06850, 24'h806850, 24'h002051};
  localparam int          PR_H [6] = '{8, 8, 8, 8, 9, 9};

  initial begin
    int n, conv_at, p1_edges, t;
    logic prev_p1, prev_conv;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(posedge clk);
    check(clk_word == 24'h002051 && !active, "idle word after reset");

    // ---- 1: parallel readout, word by word
    issue(OP_PREAD, 1);
    for (int w = 0; w < 6; w++)
      for (int h = 0; h < PR_H[w]; h++) begin
        @(negedge clk);
        check(clk_word == PR_W[w], $sformatf("PREAD word %0d cycle %0d: %h", w, h, clk_word));
      end
    @(negedge clk);
    check(!active, "PREAD ends after 50 cycles");

    // ---- 2: pixel read INT+, STRAN, INT- back to back = 400 cycles, one convert
    @(posedge clk);
    fork
      begin issue(OP_INTP, 1); issue(OP_STRAN, 1); issue(OP_INTM, 1); end
      begin
        n = 0; conv_at = -1; prev_conv = 1;
        do @(negedge clk); while (!active);
        while (active) begin
          if (prev_conv && !clk_word[B_CONV_N]) conv_at = n;
          prev_conv = clk_word[B_CONV_N];
          n++;
          @(negedge clk);
        end
      end
    join
    check(n == 400, $sformatf("pixel read takes 400 cycles (20 us), got %0d", n));
    check(conv_at == 388, $sformatf("convert start at cycle 388, got %0d", conv_at));

    // ---- 3: frame transfer of 64 lines: < 100 us, 64 P1CD rising edges
    issue(OP_FT, 64);
    t = 0; p1_edges = 0; prev_p1 = 0;
    @(negedge clk);
    while (active) begin
      if (!prev_p1 && clk_word[B_P1CD]) p1_edges++;
      prev_p1 = clk_word[B_P1CD];
      t++;
      @(negedge clk);
    end
    check(t == 64 * 30, $sformatf("frame transfer 1920 cycles, got %0d", t));
    check(t * 50 < 100_000, "frame transfer shorter than 100 us");
    check(p1_edges == 64, $sformatf("64 P1CD edges, got %0d", p1_edges));

    // ---- 4: count of zero does nothing
    issue(OP_SFLUSH, 0);
    @(negedge clk);
    check(!active, "count 0 starts nothing");

    // ---- 4b: backward parallel shift: phases rise in the order 2, 1, 3 in both areas
    issue(OP_PBACK, 2);
    t = 0; n = 0;
    begin
      int order_ab [$], order_cd [$];
      int want [$] = '{2, 1, 3, 2, 1, 3};
      logic [2:0] pab, pcd;
      pab = 3'b000; pcd = 3'b000;
      @(negedge clk);
      while (active) begin
        for (int k = 0; k < 3; k++) begin
          if (clk_word[B_P1AB - k] && !pab[2 - k]) order_ab.push_back(k + 1);
          if (clk_word[B_P1CD - k] && !pcd[2 - k]) order_cd.push_back(k + 1);
        end
        pab = clk_word[B_P1AB -: 3]; pcd = clk_word[B_P1CD -: 3];
        t++;
        @(negedge clk);
      end
      check(t == 2 * 50, $sformatf("two backward lines take 100 cycles, got %0d", t));
      check(order_ab == want, $sformatf("storage phases rise 2,1,3 per line: %p", order_ab));
      check(order_cd == want, $sformatf("image phases rise 2,1,3 per line: %p", order_cd));
    end

    // ---- 5: host rewrites the serial transfer as a two-word fragment at 50..51
    @(negedge clk);
    frag_we = 1; frag_addr = 6'd50; frag_wdata = '{8'd3, 24'h123456};
    @(negedge clk);
    frag_addr = 6'd51; frag_wdata = '{8'd7, 24'h654321};
    @(negedge clk);
    frag_we = 0; loc_we = 1; loc_addr = 3'd4; loc_wdata = '{6'd50, 4'd2};
    @(negedge clk);
    loc_we = 0;
    issue(OP_STRAN, 2);
    for (int r = 0; r < 2; r++) begin
      for (int h = 0; h < 3; h++) begin @(negedge clk); check(clk_word == 24'h123456, "new word 0"); end
      for (int h = 0; h < 7; h++) begin @(negedge clk); check(clk_word == 24'h654321, "new word 1"); end
    end
    @(negedge clk);
    check(!active, "rewritten fragment x2 = 20 cycles");

    // ---- 6: the last table entry (operation 7) is writable too
    @(negedge clk);
    loc_we = 1; loc_addr = 3'd7; loc_wdata = '{6'd51, 4'd1};
    @(negedge clk);
    loc_we = 0;
    issue(OP_PBACK, 3);
    for (int h = 0; h < 21; h++) begin @(negedge clk); check(clk_word == 24'h654321, "operation 7 moved"); end
    @(negedge clk);
    check(!active, "operation 7 x3 = 21 cycles");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
