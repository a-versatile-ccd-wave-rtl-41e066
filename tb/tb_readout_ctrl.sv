// tb_readout_ctrl: drives the readout controller with a stand-in sequencer that
// records every request and stays busy 3 cycles per repetition.  A random superpixel
// list is expanded independently into the expected stream of operations and tags;
// the test compares them for list mode (with frame transfer), raster mode (without)
// and checks readout_done and the frame period of continuous operation.
module tb_readout_ctrl;
  import wfs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;

  logic raster = 0, ft_en = 1, run = 0, start = 0;
  logic [7:0] list_len = '0, ft_rows = 8'd64;
  logic [23:0] frame_period = '0;
  logic [7:0] rows = '0;
  logic [6:0] cols = '0, pbin = '0, sbin = '0;
  logic [6:0] list_addr;
  list_entry_t list_data;
  logic req_valid, req_ready, seq_active;
  op_e req_op;
  logic [7:0] req_count;
  logic tag_valid, frame_start, readout_done, busy;
  tag_t tag;

  readout_ctrl dut (.*);

  // list memory, one cycle read latency
  list_entry_t lmem [128];
  always_ff @(posedge clk) list_data <= lmem[list_addr];

  // stand-in sequencer
  int unsigned remain = 0;
  assign seq_active = (remain != 0);
  assign req_ready  = (remain == 0);
  typedef struct { op_e op; int n; } req_t;
  req_t got[$];
  tag_t tags[$];
  always @(posedge clk) begin
    if (remain != 0) remain <= remain - 1;
    if (req_valid && req_ready && req_count != 0) begin
      got.push_back('{req_op, int'(req_count)});
      remain <= 3 * int'(req_count);
    end
    if (tag_valid) tags.push_back(tag);
  end

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  req_t exp[$];
  tag_t etags[$];
  task automatic add(input op_e op, input int n);
    if (n != 0) exp.push_back('{op, n});
  endtask

  task automatic compare(input string what);
    check(got.size() == exp.size(), $sformatf("%s: %0d requests, expected %0d", what, got.size(), exp.size()));
    for (int i = 0; i < exp.size() && i < got.size(); i++)
      check(got[i].op == exp[i].op && got[i].n == exp[i].n,
            $sformatf("%s req %0d: %s x%0d, expected %s x%0d", what, i, got[i].op.name(), got[i].n, exp[i].op.name(), exp[i].n));
    check(tags.size() == etags.size(), $sformatf("%s: %0d tags, expected %0d", what, tags.size(), etags.size()));
    for (int i = 0; i < etags.size() && i < tags.size(); i++)
      check(tags[i] == etags[i], $sformatf("%s tag %0d: %h expected %h", what, i, tags[i], etags[i]));
  endtask

  task automatic wait_done(output int cyc);
    cyc = 0;
    while (!readout_done) begin @(posedge clk); cyc++; end
    @(posedge clk);
  endtask

  initial begin
    int cyc, nread, t0, t1;
    repeat (3) @(posedge clk);
    rst_n = 1;

    // ---------------- list mode, 104 random entries
    nread = 0;
    for (int i = 0; i < 104; i++) begin
      list_entry_t e;
      e = '0;
      e.kind  = kind_e'($urandom_range(0, 9) < 6 ? 0 : $urandom_range(1, 3));
      e.par   = 7'($urandom_range(0, 3));
      e.ser   = 7'($urandom_range(1, 6));
      e.sub_l = 5'($urandom_range(0, 19));
      e.sub_r = 5'($urandom_range(0, 19));
      lmem[i] = e;
    end
    list_len = 8'd104;
    add(OP_FT, 64);
    for (int i = 0; i < 104; i++) begin
      list_entry_t e;
      e = lmem[i];
      if (e.kind == K_PFLUSH) add(OP_PFLUSH, e.par);
      else if (e.kind == K_PBACK) add(OP_PBACK, e.par);
      else begin
        add(OP_PREAD, e.par);
        if (e.kind == K_SFLUSH) add(OP_SFLUSH, e.ser);
        else begin
          add(OP_INTP, 1); add(OP_STRAN, e.ser); add(OP_INTM, 1);
          nread++;
          etags.push_back('{raster: 1'b0, last: (i == 103), sub_l: e.sub_l, sub_r: e.sub_r});
        end
      end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait_done(cyc);
    check(!seq_active, "readout_done only after the sequencer is idle");
    compare("list");
    check(!busy, "idle after the frame");

    // ---------------- raster mode without frame transfer: 4 rows x 5 cols, 2x3 binning
    got.delete(); exp.delete(); tags.delete(); etags.delete();
    raster = 1; ft_en = 0; rows = 8'd4; cols = 7'd5; pbin = 7'd2; sbin = 7'd3;
    for (int r = 0; r < 4; r++) begin
      add(OP_PREAD, 2);
      for (int c = 0; c < 5; c++) begin
        add(OP_INTP, 1); add(OP_STRAN, 3); add(OP_INTM, 1);
        etags.push_back('{raster: 1'b1, last: (r == 3 && c == 4), sub_l: SUB_NONE, sub_r: SUB_NONE});
      end
    end
    @(negedge clk); start = 1; @(negedge clk); start = 0;
    wait_done(cyc);
    compare("raster");

    // ---------------- continuous operation: frames start every frame_period cycles
    rows = 8'd1; cols = 7'd2;
    frame_period = 24'd500;
    @(negedge clk); run = 1;
    @(posedge clk); while (!frame_start) @(posedge clk);
    t0 = 0;
    @(posedge clk); while (!frame_start) begin @(posedge clk); t0++; end
    check(t0 + 1 == 500, $sformatf("frame period 500 cycles, got %0d", t0 + 1));
    // a period shorter than the readout: frames follow back to back
    frame_period = 24'd10;
    @(posedge clk); while (!frame_start) @(posedge clk);
    t1 = 0;
    @(posedge clk); while (!frame_start) begin @(posedge clk); t1++; end
    check(t1 > 10 && t1 < 60, $sformatf("back to back frames after readout, got %0d", t1 + 1));
    run = 0;

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
