// tb_adc_buffer: drives a simple converter (busy for 112 cycles = 5.6 us, results
// changing while busy) and checks that each finished conversion is captured once,
// one cycle after busy falls, that the byte reads return the right halves, and that
// results changing while no conversion ends are not captured.
module tb_adc_buffer;
  import wfs_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;   // a falling edge applies the asynchronous reset
  always #25 clk = ~clk;
  logic adc_busy = 0;
  logic [15:0] adc_l = '0, adc_r = '0, sample_l, sample_r;
  logic sample_valid;
  logic [1:0] rd_sel = '0;
  logic [7:0] rd_byte;
  adc_buffer dut (.*);

  int checks = 0, failures = 0, pulses = 0;
  task automatic check(input bit ok, input string msg);
    checks++; if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask
  always @(negedge clk) if (sample_valid) pulses++;

  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [15:0] l, r;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int k = 0; k < 20; k++) begin
      l = 16'($urandom); r = 16'($urandom);
      @(negedge clk); adc_busy = 1;
      for (int c = 0; c < 112; c++) begin
        @(negedge clk);
        adc_l = 16'($urandom); adc_r = 16'($urandom);   // output not settled yet
        check(!sample_valid, "no capture while converting");
      end
      adc_l = l; adc_r = r;
      @(negedge clk); adc_busy = 0;
      @(negedge clk);
      check(sample_valid, "capture one cycle after busy falls");
      check(sample_l == l && sample_r == r, $sformatf("sample %h %h vs %h %h", sample_l, sample_r, l, r));
      for (int b = 0; b < 4; b++) begin
        rd_sel = 2'(b); #1;
        check(rd_byte == (b == 0 ? l[7:0] : b == 1 ? l[15:8] : b == 2 ? r[7:0] : r[15:8]), $sformatf("byte %0d", b));
      end
      // results moving while idle must not disturb the registers
      adc_l = ~l; adc_r = ~r;
      repeat (30) @(negedge clk);
      check(sample_l == l && sample_r == r, "held while idle");
    end
    check(pulses == 20, $sformatf("one capture per conversion, got %0d", pulses));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
