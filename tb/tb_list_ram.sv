// tb_list_ram: writes every word of the list memory with a pattern, reads it back
// in another order and checks data and the one-cycle read latency, including a
// write and a read of the same address in one cycle (read returns the old word).
module tb_list_ram;
  logic clk = 0;
  always #5 clk = ~clk;
  localparam int DEPTH = 128;
  logic we = 0;
  logic [6:0] wr_addr = '0, rd_addr = '0;
  logic [31:0] wr_data = '0, rd_data;
  list_ram dut (.*);

  int checks = 0, failures = 0;
  function automatic logic [31:0] pat(input int a, input int k);
    return 32'(a * 32'h9E3779B1) ^ 32'(k * 32'h01000193);
  endfunction

  initial begin : watchdog
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < DEPTH; a++) begin
      @(negedge clk); we = 1; wr_addr = 7'(a); wr_data = pat(a, 1);
    end
    @(negedge clk); we = 0;
    for (int i = 0; i < DEPTH; i++) begin
      int a;
      a = (i * 37 + 11) % DEPTH;
      @(negedge clk); rd_addr = 7'(a);
      @(negedge clk);
      checks++;
      if (rd_data !== pat(a, 1)) begin failures++; $display("FAIL addr %0d: %h", a, rd_data); end
    end
    // same-address write and read: old word first, new word after
    @(negedge clk); we = 1; wr_addr = 7'd5; wr_data = pat(5, 2); rd_addr = 7'd5;
    @(negedge clk); we = 0;
    checks++; if (rd_data !== pat(5, 1)) begin failures++; $display("FAIL read-during-write"); end
    @(negedge clk);
    checks++; if (rd_data !== pat(5, 2)) begin failures++; $display("FAIL rewrite"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
