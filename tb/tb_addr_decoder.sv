// tb_addr_decoder: sweeps every bus address with and without a write strobe and
// checks the selected region, the offset and that exactly one enable (or bad_addr)
// is raised for a write, none without one.
module tb_addr_decoder;
  import wfs_pkg::*;
  logic [15:0] addr = '0;
  logic we = 0;
  region_e region;
  logic [8:0] offset;
  logic frag_we, loc_we, list_we, gain_we, cfg_we, bad_addr;
  addr_decoder dut (.*);

  int checks = 0, failures = 0;
  initial begin : watchdog
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 65536; a += (a < 2048 ? 1 : 97)) begin
      for (int w = 0; w < 2; w++) begin
        logic [5:0] exp_en;
        int exp_off;
        addr = 16'(a); we = w[0];
        #1;
        // expected: {frag, loc, list, gain, cfg, bad}
        if (a < 256)        begin exp_en = 6'b100000; exp_off = a; end
        else if (a < 512)   begin exp_en = 6'b010000; exp_off = a - 256; end
        else if (a < 1024)  begin exp_en = 6'b001000; exp_off = a - 512; end
        else if (a < 1280)  begin exp_en = 6'b000100; exp_off = a - 1024; end
        else if (a < 1536)  begin exp_en = 6'b000010; exp_off = a - 1280; end
        else                begin exp_en = 6'b000001; exp_off = -1; end
        if (!we) exp_en = '0;
        checks++;
        if ({frag_we, loc_we, list_we, gain_we, cfg_we, bad_addr} != exp_en ||
            (exp_off >= 0 && offset != 9'(exp_off))) begin
          failures++;
          $display("FAIL addr %h we %0d: en %b off %0d", a, we,
                   {frag_we, loc_we, list_we, gain_we, cfg_we, bad_addr}, offset);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
