// adc_buffer: output buffer of the two 16-bit A/D converters.
//
// One converter serves each output amplifier of the split serial register.  Their
// 16-bit results are captured in four 8-bit registers (low and high byte of the left
// and of the right channel) so that the converters' outputs are isolated from the
// controller's data bus while they convert, as the design does.  Conversion is
// pipelined: it starts at the end of one pixel period and its result is captured
// during the next one.
//
// Interface: adc_busy is high while either converter converts (its falling edge
// means both results are valid); adc_l/adc_r are the converters' parallel outputs.
// One cycle after the falling edge the four registers hold the new results and
// sample_valid pulses for one cycle with sample_l/sample_r.  rd_sel selects one byte
// for a byte-wide bus read (0: left low, 1: left high, 2: right low, 3: right high).
// Capturing on the falling edge of busy is this design's choice.
module adc_buffer
  import wfs_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             adc_busy,
  input  logic [ADC_W-1:0] adc_l,
  input  logic [ADC_W-1:0] adc_r,
  output logic             sample_valid,
  output logic [ADC_W-1:0] sample_l,
  output logic [ADC_W-1:0] sample_r,
  input  logic [1:0]       rd_sel,
  output logic [7:0]       rd_byte
);
  logic [7:0] breg [4];
  logic       busy_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q       <= 1'b0;
      sample_valid <= 1'b0;
      for (int i = 0; i < 4; i++) breg[i] <= '0;
    end else begin
      busy_q       <= adc_busy;
      sample_valid <= 1'b0;
      if (busy_q && !adc_busy) begin
        breg[0]      <= adc_l[7:0];
        breg[1]      <= adc_l[15:8];
        breg[2]      <= adc_r[7:0];
        breg[3]      <= adc_r[15:8];
        sample_valid <= 1'b1;
      end
    end
  end

  assign sample_l = {breg[1], breg[0]};
  assign sample_r = {breg[3], breg[2]};
  assign rd_byte  = breg[rd_sel];
endmodule
