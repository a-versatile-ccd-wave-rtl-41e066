// cfg_regs: configuration registers of the controller, written by the host.
//
// Holds what the host downloads besides fragments, list and factors: the readout
// mode (raster or superpixel list, dark frame, frame transfer on/off), list length,
// frame period, frame-transfer line count, raster size and binning, number of
// subapertures, and the run bit.  Writing 1 to bit 1 of CFG_RUN starts one frame
// (start pulses for one cycle).  The reset values select the main configuration:
// list mode with frame transfer, the 104-entry 19-subaperture list, 64 frame-transfer
// lines and a 2 ms frame period (500 frames/s at 20 MHz); the raster defaults give a
// 16x16 image of 4x4-binned superpixels read through both amplifiers.  Offsets are
// in wfs_pkg; the register set is this design's own.
module cfg_regs
  import wfs_pkg::*;
#(
  parameter int unsigned PERIOD_W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                we,
  input  logic [7:0]          offset,
  input  logic [31:0]         wdata,
  output logic                raster,
  output logic                dark,
  output logic                ft_en,
  output logic [7:0]          list_len,
  output logic [PERIOD_W-1:0] frame_period,
  output logic [7:0]          ft_rows,
  output logic [7:0]          rows,
  output logic [6:0]          cols,
  output logic [6:0]          pbin,
  output logic [6:0]          sbin,
  output logic [SUB_W-1:0]    nsub,
  output logic                run,
  output logic                start
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      raster <= 1'b0; dark <= 1'b0; ft_en <= 1'b1;
      list_len     <= 8'd104;
      frame_period <= PERIOD_W'(40000);
      ft_rows      <= 8'd64;
      rows <= 8'd16; cols <= 7'd8; pbin <= 7'd4; sbin <= 7'd4;
      nsub  <= SUB_W'(19);
      run   <= 1'b0;
      start <= 1'b0;
    end else begin
      start <= 1'b0;
      if (we) begin
        unique case (offset)
          CFG_MODE:    {ft_en, dark, raster} <= wdata[2:0];
          CFG_LISTLEN: list_len     <= wdata[7:0];
          CFG_PERIOD:  frame_period <= wdata[PERIOD_W-1:0];
          CFG_FTROWS:  ft_rows      <= wdata[7:0];
          CFG_ROWS:    rows         <= wdata[7:0];
          CFG_COLS:    cols         <= wdata[6:0];
          CFG_PBIN:    pbin         <= wdata[6:0];
          CFG_SBIN:    sbin         <= wdata[6:0];
          CFG_NSUB:    nsub         <= wdata[SUB_W-1:0];
          CFG_RUN:     begin run <= wdata[0]; start <= wdata[1]; end
          default: ;
        endcase
      end
    end
  end
endmodule
