// subap_accum: subaperture accumulator and dark-frame store.
//
// Every read of the CCD gives two superpixels, one per output amplifier, and its tag
// names the subaperture each belongs to.  Because conversion is pipelined, a read's
// result arrives during the next pixel period, after its tag: tags wait in a small
// FIFO and each A/D sample pair is matched with the oldest tag.  The two superpixels
// are added to the running sums of their subapertures (SUB_NONE: not summed).
// Every sample pair also leaves on the pixel stream, which carries raster images.
// When the readout has finished and no tagged conversion is outstanding, the frame
// is complete: the sums move to the result array (or, for a dark frame, to the dark
// array that holds the bias and dark level of each subaperture) and are cleared for
// the next frame, so the next frame can accumulate while the result is used.
// Summing superpixels into subapertures and a dark frame taken in the same readout
// mode follow the design; the FIFO, the double buffering and the widths are this
// design's own.
//
// Interface: tag_valid/tag from the readout controller; sample_valid/sample_l/_r from
// the A/D buffer; readout_done from the readout controller.  frame_done pulses one
// cycle after the frame is complete, with frame_dark telling which array was written.
// rd_idx reads res_sum/dark_sum combinationally.  err is a sticky flag for a sample
// without a tag or a tag FIFO overflow.
module subap_accum
  import wfs_pkg::*;
#(
  parameter int unsigned SUM_W = 24,
  parameter int unsigned FIFO_D = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 dark,
  input  logic                 tag_valid,
  input  tag_t                 tag,
  input  logic                 sample_valid,
  input  logic [ADC_W-1:0]     sample_l,
  input  logic [ADC_W-1:0]     sample_r,
  input  logic                 readout_done,
  output logic                 frame_done,
  output logic                 frame_dark,
  input  logic [SUB_W-1:0]     rd_idx,
  output logic [SUM_W-1:0]     res_sum,
  output logic [SUM_W-1:0]     dark_sum,
  output logic                 pix_valid,
  output logic [ADC_W-1:0]     pix_l,
  output logic [ADC_W-1:0]     pix_r,
  output tag_t                 pix_tag,
  output logic                 err
);
  localparam int unsigned NS = 1 << SUB_W;
  localparam int unsigned FAW = $clog2(FIFO_D);

  logic [SUM_W-1:0] sum [NS];
  logic [SUM_W-1:0] res [NS];
  logic [SUM_W-1:0] drk [NS];

  tag_t           fifo [FIFO_D];
  logic [FAW-1:0] wp, rp;
  logic [FAW:0]   cnt;
  logic           pending, complete, pop;
  tag_t           head;

  assign head     = fifo[rp];
  assign pop      = sample_valid && (cnt != '0);
  assign complete = pending && (cnt == '0) && !tag_valid;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0; rp <= '0; cnt <= '0;
      pending <= 1'b0; frame_done <= 1'b0; frame_dark <= 1'b0; err <= 1'b0;
      pix_valid <= 1'b0; pix_l <= '0; pix_r <= '0; pix_tag <= '0;
      for (int i = 0; i < FIFO_D; i++) fifo[i] <= '0;
      for (int i = 0; i < NS; i++) begin sum[i] <= '0; res[i] <= '0; drk[i] <= '0; end
    end else begin
      frame_done <= 1'b0;
      pix_valid  <= 1'b0;
      // tag FIFO
      if (tag_valid) begin
        fifo[wp] <= tag;
        wp <= wp + 1'b1;
        if (cnt == (FAW+1)'(FIFO_D) && !pop) err <= 1'b1;
      end
      if (pop) rp <= rp + 1'b1;
      cnt <= cnt + (FAW+1)'(tag_valid) - (FAW+1)'(pop);
      if (sample_valid && cnt == '0) err <= 1'b1;
      // accumulate
      if (pop) begin
        for (int i = 0; i < NS; i++) begin
          logic [SUM_W-1:0] add;
          add = '0;
          if (head.sub_l == SUB_W'(i) && head.sub_l != SUB_NONE) add += SUM_W'(sample_l);
          if (head.sub_r == SUB_W'(i) && head.sub_r != SUB_NONE) add += SUM_W'(sample_r);
          sum[i] <= sum[i] + add;
        end
        pix_valid <= 1'b1;
        pix_l     <= sample_l;
        pix_r     <= sample_r;
        pix_tag   <= head;
      end
      // end of frame
      if (readout_done) pending <= 1'b1;
      if (complete) begin
        pending    <= 1'b0;
        frame_done <= 1'b1;
        frame_dark <= dark;
        for (int i = 0; i < NS; i++) begin
          if (dark) drk[i] <= sum[i];
          else      res[i] <= sum[i];
          sum[i] <= '0;
        end
      end
    end
  end

  assign res_sum  = res[rd_idx];
  assign dark_sum = drk[rd_idx];

endmodule
