// readout_ctrl: frame-level readout controller of the CCD.
//
// A frame is read as an ensemble of elementary operations, each handed to the clock
// sequencer as a request {operation, repeat count}:
//   1. frame transfer of ft_rows lines from the image to the storage area (when
//      frame transfer is enabled), which starts the next exposure;
//   2a. list mode: the superpixel list is walked entry by entry.  An entry asks for
//      `par` parallel readouts (vertical binning), then either one read that bins
//      `ser` serial transfers onto the output node between the two integration
//      periods (INT+, ser x serial transfer, INT-), or `ser` serial flushes; or it
//      asks for `par` parallel flushes, or for `par` parallel shifts backward
//      (both areas, away from the serial register).  Each read yields one superpixel per output
//      amplifier and carries a tag naming the subapertures they belong to;
//   2b. raster mode: rows x cols superpixels, each row made of pbin parallel
//      readouts and each superpixel of sbin serial transfers, both amplifiers at once;
//   3. when the last operation has finished, readout_done pulses.
// Frames start on a start pulse or, while run is set, every frame_period cycles
// (back to back when the readout is longer than the period).
// The operations, the list's contents (parallel transfers, serial binning and
// subaperture per superpixel) and the frame-by-frame operation follow the design;
// the list entry layout (wfs_pkg::list_entry_t), the raster loop and the frame timer
// are this design's own.
//
// Interface: the list memory is read with one cycle of latency (list_addr ->
// list_data).  Requests follow the sequencer's valid/ready handshake.  tag_valid
// pulses with tag when the INT- request of a read is accepted; that conversion's
// result arrives later, during the next pixel period.
// Timing: list entries are fetched while the previous operation runs, so operations
// follow each other without gaps.  Only the very first fetch of a frame without frame
// transfer is not hidden; it costs 2 cycles.
module readout_ctrl
  import wfs_pkg::*;
#(
  parameter int unsigned LIST_AW  = 7,
  parameter int unsigned PERIOD_W = 24
) (
  input  logic                clk,
  input  logic                rst_n,
  // configuration
  input  logic                raster,
  input  logic                ft_en,
  input  logic [7:0]          list_len,
  input  logic [PERIOD_W-1:0] frame_period,
  input  logic [7:0]          ft_rows,
  input  logic [7:0]          rows,
  input  logic [6:0]          cols,
  input  logic [6:0]          pbin,
  input  logic [6:0]          sbin,
  input  logic                run,
  input  logic                start,
  // superpixel list
  output logic [LIST_AW-1:0]  list_addr,
  input  list_entry_t         list_data,
  // clock sequencer
  output logic                req_valid,
  input  logic                req_ready,
  output op_e                 req_op,
  output logic [7:0]          req_count,
  input  logic                seq_active,
  // conversion tags
  output logic                tag_valid,
  output tag_t                tag,
  // status
  output logic                frame_start,
  output logic                readout_done,
  output logic                busy
);

  typedef enum logic [3:0] {
    S_IDLE, S_FT, S_FETCH, S_WAIT, S_PAR, S_SER, S_INTP, S_STRAN, S_INTM,
    S_NEXT, S_RROW, S_RINTP, S_RSTRAN, S_RINTM, S_DONE
  } state_e;

  state_e              state;
  list_entry_t         ent;
  logic [LIST_AW:0]    idx;
  logic [7:0]          row;
  logic [6:0]          col;
  logic [PERIOD_W-1:0] since;
  logic                go, take;

  assign take = req_valid && req_ready;
  assign go   = start || (run && since >= frame_period);
  assign busy = (state != S_IDLE);
  assign list_addr = idx[LIST_AW-1:0];

  // request presented in each state
  always_comb begin
    req_valid = 1'b0;
    req_op    = OP_FT;
    req_count = '0;
    unique case (state)
      S_FT:     begin req_valid = 1'b1; req_op = OP_FT;     req_count = ft_rows; end
      S_PAR:    begin
                  req_valid = 1'b1;
                  unique case (ent.kind)
                    K_PFLUSH: req_op = OP_PFLUSH;
                    K_PBACK:  req_op = OP_PBACK;
                    default:  req_op = OP_PREAD;
                  endcase
                  req_count = {1'b0, ent.par};
                end
      S_SER:    begin req_valid = 1'b1; req_op = OP_SFLUSH; req_count = {1'b0, ent.ser}; end
      S_INTP,
      S_RINTP:  begin req_valid = 1'b1; req_op = OP_INTP;   req_count = 8'd1; end
      S_STRAN:  begin req_valid = 1'b1; req_op = OP_STRAN;  req_count = {1'b0, ent.ser}; end
      S_RSTRAN: begin req_valid = 1'b1; req_op = OP_STRAN;  req_count = {1'b0, sbin}; end
      S_INTM,
      S_RINTM:  begin req_valid = 1'b1; req_op = OP_INTM;   req_count = 8'd1; end
      S_RROW:   begin req_valid = 1'b1; req_op = OP_PREAD;  req_count = {1'b0, pbin}; end
      default:  ;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_IDLE;
      ent          <= '0;
      idx          <= '0;
      row          <= '0;
      col          <= '0;
      since        <= '0;
      tag_valid    <= 1'b0;
      tag          <= '0;
      frame_start  <= 1'b0;
      readout_done <= 1'b0;
    end else begin
      tag_valid    <= 1'b0;
      frame_start  <= 1'b0;
      readout_done <= 1'b0;
      if (since != '1) since <= since + PERIOD_W'(1);

      unique case (state)
        S_IDLE: if (go) begin
          since       <= PERIOD_W'(1);   // the start cycle counts as the first
          frame_start <= 1'b1;
          idx         <= '0;
          row         <= '0;
          col         <= '0;
          state       <= ft_en ? S_FT : (raster ? S_RROW : S_FETCH);
        end
        S_FT: if (take) state <= raster ? S_RROW : S_FETCH;
        // ---------------------------------------------------------- list mode
        S_FETCH: state <= (idx >= (LIST_AW+1)'(list_len)) ? S_DONE : S_WAIT;
        // zero counts are skipped here so that no request of count 0 leaves a gap
        S_WAIT: begin
          ent <= list_data;
          if (list_data.par != '0)         state <= S_PAR;
          else if (list_data.kind == K_READ) state <= S_INTP;
          else if (list_data.kind == K_SFLUSH && list_data.ser != '0) state <= S_SER;
          else                             state <= S_NEXT;
        end
        S_PAR: if (take) begin
          unique case (ent.kind)
            K_READ:   state <= S_INTP;
            K_SFLUSH: state <= (ent.ser != '0) ? S_SER : S_NEXT;
            default:  state <= S_NEXT;
          endcase
        end
        S_SER:   if (take) state <= S_NEXT;
        S_INTP:  if (take) state <= S_STRAN;
        S_STRAN: if (take) state <= S_INTM;
        S_INTM:  if (take) begin
          tag_valid <= 1'b1;
          tag       <= '{raster: 1'b0, last: (idx + 1'b1 >= (LIST_AW+1)'(list_len)),
                         sub_l: ent.sub_l, sub_r: ent.sub_r};
          state     <= S_NEXT;
        end
        S_NEXT: begin
          idx   <= idx + 1'b1;
          state <= S_FETCH;
        end
        // ---------------------------------------------------------- raster mode
        S_RROW:   if (take) state <= S_RINTP;
        S_RINTP:  if (take) state <= S_RSTRAN;
        S_RSTRAN: if (take) state <= S_RINTM;
        S_RINTM:  if (take) begin
          tag_valid <= 1'b1;
          tag       <= '{raster: 1'b1, last: (col + 7'd1 >= cols) && (row + 8'd1 >= rows),
                         sub_l: SUB_NONE, sub_r: SUB_NONE};
          if (col + 7'd1 >= cols) begin
            col   <= '0;
            row   <= row + 8'd1;
            state <= (row + 8'd1 >= rows) ? S_DONE : S_RROW;
          end else begin
            col   <= col + 7'd1;
            state <= S_RINTP;
          end
        end
        // ---------------------------------------------------------- end of readout
        S_DONE: if (!seq_active && !req_valid) begin
          readout_done <= 1'b1;
          state        <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
