// wfs_controller: digital controller of a CCD wave front curvature sensor.
//
// The sensor reads a defocused guide-star image on a small frame-transfer CCD and
// sums it into a ring pattern of subapertures whose normalised intensity changes are
// the wave front curvature.  This top level ties together:
//   addr_decoder + cfg_regs   host download of everything below
//   seq_engine                fragment memory, hold timing and the 24-bit clock register
//   readout_ctrl + list_ram   frame transfer, then the superpixel list (or a raster)
//   adc_buffer                the two A/D results of each read, in four byte registers
//   subap_accum               pipelined tag/sample matching, subaperture and dark sums
//   curvature_unit            (G(I-I_B) - I_S)/I_S for every subaperture after each frame
// The analog chain (clock drivers, bias references, preamplifiers, dual-slope
// integrators) and the A/D converters are outside: clk_word drives the clock drivers
// and integrator controls bit by bit, and the converters come back on adc_*.
// The host link is a plain write bus in and two result streams out.  Writes beyond
// the end of the fragment memory, the fragment table, the list or the gain table
// inside their regions are ignored rather than wrapped.
//
// Timing: clk is the 20 MHz (50 ns) sequencing clock.  With the default fragments a
// pixel read takes 20 us, a parallel transfer 2.5 us, a serial transfer 1.2 us and a
// 64-line frame transfer 96 us.  Curvatures follow the last conversion of a frame
// within 5 us.  A dark frame (cfg mode bit 1) fills the dark array instead and
// produces no curvatures.
module wfs_controller
  import wfs_pkg::*;
#(
  parameter int unsigned LIST_DEPTH = 128,
  parameter int unsigned SUM_W      = 24,
  parameter int unsigned PERIOD_W   = 24
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // host download bus
  input  logic [15:0]             host_addr,
  input  logic                    host_we,
  input  logic [31:0]             host_wdata,
  output logic                    bad_addr,
  // clock register to the clock drivers and signal chain
  output clk_word_t               clk_word,
  // A/D converters
  input  logic                    adc_busy,
  input  logic [ADC_W-1:0]        adc_l,
  input  logic [ADC_W-1:0]        adc_r,
  input  logic [1:0]              adc_rd_sel,
  output logic [7:0]              adc_rd_byte,
  // pixel stream (every read, raster images)
  output logic                    pix_valid,
  output logic [ADC_W-1:0]        pix_l,
  output logic [ADC_W-1:0]        pix_r,
  output tag_t                    pix_tag,
  // curvature stream
  output logic                    curv_valid,
  output logic [SUB_W-1:0]        curv_idx,
  output logic signed [OUT_W-1:0] curv_val,
  output logic                    curv_done,
  output logic                    no_signal,
  // status
  output logic                    frame_start,
  output logic                    readout_done,
  output logic                    frame_done,
  output logic                    frame_dark,
  output logic                    readout_busy,
  output logic                    tag_err
);
  localparam int unsigned LIST_AW = $clog2(LIST_DEPTH);

  // ---------------------------------------------------------------- host side
  region_e    region;
  logic [8:0] offset;
  logic       frag_we, loc_we, list_we, gain_we, cfg_we;

  addr_decoder u_dec (
    .addr(host_addr), .we(host_we), .region(region), .offset(offset),
    .frag_we(frag_we), .loc_we(loc_we), .list_we(list_we), .gain_we(gain_we),
    .cfg_we(cfg_we), .bad_addr(bad_addr)
  );

  logic                raster, dark, ft_en, run, start;
  logic [7:0]          list_len, ft_rows;
  logic [PERIOD_W-1:0] frame_period;
  logic [7:0]          rows;
  logic [6:0]          cols, pbin, sbin;
  logic [SUB_W-1:0]    nsub;

  cfg_regs #(.PERIOD_W(PERIOD_W)) u_cfg (
    .clk, .rst_n, .we(cfg_we), .offset(offset[7:0]), .wdata(host_wdata),
    .raster, .dark, .ft_en, .list_len, .frame_period, .ft_rows,
    .rows, .cols, .pbin, .sbin, .nsub, .run, .start
  );

  // ---------------------------------------------------------------- sequencing
  logic              req_valid, req_ready, seq_active, op_done;
  op_e               req_op;
  logic [7:0]        req_count;
  logic [LIST_AW-1:0] list_addr;
  logic [31:0]       list_word;
  logic              tag_valid;
  tag_t              tag;

  seq_engine u_seq (
    .clk, .rst_n,
    .frag_we(frag_we && (offset >> FRAG_AW) == '0), .frag_addr(offset[FRAG_AW-1:0]), .frag_wdata(frag_t'(host_wdata)),
    .loc_we(loc_we && (offset >> 3) == '0), .loc_addr(offset[2:0]), .loc_wdata(frag_loc_t'(host_wdata[9:0])),
    .req_valid, .req_ready, .req_op, .req_count,
    .clk_word, .active(seq_active), .op_done
  );

  list_ram #(.DEPTH(LIST_DEPTH), .W(32)) u_list (
    .clk, .we(list_we && (offset >> LIST_AW) == '0), .wr_addr(offset[LIST_AW-1:0]), .wr_data(host_wdata),
    .rd_addr(list_addr), .rd_data(list_word)
  );

  readout_ctrl #(.LIST_AW(LIST_AW), .PERIOD_W(PERIOD_W)) u_ro (
    .clk, .rst_n, .raster, .ft_en, .list_len, .frame_period, .ft_rows,
    .rows, .cols, .pbin, .sbin, .run, .start,
    .list_addr, .list_data(list_entry_t'(list_word)),
    .req_valid, .req_ready, .req_op, .req_count, .seq_active,
    .tag_valid, .tag, .frame_start, .readout_done, .busy(readout_busy)
  );

  // ---------------------------------------------------------------- data path
  logic             sample_valid;
  logic [ADC_W-1:0] sample_l, sample_r;

  adc_buffer u_adc (
    .clk, .rst_n, .adc_busy, .adc_l, .adc_r,
    .sample_valid, .sample_l, .sample_r, .rd_sel(adc_rd_sel), .rd_byte(adc_rd_byte)
  );

  logic [SUB_W-1:0] rd_idx;
  logic [SUM_W-1:0] res_sum, dark_sum;

  subap_accum #(.SUM_W(SUM_W)) u_acc (
    .clk, .rst_n, .dark, .tag_valid, .tag,
    .sample_valid, .sample_l, .sample_r, .readout_done,
    .frame_done, .frame_dark, .rd_idx, .res_sum, .dark_sum,
    .pix_valid, .pix_l, .pix_r, .pix_tag, .err(tag_err)
  );

  logic curv_busy;

  curvature_unit #(.SUM_W(SUM_W)) u_curv (
    .clk, .rst_n,
    .g_we(gain_we && (offset >> SUB_W) == '0), .g_addr(offset[SUB_W-1:0]), .g_wdata(host_wdata[15:0]),
    .nsub, .start(frame_done && !frame_dark),
    .rd_idx, .res_sum, .dark_sum,
    .out_valid(curv_valid), .out_idx(curv_idx), .out_val(curv_val),
    .done(curv_done), .no_signal, .busy(curv_busy)
  );

endmodule
