// wfs_pkg: types and constants shared by the CCD wave front sensor controller.
//
// The controller drives a 64x128 frame-transfer CCD through a 24-bit clock word.
// Each bit of the word is one CCD clock or one control line of the analog signal
// chain; the bit assignment below is the one of the sequencing table of the design
// (P1AB on bit 23 down to the active-low BUSY flag on bit 0).  The default sequence
// fragments are that table's columns, one 24-bit word per step.  The hold time of
// each step (in 50 ns cycles of the 20 MHz sequencing clock), the superpixel list
// entry layout, the host address map and the fixed-point formats are this design's
// own choices, chosen so that a plain pixel read takes 20 us, a parallel transfer
// 2.5 us, a serial transfer 1.2 us and a 64-row frame transfer under 100 us.
package wfs_pkg;

  // ---------------------------------------------------------------- clock word bits
  localparam int unsigned B_P1AB   = 23;
  localparam int unsigned B_P2AB   = 22;
  localparam int unsigned B_P3AB   = 21;
  localparam int unsigned B_P1CD   = 20;
  localparam int unsigned B_P2CD   = 19;
  localparam int unsigned B_P3CD   = 18;
  localparam int unsigned B_TG     = 17;
  localparam int unsigned B_S1L    = 15;
  localparam int unsigned B_S3L    = 14;
  localparam int unsigned B_S2     = 13;
  localparam int unsigned B_S1R    = 12;
  localparam int unsigned B_S3R    = 11;
  localparam int unsigned B_RG     = 10;
  localparam int unsigned B_SW     = 9;
  localparam int unsigned B_FRST_N = 7;   // integrator reset, active low
  localparam int unsigned B_FINT_N = 6;   // integrate, active low
  localparam int unsigned B_FPLTY  = 5;   // integrator input polarity
  localparam int unsigned B_CONV_N = 4;   // A/D convert start, active low
  localparam int unsigned B_BUSY_N = 0;   // sequence busy, active low

  localparam int unsigned WORD_W = 24;
  localparam int unsigned HOLD_W = 8;
  typedef logic [WORD_W-1:0] clk_word_t;

  // ---------------------------------------------------------------- elementary operations
  typedef enum logic [2:0] {
    OP_FT     = 3'd0,   // frame transfer: image and storage areas shift together
    OP_PREAD  = 3'd1,   // parallel readout: storage area shifts one line into the serial register
    OP_PFLUSH = 3'd2,   // parallel flush: lines shifted out and dumped
    OP_INTP   = 3'd3,   // reset output node, integrate reset level (INT+)
    OP_STRAN  = 3'd4,   // serial transfer onto the output node
    OP_INTM   = 3'd5,   // integrate signal level (INT-), start A/D conversion
    OP_SFLUSH = 3'd6,   // serial flush: shift and dump through the reset gate
    OP_PBACK  = 3'd7    // parallel shift backward: both areas move one line away from the serial register
  } op_e;
  localparam int unsigned N_OPS = 8;

  // fragment memory entry: hold count in the top byte, clock word below
  typedef struct packed {
    logic [HOLD_W-1:0] hold;
    clk_word_t         word;
  } frag_t;

  // fragment table entry: first address and length of an operation's fragment
  localparam int unsigned FRAG_AW = 6;
  typedef struct packed {
    logic [FRAG_AW-1:0] start;
    logic [3:0]         len;
  } frag_loc_t;

  localparam int unsigned N_DEFAULT_WORDS = 46;

  // Default fragment memory: the columns of the sequencing table, with hold times.
  function automatic frag_t default_frag(input int unsigned a);
    frag_t f;
    unique case (a)
      // frame transfer: 250 ns phases (5 cycles), 1.5 us per line
      0:  f = '{8'd5, 24'h486850};  1:  f = '{8'd5, 24'h6C6850};
      2:  f = '{8'd5, 24'h246850};  3:  f = '{8'd5, 24'hB46850};
      4:  f = '{8'd5, 24'h906850};  5:  f = '{8'd5, 24'h002051};
      // parallel readout: 2.5 us per line
      6:  f = '{8'd8, 24'h406850};  7:  f = '{8'd8, 24'h606850};
      8:  f = '{8'd8, 24'h206850};  9:  f = '{8'd8, 24'hA06850};
      10: f = '{8'd9, 24'h806850};  11: f = '{8'd9, 24'h002051};
      // parallel flush: 2.5 us per line
      12: f = '{8'd8, 24'h48FC50};  13: f = '{8'd8, 24'h6CFC50};
      14: f = '{8'd8, 24'h24FC50};  15: f = '{8'd8, 24'hB4FC50};
      16: f = '{8'd9, 24'h90FC50};  17: f = '{8'd9, 24'h00FC51};
      // INT+: reset node and integrator, 8 us integration of the reset level
      18: f = '{8'd20,  24'h002450}; 19: f = '{8'd10, 24'h0020D0};
      20: f = '{8'd160, 24'h002090}; 21: f = '{8'd4,  24'h0020D0};
      22: f = '{8'd4,   24'h0020F1};
      // serial transfer: 1.2 us
      23: f = '{8'd4, 24'h00A8F0};  24: f = '{8'd4, 24'h0088F0};
      25: f = '{8'd4, 24'h00D8F0};  26: f = '{8'd4, 24'h0050F0};
      27: f = '{8'd4, 24'h0070F0};  28: f = '{8'd4, 24'h0020F1};
      // INT-: 8 us integration of the signal level, then convert start
      29: f = '{8'd160, 24'h0020B0}; 30: f = '{8'd6, 24'h0020F0};
      31: f = '{8'd4,   24'h0020E0}; 32: f = '{8'd4, 24'h0020F0};
      33: f = '{8'd4,   24'h002051};
      // serial flush: 1.2 us
      34: f = '{8'd4, 24'h00A850};  35: f = '{8'd4, 24'h008850};
      36: f = '{8'd4, 24'h00DC50};  37: f = '{8'd4, 24'h005450};
      38: f = '{8'd4, 24'h007050};  39: f = '{8'd4, 24'h002051};
      // parallel shift backward: the frame-transfer phases in reverse order
      // (2, 21, 1, 13, 3), both areas, 2.5 us per line
      40: f = '{8'd8, 24'h486850};  41: f = '{8'd8, 24'hD86850};
      42: f = '{8'd8, 24'h906850};  43: f = '{8'd8, 24'hB46850};
      44: f = '{8'd9, 24'h246850};  45: f = '{8'd9, 24'h002051};
      default: f = '{8'd1, 24'h002051};
    endcase
    return f;
  endfunction

  function automatic frag_loc_t default_loc(input int unsigned op);
    frag_loc_t l;
    unique case (op)
      0: l = '{6'd0,  4'd6};
      1: l = '{6'd6,  4'd6};
      2: l = '{6'd12, 4'd6};
      3: l = '{6'd18, 4'd5};
      4: l = '{6'd23, 4'd6};
      5: l = '{6'd29, 4'd5};
      6: l = '{6'd34, 4'd6};
      7: l = '{6'd40, 4'd6};
      default: l = '{6'd0, 4'd1};
    endcase
    return l;
  endfunction

  // ---------------------------------------------------------------- superpixel list
  localparam int unsigned SUB_W   = 5;
  localparam logic [SUB_W-1:0] SUB_NONE = '1;   // sample belongs to no subaperture

  typedef enum logic [1:0] {
    K_READ   = 2'd0,   // par parallel readouts, then one read binning ser serial transfers
    K_SFLUSH = 2'd1,   // par parallel readouts, then ser serial flushes
    K_PFLUSH = 2'd2,   // par parallel flushes
    K_PBACK  = 2'd3    // par parallel shifts backward
  } kind_e;

  typedef struct packed {
    kind_e            kind;    // [31:30]
    logic [6:0]       par;     // [29:23]
    logic [6:0]       ser;     // [22:16]
    logic [5:0]       rsvd;    // [15:10]
    logic [SUB_W-1:0] sub_l;   // [9:5]  subaperture of the left amplifier's superpixel
    logic [SUB_W-1:0] sub_r;   // [4:0]  subaperture of the right amplifier's superpixel
  } list_entry_t;

  // tag travelling with a conversion through the pipelined A/D converter
  typedef struct packed {
    logic             raster;  // raster-mode pixel (no subaperture)
    logic             last;    // last read of the frame
    logic [SUB_W-1:0] sub_l;
    logic [SUB_W-1:0] sub_r;
  } tag_t;

  // ---------------------------------------------------------------- host address map
  typedef enum logic [2:0] {
    R_NONE = 3'd0,
    R_FRAG = 3'd1,   // 0x0000-0x00FF fragment memory {hold, word}
    R_LOC  = 3'd2,   // 0x0100-0x01FF fragment table {start, len}
    R_LIST = 3'd3,   // 0x0200-0x03FF superpixel list
    R_GAIN = 3'd4,   // 0x0400-0x04FF geometric factors G
    R_CFG  = 3'd5    // 0x0500-0x05FF configuration registers
  } region_e;

  // configuration registers (offsets in R_CFG)
  localparam logic [7:0] CFG_MODE    = 8'h00; // bit0 raster, bit1 dark frame, bit2 frame transfer enable
  localparam logic [7:0] CFG_LISTLEN = 8'h01;
  localparam logic [7:0] CFG_PERIOD  = 8'h02; // frame period in cycles (0: back to back)
  localparam logic [7:0] CFG_FTROWS  = 8'h03;
  localparam logic [7:0] CFG_ROWS    = 8'h04; // raster: superpixel rows
  localparam logic [7:0] CFG_COLS    = 8'h05; // raster: superpixel columns per amplifier
  localparam logic [7:0] CFG_PBIN    = 8'h06;
  localparam logic [7:0] CFG_SBIN    = 8'h07;
  localparam logic [7:0] CFG_NSUB    = 8'h08;
  localparam logic [7:0] CFG_RUN     = 8'h09; // bit0 run continuously; writing bit1 starts one frame

  // ---------------------------------------------------------------- number formats
  localparam int unsigned ADC_W   = 16;
  localparam int unsigned G_FRAC  = 8;     // G is unsigned Q8.8
  localparam int unsigned OUT_W   = 24;    // curvature is signed, OUT_FRAC fraction bits
  localparam int unsigned OUT_FRAC = 16;

endpackage
