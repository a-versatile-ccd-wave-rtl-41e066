// seq_engine: CCD clock sequencer and 24-bit clock register.
//
// Every CCD clock and analog-chain control line is one bit of a 24-bit word.  An
// elementary operation (frame transfer, parallel readout, serial transfer, ...) is a
// short sequence fragment of such words kept in the fragment memory; each word is
// held in the clock register for its own hold count of clock cycles and then
// overwritten by the next one.  A request names an operation and a repeat count: the
// fragment is stepped through `count` times in a row, as a software DO loop would.
// The word layout, the fragments and the idea of per-word hold times follow the
// design; the memory sizes, the hold field width and the request handshake are this
// design's own.
//
// Interface
//   host port   frag_we/frag_addr/frag_wdata write the fragment memory ({hold, word});
//               loc_we/loc_addr/loc_wdata write the per-operation table (first address,
//               length).  Both reset to the default fragments of wfs_pkg.
//   request     req_valid/req_ready handshake with req_op and req_count.  A count of 0 is
//               accepted and does nothing.
//   clk_word    the clock register; holds its last word while idle.  Resets to the idle
//               word (all lines at rest, BUSY_N high).
// Timing
//   The first word of an accepted request appears on clk_word one cycle after the
//   handshake.  req_ready is high while idle and in the last cycle of the last word,
//   so consecutive operations follow each other without a gap: an operation of count
//   N whose fragment holds add up to H cycles occupies clk_word for exactly N*H cycles.
//   A hold count of 0 counts as 1.
module seq_engine
  import wfs_pkg::*;
#(
  parameter int unsigned FRAG_DEPTH = 64,
  parameter int unsigned CNT_W      = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // host download
  input  logic                      frag_we,
  input  logic [FRAG_AW-1:0]        frag_addr,
  input  frag_t                     frag_wdata,
  input  logic                      loc_we,
  input  logic [2:0]                loc_addr,
  input  frag_loc_t                 loc_wdata,
  // operation request
  input  logic                      req_valid,
  output logic                      req_ready,
  input  op_e                       req_op,
  input  logic [CNT_W-1:0]          req_count,
  // clock register
  output clk_word_t                 clk_word,
  output logic                      active,
  output logic                      op_done     // pulse: last word of an operation ended
);

  frag_t     frag_mem [FRAG_DEPTH];
  frag_loc_t loc_tab  [N_OPS];

  logic [FRAG_AW-1:0] addr, first;
  logic [3:0]         idx, len;
  logic [HOLD_W-1:0]  hold_cnt;
  logic [CNT_W-1:0]   rep;

  logic last_word, word_end, accept;
  frag_loc_t  nloc;
  frag_t      nfrag;

  always_comb begin
    last_word = (idx == len - 4'd1) && (rep == CNT_W'(1));
    word_end  = active && (hold_cnt <= HOLD_W'(1));
    req_ready = !active || (last_word && word_end);
    accept    = req_valid && req_ready && (req_count != '0);
    nloc      = loc_tab[req_op];
    nfrag     = frag_mem[nloc.start];
  end

  function automatic logic [HOLD_W-1:0] hold_of(frag_t f);
    return (f.hold == '0) ? HOLD_W'(1) : f.hold;
  endfunction

  // fragment memory and table: host-writable, reset to the defaults
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int unsigned i = 0; i < FRAG_DEPTH; i++) frag_mem[i] <= default_frag(i);
      for (int unsigned i = 0; i < N_OPS; i++)      loc_tab[i]  <= default_loc(i);
    end else begin
      if (frag_we) frag_mem[frag_addr] <= frag_wdata;
      if (loc_we && int'(loc_addr) < N_OPS) loc_tab[loc_addr] <= loc_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      active   <= 1'b0;
      addr     <= '0;
      first    <= '0;
      idx      <= '0;
      len      <= 4'd1;
      hold_cnt <= '0;
      rep      <= '0;
      clk_word <= default_frag(N_DEFAULT_WORDS - 1).word;
      op_done  <= 1'b0;
    end else begin
      op_done <= 1'b0;
      if (accept) begin
        active   <= 1'b1;
        first    <= nloc.start;
        addr     <= nloc.start;
        len      <= (nloc.len == '0) ? 4'd1 : nloc.len;
        idx      <= '0;
        rep      <= req_count;
        clk_word <= nfrag.word;
        hold_cnt <= hold_of(nfrag);
      end else if (word_end) begin
        if (last_word) begin
          active <= 1'b0;
        end else if (idx == len - 4'd1) begin
          // next repetition of the fragment
          rep      <= rep - CNT_W'(1);
          idx      <= '0;
          addr     <= first;
          clk_word <= frag_mem[first].word;
          hold_cnt <= hold_of(frag_mem[first]);
        end else begin
          idx      <= idx + 4'd1;
          addr     <= addr + FRAG_AW'(1);
          clk_word <= frag_mem[addr + FRAG_AW'(1)].word;
          hold_cnt <= hold_of(frag_mem[addr + FRAG_AW'(1)]);
        end
      end else if (active) begin
        hold_cnt <= hold_cnt - HOLD_W'(1);
      end
      if (word_end && last_word) op_done <= 1'b1;
    end
  end

  // a request must stay stable until it is taken
  property p_req_stable;
    @(posedge clk) disable iff (!rst_n)
      req_valid && !req_ready |=> req_valid && $stable(req_op) && $stable(req_count);
  endproperty
  a_req_stable: assert property (p_req_stable);

endmodule
