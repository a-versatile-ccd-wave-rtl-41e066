// curvature_unit: curvature signal of every subaperture from one frame's sums.
//
// For subaperture i with frame sum I_i, dark-frame sum B_i and geometric factor G_i:
//     I_S      = sum_i (I_i - B_i)                    bias-corrected total flux
//     dI/I (i) = (G_i * (I_i - B_i) - I_S) / I_S  =  G_i * (I_i - B_i) * (1 / I_S) - 1
// G_i scales a subaperture to the full aperture (1/20th of the area: G = 20; it may
// also fold in the gain of the amplifier that reads the subaperture), so that every
// subaperture shares the single normalisation 1/I_S: one reciprocal per frame instead
// of one division per subaperture.  The formula and the single-reciprocal scheme are
// the design's; the fixed-point formats, the bit-serial divider and the saturation
// are this design's own.
//
// Sequence after start (one cycle per step):
//   nsub cycles   accumulate I_S over the subapertures (signed)
//   K+1 cycles    restoring division R = floor(2^K / I_S)
//   nsub cycles   one result per cycle on out_valid/out_idx/out_val
//   then done pulses.  With 19 subapertures and K = 48 this is 90 cycles, 4.5 us at
//   20 MHz.  If I_S <= 0 (no light) the results are all 0 and no_signal is set.
// Formats: G is unsigned Q8.8 (wfs_pkg::G_FRAC); out_val is signed with OUT_FRAC
// fraction bits, saturated to OUT_W bits.  Sums are read combinationally through
// rd_idx (from subap_accum).  G is written through g_we/g_addr/g_wdata and resets to 1.0.
module curvature_unit
  import wfs_pkg::*;
#(
  parameter int unsigned SUM_W   = 24,
  parameter int unsigned RECIP_K = 48
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    g_we,
  input  logic [SUB_W-1:0]        g_addr,
  input  logic [15:0]             g_wdata,
  input  logic [SUB_W-1:0]        nsub,
  input  logic                    start,
  output logic [SUB_W-1:0]        rd_idx,
  input  logic [SUM_W-1:0]        res_sum,
  input  logic [SUM_W-1:0]        dark_sum,
  output logic                    out_valid,
  output logic [SUB_W-1:0]        out_idx,
  output logic signed [OUT_W-1:0] out_val,
  output logic                    done,
  output logic                    no_signal,
  output logic                    busy
);
  localparam int unsigned NS    = 1 << SUB_W;
  localparam int unsigned D_W   = SUM_W + 1;           // I - B, signed
  localparam int unsigned IS_W  = D_W + SUB_W;         // I_S, signed
  localparam int unsigned R_W   = RECIP_K + 1;         // reciprocal, unsigned
  localparam int unsigned NUM_W = D_W + 17;            // G * (I - B), signed
  localparam int unsigned P_W   = NUM_W + R_W + 1;
  localparam int unsigned SHIFT = RECIP_K + G_FRAC - OUT_FRAC;

  typedef enum logic [1:0] {C_IDLE, C_SUM, C_DIV, C_OUT} cstate_e;
  cstate_e state;

  logic [15:0]             gmem [NS];
  logic signed [IS_W-1:0]  is_acc;
  logic [R_W-1:0]          quo;
  logic [IS_W:0]           rem;
  logic [$clog2(R_W+1)-1:0] bitn;
  logic [SUB_W-1:0]        idx;

  logic signed [D_W-1:0]   d;
  logic signed [NUM_W-1:0] num;
  logic signed [P_W-1:0]   prod;
  logic signed [P_W-1:0]   scaled;
  logic signed [OUT_W-1:0] sat;
  logic [IS_W:0]           rem_sh, divisor;

  assign rd_idx = idx;
  assign busy   = (state != C_IDLE);

  always_comb begin
    d       = $signed({1'b0, res_sum}) - $signed({1'b0, dark_sum});
    num     = $signed({1'b0, gmem[idx]}) * d;
    prod    = num * $signed({1'b0, quo});
    scaled  = (prod >>> SHIFT) - (P_W'(1) <<< OUT_FRAC);
    if (scaled > P_W'(signed'({1'b0, {(OUT_W-1){1'b1}}})))
      sat = {1'b0, {(OUT_W-1){1'b1}}};
    else if (scaled < -P_W'(signed'({1'b0, {(OUT_W-1){1'b1}}})) - P_W'(1))
      sat = {1'b1, {(OUT_W-1){1'b0}}};
    else
      sat = scaled[OUT_W-1:0];
    divisor = {1'b0, is_acc};
    // restoring division of 2^RECIP_K: the dividend has a single 1 at its top bit
    rem_sh  = {rem[IS_W-1:0], (bitn == '0)};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NS; i++) gmem[i] <= 16'(1 << G_FRAC);
    end else if (g_we) begin
      gmem[g_addr] <= g_wdata;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= C_IDLE; is_acc <= '0; quo <= '0; rem <= '0; bitn <= '0; idx <= '0;
      out_valid <= 1'b0; out_idx <= '0; out_val <= '0; done <= 1'b0; no_signal <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      done      <= 1'b0;
      unique case (state)
        C_IDLE: if (start) begin
          is_acc <= '0;
          idx    <= '0;
          state  <= (nsub == '0) ? C_IDLE : C_SUM;
          done   <= (nsub == '0);
        end
        C_SUM: begin
          is_acc <= is_acc + IS_W'(d);
          if (idx == nsub - 1'b1) begin
            idx   <= '0;
            rem   <= '0;
            quo   <= '0;
            bitn  <= '0;
            state <= C_DIV;
          end else idx <= idx + 1'b1;
        end
        C_DIV: begin
          if (is_acc <= 0) begin
            no_signal <= 1'b1;
            quo       <= '0;
            state     <= C_OUT;
          end else begin
            if (rem_sh >= divisor) begin
              rem <= rem_sh - divisor;
              quo <= {quo[R_W-2:0], 1'b1};
            end else begin
              rem <= rem_sh;
              quo <= {quo[R_W-2:0], 1'b0};
            end
            bitn <= bitn + 1'b1;
            if (bitn == ($clog2(R_W+1))'(R_W - 1)) begin
              no_signal <= 1'b0;
              state     <= C_OUT;
            end
          end
        end
        C_OUT: begin
          out_valid <= 1'b1;
          out_idx   <= idx;
          out_val   <= no_signal ? '0 : sat;
          if (idx == nsub - 1'b1) begin
            state <= C_IDLE;
            done  <= 1'b1;
          end else idx <= idx + 1'b1;
        end
        default: state <= C_IDLE;
      endcase
    end
  end
endmodule
