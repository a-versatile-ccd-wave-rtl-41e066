// ccd_model: behavioural model (testbench only) of the analog side of the sensor:
// the 64x128 frame-transfer CCD used as a 64x64 image area plus a 64x64 storage
// area, its split serial register with one output amplifier at each end, the two
// dual-slope integrators and the two A/D converters.  It follows the 24-bit clock
// word bit by bit and is not synthesizable.
//
//   parallel transfer  rising P1AB while P3AB is high (phases 2, 3, 1: forward):
//                      storage line 0 moves into the serial register
//                      (added to what is there) and the storage area moves one line;
//                      if P1CD rises too (frame transfer, parallel flush) the image
//                      area moves into the storage area.  With all serial phases and
//                      RG high (parallel flush) the line is dumped.
//   backward transfer  rising P1AB while P2AB is high (phases 2, 1, 3): the storage
//                      area moves one line away from the serial register, and line 0
//                      becomes empty.  If P1CD rises too, the last storage line moves
//                      into image line 0 and the image area's last line is drained;
//                      otherwise the last storage line is lost.
//   serial transfer    rising S3L with S1L high and S2 low: each half of the serial
//                      register moves one pixel toward its amplifier, whose output
//                      node collects the charge.  RG high empties both nodes.
//   integrator         FRST_N low clears it; while FINT_N is low it integrates
//                      (VREF - node) with the sign given by FPLTY, so INT+ followed by
//                      INT- leaves T_INT * charge.
//   A/D converter      falling CONV_N samples integrator/T_INT + bias; busy is high
//                      for T_CONV cycles (5.6 us), after which the code is on adc_l/_r.
module ccd_model
  import wfs_pkg::*;
#(
  parameter int T_INT  = 160,
  parameter int T_CONV = 112,
  parameter int BIAS_L = 200,
  parameter int BIAS_R = 150
) (
  input  logic             clk,
  input  clk_word_t        clk_word,
  output logic             adc_busy,
  output logic [ADC_W-1:0] adc_l,
  output logic [ADC_W-1:0] adc_r
);
  localparam int COLS = 64, ROWS = 64, VREF = 1000;

  int image   [ROWS][COLS];
  int storage [ROWS][COLS];
  int serial  [COLS];
  int node_l = 0, node_r = 0;
  longint integ_l = 0, integ_r = 0;
  int conv_left = 0;
  int code_l = 0, code_r = 0;
  clk_word_t prev = '0;

  // statistics for the testbench
  int n_pshift = 0, n_ft = 0, n_pflush = 0, n_sshift = 0, n_conv = 0;
  int n_pback = 0;       // backward parallel transfers
  int n_sflush = 0;      // serial transfers dumped through the open reset gate
  int n_binned = 0;      // conversions of a node that collected more than one transfer
  int n_pipelined = 0;   // results that arrived after the next read had reset its node
  int shifts_on_node = 0;
  bit reset_since_conv = 0;

  initial begin
    adc_busy = 0; adc_l = '0; adc_r = '0;
    for (int r = 0; r < ROWS; r++)
      for (int c = 0; c < COLS; c++) begin image[r][c] = 0; storage[r][c] = 0; end
    for (int c = 0; c < COLS; c++) serial[c] = 0;
  end

  function automatic int clip16(input longint v);
    return (v < 0) ? 0 : (v > 65535) ? 65535 : int'(v);
  endfunction

  always @(posedge clk) begin
    clk_word_t w;
    w = clk_word;
    // ---- parallel transfers
    if (w[B_P1AB] && !prev[B_P1AB] && prev[B_P2AB]) begin
      bit both;
      both = w[B_P1CD] && !prev[B_P1CD];
      n_pback++;
      if (both) begin
        for (int r = ROWS - 1; r > 0; r--) image[r] = image[r-1];
        image[0] = storage[ROWS-1];
      end
      for (int r = ROWS - 1; r > 0; r--) storage[r] = storage[r-1];
      for (int c = 0; c < COLS; c++) storage[0][c] = 0;
    end else if (w[B_P1AB] && !prev[B_P1AB]) begin
      bit ft, dump;
      ft   = w[B_P1CD] && !prev[B_P1CD];
      dump = w[B_S1L] && w[B_S1R] && w[B_S2] && w[B_RG];
      n_pshift++;
      if (ft && !dump) n_ft++;
      if (dump) n_pflush++;
      for (int c = 0; c < COLS; c++) serial[c] += storage[0][c];
      for (int r = 0; r < ROWS - 1; r++) storage[r] = storage[r+1];
      for (int c = 0; c < COLS; c++) storage[ROWS-1][c] = ft ? image[0][c] : 0;
      if (ft) begin
        for (int r = 0; r < ROWS - 1; r++) image[r] = image[r+1];
        for (int c = 0; c < COLS; c++) image[ROWS-1][c] = 0;
      end
      if (dump) for (int c = 0; c < COLS; c++) serial[c] = 0;
    end
    // ---- serial transfers toward both amplifiers
    if (w[B_S3L] && !prev[B_S3L] && w[B_S1L] && !w[B_S2]) begin
      n_sshift++;
      if (w[B_RG]) n_sflush++;
      shifts_on_node++;
      node_l += serial[0];
      for (int c = 0; c < COLS/2 - 1; c++) serial[c] = serial[c+1];
      serial[COLS/2-1] = 0;
      node_r += serial[COLS-1];
      for (int c = COLS - 1; c > COLS/2; c--) serial[c] = serial[c-1];
      serial[COLS/2] = 0;
    end
    if (w[B_RG]) begin node_l = 0; node_r = 0; shifts_on_node = 0; reset_since_conv = 1; end
    // ---- dual-slope integrators
    if (!w[B_FRST_N]) begin integ_l = 0; integ_r = 0; end
    else if (!w[B_FINT_N]) begin
      if (w[B_FPLTY]) begin integ_l -= VREF - node_l; integ_r -= VREF - node_r; end
      else            begin integ_l += VREF - node_l; integ_r += VREF - node_r; end
    end
    // ---- A/D converters
    if (!w[B_CONV_N] && prev[B_CONV_N]) begin
      n_conv++;
      if (shifts_on_node > 1) n_binned++;
      reset_since_conv = 0;
      code_l = clip16(integ_l / T_INT + BIAS_L);
      code_r = clip16(integ_r / T_INT + BIAS_R);
      conv_left = T_CONV;
      adc_busy <= 1'b1;
    end else if (conv_left > 0) begin
      conv_left--;
      if (conv_left == 0) begin
        if (reset_since_conv) n_pipelined++;
        adc_busy <= 1'b0;
        adc_l <= 16'(code_l);
        adc_r <= 16'(code_r);
      end
    end
    prev = w;
  end
endmodule
