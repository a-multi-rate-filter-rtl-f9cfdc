// qb_fir - symmetric quarter-band FIR with built-in decimation by LANES.
//
// Each clock brings LANES new samples (lane 0 the oldest) and the
// convolution window slides by LANES samples, so exactly one output is
// computed per clock: decimation by LANES costs nothing extra. This is the
// same organisation as a demultiplexed polyphase FIR whose window moves a
// whole clock's worth of samples per edge. With the defaults (4 lanes,
// 17 taps) the output at clock t is
//
//     acc[t] = sum_{i<TAPS} COEF[i] * u[LANES*t + LANES - 1 - i]
//     y[t]   = sat_OUT_W( floor(acc[t] / 2^SHIFT) )
//
// Samples older than the current clock come from a TAPS-1 sample history
// register. The taps must be symmetric (linear phase); the pairs of
// samples that share a tap are added first, so TAPS/2 + 1 products are
// formed. The sum is full precision; the result is truncated (LSBs
// discarded, rounding towards minus infinity) to OUT_W bits and clipped
// at the largest and smallest OUT_W-bit values, since the filter's gain
// for an adversarial input (sum of |COEF|) exceeds its DC gain.
//
// Timing: output registered, out_valid follows in_valid by one clock.
// Registers move only on in_valid. Tap count, symmetry, decimation by 4
// and the 8-bit output follow the published design; the coefficient
// values, SHIFT, the clipping and reset behaviour are this design's own.
module qb_fir
#(
  parameter int unsigned LANES  = 4,
  parameter int unsigned IN_W   = 9,
  parameter int unsigned TAPS   = cic_qb_pkg::QB_TAPS,
  parameter int unsigned CW     = cic_qb_pkg::QB_CW,
  parameter int          COEF [TAPS] = cic_qb_pkg::QB_COEF,
  parameter int unsigned OUT_W  = cic_qb_pkg::DEC_OUT_W,
  // Discarded LSBs: the coefficient scale plus the input/output width gap.
  parameter int unsigned SHIFT  = cic_qb_pkg::QB_FRAC + IN_W - OUT_W
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic                         in_valid,
  input  logic [LANES-1:0][IN_W-1:0]   in_data,
  output logic                         out_valid,
  output logic signed [OUT_W-1:0]      out_data
);

  localparam int unsigned HIST  = TAPS - 1;
  localparam int unsigned WIN   = LANES + HIST;
  localparam int unsigned PAIRS = TAPS / 2;
  localparam int unsigned ACC_W = IN_W + 1 + CW + $clog2(PAIRS + 1);

  // Samples by age: 0 is the newest (current lane LANES-1).
  logic signed [IN_W-1:0] hist_q [HIST];
  logic signed [IN_W-1:0] win [WIN];
  logic signed [ACC_W-1:0] acc;
  logic signed [ACC_W-1:0] shifted;
  logic signed [OUT_W-1:0] y_d;

  localparam logic signed [ACC_W-1:0] YMAX = ACC_W'((1 << (OUT_W - 1)) - 1);
  localparam logic signed [ACC_W-1:0] YMIN = -ACC_W'(1 << (OUT_W - 1));

  always_comb begin
    for (int a = 0; a < int'(LANES); a++) win[a] = signed'(in_data[LANES-1-a]);
    for (int h = 0; h < int'(HIST); h++) win[LANES+h] = hist_q[h];
  end

  always_comb begin
    acc = '0;
    for (int i = 0; i < int'(PAIRS); i++)
      acc += ACC_W'(COEF[i]) * (ACC_W'(win[i]) + ACC_W'(win[TAPS-1-i]));
    if (TAPS % 2 == 1)
      acc += ACC_W'(COEF[PAIRS]) * ACC_W'(win[PAIRS]);
    shifted = acc >>> SHIFT;
    if (shifted > YMAX)      y_d = YMAX[OUT_W-1:0];
    else if (shifted < YMIN) y_d = YMIN[OUT_W-1:0];
    else                     y_d = shifted[OUT_W-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int h = 0; h < int'(HIST); h++) hist_q[h] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= y_d;
        for (int h = 0; h < int'(HIST); h++) hist_q[h] <= win[h];
      end
    end
  end

  initial begin
    for (int i = 0; i < int'(TAPS); i++) begin
      assert (COEF[i] == COEF[TAPS-1-i])
        else $error("qb_fir: coefficients must be symmetric");
      assert (COEF[i] < (1 << (CW - 1)) && COEF[i] >= -(1 << (CW - 1)))
        else $error("qb_fir: coefficient %0d does not fit in CW bits", i);
    end
  end

endmodule
