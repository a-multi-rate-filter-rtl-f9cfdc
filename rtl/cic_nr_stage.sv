// cic_nr_stage - one block of the non-recursive CIC decimator.
//
// Applies (1 + z^-1)^N to a lane-demultiplexed stream and keeps every
// second output (decimation by 2), so LANES_IN input lanes give
// LANES_IN/2 output lanes per clock. Lane k of a clock holds sample
// x[LANES_IN*t + k]: lane 0 is the oldest. Output lane j holds
//
//     y[m] = sum_{k=0..N} C(N,k) * x[2m + 1 - k],   m = (LANES_IN/2)*t + j,
//
// i.e. the newest sample of each output is input lane 2j+1. Only the kept
// outputs are computed, which is what removes every other adder of the
// undecimated filter. Samples older than the current clock come from the
// last N-1 lanes of the previous valid clock, held in a small history
// register. Arithmetic is full precision: the output is IN_W + N bits
// wide and never wraps.
//
// Timing: the outputs are registered; out_valid follows in_valid by one
// clock. Registers only move on in_valid, so gaps in the input stream are
// allowed. Reset clears the history (earlier samples read as zero).
// The block structure follows the published factorisation of the CIC
// transfer function; which phase the decimation keeps, the valid
// qualifier and the reset behaviour are this design's choices.
module cic_nr_stage #(
  parameter int unsigned LANES_IN = 32,
  parameter int unsigned IN_W     = 3,
  parameter int unsigned N        = 2,
  localparam int unsigned LANES_OUT = LANES_IN / 2,
  localparam int unsigned OUT_W     = IN_W + N
) (
  input  logic                                  clk,
  input  logic                                  rst_n,
  input  logic                                  in_valid,
  input  logic [LANES_IN-1:0][IN_W-1:0]         in_data,
  output logic                                  out_valid,
  output logic [LANES_OUT-1:0][OUT_W-1:0]       out_data
);
  import cic_qb_pkg::binom;

  // History: the N-1 newest samples of the previous clock (index 0 newest).
  localparam int unsigned HIST = (N > 1) ? N - 1 : 1;
  logic signed [IN_W-1:0] hist_q [HIST];

  // Window: the current lanes followed by the history, as one sample
  // sequence indexed by age (0 = newest = lane LANES_IN-1).
  localparam int unsigned WIN = LANES_IN + HIST;
  logic signed [IN_W-1:0] win [WIN];
  logic [LANES_OUT-1:0][OUT_W-1:0] sum_d;

  always_comb begin
    for (int a = 0; a < int'(LANES_IN); a++) win[a] = signed'(in_data[LANES_IN-1-a]);
    for (int h = 0; h < int'(HIST); h++) win[LANES_IN+h] = hist_q[h];
  end

  always_comb begin
    for (int j = 0; j < int'(LANES_OUT); j++) begin
      logic signed [OUT_W-1:0] acc;
      acc = '0;
      // x[2m+1-k] is input lane 2j+1-k, age LANES_IN-1-(2j+1-k).
      for (int k = 0; k <= int'(N); k++)
        acc += OUT_W'(binom(N, k)) * OUT_W'(win[LANES_IN - 2 - 2*j + k]);
      sum_d[j] = acc;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_data  <= '0;
      for (int h = 0; h < int'(HIST); h++) hist_q[h] <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_data <= sum_d;
        for (int h = 0; h < int'(HIST); h++) hist_q[h] <= win[h];
      end
    end
  end

  initial begin
    assert (LANES_IN % 2 == 0 && LANES_IN >= 2 * N)
      else $error("cic_nr_stage: LANES_IN must be even and at least 2*N");
  end

endmodule
