// cic_qb_decimator - first filter stage of a tunable filter bank channel:
// non-recursive CIC (D = 8, N = 2) followed by a quarter-band FIR.
//
// One stream of 3-bit samples arrives as 32 lanes per 125 MHz clock (32
// consecutive samples of a 4 GS/s stream, lane 0 the oldest). The CIC
// decimates by 8 with three multiplier-free blocks of (1 + z^-1)^2 and
// decimation by 2 (32 -> 16 -> 8 -> 4 lanes, 3 -> 9 bits, full precision).
// The quarter-band FIR (17 symmetric taps) takes the 4 remaining lanes and
// decimates by 4, giving one 8-bit sample per clock for the next filter
// stage: total decimation 32, and the sample rate per lane stays at the
// clock rate everywhere, so nothing ever stalls.
//
// Overall, with x the input stream and g the 143 taps of the CIC
// response (sum_{k<8} z^-k)^2 convolved with the quarter-band taps spaced
// 8 samples apart:
//
//     y[t] = sat8( floor( sum_{n<143} g[n] * x[32t + 31 - n] / 2^11 ) )
//
// Timing: out_valid follows in_valid by 4 clocks (one register per CIC
// block and one in the FIR); all registers move only on in_valid and are
// cleared by the asynchronous active-low reset. The architecture and the
// sizes follow the published design; the quarter-band coefficients, the
// output scaling and clipping, the valid qualifier and the reset are this
// design's own choices.
module cic_qb_decimator
#(
  parameter int unsigned LANES = cic_qb_pkg::DEC_LANES,
  parameter int unsigned IN_W  = cic_qb_pkg::DEC_IN_W,
  parameter int unsigned CIC_M = cic_qb_pkg::DEC_CIC_M,
  parameter int unsigned CIC_N = cic_qb_pkg::DEC_CIC_N,
  parameter int unsigned OUT_W = cic_qb_pkg::DEC_OUT_W
) (
  input  logic                        clk,
  input  logic                        rst_n,
  input  logic                        in_valid,
  input  logic [LANES-1:0][IN_W-1:0]  in_data,
  output logic                        out_valid,
  output logic signed [OUT_W-1:0]     out_data
);

  localparam int unsigned MID_LANES = LANES >> CIC_M;
  localparam int unsigned MID_W     = IN_W + CIC_M * CIC_N;

  logic                                  mid_valid;
  logic [MID_LANES-1:0][MID_W-1:0]       mid_data;

  cic_nonrec #(.LANES(LANES), .IN_W(IN_W), .M(CIC_M), .N(CIC_N)) u_cic (
    .clk, .rst_n,
    .in_valid,
    .in_data,
    .out_valid(mid_valid),
    .out_data (mid_data)
  );

  qb_fir #(.LANES(MID_LANES), .IN_W(MID_W), .OUT_W(OUT_W)) u_qb (
    .clk, .rst_n,
    .in_valid (mid_valid),
    .in_data  (mid_data),
    .out_valid,
    .out_data
  );

endmodule
