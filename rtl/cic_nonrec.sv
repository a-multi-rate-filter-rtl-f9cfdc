// cic_nonrec - non-recursive CIC decimator, D = 2^M, order N.
//
// The CIC transfer function (sum_{k<D} z^-k)^N factorises, for D = 2^M,
// into prod_{i<M} (1 + z^-(2^i))^N. Moving each decimation by 2 in front
// of the following factor turns the filter into a cascade of M identical
// blocks, each (1 + z^-1)^N followed by decimation by 2 (cic_nr_stage).
// With the default 32 input lanes of 3 bits, D = 8 and N = 2 the blocks
// take 32 -> 16 -> 8 -> 4 lanes and 3 -> 5 -> 7 -> 9 bits. No bits are
// dropped anywhere: the gain D^N = 64 is carried in the output width.
//
// Interface: LANES lanes of IN_W-bit two's complement samples per clock,
// lane 0 the oldest; LANES/D output lanes of IN_W + M*N bits, output lane
// j at clock t holding y[(LANES/D)*t + j] = sum_n g[n] x[D*((LANES/D)*t + j)
// + D - 1 - n], with g the taps of (sum_{k<D} z^-k)^N.
// Timing: one register per block, so out_valid follows in_valid by M
// clocks. The structure and the default sizes follow the published
// design; the valid qualifier and reset are this design's choices.
module cic_nonrec #(
  parameter int unsigned LANES = 32,
  parameter int unsigned IN_W  = 3,
  parameter int unsigned M     = 3,
  parameter int unsigned N     = 2,
  localparam int unsigned LANES_OUT = LANES >> M,
  localparam int unsigned OUT_W     = IN_W + M * N
) (
  input  logic                              clk,
  input  logic                              rst_n,
  input  logic                              in_valid,
  input  logic [LANES-1:0][IN_W-1:0]        in_data,
  output logic                              out_valid,
  output logic [LANES_OUT-1:0][OUT_W-1:0]   out_data
);

  for (genvar s = 0; s < int'(M); s++) begin : g_stage
    localparam int unsigned LI = LANES >> s;
    localparam int unsigned WI = IN_W + s * N;
    logic                                 v_in;
    logic [LI-1:0][WI-1:0]                d_in;
    logic                                 v_out;
    logic [LI/2-1:0][WI+N-1:0]            d_out;

    if (s == 0) begin : g_first
      assign v_in = in_valid;
      assign d_in = in_data;
    end else begin : g_next
      assign v_in = g_stage[s-1].v_out;
      assign d_in = g_stage[s-1].d_out;
    end

    cic_nr_stage #(.LANES_IN(LI), .IN_W(WI), .N(N)) u_stage (
      .clk, .rst_n,
      .in_valid (v_in),
      .in_data  (d_in),
      .out_valid(v_out),
      .out_data (d_out)
    );
  end

  assign out_valid = g_stage[M-1].v_out;
  assign out_data  = g_stage[M-1].d_out;

  initial begin
    assert (M >= 1 && (LANES % (1 << M)) == 0)
      else $error("cic_nonrec: LANES must be a multiple of 2^M");
  end

endmodule
