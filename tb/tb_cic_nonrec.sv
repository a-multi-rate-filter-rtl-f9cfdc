// tb_cic_nonrec - self-checking test of the non-recursive CIC decimator.
//
// The default decimator (32 lanes of 3 bits, D = 8, N = 2) gets random
// samples with random gaps in in_valid. The reference is the plain CIC
// definition, independent of the block structure: with g[n] the 15 taps of
// (sum_{k<8} z^-k)^2, output p is sum_n g[n] x[8p + 7 - n] (x before reset
// reads as 0). Each of the 4 output lanes is checked, as is the latency of
// 3 clocks from in_valid to out_valid. A second phase feeds constant
// full-scale samples to check the gain of 64 at both extremes without
// wrap-around.
module tb_cic_nonrec;
  localparam int L = 32, W = 3, M = 3, N = 2;
  localparam int D = 1 << M, LO = L / D, WO = W + M * N;
  localparam int GLEN = N * (D - 1) + 1;
  localparam int NCLK = 600;
  localparam int LAT = M;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  logic [L-1:0][W-1:0] din = '0;
  logic out_valid;
  logic [LO-1:0][WO-1:0] dout;

  cic_nonrec dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout));

  int checks = 0, failures = 0;
  int xs[$];
  int g[GLEN];
  bit vhist[$];                // in_valid history, to check the latency
  int p_out = 0;
  int fullscale_hits = 0;

  function automatic int rnd_sample();
    case ($urandom_range(0, 7))
      0: return -(1 << (W - 1));
      1: return (1 << (W - 1)) - 1;
      default: return -(1 << (W - 1)) + int'($urandom_range(0, (1 << W) - 1));
    endcase
  endfunction

  initial begin
    // g = box(D) convolved with itself N times
    int tmp[GLEN];
    for (int n = 0; n < GLEN; n++) g[n] = (n < D) ? 1 : 0;
    for (int r = 1; r < N; r++) begin
      for (int n = 0; n < GLEN; n++) begin
        tmp[n] = 0;
        for (int k = 0; k < D; k++) if (n - k >= 0) tmp[n] += g[n - k];
      end
      g = tmp;
    end

    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCLK; c++) begin
      bit ev;
      @(negedge clk);
      ev = (vhist.size() >= LAT) ? vhist[vhist.size() - LAT] : 1'b0;
      checks++;
      if (out_valid !== ev) begin
        failures++;
        $display("clock %0d: out_valid %0b expected %0b", c, out_valid, ev);
      end
      if (out_valid) begin
        for (int j = 0; j < LO; j++) begin
          int e, p;
          p = p_out * LO + j;
          e = 0;
          for (int n = 0; n < GLEN; n++)
            if (D*p + D - 1 - n >= 0) e += g[n] * xs[D*p + D - 1 - n];
          if (e == (D**N) * ((1 << (W - 1)) - 1) || e == -(D**N) * (1 << (W - 1)))
            fullscale_hits++;
          checks++;
          if (int'($signed(dout[j])) != e) begin
            failures++;
            $display("output %0d: got %0d expected %0d", p, $signed(dout[j]), e);
          end
        end
        p_out++;
      end
      // next input clock: random phase, then full-scale runs
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        for (int k = 0; k < L; k++) begin
          int s;
          if (c < NCLK / 2)            s = rnd_sample();
          else if ((c / 10) % 2 == 0)  s = (1 << (W - 1)) - 1;
          else                         s = -(1 << (W - 1));
          din[k] = W'(s);
          xs.push_back(s);
        end
      end else begin
        din = L*W'($urandom);
      end
      vhist.push_back(in_valid);
    end
    if (p_out < NCLK / 2 || fullscale_hits == 0) begin
      failures++;
      $display("coverage: outputs %0d full-scale %0d", p_out, fullscale_hits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NCLK + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
