// tb_cic_qb_decimator - end-to-end test of the first-stage decimator at its
// default size (32 lanes of 3 bits in, one 8-bit sample out per clock).
//
// The reference ignores the internal structure: it builds the 143 overall
// taps g = (box of 8)^2 convolved with the quarter-band taps spaced 8 apart,
// and computes y[t] = clip8(floor(sum_n g[n] x[32t + 31 - n] / 2^11)) from
// the serial input. Inputs cycle through random 3-bit samples (the noise-like
// signal the stage is built for), constant full-scale levels, and windows
// that follow the signs of g at full scale, which drive the output past
// -128 so that clipping happens. in_valid has random gaps. Every output is
// checked, as is the 4-clock latency from in_valid to out_valid. The test
// counts the decimation (one output per valid input clock), the input gaps
// and the clipped outputs, and fails if any of them never happened.
module tb_cic_qb_decimator;
  localparam int L = 32, W = 3, OW = 8, SH = 11, LAT = 4;
  localparam int T = 17, D = 8;
  localparam int GCIC = 2 * (D - 1) + 1;          // 15
  localparam int GLEN = GCIC + D * (T - 1);       // 143
  localparam int NCLK = 3000;
  localparam int H [T] = '{-5, -12, -15, -6, 26, 79, 143, 195, 214,
                           195, 143, 79, 26, -6, -15, -12, -5};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  logic [L-1:0][W-1:0] din = '0;
  logic out_valid;
  logic signed [OW-1:0] dout;

  cic_qb_decimator dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout));

  int checks = 0, failures = 0;
  int xs[$];
  int g[GLEN];
  bit vhist[$];
  int n_in = 0, n_out = 0, n_gap = 0, n_clip = 0;

  initial begin
    int cic[GCIC];
    for (int n = 0; n < GCIC; n++) cic[n] = (n < D) ? n + 1 : 2 * D - 1 - n;
    for (int n = 0; n < GLEN; n++) g[n] = 0;
    for (int i = 0; i < T; i++)
      for (int n = 0; n < GCIC; n++) g[D*i + n] += H[i] * cic[n];

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
        longint acc;
        int e;
        acc = 0;
        for (int n = 0; n < GLEN; n++)
          if (L*n_out + L - 1 - n >= 0) acc += longint'(g[n]) * xs[L*n_out + L - 1 - n];
        e = int'(acc >>> SH);
        if (e > 127)  begin e = 127;  n_clip++; end
        if (e < -128) begin e = -128; n_clip++; end
        checks++;
        if (int'(dout) != e) begin
          failures++;
          if (failures < 20) $display("output %0d: got %0d expected %0d", n_out, dout, e);
        end
        n_out++;
      end
      in_valid = ($urandom_range(0, 5) != 0);
      if (in_valid) begin
        n_in++;
        for (int k = 0; k < L; k++) begin
          int s, n, idx;
          n = xs.size();
          case ((c / 250) % 3)
            0: s = -4 + int'($urandom_range(0, 7));
            1: s = ((c / 750) % 2 != 0) ? 3 : -4;
            default: begin
              // blocks of 5 clocks follow the signs of g for their last output
              idx = 5 * L - 1 - n % (5 * L);
              s = (idx < GLEN && g[idx] < 0) ? 3 : -4;
            end
          endcase
          din[k] = W'(s);
          xs.push_back(s);
        end
      end else begin
        n_gap++;
        din = L*W'($urandom);
      end
      vhist.push_back(in_valid);
    end
    $display("input clocks %0d (%0d samples), outputs %0d, gaps %0d, clipped %0d",
             n_in, xs.size(), n_out, n_gap, n_clip);
    if (n_out < n_in - LAT || n_gap == 0 || n_clip == 0) begin
      failures++;
      $display("a mechanism was never exercised");
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
