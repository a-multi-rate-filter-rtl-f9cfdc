// tb_cic_qb_tones - selectivity test of the first-stage decimator with
// 3-bit quantised tones, at its default size.
//
// Sample rate of the input stream: 4 GS/s (32 lanes at 125 MHz). The wanted
// band at the 125 MS/s output is 0 .. 31.25 MHz (1/128 of the input rate);
// input frequencies within 31.25 MHz of a multiple of 125 MHz fold onto it.
// The test sends, one after the other, a passband tone at 15.625 MHz and
// tones at the worst-case edges of the first four folding bands
// (k*125 MHz +/- 31.25 MHz), each with an amplitude of 3.5 codes, a uniform
// dither of one code added, and quantised to the 3-bit codes -4..3. The
// dither turns the quantiser's harmonics into noise; without it they fold
// onto the very output frequency being measured. After the filter has
// settled, the amplitude of the output at the tone's folded frequency
// (+/- 1/8 of the output rate for the passband tone, +/- 1/4 for the others)
// is taken from a 1024-point single-bin DFT. The passband tone must come out
// at close to 32 output codes per input code (the stage gain) and every
// folding tone at least 40 dB below it. The filter's own rejection at these
// frequencies is 47 dB or more; the margin covers the dither and truncation
// noise that falls into the measured bin.
module tb_cic_qb_tones;
  localparam int L = 32, W = 3, OW = 8;
  localparam int SETTLE = 12, MEAS = 1024;
  localparam int NTONE = 9;
  localparam real PI = 3.14159265358979;
  localparam real MIN_REJECT_DB = 40.0;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  logic [L-1:0][W-1:0] din = '0;
  logic out_valid;
  logic signed [OW-1:0] dout;

  cic_qb_decimator dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout));

  int checks = 0, failures = 0;
  real freq [NTONE];            // cycles per input sample
  real amp  [NTONE];            // measured output amplitude, codes
  longint n = 0;                // input sample counter
  int ys[$];                    // measured outputs of the current tone

  function automatic int quantise(real v);
    int q;
    q = $rtoi($floor(v));
    if (q > 3) q = 3;
    if (q < -4) q = -4;
    return q;
  endfunction

  function automatic real dither();
    return real'($urandom) / 4294967296.0;
  endfunction

  initial begin
    freq[0] = 1.0 / 256.0;
    for (int k = 1; k <= 4; k++) begin
      freq[2*k - 1] = k / 32.0 - 1.0 / 128.0;
      freq[2*k]     = k / 32.0 + 1.0 / 128.0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int tn = 0; tn < NTONE; tn++) begin
      real fo, re, im;
      ys.delete();
      for (int c = 0; c < SETTLE + MEAS + 4; c++) begin
        @(negedge clk);
        if (out_valid && c >= SETTLE + 4) ys.push_back(int'(dout));
        in_valid = 1'b1;
        for (int k = 0; k < L; k++) begin
          din[k] = W'(quantise(3.5 * $cos(2.0 * PI * freq[tn] * n) + dither()));
          n++;
        end
      end
      // folded output frequency, cycles per output sample
      fo = freq[tn] * L - $floor(freq[tn] * L);
      re = 0.0;
      im = 0.0;
      foreach (ys[m]) begin
        re += ys[m] * $cos(2.0 * PI * fo * m);
        im += ys[m] * $sin(2.0 * PI * fo * m);
      end
      amp[tn] = 2.0 * $sqrt(re * re + im * im) / ys.size();
      checks++;
      if (ys.size() != MEAS) begin
        failures++;
        $display("tone %0d: %0d outputs, expected %0d", tn, ys.size(), MEAS);
      end
      if (tn == 0) begin
        $display("passband tone %8.3f MHz: output amplitude %7.2f codes",
                 freq[tn] * 4000.0, amp[tn]);
        checks++;
        if (amp[tn] < 90.0 || amp[tn] > 127.0) begin
          failures++;
          $display("  passband amplitude outside 90..127 codes");
        end
      end else begin
        real rej;
        rej = 20.0 * $log10(amp[0] / ((amp[tn] > 1.0e-6) ? amp[tn] : 1.0e-6));
        $display("folding tone %8.3f MHz: output amplitude %6.3f codes, %5.1f dB below passband",
                 freq[tn] * 4000.0, amp[tn], rej);
        checks++;
        if (rej < MIN_REJECT_DB) begin
          failures++;
          $display("  rejection below %0.1f dB", MIN_REJECT_DB);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (NTONE * (SETTLE + MEAS + 4) + 100) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
