// tb_qb_fir - self-checking test of the decimating quarter-band FIR.
//
// The default filter (4 lanes of 9 bits, 17 taps, 8-bit output) gets three
// kinds of input with random gaps in in_valid: random samples over the full
// 9-bit range, a constant (to check the unit DC gain), and windows whose
// signs follow the signs of the taps at full scale, which drive the sum past
// the 8-bit range in both directions so that clipping happens. The reference
// convolves the serial input with the 17 taps written out below, divides by
// 2^11 rounding towards minus infinity and clips to [-128, 127]. Every
// output and the one-clock latency of out_valid are checked.
module tb_qb_fir;
  localparam int L = 4, W = 9, T = 17, OW = 8, SH = 11;
  localparam int NCLK = 1200;
  localparam int H [T] = '{-5, -12, -15, -6, 26, 79, 143, 195, 214,
                           195, 143, 79, 26, -6, -15, -12, -5};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  logic [L-1:0][W-1:0] din = '0;
  logic out_valid;
  logic signed [OW-1:0] dout;

  qb_fir dut (.clk, .rst_n, .in_valid, .in_data(din), .out_valid, .out_data(dout));

  int checks = 0, failures = 0;
  int xs[$];
  int t_out = 0;
  bit exp_valid = 1'b0;
  int sat_hi = 0, sat_lo = 0;

  function automatic int floor_div(longint a, int sh);
    return int'(a >>> sh);
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCLK; c++) begin
      @(negedge clk);
      checks++;
      if (out_valid !== exp_valid) begin
        failures++;
        $display("clock %0d: out_valid %0b expected %0b", c, out_valid, exp_valid);
      end
      if (exp_valid) begin
        longint acc;
        int e;
        acc = 0;
        for (int i = 0; i < T; i++)
          if (L*t_out + L - 1 - i >= 0) acc += longint'(H[i]) * xs[L*t_out + L - 1 - i];
        e = floor_div(acc, SH);
        if (e > 127)  begin e = 127;  sat_hi++; end
        if (e < -128) begin e = -128; sat_lo++; end
        checks++;
        if (int'(dout) != e) begin
          failures++;
          $display("output %0d: got %0d expected %0d", t_out, dout, e);
        end
        t_out++;
      end
      in_valid = ($urandom_range(0, 4) != 0);
      if (in_valid) begin
        for (int k = 0; k < L; k++) begin
          int s, n, sign;
          n = xs.size();
          case ((c / 100) % 3)
            0: s = -256 + int'($urandom_range(0, 511));
            1: s = ((c / 300) % 2 != 0) ? 255 : -256;
            default: begin
              // blocks of 5 clocks: the samples of each block follow the
              // signs of the taps of its last output, at full scale
              int i;
              sign = ((c / 25) % 2 != 0) ? 1 : -1;
              i = 19 - n % 20;
              s = (i < T && H[i] < 0) ? -255 * sign : 255 * sign;
            end
          endcase
          din[k] = W'(s);
          xs.push_back(s);
        end
      end else begin
        din = L*W'($urandom);
      end
      exp_valid = in_valid;
    end
    $display("outputs %0d, clipped high %0d, clipped low %0d", t_out, sat_hi, sat_lo);
    if (t_out < NCLK / 2 || sat_hi == 0 || sat_lo == 0) begin
      failures++;
      $display("coverage not reached");
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
