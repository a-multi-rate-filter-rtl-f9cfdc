// tb_cic_nr_stage - self-checking test of one non-recursive CIC block.
//
// Two instances are tested side by side: the default block (32 lanes,
// 3 bits, order 2) and a small third-order block (8 lanes, 4 bits). Random
// samples, including the extreme codes, are fed with random gaps in
// in_valid. The testbench keeps the whole input as one serial sequence and
// computes every kept output directly from the definition
// y[m] = sum_k C(N,k) x[2m+1-k] (x before reset reads as 0), then checks
// each output lane and that out_valid follows in_valid by exactly one clock.
module tb_cic_nr_stage;
  localparam int L0 = 32, W0 = 3, N0 = 2;
  localparam int L1 = 8,  W1 = 4, N1 = 3;
  localparam int NCLK = 400;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic in_valid = 1'b0;
  logic [L0-1:0][W0-1:0] d0 = '0;
  logic [L1-1:0][W1-1:0] d1 = '0;
  logic v0, v1;
  logic [L0/2-1:0][W0+N0-1:0] q0;
  logic [L1/2-1:0][W1+N1-1:0] q1;

  cic_nr_stage dut0 (.clk, .rst_n, .in_valid, .in_data(d0), .out_valid(v0), .out_data(q0));
  cic_nr_stage #(.LANES_IN(L1), .IN_W(W1), .N(N1)) dut1 (
    .clk, .rst_n, .in_valid, .in_data(d1), .out_valid(v1), .out_data(q1));

  int checks = 0, failures = 0;
  int xs0[$], xs1[$];          // serial input streams
  int t_out = 0;               // index of the next expected output clock
  bit exp_valid = 1'b0;

  function automatic int binom(int n, int k);
    int r = 1;
    for (int i = 0; i < k; i++) r = r * (n - i) / (i + 1);
    return r;
  endfunction

  function automatic int ref_out(ref int xs[$], input int m, input int n);
    int acc = 0;
    for (int k = 0; k <= n; k++)
      if (2*m + 1 - k >= 0) acc += binom(n, k) * xs[2*m + 1 - k];
    return acc;
  endfunction

  function automatic int rnd_sample(int w);
    int lo = -(1 << (w - 1)), hi = (1 << (w - 1)) - 1;
    case ($urandom_range(0, 7))
      0: return lo;
      1: return hi;
      default: return lo + int'($urandom_range(0, (1 << w) - 1));
    endcase
  endfunction

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int c = 0; c < NCLK; c++) begin
      @(negedge clk);
      // check outputs registered at the previous edge
      if (v0 !== exp_valid || v1 !== exp_valid) begin
        failures++;
        $display("valid mismatch at clock %0d", c);
      end
      checks++;
      if (exp_valid) begin
        for (int j = 0; j < L0/2; j++) begin
          int e;
          e = ref_out(xs0, t_out*(L0/2) + j, N0);
          checks++;
          if (int'($signed(q0[j])) != e) begin
            failures++;
            $display("N=2 lane %0d clock %0d: got %0d expected %0d", j, t_out, $signed(q0[j]), e);
          end
        end
        for (int j = 0; j < L1/2; j++) begin
          int e;
          e = ref_out(xs1, t_out*(L1/2) + j, N1);
          checks++;
          if (int'($signed(q1[j])) != e) begin
            failures++;
            $display("N=3 lane %0d clock %0d: got %0d expected %0d", j, t_out, $signed(q1[j]), e);
          end
        end
        t_out++;
      end
      // drive the next input clock
      in_valid = ($urandom_range(0, 3) != 0);
      if (in_valid) begin
        for (int k = 0; k < L0; k++) begin
          int s;
          s = rnd_sample(W0);
          d0[k] = W0'(s);
          xs0.push_back(s);
        end
        for (int k = 0; k < L1; k++) begin
          int s;
          s = rnd_sample(W1);
          d1[k] = W1'(s);
          xs1.push_back(s);
        end
      end else begin
        d0 = L0*W0'($urandom);
        d1 = L1*W1'($urandom);
      end
      exp_valid = in_valid;
    end
    if (t_out < NCLK / 2) begin
      failures++;
      $display("too few outputs: %0d", t_out);
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
