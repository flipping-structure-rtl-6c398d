// tb_flip97_core: self-checking testbench for the flipped (9,7) lifting core.
//
// A random signal of 12-bit samples is fed as sample pairs, with random stall
// cycles (in_valid low). The expected outputs come from a floating-point model of
// the conventional, unflipped lifting steps
//   d1[i] = x[2i+1] + a (x[2i]   + x[2i+2])
//   s1[i] = x[2i]   + b (d1[i-1] + d1[i])
//   d2[i] = d1[i]   + c (s1[i]   + s1[i+1])
//   s2[i] = s1[i]   + d (d2[i-1] + d2[i])
// divided by the flipping factors a b' c d' (lowpass) and a b' c (highpass).
// Three instances are driven with the same stream: PIPE = 0, 3 and 5. Each
// must match the model within a few LSB of fixed-point rounding error, deliver
// pair k's result exactly one cycle after pair k + 0, 1, 2 is accepted, never
// raise out_valid for a result of the first four pairs, and the pipelined
// instances must agree bit for bit with the unpipelined one.
module tb_flip97_core;
  import dwt_pkg::*;

  localparam int NP  = 300;        // sample pairs
  localparam int TOL = 12;         // allowed error in LSB

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  data_t x_odd, x_even;
  data_t low[3], high[3];
  logic out_valid[3];
  localparam int LATX[3] = '{0, 1, 2};  // extra pairs before a result leaves

  flip97_core #(.PIPE(0)) dut0 (.clk, .rst_n, .in_valid, .x_odd, .x_even,
                                .out_valid(out_valid[0]), .low(low[0]), .high(high[0]));
  flip97_core #(.PIPE(3)) dut3 (.clk, .rst_n, .in_valid, .x_odd, .x_even,
                                .out_valid(out_valid[1]), .low(low[1]), .high(high[1]));
  flip97_core #(.PIPE(5)) dut5 (.clk, .rst_n, .in_valid, .x_odd, .x_even,
                                .out_valid(out_valid[2]), .low(low[2]), .high(high[2]));

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int max_err = 0;

  real xs[0:2*NP];
  real d1[0:NP], s1[0:NP], d2[0:NP], s2[0:NP];
  real lo_exp[0:NP], hi_exp[0:NP];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_val(input string what, input int k, input data_t got, input real exp_v);
    int err;
    err = $rtoi((real'(got) - exp_v) >= 0.0 ? (real'(got) - exp_v) : (exp_v - real'(got)));
    if (err > max_err) max_err = err;
    checks++;
    if (err > TOL) begin
      failures++;
      $display("FAIL %s pair %0d: got %0d expected %f", what, k, got, exp_v);
    end
  endtask

  // in_valid as seen by the edge (sampled before the driver changes it)
  logic in_valid_q;
  always @(posedge clk) in_valid_q <= in_valid;

  int accepted = 0;      // pairs accepted so far
  int seen[3] = '{0, 0, 0};
  int cyc = 0;           // rising edges since reset release
  logic acc_at[0:4095];  // a pair was accepted at edge n
  int   k_at[0:4095];    // and its index
  data_t lo_ref[0:NP], hi_ref[0:NP];   // outputs of the PIPE=0 instance

  // Output monitor: sample just after each rising edge. The edge numbered cyc
  // is the edge that accepted the pair driven before it.
  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      acc_at[cyc] = in_valid_q;
      k_at[cyc] = accepted - 1;
      for (int d = 0; d < 3; d++) begin
        int c0, k;
        logic exp_v;
        c0 = cyc;
        k = k_at[c0] - LATX[d];
        exp_v = acc_at[c0] && (k >= 4);
        checks++;
        if (out_valid[d] !== exp_v) begin
          failures++;
          $display("FAIL instance %0d out_valid=%0b at edge %0d", d, out_valid[d], cyc);
        end
        if (out_valid[d] && exp_v) begin
          check_val("low", k, low[d], lo_exp[k]);
          check_val("high", k, high[d], hi_exp[k]);
          if (d == 0) begin
            lo_ref[k] = low[0];
            hi_ref[k] = high[0];
          end else begin
            checks++;
            if (low[d] !== lo_ref[k] || high[d] !== hi_ref[k]) begin
              failures++;
              $display("FAIL instance %0d pair %0d differs from the unpipelined core", d, k);
            end
          end
          seen[d]++;
        end
      end
      cyc++;
    end
  end

  initial begin
    real a, b, c, d, bp, dp;
    int stalls;
    a = A_R; b = B_R; c = C_R; d = D_R; bp = BP_R; dp = DP_R;
    for (int i = 0; i <= 2*NP; i++) xs[i] = real'(int'($urandom_range(4095)) - 2048);
    for (int i = 0; i < NP; i++)  d1[i] = xs[2*i+1] + a * (xs[2*i] + xs[2*i+2]);
    for (int i = 1; i < NP; i++)  s1[i] = xs[2*i] + b * (d1[i-1] + d1[i]);
    for (int i = 1; i < NP-1; i++) d2[i] = d1[i] + c * (s1[i] + s1[i+1]);
    for (int i = 2; i < NP-1; i++) s2[i] = s1[i] + d * (d2[i-1] + d2[i]);
    // pair k (x(2k-1), x(2k)) yields s2[k-2] and d2[k-2]
    for (int k = 4; k < NP; k++) begin
      lo_exp[k] = s2[k-2] / (a * bp * c * dp);
      hi_exp[k] = d2[k-2] / (a * bp * c);
    end

    rst_n = 1'b0; in_valid = 1'b0; x_odd = '0; x_even = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    stalls = 0;
    for (int k = 0; k < NP; ) begin
      @(posedge clk);
      #2;
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        x_odd = data_t'($urandom);
        x_even = data_t'($urandom);
        stalls++;
      end else begin
        in_valid = 1'b1;
        x_odd = (k == 0) ? '0 : data_t'($rtoi(xs[2*k-1]));
        x_even = data_t'($rtoi(xs[2*k]));
        k++;
        accepted = k;
      end
    end
    @(posedge clk);
    #2 in_valid = 1'b0;
    repeat (8) @(posedge clk);
    for (int d = 0; d < 3; d++) begin
      checks++;
      if (seen[d] != NP - 4 - LATX[d]) begin
        failures++;
        $display("FAIL instance %0d saw %0d valid outputs, expected %0d", d, seen[d], NP - 4 - LATX[d]);
      end
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall cycle exercised"); end
    $display("max error %0d LSB, stalls %0d", max_err, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
