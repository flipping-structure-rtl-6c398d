// tb_int97_flip_core: self-checking testbench for the flipped integer (9,7) core.
//
// Random 12-bit samples are fed as pairs with random stall cycles. Two
// references are computed independently of the RTL:
//  - exact: the flipped lifting equations in plain integer arithmetic, each
//    shifted term written as an explicit floor division by a power of two;
//  - approximate: the conventional integer (9,7) lifting (a=-3/2, b=-1/16,
//    c=4/5, d=15/32) in floating point, times 5/4, which the flipped outputs
//    must follow within a few LSB.
// The result of pair k must appear exactly one cycle after pair k is accepted.
module tb_int97_flip_core;

  localparam int NP  = 300;
  localparam int TOL = 10;
  localparam int W   = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic signed [W-1:0] x_odd, x_even, low, high;
  logic out_valid;

  int97_flip_core #(.W(W)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;
  int max_err = 0;

  int  xi[0:2*NP];
  int  eh1[0:NP], el1[0:NP], eh2[0:NP], el2[0:NP];
  real d1[0:NP], s1[0:NP], d2[0:NP], s2[0:NP];
  real lo_apx[0:NP], hi_apx[0:NP];

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int fdiv(input int n, input int d);
    int q;
    q = n / d;
    if ((n % d != 0) && ((n < 0) != (d < 0))) q = q - 1;
    return q;
  endfunction

  int accepted = 0;
  int seen = 0;
  logic acc_prev = 1'b0;
  int k_prev = 0;

  always @(posedge clk) begin
    #1;
    if (rst_n) begin
      checks++;
      if (out_valid !== (acc_prev && k_prev >= 4)) begin
        failures++;
        $display("FAIL out_valid=%0b after pair %0d", out_valid, k_prev);
      end
      if (out_valid) begin
        real e1, e2;
        checks += 2;
        if (int'(low) != el2[k_prev] || int'(high) != eh2[k_prev]) begin
          failures++;
          $display("FAIL pair %0d: low %0d/%0d high %0d/%0d", k_prev, low, el2[k_prev], high, eh2[k_prev]);
        end
        e1 = real'(low) - lo_apx[k_prev];
        e2 = real'(high) - hi_apx[k_prev];
        if (e1 < 0) e1 = -e1;
        if (e2 < 0) e2 = -e2;
        if ($rtoi(e1) > max_err) max_err = $rtoi(e1);
        if ($rtoi(e2) > max_err) max_err = $rtoi(e2);
        if (e1 > TOL || e2 > TOL) begin
          failures++;
          $display("FAIL pair %0d differs from the conventional filter by %f / %f", k_prev, e1, e2);
        end
        seen++;
      end
    end
  end

  initial begin
    int stalls;
    for (int i = 0; i <= 2*NP; i++) xi[i] = int'($urandom_range(4095)) - 2048;
    // exact model of the flipped equations, pair index k
    for (int k = 1; k < NP; k++) begin
      int sa;
      sa = xi[2*k-2] + xi[2*k];
      eh1[k] = xi[2*k-1] - (sa + fdiv(sa, 2));
      if (k >= 2) el1[k] = xi[2*k-2] - fdiv(eh1[k-1], 16) - fdiv(eh1[k], 16);
      if (k >= 3) eh2[k] = eh1[k-1] + fdiv(eh1[k-1], 4) + el1[k-1] + el1[k];
      if (k >= 4) el2[k] = el1[k-1] + fdiv(el1[k-1], 4)
                         + fdiv(eh2[k-1], 2) - fdiv(eh2[k-1], 32)
                         + fdiv(eh2[k], 2) - fdiv(eh2[k], 32);
    end
    // conventional integer (9,7) lifting in floating point
    for (int i = 0; i < NP; i++)  d1[i] = xi[2*i+1] - 1.5 * (xi[2*i] + xi[2*i+2]);
    for (int i = 1; i < NP; i++)  s1[i] = xi[2*i] - (d1[i-1] + d1[i]) / 16.0;
    for (int i = 1; i < NP-1; i++) d2[i] = d1[i] + 0.8 * (s1[i] + s1[i+1]);
    for (int i = 2; i < NP-1; i++) s2[i] = s1[i] + 15.0 / 32.0 * (d2[i-1] + d2[i]);
    for (int k = 4; k < NP; k++) begin
      lo_apx[k] = 1.25 * s2[k-2];
      hi_apx[k] = 1.25 * d2[k-2];
    end

    rst_n = 1'b0; in_valid = 1'b0; x_odd = '0; x_even = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    stalls = 0;
    for (int k = 0; k < NP; ) begin
      @(posedge clk);
      acc_prev = in_valid;
      k_prev = accepted - 1;
      #2;
      if ($urandom_range(3) == 0) begin
        in_valid = 1'b0;
        x_odd = W'($urandom);
        x_even = W'($urandom);
        stalls++;
      end else begin
        in_valid = 1'b1;
        x_odd = (k == 0) ? '0 : W'(xi[2*k-1]);
        x_even = W'(xi[2*k]);
        k++;
        accepted = k;
      end
    end
    @(posedge clk);
    acc_prev = in_valid; k_prev = accepted - 1;
    #2 in_valid = 1'b0;
    @(posedge clk);
    acc_prev = 1'b0;
    repeat (2) @(posedge clk);
    checks++;
    if (seen != NP - 4) begin
      failures++;
      $display("FAIL saw %0d valid outputs, expected %0d", seen, NP - 4);
    end
    checks++;
    if (stalls == 0) begin failures++; $display("FAIL no stall cycle exercised"); end
    $display("max deviation from conventional filter %0d LSB, stalls %0d", max_err, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
