// tb_flipping_dwt_top: end-to-end test of both flipping-structure filters.
//
// Several rows of 8-bit pixels are transformed back to back, on both paths at
// once, with no reset between rows. The feeder applies whole-sample symmetric
// extension at both row ends (E = 6 extra samples per side) and streams each
// extended row as sample pairs; each path stalls at its own random cycles.
// The (9,7) path works on pixels minus 128 times 16 (four fraction bits); its
// lowpass and highpass outputs are compared with a floating-point model of the
// conventional (9,7) lifting on the same extended row, times K and 1/K. The
// integer path works on pixels minus 128; its outputs are compared with the
// conventional integer (9,7) lifting times 5/4. Every coefficient of every row
// must arrive, and the stall mechanism must occur on both paths.
module tb_flipping_dwt_top;
  import dwt_pkg::*;

  localparam int N     = 64;          // row length in pixels
  localparam int ROWS  = 3;
  localparam int E     = 6;           // symmetric extension per side
  localparam int L     = N + 2 * E;   // extended row length
  localparam int NP    = L / 2;       // pairs per extended row
  localparam int TOL_F = 16;          // LSB, (9,7) path (16 LSB = 1 pixel)
  localparam int TOL_I = 10;          // LSB, integer path

  logic clk = 1'b0;
  logic rst_n;
  logic f97_in_valid, f97_out_valid, i97_in_valid, i97_out_valid;
  data_t f97_x_odd, f97_x_even, f97_low, f97_high;
  logic signed [15:0] i97_x_odd, i97_x_even, i97_low, i97_high;

  flipping_dwt_top dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // extended rows: ext[r][j] = pixel(j - E) - 128, mirrored at both ends
  int  ext[ROWS][L];
  real ref_lo[ROWS][N/2], ref_hi[ROWS][N/2];      // (9,7), in input units
  real iref_lo[ROWS][N/2], iref_hi[ROWS][N/2];    // integer filter
  int  f_got_lo[ROWS][N/2], f_got_hi[ROWS][N/2];
  int  i_got_lo[ROWS][N/2], i_got_hi[ROWS][N/2];
  int  f_cnt = 0, i_cnt = 0, f_stalls = 0, i_stalls = 0, ext_samples = 0;

  function automatic int mirror(input int j);
    int m;
    m = j;
    if (m < 0) m = -m;
    if (m > N - 1) m = 2 * (N - 1) - m;
    return m;
  endfunction

  task automatic reference(input int r, input real a, input real b, input real c,
                           input real d, input real gl, input real gh, input bit fl);
    real d1[L], s1[L], d2[L], s2[L];
    // lifting on the extended row, odd positions predicted, even updated
    for (int i = 0; 2*i + 2 < L; i++) d1[i] = ext[r][2*i+1] + a * (ext[r][2*i] + ext[r][2*i+2]);
    for (int i = 1; 2*i + 2 < L; i++) s1[i] = ext[r][2*i] + b * (d1[i-1] + d1[i]);
    for (int i = 1; 2*i + 4 < L; i++) d2[i] = d1[i] + c * (s1[i] + s1[i+1]);
    for (int i = 2; 2*i + 4 < L; i++) s2[i] = s1[i] + d * (d2[i-1] + d2[i]);
    for (int n = 0; n < N/2; n++) begin
      if (fl) begin
        ref_lo[r][n] = gl * s2[n + E/2];
        ref_hi[r][n] = gh * d2[n + E/2];
      end else begin
        iref_lo[r][n] = gl * s2[n + E/2];
        iref_hi[r][n] = gh * d2[n + E/2];
      end
    end
  endtask

  // Pair k of a row yields lowpass of extended index 2k-4 and highpass of 2k-3.
  task automatic drive_f97();
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < NP; ) begin
        @(posedge clk);
        #2;
        if ($urandom_range(4) == 0) begin
          f97_in_valid = 1'b0;
          f97_x_odd = data_t'($urandom);
          f97_x_even = data_t'($urandom);
          f_stalls++;
        end else begin
          f97_in_valid = 1'b1;
          f97_x_odd = data_t'(16 * ((k == 0) ? 0 : ext[r][2*k-1]));
          f97_x_even = data_t'(16 * ext[r][2*k]);
          k++;
        end
      end
    @(posedge clk);
    #2 f97_in_valid = 1'b0;
  endtask

  task automatic drive_i97();
    for (int r = 0; r < ROWS; r++)
      for (int k = 0; k < NP; ) begin
        @(posedge clk);
        #2;
        if ($urandom_range(2) == 0) begin
          i97_in_valid = 1'b0;
          i97_x_odd = 16'($urandom);
          i97_x_even = 16'($urandom);
          i_stalls++;
        end else begin
          i97_in_valid = 1'b1;
          i97_x_odd = 16'((k == 0) ? 0 : ext[r][2*k-1]);
          i97_x_even = 16'(ext[r][2*k]);
          k++;
        end
      end
    @(posedge clk);
    #2 i97_in_valid = 1'b0;
  endtask

  // Collect outputs. The core raises out_valid from the fifth pair after reset
  // on, so the first row yields NP-4 outputs (pairs 4..NP-1) and each later row
  // NP outputs; those of pairs 0..3 of a later row still mix in the previous
  // row and fall into its extension, where they are not used.
  task automatic pair_of(input int p, output int r, output int k);
    if (p < NP - 4) begin
      r = 0;
      k = p + 4;
    end else begin
      r = 1 + (p - (NP - 4)) / NP;
      k = (p - (NP - 4)) % NP;
    end
  endtask

  int f_pos = 0, i_pos = 0;
  always @(posedge clk) begin
    #1;
    if (rst_n && f97_out_valid) begin
      int r, k;
      pair_of(f_pos, r, k);
      if (2*k - 4 - E >= 0 && 2*k - 4 - E < N) f_got_lo[r][(2*k-4-E)/2] = int'(f97_low);
      if (2*k - 3 - E >= 0 && 2*k - 3 - E < N) f_got_hi[r][(2*k-3-E)/2] = int'(f97_high);
      f_pos++;
    end
    if (rst_n && i97_out_valid) begin
      int r, k;
      pair_of(i_pos, r, k);
      if (2*k - 4 - E >= 0 && 2*k - 4 - E < N) i_got_lo[r][(2*k-4-E)/2] = int'(i97_low);
      if (2*k - 3 - E >= 0 && 2*k - 3 - E < N) i_got_hi[r][(2*k-3-E)/2] = int'(i97_high);
      i_pos++;
    end
  end

  function automatic bit near(input int got, input real exp_v, input int tol);
    real e;
    e = real'(got) - exp_v;
    if (e < 0.0) e = -e;
    return e <= real'(tol);
  endfunction

  initial begin
    for (int r = 0; r < ROWS; r++) begin
      int row[N];
      for (int n = 0; n < N; n++)   // smooth ramp plus noise, like an image row
        row[n] = (n * 3 + r * 40 + int'($urandom_range(60))) % 256;
      for (int j = 0; j < L; j++) begin
        ext[r][j] = row[mirror(j - E)] - 128;
        if (j < E || j >= N + E) ext_samples++;
      end
      reference(r, A_R, B_R, C_R, D_R, K_R, 1.0 / K_R, 1'b1);
      reference(r, -1.5, -1.0 / 16.0, 0.8, 15.0 / 32.0, 1.25, 1.25, 1'b0);
      for (int n = 0; n < N/2; n++) begin
        f_got_lo[r][n] = -99999; f_got_hi[r][n] = -99999;
        i_got_lo[r][n] = -99999; i_got_hi[r][n] = -99999;
      end
    end

    rst_n = 1'b0;
    f97_in_valid = 1'b0; f97_x_odd = '0; f97_x_even = '0;
    i97_in_valid = 1'b0; i97_x_odd = '0; i97_x_even = '0;
    repeat (3) @(posedge clk);
    #2 rst_n = 1'b1;
    fork
      drive_f97();
      drive_i97();
    join
    repeat (5) @(posedge clk);

    for (int r = 0; r < ROWS; r++)
      for (int n = 0; n < N/2; n++) begin
        checks += 4;
        if (!near(f_got_lo[r][n], 16.0 * ref_lo[r][n], TOL_F)) begin
          failures++;
          $display("FAIL f97 row %0d low[%0d] got %0d expected %f", r, n, f_got_lo[r][n], 16.0 * ref_lo[r][n]);
        end
        if (!near(f_got_hi[r][n], 16.0 * ref_hi[r][n], TOL_F)) begin
          failures++;
          $display("FAIL f97 row %0d high[%0d] got %0d expected %f", r, n, f_got_hi[r][n], 16.0 * ref_hi[r][n]);
        end
        if (!near(i_got_lo[r][n], iref_lo[r][n], TOL_I)) begin
          failures++;
          $display("FAIL i97 row %0d low[%0d] got %0d expected %f", r, n, i_got_lo[r][n], iref_lo[r][n]);
        end
        if (!near(i_got_hi[r][n], iref_hi[r][n], TOL_I)) begin
          failures++;
          $display("FAIL i97 row %0d high[%0d] got %0d expected %f", r, n, i_got_hi[r][n], iref_hi[r][n]);
        end
      end
    // every mechanism must have occurred
    checks += 4;
    if (f_pos != ROWS * NP - 4 || i_pos != ROWS * NP - 4) begin
      failures++;
      $display("FAIL output count f97 %0d i97 %0d expected %0d", f_pos, i_pos, ROWS * NP - 4);
    end
    if (f_stalls == 0) begin failures++; $display("FAIL no stall on the (9,7) path"); end
    if (i_stalls == 0) begin failures++; $display("FAIL no stall on the integer path"); end
    if (ext_samples == 0) begin failures++; $display("FAIL no boundary extension"); end
    $display("rows %0d, coefficients per path %0d, stalls f97 %0d i97 %0d, extension samples %0d",
             ROWS, ROWS * N, f_stalls, i_stalls, ext_samples);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
