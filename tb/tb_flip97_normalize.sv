// tb_flip97_normalize: self-checking testbench for the output scaling stage.
//
// Random flipped-domain lowpass/highpass words are applied with random gaps.
// Each must come out one cycle later multiplied by a b' c d' K (lowpass) and
// a b' c / K (highpass), computed here in floating point from the (9,7)
// coefficients, within one LSB of the 12-bit coefficient quantization.
module tb_flip97_normalize;
  import dwt_pkg::*;

  localparam int N = 400;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  data_t low_in, high_in, low, high;
  logic out_valid;

  flip97_normalize dut (.*);

  always #5 clk = ~clk;

  int checks = 0;
  int failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real gl, gh, el, eh;
    logic v_prev;
    real el_prev, eh_prev;
    int got;
    gl = A_R * BP_R * C_R * DP_R * K_R;
    gh = A_R * BP_R * C_R / K_R;
    rst_n = 1'b0; in_valid = 1'b0; low_in = '0; high_in = '0;
    repeat (2) @(posedge clk);
    #2 rst_n = 1'b1;
    v_prev = 1'b0; el_prev = 0.0; eh_prev = 0.0;
    for (int i = 0; i < N; i++) begin
      in_valid = ($urandom_range(4) != 0);
      low_in = data_t'(int'($urandom_range(24000)) - 12000);
      high_in = data_t'(int'($urandom_range(24000)) - 12000);
      el = real'(low_in) * gl;
      eh = real'(high_in) * gh;
      @(posedge clk);
      #1;
      checks++;
      if (out_valid !== in_valid) begin
        failures++;
        $display("FAIL out_valid %0b for in_valid %0b", out_valid, in_valid);
      end
      if (in_valid) begin
        checks += 2;
        if ((real'(low) - el) > 2.0 || (el - real'(low)) > 2.0) begin
          failures++;
          $display("FAIL low %0d expected %f", low, el);
        end
        if ((real'(high) - eh) > 2.0 || (eh - real'(high)) > 2.0) begin
          failures++;
          $display("FAIL high %0d expected %f", high, eh);
        end
      end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
