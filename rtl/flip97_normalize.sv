// flip97_normalize: output scaling for the flipped (9,7) lifting core.
//
// Flipping the four computing units divides the lowpass result by a b' c d'
// and the highpass result by a b' c. This stage multiplies them back and applies
// the (9,7) normalization in the same multiplication: lowpass times a b' c d' K
// and highpass times a b' c / K, both coefficients held with 12 fractional bits.
// It is one multiplier per output and a register stage: a pair entering with
// in_valid leaves one cycle later with out_valid.
//
// From the published design: putting the flipped coefficients into the normalization
// step, with the constants ab'cd'K and ab'c/K. Own choices: the register stage,
// rounding to nearest and wrap-around on overflow.
module flip97_normalize
  import dwt_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t low_in,
  input  data_t high_in,
  output logic  out_valid,
  output data_t low,      // K * x_L
  output data_t high      // x_H / K
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low <= '0;
      high <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        low <= cmul(low_in, C_NORM_LO);
        high <= cmul(high_in, C_NORM_HI);
      end
    end
  end

  // Handshake rule: a result is only ever presented in the cycle after an
  // accepted input.
  a_valid_follows_input: assert property (
    @(posedge clk) out_valid |-> $past(in_valid));

endmodule
