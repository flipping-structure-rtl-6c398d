// flipping_dwt_top: the two flipping-structure 1-D DWT filters side by side.
//
// Path f97: the JPEG2000 (9,7) filter as a fully flipped lifting structure
// (flip97_core, critical path one multiplier and five adders) followed by the
// stage that undoes the flipping factors and applies K and 1/K
// (flip97_normalize). Path i97: the integer (9,7) filter with its c unit flipped
// (int97_flip_core), which needs adders and shifts only; its outputs carry the
// factor 5/4 that the integer filter's normalization absorbs.
//
// Each path takes one sample pair per cycle, x(2k-1) and x(2k), under its own
// in_valid, and returns one lowpass and one highpass coefficient per pair.
// Latency: on i97 the result of pair k leaves one cycle after pair k is
// accepted. On f97 it leaves two cycles (core output register, normalization
// register) after pair k + LAT_EXTRA is accepted, where LAT_EXTRA is 0, 1 or 2
// for F97_PIPE = 0, 3 or 5; the default is the unpipelined flipping structure.
// Both in_valid inputs act as clock enables of their path. out_valid stays low
// for the first four accepted pairs of each path. The two paths share only
// clock and reset.
module flipping_dwt_top
  import dwt_pkg::*;
#(
  parameter int unsigned F97_PIPE = 0,   // pipeline cuts of the (9,7) core: 0, 3 or 5
  parameter int unsigned INT_W    = 16   // data width of the integer path
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // (9,7) path
  input  logic                    f97_in_valid,
  input  data_t                   f97_x_odd,
  input  data_t                   f97_x_even,
  output logic                    f97_out_valid,
  output data_t                   f97_low,    // K * x_L
  output data_t                   f97_high,   // x_H / K
  // integer (9,7) path
  input  logic                    i97_in_valid,
  input  logic signed [INT_W-1:0] i97_x_odd,
  input  logic signed [INT_W-1:0] i97_x_even,
  output logic                    i97_out_valid,
  output logic signed [INT_W-1:0] i97_low,    // 5/4 * x_L
  output logic signed [INT_W-1:0] i97_high    // 5/4 * x_H
);

  logic  core_valid;
  data_t core_low, core_high;

  flip97_core #(.PIPE(F97_PIPE)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (f97_in_valid),
    .x_odd     (f97_x_odd),
    .x_even    (f97_x_even),
    .out_valid (core_valid),
    .low       (core_low),
    .high      (core_high)
  );

  flip97_normalize u_norm (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (core_valid),
    .low_in    (core_low),
    .high_in   (core_high),
    .out_valid (f97_out_valid),
    .low       (f97_low),
    .high      (f97_high)
  );

  int97_flip_core #(.W(INT_W)) u_int (
    .clk       (clk),
    .rst_n     (rst_n),
    .in_valid  (i97_in_valid),
    .x_odd     (i97_x_odd),
    .x_even    (i97_x_even),
    .out_valid (i97_out_valid),
    .low       (i97_low),
    .high      (i97_high)
  );

endmodule
