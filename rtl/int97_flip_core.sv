// int97_flip_core: 1-D integer (9,7) lifting DWT with the c unit flipped.
//
// The integer (9,7) filter has lifting coefficients a = -3/2, b = -1/16,
// c = 4/5, d = 15/32. a, b and d are shift-and-add multiplications, but 4/5 has
// no short binary form. Flipping the c unit replaces 4/5 by its inverse 5/4 on
// the vertical branch (x + x/4). From there on the data is scaled by 5/4, so the
// d unit also applies 5/4 to its vertical input while its diagonal coefficient
// stays 15/32. Both outputs leave the structure multiplied by 5/4; the
// normalization (K = 4*sqrt(2)/5) absorbs this factor.
// As in the flipped (9,7) core, each computing node is split: the terms that
// do not depend on the unit below are summed off the chain, and the current
// neighbour is added last. Every product is a sum of arithmetic right shifts,
// each of which rounds towards minus infinity:
//   h1 = x(2k-1) - (s + s>>1),            s = r1 + x(2k)      (a = -3/2)
//   l1 = (r1 - r2>>4) - h1>>4                                  (b = -1/16)
//   h2 = (r2 + r2>>2 + r3) + l1                                (5/4, = 5/4 * highpass)
//   l2 = (r3 + r3>>2 + r4>>1 - r4>>5) + (h2>>1 - h2>>5)         (5/4 and 15/32,
//                                                               = 5/4 * lowpass)
// where r1..r4 are the z^-1 register nodes (x(2k-2), and h1, l1, h2 of the
// previous pair). This takes 13 adders, and the longest chain, x(2k) through
// s, s + s>>1, h1, l1, h2, h2>>1 - h2>>5 to l2, is 7 adders.
//
// Interface and timing are those of flip97_core: pair k carries x(2k-1) on
// x_odd and x(2k) on x_even; the lowpass of sample 2k-4 and the highpass of
// sample 2k-3 appear one cycle after the pair is accepted; in_valid low stalls;
// out_valid stays low for the first four accepted pairs.
//
// From the published design: the coefficients, the flipped c unit with 5/4, the
// shift-add multiplications, 13 adders with a 7-adder critical path. Own
// choices: the exact split of the nodes, rounding every shifted term down, the
// data width, valid handshake and reset.
module int97_flip_core
#(
  parameter int unsigned W = 16   // integer data width
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,
  input  logic signed [W-1:0] x_odd,    // x(2k-1)
  input  logic signed [W-1:0] x_even,   // x(2k)
  output logic                out_valid,
  output logic signed [W-1:0] low,      // 5/4 * x_L(2k-4)
  output logic signed [W-1:0] high      // 5/4 * x_H(2k-3)
);

  typedef logic signed [W-1:0] word_t;
  typedef logic signed [W+1:0] wide_t;  // headroom for the unit-a pre-sum

  word_t r1, r2, r3, r4;
  logic [2:0] fill;

  wide_t sa, ta;
  word_t h1, qb, l1, qc, h2, qd, l2;

  always_comb begin
    // unit a: h1 = x_odd - 3/2 (r1 + x_even)
    sa = wide_t'(r1) + wide_t'(x_even);
    ta = sa + (sa >>> 1);
    h1 = word_t'(wide_t'(x_odd) - ta);
    // unit b: l1 = r1 - 1/16 r2 - 1/16 h1
    qb = word_t'(r1 - (r2 >>> 4));
    l1 = word_t'(qb - (h1 >>> 4));
    // unit c, flipped: h2 = 5/4 r2 + r3 + l1
    qc = word_t'(r2 + (r2 >>> 2) + r3);
    h2 = word_t'(qc + l1);
    // unit d: l2 = 5/4 r3 + 15/32 r4 + 15/32 h2, 15/32 x = x/2 - x/32
    qd = word_t'(r3 + (r3 >>> 2) + ((r4 >>> 1) - (r4 >>> 5)));
    l2 = word_t'(qd + ((h2 >>> 1) - (h2 >>> 5)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r1 <= '0;
      r2 <= '0;
      r3 <= '0;
      r4 <= '0;
      fill <= '0;
      low <= '0;
      high <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (fill == 3'd4);
      if (in_valid) begin
        r1 <= x_even;
        r2 <= h1;
        r3 <= l1;
        r4 <= h2;
        low <= l2;
        high <= h2;
        if (fill != 3'd4) fill <= fill + 3'd1;
      end
    end
  end

  // Handshake rule: a result is only ever presented in the cycle after an
  // accepted input.
  a_valid_follows_input: assert property (
    @(posedge clk) out_valid |-> $past(in_valid));

endmodule
