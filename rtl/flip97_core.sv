// flip97_core: 1-D lifting (9,7) forward DWT built as a flipping structure.
//
// The four lifting steps of the (9,7) filter (coefficients a, b, c, d) are
// computing units in series. In the conventional structure each unit's
// multiplier lies on the path from the previous unit's output to the next
// computing node, so the critical path collects four multipliers. Here every
// unit is flipped: its multiplier is moved onto the vertical (update) branch and
// holds the inverse of the accumulated coefficients (1/a, 1/(a b'), 1/(b' c),
// 1/(c d'), with b' = 16 b and d' = 2 d). Each computing node is split into two
// adders: the first adds the product to the delayed neighbour and runs in
// parallel with the other units; only the second, which adds the current
// neighbour, lies on the chain. The factors 1/16 and 1/2 left over from b' and
// d' are the >>4 and >>1 shifts. With pair index k and r1..r4 the z^-1 nodes:
//   h1 = x_odd/a + r1 + x_even             r1 = x_even of pair k-1
//   l1 = r1/(a b') + r2>>4 + h1>>4          r2 = h1 of pair k-1
//   h2 = r2/(b' c) + r3 + l1                r3 = l1 of pair k-1
//   l2 = r3/(c d') + r4>>1 + h2>>1          r4 = h2 of pair k-1
// Outputs are the lowpass l2 and highpass h2, scaled by 1/(a b' c d') and
// 1/(a b' c); flip97_normalize restores the normalized values.
//
// PIPE selects the pipelined form. The pipelined forms are retimings of the
// same graph: registers are moved onto the product and first-adder edges, and
// the z^-1 nodes that become redundant are dropped.
//   0  no pipelining: critical path one multiplier and five adders (Tm + 5Ta),
//      four data registers r1..r4.
//   3  critical path Tm + Ta, six data registers, results one pair later.
//      Registered: r1, r2 (= h1 of the previous pair), the first adder of
//      unit b (q2), the first adder of unit c (q3 = h1/(b'c) + l1, formed while
//      l1 is current), the 1/(c d') product and r4.
//   5  critical path Tm (no multiplier in series with an adder, at most three
//      adders in series), ten data registers, results two pairs later.
//      Registered: r1, the 1/a product, the r1 + x_even pre-sum, the 1/(a b')
//      product, r2, l1 and its previous value, the 1/(b' c) and 1/(c d')
//      products and r4.
// All settings compute bit-identical results; only the delay differs.
//
// Interface: one sample pair per cycle when in_valid is high. Pair k carries
// x_odd = x(2k-1) and x_even = x(2k) and produces the lowpass coefficient of
// sample 2k-4 and the highpass coefficient of sample 2k-3. in_valid is a clock
// enable for the whole core: with in_valid low nothing moves. The result of
// pair k leaves on low/high with out_valid one cycle after pair k + LAT_EXTRA is
// accepted (LAT_EXTRA = 0, 1, 2 for PIPE = 0, 3, 5), so a stream needs
// LAT_EXTRA trailing pairs to flush its last result. out_valid stays low until
// the result belongs to the fifth pair after reset or later, while older
// results still depend on the reset values of the z^-1 registers.
// Boundary extension of a finite signal is left to whoever feeds the samples.
//
// From the published design: the flipped structure, its coefficients and
// shifts, the split computing nodes, 16-bit data and 12-bit coefficient
// precision, and the critical paths Tm+5Ta, Tm+Ta and Tm of the unpipelined and
// two pipelined forms. Own choices: the retimed register placement of the
// pipelined forms (6 and 10 data registers, where the published forms use 7
// and 11), the sample-pair timing, in_valid/out_valid, the output register,
// reset to zero, round-to-nearest products and wrap-around on overflow.
module flip97_core
  import dwt_pkg::*;
#(
  parameter int unsigned PIPE = 0   // pipeline cuts: 0, 3 or 5
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  input  data_t x_odd,    // x(2k-1)
  input  data_t x_even,   // x(2k)
  output logic  out_valid,
  output data_t low,      // lowpass x_L(2k-4) * 1/(a b' c d')
  output data_t high      // highpass x_H(2k-3) * 1/(a b' c)
);

  localparam int unsigned LAT_EXTRA = (PIPE == 5) ? 2 : (PIPE == 3) ? 1 : 0;

  logic [2:0] fill;     // accepted pairs, saturating at 4 + LAT_EXTRA
  data_t r1;            // x_even of the previous pair (all forms)
  data_t l2, hout;      // lowpass and highpass leaving the core

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      fill <= '0;
      r1 <= '0;
    end else if (in_valid) begin
      r1 <= x_even;
      if (fill != 3'(4 + LAT_EXTRA)) fill <= fill + 3'd1;
    end
  end

  if (PIPE == 0) begin : g_pipe0
    data_t r2, r3, r4;
    data_t h1, q2, l1, q3, h2, q4;
    always_comb begin
      // unit a, flipped by 1/a
      h1 = data_t'(cmul(x_odd, C_INV_A) + r1);
      h1 = data_t'(h1 + x_even);
      // unit b, flipped by 1/(a b'); first adder off the chain
      q2 = data_t'(cmul(r1, C_INV_AB) + (r2 >>> 4));
      l1 = data_t'(q2 + (h1 >>> 4));
      // unit c, flipped by 1/(b' c)
      q3 = data_t'(cmul(r2, C_INV_BC) + r3);
      h2 = data_t'(q3 + l1);
      // unit d, flipped by 1/(c d')
      q4 = data_t'(cmul(r3, C_INV_CD) + (r4 >>> 1));
      l2 = data_t'(q4 + (h2 >>> 1));
      hout = h2;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r2 <= '0;
        r3 <= '0;
        r4 <= '0;
      end else if (in_valid) begin
        r2 <= h1;
        r3 <= l1;
        r4 <= h2;
      end
    end
  end else if (PIPE == 3) begin : g_pipe3
    // Comments give the pair each value belongs to; pair t is on the inputs.
    data_t r2, q2r, q3r, m4r, r4;
    data_t h1, q2, l1, q3, h2, m4;
    always_comb begin
      h1 = data_t'(cmul(x_odd, C_INV_A) + data_t'(r1 + x_even)); // unit a, t
      q2 = data_t'(cmul(r1, C_INV_AB) + (r2 >>> 4));             // unit b 1st, t
      l1 = data_t'(q2r + (r2 >>> 4));                             // unit b, t-1
      q3 = data_t'(cmul(r2, C_INV_BC) + l1);                      // unit c 1st, t
      h2 = data_t'(q3r + l1);                                     // unit c, t-1
      m4 = cmul(l1, C_INV_CD);                                    // unit d product, t
      l2 = data_t'(data_t'(m4r + (r4 >>> 1)) + (h2 >>> 1));      // unit d, t-1
      hout = h2;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        r2 <= '0;
        q2r <= '0;
        q3r <= '0;
        m4r <= '0;
        r4 <= '0;
      end else if (in_valid) begin
        r2 <= h1;
        q2r <= q2;
        q3r <= q3;
        m4r <= m4;
        r4 <= h2;
      end
    end
  end else begin : g_pipe5
    data_t m1r, s1r, m2r, r2, l1r, l1rr, m3r, m4r, r4;
    data_t h1, q2, l1, q3, h2, q4;
    always_comb begin
      h1 = data_t'(m1r + s1r);                 // unit a, t-1
      q2 = data_t'(m2r + (r2 >>> 4));          // unit b 1st, t-1
      l1 = data_t'(q2 + (h1 >>> 4));           // unit b, t-1
      q3 = data_t'(m3r + l1rr);                // unit c 1st, t-2
      h2 = data_t'(q3 + l1r);                  // unit c, t-2
      q4 = data_t'(m4r + (r4 >>> 1));          // unit d 1st, t-2
      l2 = data_t'(q4 + (h2 >>> 1));           // unit d, t-2
      hout = h2;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        m1r <= '0;
        s1r <= '0;
        m2r <= '0;
        r2 <= '0;
        l1r <= '0;
        l1rr <= '0;
        m3r <= '0;
        m4r <= '0;
        r4 <= '0;
      end else if (in_valid) begin
        m1r <= cmul(x_odd, C_INV_A);           // unit a product, t
        s1r <= data_t'(r1 + x_even);           // unit a pre-sum, t
        m2r <= cmul(r1, C_INV_AB);             // unit b product, t
        r2 <= h1;
        l1r <= l1;
        l1rr <= l1r;
        m3r <= cmul(r2, C_INV_BC);             // unit c product, t-1
        m4r <= cmul(l1r, C_INV_CD);            // unit d product, t-1
        r4 <= h2;
      end
    end
  end

  // Output register.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      low <= '0;
      high <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && (fill == 3'(4 + LAT_EXTRA));
      if (in_valid) begin
        low <= l2;
        high <= hout;
      end
    end
  end

  if (PIPE != 0 && PIPE != 3 && PIPE != 5) begin : g_bad
    $error("flip97_core: PIPE must be 0, 3 or 5");
  end

  // Handshake rule: a result is only ever presented in the cycle after an
  // accepted input.
  a_valid_follows_input: assert property (
    @(posedge clk) out_valid |-> $past(in_valid));

endmodule
