// Bit-based approximation engine (sender side, FP-BAXX).
//
// For an approximable block, one AVCL per word finds how many LSBs each word
// tolerates; the block-wide count is the minimum over all 16 words, since the
// transposed rows mix bits of every word. The block is then transposed
// (baxx_transpose) so that row r holds bits [2r+1:2r] of every word, and the
// first floor(min/2) rows, which hold only bits each word may lose, are set to
// zero, which is the FP-BAXX rule. Zeroing makes rows compress as zero runs or
// short sign-extended patterns in the frequent-pattern encoder.
//
// A block that is not approximable bypasses the engine: it leaves neither
// transposed nor changed, and approx_out is 0 so the receiver knows not to
// post-process it. A zero word tolerates no approximation under the AVCL rule
// and so keeps the whole block exact; that follows the minimum-over-all-words
// rule literally.
//
// Purely combinational. Ports:
//   blk_in, approximable, is_float, err_pct (0..100, 0 = exact)
//   blk_out     transposed-and-approximated block, or blk_in when bypassed
//   blk_xp      transposed block with no row zeroed, or blk_in when bypassed;
//               the dictionary encoder approximates its rows itself
//   approx_out  blk_out is in transposed form
//   min_bits    block-wide approximable bit count (0 when bypassed)
//   rows        number of transposed rows set to zero
module baxx_engine
  import baxx_pkg::*;
(
  input  block_t     blk_in,
  input  logic       approximable,
  input  logic       is_float,
  input  logic [6:0] err_pct,
  output block_t     blk_out,
  output block_t     blk_xp,
  output logic       approx_out,
  output logic [5:0] min_bits,
  output logic [4:0] rows
);

  logic [WORDS-1:0][5:0] word_bits;
  logic [2:0]            err_shift;
  logic                  err_en;
  block_t                transposed;

  assign err_shift = thresh_shift(err_pct);
  assign err_en    = (err_pct != '0);

  for (genvar w = 0; w < int'(WORDS); w++) begin : g_avcl
    baxx_avcl u_avcl (
      .word      (blk_in[w]),
      .is_float  (is_float),
      .err_en    (err_en),
      .err_shift (err_shift),
      .nbits     (word_bits[w])
    );
  end

  baxx_transpose u_pre (
    .din  (blk_in),
    .dout (transposed)
  );

  always_comb begin
    min_bits = 6'd32;
    for (int w = 0; w < int'(WORDS); w++)
      if (word_bits[w] < min_bits) min_bits = word_bits[w];
    if (!approximable) min_bits = '0;
    rows = 5'(min_bits >> 1);

    approx_out = approximable;
    blk_xp     = approximable ? transposed : blk_in;
    if (approximable) begin
      for (int r = 0; r < int'(ROWS); r++)
        blk_out[r] = (5'(r) < rows) ? '0 : transposed[r];
    end else begin
      blk_out = blk_in;
    end
  end

endmodule
