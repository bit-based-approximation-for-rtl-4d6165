// Bit-group transpose of a cache block (BAXX pre-process and post-process).
//
// The block is viewed as a 16 x 16 matrix of 2-bit groups: word w holds
// groups 0..15, group r being bits [2r+1:2r]. Transposed row r collects
// group r of every word, word w's group landing in bits [2w+1:2w] of the row.
// Row 0 therefore holds the two LSBs of all 16 words and row 15 their two
// MSBs, so the low-order bits of the whole block sit together in the low
// rows. Because the matrix is square the same permutation undoes itself: the
// sender applies it before approximation and the receiver applies it again
// after decompression to put every bit back in its word.
//
// Pure wiring, no timing. Ports: din block in, dout transposed block.
module baxx_transpose
  import baxx_pkg::*;
(
  input  block_t din,
  output block_t dout
);

  always_comb begin
    for (int r = 0; r < int'(ROWS); r++)
      for (int w = 0; w < int'(WORDS); w++)
        dout[r][GROUP_W*w +: GROUP_W] = din[w][GROUP_W*r +: GROUP_W];
  end

endmodule
