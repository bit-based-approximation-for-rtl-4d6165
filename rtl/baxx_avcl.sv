// Approximate value compute logic (AVCL) for one 32-bit word.
//
// Works out how many least-significant bits of the word may be approximated
// without leaving the programmer's error threshold. The allowed error range
// is estimated with a shift, range = |value| >> err_shift, and the number of
// approximable bits is the bit length of that range (for 9 at 20 %:
// 9 >> 2 = 2, two bits, so 1001 may become 10xx).
//
// Integers use the whole word (magnitude of the two's complement value).
// For a float only the mantissa may be approximated: the mantissa field is
// extracted and extended with its hidden one to {8'b0, 1, mantissa}, the
// count is computed on that value and capped at 23 so sign and exponent are
// never touched. A float whose exponent is all zeros (zero, subnormal) or all
// ones (infinity, NaN) is not approximated; this exponent check and the use
// of the magnitude for negative integers are this design's choices.
//
// Purely combinational. Ports:
//   word      word to examine
//   is_float  1: IEEE-754 single, 0: integer
//   err_en    threshold is non-zero
//   err_shift threshold as a shift (baxx_pkg::thresh_shift)
//   nbits     number of approximable LSBs, 0..32
module baxx_avcl
  import baxx_pkg::*;
(
  input  word_t      word,
  input  logic       is_float,
  input  logic       err_en,
  input  logic [2:0] err_shift,
  output logic [5:0] nbits
);

  logic [7:0]  exponent;
  logic        exp_special;
  word_t       mant_ext;
  word_t       magnitude;
  word_t       operand;
  logic [5:0]  len;

  always_comb begin
    exponent    = word[30:23];
    exp_special = (exponent == 8'h00) || (exponent == 8'hFF);
    mant_ext    = {8'b0, 1'b1, word[22:0]};
    magnitude   = word[31] ? (~word + 32'd1) : word;
    operand     = is_float ? mant_ext : magnitude;
    len         = bit_length(operand >> err_shift);

    if (!err_en || (is_float && exp_special))
      nbits = '0;
    else if (is_float && len > 6'd23)
      nbits = 6'd23;
    else
      nbits = len;
  end

endmodule
