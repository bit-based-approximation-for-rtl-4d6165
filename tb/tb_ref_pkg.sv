// Reference models for the testbenches, written independently of the RTL:
// error-threshold shift, approximable bit count, block-wide approximated row
// count, bit-group transpose, and a frequent pattern encoder that builds the
// compressed stream bit by bit from signed value ranges.
package tb_ref_pkg;

  typedef logic [15:0][31:0] blk_t;

  // floor(log2(100 / pct)) by integer division; -1 when pct == 0
  function automatic int ref_shift(int pct);
    int q, s;
    if (pct == 0) return -1;
    q = 100 / pct;
    s = 0;
    while ((1 << (s + 1)) <= q) s++;
    return s;
  endfunction

  function automatic int nbits_of(longint unsigned v);
    int n = 0;
    while (v != 0) begin v = v >> 1; n++; end
    return n;
  endfunction

  function automatic int ref_bits(logic [31:0] w, bit is_float, int pct);
    int s;
    longint unsigned mag;
    s = ref_shift(pct);
    if (s < 0) return 0;
    if (is_float) begin
      if (w[30:23] == 8'd0 || w[30:23] == 8'd255) return 0;
      mag = 64'(w[22:0]) + 64'h800000;
      return (nbits_of(mag >> s) > 23) ? 23 : nbits_of(mag >> s);
    end
    mag = w[31] ? (64'h1_0000_0000 - 64'(w)) : 64'(w);
    return nbits_of(mag >> s);
  endfunction

  function automatic int ref_rows(blk_t b, bit approximable, bit is_float, int pct);
    int m = 32;
    if (!approximable) return 0;
    for (int w = 0; w < 16; w++)
      if (ref_bits(b[w], is_float, pct) < m) m = ref_bits(b[w], is_float, pct);
    return m / 2;
  endfunction

  // bit b of word w goes to row b/2, bit 2*w + b%2
  function automatic blk_t ref_transpose(blk_t b);
    blk_t t;
    for (int w = 0; w < 16; w++)
      for (int bit_i = 0; bit_i < 32; bit_i++)
        t[bit_i / 2][2 * w + (bit_i % 2)] = b[w][bit_i];
    return t;
  endfunction

  // Expected block received after approximation: transposed rows below
  // `rows` are zero, i.e. the low 2*rows bits of every word are zero.
  function automatic blk_t ref_approx_words(blk_t b, int rows);
    blk_t r = b;
    for (int w = 0; w < 16; w++)
      for (int i = 0; i < 2 * rows; i++) r[w][i] = 1'b0;
    return r;
  endfunction

  // ---- frequent pattern reference encoder ----
  function automatic bit fits_signed(logic [31:0] w, int bits);
    longint v = longint'($signed(w));
    return (v >= -(64'sd1 <<< (bits - 1))) && (v < (64'sd1 <<< (bits - 1)));
  endfunction

  function automatic bit fits_signed16(logic [15:0] h, int bits);
    int v = int'($signed(h));
    return (v >= -(1 <<< (bits - 1))) && (v < (1 <<< (bits - 1)));
  endfunction

  // append `n` bits of v (LSB first) to the stream
  function automatic void put(ref bit s[$], input logic [31:0] v, input int n);
    for (int i = 0; i < n; i++) s.push_back(v[i]);
  endfunction

  function automatic void ref_encode(blk_t b, ref bit s[$]);
    int run = 0;
    s.delete();
    for (int w = 0; w < 16; w++) begin
      if (b[w] == 0) begin
        run++;
        if (run == 8 || w == 15) begin put(s, 0, 3); put(s, run - 1, 3); run = 0; end
        continue;
      end
      if (run > 0) begin put(s, 0, 3); put(s, run - 1, 3); run = 0; end
      if (fits_signed(b[w], 4))       begin put(s, 1, 3); put(s, b[w], 4);  end
      else if (fits_signed(b[w], 8))  begin put(s, 2, 3); put(s, b[w], 8);  end
      else if (fits_signed(b[w], 16)) begin put(s, 3, 3); put(s, b[w], 16); end
      else if (b[w][15:0] == 0)       begin put(s, 4, 3); put(s, b[w][31:16], 16); end
      else if (fits_signed16(b[w][31:16], 8) && fits_signed16(b[w][15:0], 8)) begin
        put(s, 5, 3); put(s, b[w][7:0], 8); put(s, b[w][23:16], 8);
      end else begin put(s, 7, 3); put(s, b[w], 32); end
    end
  endfunction

  // Random block with a mix of the patterns the encoder distinguishes
  function automatic logic [31:0] rand_word(int kind);
    logic [31:0] r = $urandom;
    case (kind % 8)
      0: return 0;
      1: return {{28{r[3]}}, r[3:0]};
      2: return {{24{r[7]}}, r[7:0]};
      3: return {{16{r[15]}}, r[15:0]};
      4: return {r[31:16], 16'h0};
      5: return {{8{r[23]}}, r[23:16], {8{r[7]}}, r[7:0]};
      6: return r | 32'h0100_0000;
      default: return r;
    endcase
  endfunction

  function automatic blk_t rand_block(int mode);
    blk_t b;
    for (int w = 0; w < 16; w++) begin
      case (mode % 4)
        0: b[w] = rand_word($urandom);                       // mixed patterns
        1: b[w] = 32'd1000 + ($urandom % 4000);              // similar integers
        2: b[w] = {1'b0, 8'd120 + 8'($urandom % 16), 23'($urandom)};   // positive floats
        default: b[w] = $urandom;
      endcase
    end
    return b;
  endfunction

endpackage
