// Dictionary encoder with its pattern matching table (DICT-BAXX sender side).
//
// The encoder PMT has DICT_ENTRIES (8) entries. Each holds a 32-bit data
// pattern, a frequency counter and, for every node of the network, an
// encoded index with a valid bit: the index under which that destination's
// decoder stores the pattern. Decoders learn frequent patterns on their own
// and send update notifications (source decoder node, pattern, index); an
// update either refreshes the index of the entry that already holds the
// pattern or installs the pattern in a free or least-used entry.
//
// Encoding a block, one transposed row (word) per cycle, for destination dst:
//   - a row that must stay exact hits only an entry holding exactly that
//     pattern with a valid index for dst;
//   - a row among the first `rows` approximable rows may take any entry with
//     a valid index for dst (an exact match is preferred): every bit of such
//     a row may be approximated, so the word is approximated to the pattern;
//   - a hit is sent as {index, 1}, 4 bits; a miss as {word, 0}, 33 bits.
// Codes are packed LSB first, as in the FPC encoder. Hits raise the entry's
// frequency counter, which chooses the victim when a new pattern arrives.
//
// Timing: the edge that samples start captures blk, rows and dst; the next
// 16 edges encode one row each; done is high for one cycle 17 cycles after
// start. Updates are written in the cycle they arrive, also during encoding;
// a decoder never moves a published pattern, so a change in mid-block cannot
// produce a wrong index.
//
// The table contents follow the document's encoder PMT; the code format,
// the replacement rule and the exact-match preference are this design's.
module dict_encoder
  import baxx_pkg::*;
#(
  parameter int unsigned NODES = 64
) (
  input  logic                    clk,
  input  logic                    rst_n,
  // block encoding
  input  logic                    start,
  input  block_t                  blk,
  input  logic [4:0]              rows,       // approximable rows (from the front)
  input  logic [$clog2(NODES)-1:0] dst,
  output logic                    busy,
  output logic                    done,
  output logic [BUF_W-1:0]        stream,
  output logic [9:0]              nbits,
  output logic [4:0]              hits,       // rows sent as an index
  output logic [4:0]              approx_hits,// approximable rows replaced by a different pattern
  // update notification from the decoder at node upd_src
  input  logic                    upd_valid,
  input  logic [$clog2(NODES)-1:0] upd_src,
  input  word_t                   upd_pattern,
  input  logic [DICT_IDX_W-1:0]   upd_idx
);

  localparam int unsigned E  = DICT_ENTRIES;
  localparam int unsigned NW = $clog2(NODES);

  // PMT
  logic  [E-1:0]                        ent_valid;
  word_t [E-1:0]                        ent_pat;
  logic  [E-1:0][DICT_FREQ_W-1:0]       ent_freq;
  logic  [E-1:0][NODES-1:0]             vec_valid;
  logic  [E-1:0][NODES-1:0][DICT_IDX_W-1:0] vec_idx;

  // block state
  block_t      blk_q;
  logic [4:0]  rows_q;
  logic [NW-1:0] dst_q;
  logic [4:0]  ridx;
  logic [9:0]  pos;

  // lookup of the current row
  word_t       w;
  logic        apx_row;
  logic        hit;
  logic [$clog2(E)-1:0] sel;
  logic [DICT_IDX_W-1:0] code_idx;

  always_comb begin
    logic found_exact, found_any;
    logic [$clog2(E)-1:0] e_exact, e_any;
    w       = blk_q[ridx[3:0]];
    apx_row = (ridx < rows_q);
    found_exact = 1'b0; found_any = 1'b0; e_exact = '0; e_any = '0;
    for (int e = E - 1; e >= 0; e--) begin
      if (ent_valid[e] && vec_valid[e][dst_q]) begin
        found_any = 1'b1; e_any = ($clog2(E))'(e);
        if (ent_pat[e] == w) begin found_exact = 1'b1; e_exact = ($clog2(E))'(e); end
      end
    end
    hit      = found_exact || (apx_row && found_any);
    sel      = found_exact ? e_exact : e_any;
    code_idx = vec_idx[sel][dst_q];
  end

  // update: entry already holding the pattern, else victim
  logic                 upd_found;
  logic [$clog2(E)-1:0] upd_ent, victim;
  always_comb begin
    upd_found = 1'b0; upd_ent = '0;
    for (int e = E - 1; e >= 0; e--)
      if (ent_valid[e] && ent_pat[e] == upd_pattern) begin upd_found = 1'b1; upd_ent = ($clog2(E))'(e); end
    // least-used entry, but a free entry first
    victim = '0;
    for (int e = 1; e < int'(E); e++)
      if (ent_freq[e] < ent_freq[victim]) victim = ($clog2(E))'(e);
    for (int e = E - 1; e >= 0; e--)
      if (!ent_valid[e]) victim = ($clog2(E))'(e);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid   <= '0;
      ent_pat     <= '0;
      ent_freq    <= '0;
      vec_valid   <= '0;
      vec_idx     <= '0;
      busy        <= 1'b0;
      done        <= 1'b0;
      blk_q       <= '0;
      rows_q      <= '0;
      dst_q       <= '0;
      ridx        <= '0;
      pos         <= '0;
      stream      <= '0;
      nbits       <= '0;
      hits        <= '0;
      approx_hits <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy        <= 1'b1;
          blk_q       <= blk;
          rows_q      <= rows;
          dst_q       <= dst;
          ridx        <= '0;
          pos         <= '0;
          stream      <= '0;
          hits        <= '0;
          approx_hits <= '0;
        end
      end else begin
        if (hit) begin
          stream <= stream | (BUF_W'({code_idx, 1'b1}) << pos);
          pos    <= pos + 10'd4;
          hits   <= hits + 5'd1;
          if (ent_pat[sel] != w) approx_hits <= approx_hits + 5'd1;
          if (ent_freq[sel] != '1) ent_freq[sel] <= ent_freq[sel] + 1'b1;
        end else begin
          stream <= stream | (BUF_W'({w, 1'b0}) << pos);
          pos    <= pos + 10'd33;
        end
        ridx <= ridx + 5'd1;
        if (ridx == 5'(WORDS - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          nbits <= pos + (hit ? 10'd4 : 10'd33);
        end
      end
      // update notification (written after the hit bookkeeping, so it wins)
      if (upd_valid) begin
        if (upd_found) begin
          vec_valid[upd_ent][upd_src] <= 1'b1;
          vec_idx[upd_ent][upd_src]   <= upd_idx;
        end else begin
          ent_valid[victim] <= 1'b1;
          ent_pat[victim]   <= upd_pattern;
          ent_freq[victim]  <= '0;
          for (int n = 0; n < int'(NODES); n++) vec_valid[victim][n] <= (n == int'(upd_src));
          vec_idx[victim][upd_src] <= upd_idx;
        end
      end
    end
  end

endmodule
