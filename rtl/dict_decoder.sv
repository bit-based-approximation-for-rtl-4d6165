// Dictionary decoder with its pattern matching table (DICT-BAXX receiver
// side).
//
// The decoder PMT has DICT_ENTRIES (8) entries, entry i being encoded index
// i. Each holds a data pattern, a frequency counter and one valid bit per
// node: bit s says that the encoder at node s has been told the index.
//
// Decoding, one code per cycle: bit 0 of a code is the hit flag. {index, 1}
// (4 bits) is replaced by the entry's pattern; the entry must be valid for
// the packet's source, otherwise err is set. {word, 0} (33 bits) is a literal
// word, and is also used to learn: a literal found in the table raises the
// entry's counter, and once the counter reaches FREQ_THRESH the pattern is
// published to the source encoder through the update port (pattern, index,
// destination = source of the packet) and the source's valid bit is set. A
// literal not in the table is installed, counter 1, in an entry that has not
// been published to any encoder (a free one first, else the least used). A
// published entry is never replaced, which keeps every encoder's indices
// consistent with this table without invalidation messages. An update is
// only published when upd_ready is high; otherwise it is retried on a later
// occurrence of the pattern, so decoding never waits for the network.
//
// Timing: as the FPC decoder; done is high for one cycle c+1 cycles after
// start for a block of c codes (16 here, one per row).
//
// The table layout follows the document's decoder PMT; the threshold, the
// replacement rule and the update hand-shake are this design's choices.
module dict_decoder
  import baxx_pkg::*;
#(
  parameter int unsigned NODES       = 64,
  parameter int unsigned FREQ_THRESH = 2
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic [BUF_W-1:0]         stream,
  input  logic [9:0]               nbits,
  input  logic [$clog2(NODES)-1:0] src,
  output logic                     busy,
  output logic                     done,
  output logic                     err,
  output block_t                   blk,
  // update notification to the encoder at node upd_dst
  output logic                     upd_valid,
  input  logic                     upd_ready,
  output logic [$clog2(NODES)-1:0] upd_dst,
  output word_t                    upd_pattern,
  output logic [DICT_IDX_W-1:0]    upd_idx
);

  localparam int unsigned E  = DICT_ENTRIES;
  localparam int unsigned NW = $clog2(NODES);

  logic  [E-1:0]                  ent_valid;
  word_t [E-1:0]                  ent_pat;
  logic  [E-1:0][DICT_FREQ_W-1:0] ent_freq;
  logic  [E-1:0][NODES-1:0]       pub;

  logic [BUF_W+32:0] buf_q;
  logic [9:0]        len_q;
  logic [9:0]        pos;
  logic [4:0]        widx;
  logic [NW-1:0]     src_q;

  // current code
  logic              flag;
  logic [DICT_IDX_W-1:0] idx;
  word_t             lit;
  logic              found;
  logic [DICT_IDX_W-1:0] fidx, victim;
  logic              have_victim;
  logic              publish;

  always_comb begin
    flag = buf_q[pos];
    idx  = buf_q[(pos + 10'd1) +: DICT_IDX_W];
    lit  = buf_q[(pos + 10'd1) +: WORD_W];
    found = 1'b0; fidx = '0;
    for (int e = E - 1; e >= 0; e--)
      if (ent_valid[e] && ent_pat[e] == lit) begin found = 1'b1; fidx = DICT_IDX_W'(e); end
    // least-used unpublished entry, but a free entry first
    have_victim = 1'b0; victim = '0;
    for (int e = 0; e < int'(E); e++)
      if (pub[e] == '0 && (!have_victim || ent_freq[e] < ent_freq[victim])) begin
        have_victim = 1'b1; victim = DICT_IDX_W'(e);
      end
    for (int e = E - 1; e >= 0; e--)
      if (!ent_valid[e]) begin have_victim = 1'b1; victim = DICT_IDX_W'(e); end
    publish = busy && !flag && found && !pub[fidx][src_q] &&
              (32'(ent_freq[fidx]) + 1 >= FREQ_THRESH);
  end

  assign upd_valid   = publish;
  assign upd_dst     = src_q;
  assign upd_pattern = lit;
  assign upd_idx     = fidx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ent_valid <= '0;
      ent_pat   <= '0;
      ent_freq  <= '0;
      pub       <= '0;
      buf_q     <= '0;
      len_q     <= '0;
      pos       <= '0;
      widx      <= '0;
      src_q     <= '0;
      busy      <= 1'b0;
      done      <= 1'b0;
      err       <= 1'b0;
      blk       <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          buf_q <= {33'b0, stream};
          len_q <= nbits;
          src_q <= src;
          pos   <= '0;
          widx  <= '0;
          err   <= 1'b0;
        end
      end else begin
        if (flag) begin
          blk[widx[3:0]] <= ent_pat[idx];
          pos <= pos + 10'd4;
          if (!ent_valid[idx] || !pub[idx][src_q]) err <= 1'b1;
        end else begin
          blk[widx[3:0]] <= lit;
          pos <= pos + 10'd33;
          if (found) begin
            if (ent_freq[fidx] != '1) ent_freq[fidx] <= ent_freq[fidx] + 1'b1;
            if (publish && upd_ready) pub[fidx][src_q] <= 1'b1;
          end else if (have_victim) begin
            ent_valid[victim] <= 1'b1;
            ent_pat[victim]   <= lit;
            ent_freq[victim]  <= DICT_FREQ_W'(1);
          end
        end
        widx <= widx + 5'd1;
        if (widx == 5'(WORDS - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
          if ((pos + (flag ? 10'd4 : 10'd33)) != len_q) err <= 1'b1;
        end
      end
    end
  end

endmodule
