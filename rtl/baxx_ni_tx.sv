// Sender network interface with bit-based approximation (FP-BAXX and
// DICT-BAXX).
//
// Takes one cache block at a time from the tile, together with its
// destination, its approximable flag and its data type. The block passes the
// BAXX engine (bypassed when it is not approximable), then one of two
// compressors, chosen by comp_dict: the frequent pattern encoder (FP-BAXX,
// approximable rows zeroed) or the dictionary encoder (DICT-BAXX,
// approximable rows matched against the PMT). The compressed stream is cut
// into 64-bit data flits behind a head flit that carries the route, the
// approx, data-type and dictionary flags and the stream length. Flits go
// through a 4-flit injection queue to the router's local input, one per
// credit.
//
// The NI also carries the dictionary protocol. Update notifications produced
// by this node's decoder (upd_req_*) are sent, ahead of waiting blocks, as a
// two-flit packet (head with the upd flag, then {index, pattern}) to the
// encoder they are meant for. Notifications received for this node's encoder
// arrive on pmt_wr_* from the receiving NI and are written into its PMT.
//
// Timing, with free credits: the edge that takes the request (req_valid and
// req_ready) is edge 0; the encoder captures the engine's result at edge 1 and
// finishes at edge 17; the head flit enters the injection queue at edge 19
// and is on inj_valid until edge 20, where the router takes it; data flits
// follow one per cycle. req_ready stays low until the packet is
// fully in the queue. err_pct is the programmer's error threshold in percent
// (0 disables approximation) and may change between blocks.
//
// The packet format and the queue depth are this design's choices.
module baxx_ni_tx
  import baxx_pkg::*;
#(
  parameter int unsigned QDEPTH    = 4,   // injection queue
  parameter int unsigned BUF_DEPTH = 4,   // router input buffer, initial credits
  parameter int unsigned MESH_X    = 8,   // node id = y * MESH_X + x
  parameter int unsigned NODES     = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [COORD_W-1:0] my_x,
  input  logic [COORD_W-1:0] my_y,
  input  logic [6:0]         err_pct,
  input  logic               comp_dict,     // 1: DICT-BAXX, 0: FP-BAXX
  // from the tile
  input  logic               req_valid,
  output logic               req_ready,
  input  block_t             req_blk,
  input  logic [COORD_W-1:0] req_dst_x,
  input  logic [COORD_W-1:0] req_dst_y,
  input  logic               req_approximable,
  input  logic               req_is_float,
  // to the router's local input
  output logic               inj_valid,
  output flit_t              inj_flit,
  input  logic               inj_credit,
  // update notification to send (from this node's decoder)
  input  logic               upd_req_valid,
  output logic               upd_req_ready,
  input  logic [$clog2(NODES)-1:0] upd_req_dst,
  input  word_t              upd_req_pattern,
  input  logic [DICT_IDX_W-1:0] upd_req_idx,
  // update notification received for this node's encoder PMT
  input  logic               pmt_wr_valid,
  input  logic [$clog2(NODES)-1:0] pmt_wr_src,
  input  word_t              pmt_wr_pattern,
  input  logic [DICT_IDX_W-1:0] pmt_wr_idx,
  // statistics of the last accepted block
  output logic [4:0]         last_rows,
  output logic [9:0]         last_nbits
);

  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  typedef enum logic [1:0] {S_IDLE, S_ENC, S_WAIT, S_SEND} state_e;
  state_e state;

  block_t             blk_q;
  logic               approximable_q, is_float_q;
  logic [COORD_W-1:0] dst_x_q, dst_y_q;

  block_t             eng_blk, eng_xp;
  logic               dict_q, upd_q;
  logic               denc_busy, denc_done;
  logic [BUF_W-1:0]   denc_stream;
  logic [9:0]         denc_nbits;
  logic [4:0]         denc_hits, denc_apx_hits;
  logic               eng_approx;
  logic [5:0]         eng_min_bits;
  logic [4:0]         eng_rows;
  logic               approx_q;

  logic               enc_start, enc_busy, enc_done;
  logic [BUF_W-1:0]   enc_stream;
  logic [9:0]         enc_nbits;

  logic [3:0]         ndata_q;
  logic [3:0]         fidx;           // 0 = head, 1..ndata = data flits
  logic [BUF_W-1:0]   stream_q;
  logic [9:0]         nbits_q;

  logic               q_push, q_pop, q_empty, q_full;
  flit_t              q_in, q_out;
  logic [CW-1:0]      credits;

  baxx_engine u_engine (
    .blk_in       (blk_q),
    .approximable (approximable_q),
    .is_float     (is_float_q),
    .err_pct      (err_pct),
    .blk_out      (eng_blk),
    .blk_xp       (eng_xp),
    .approx_out   (eng_approx),
    .min_bits     (eng_min_bits),
    .rows         (eng_rows)
  );

  fpc_encoder u_enc (
    .clk, .rst_n,
    .start  (enc_start),
    .blk    (eng_blk),
    .busy   (enc_busy),
    .done   (enc_done),
    .stream (enc_stream),
    .nbits  (enc_nbits)
  );

  dict_encoder #(.NODES(NODES)) u_denc (
    .clk, .rst_n,
    .start       ((state == S_ENC) && dict_q),
    .blk         (eng_xp),
    .rows        (eng_rows),
    .dst         ($clog2(NODES)'(32'(dst_y_q) * MESH_X + 32'(dst_x_q))),
    .busy        (denc_busy),
    .done        (denc_done),
    .stream      (denc_stream),
    .nbits       (denc_nbits),
    .hits        (denc_hits),
    .approx_hits (denc_apx_hits),
    .upd_valid   (pmt_wr_valid),
    .upd_src     (pmt_wr_src),
    .upd_pattern (pmt_wr_pattern),
    .upd_idx     (pmt_wr_idx)
  );

  assign req_ready     = (state == S_IDLE) && !upd_req_valid;
  assign upd_req_ready = (state == S_IDLE);
  assign enc_start     = (state == S_ENC) && !dict_q;

  // Flit being written into the injection queue
  always_comb begin
    head_t h;
    h          = '0;
    h.dst_x    = dst_x_q;
    h.dst_y    = dst_y_q;
    h.src_x    = my_x;
    h.src_y    = my_y;
    h.approx   = approx_q;
    h.is_float = is_float_q;
    h.ndata    = ndata_q;
    h.dict     = dict_q;
    h.upd      = upd_q;
    h.nbits    = nbits_q;
    q_in.head  = (fidx == '0);
    q_in.tail  = (fidx == ndata_q);
    q_in.data  = (fidx == '0) ? FLIT_W'(h) : stream_q[32'(fidx - 4'd1) * FLIT_W +: FLIT_W];
    q_push     = (state == S_SEND) && !q_full;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state          <= S_IDLE;
      blk_q          <= '0;
      approximable_q <= 1'b0;
      is_float_q     <= 1'b0;
      dst_x_q        <= '0;
      dst_y_q        <= '0;
      approx_q       <= 1'b0;
      ndata_q        <= '0;
      fidx           <= '0;
      stream_q       <= '0;
      nbits_q        <= '0;
      last_rows      <= '0;
      last_nbits     <= '0;
      dict_q         <= 1'b0;
      upd_q          <= 1'b0;
    end else begin
      case (state)
        S_IDLE: if (upd_req_valid) begin
          // update notification: head plus one data flit
          upd_q    <= 1'b1;
          dict_q   <= 1'b0;
          approx_q <= 1'b0;
          dst_x_q  <= COORD_W'(32'(upd_req_dst) % MESH_X);
          dst_y_q  <= COORD_W'(32'(upd_req_dst) / MESH_X);
          stream_q <= BUF_W'({upd_req_idx, upd_req_pattern});
          nbits_q  <= 10'(DICT_IDX_W + WORD_W);
          ndata_q  <= 4'd1;
          fidx     <= '0;
          state    <= S_SEND;
        end else if (req_valid) begin
          upd_q          <= 1'b0;
          dict_q         <= comp_dict;
          blk_q          <= req_blk;
          approximable_q <= req_approximable;
          is_float_q     <= req_is_float;
          dst_x_q        <= req_dst_x;
          dst_y_q        <= req_dst_y;
          state          <= S_ENC;
        end
        S_ENC: begin                       // encoder captures eng_blk this cycle
          approx_q  <= eng_approx;
          last_rows <= eng_rows;
          state     <= S_WAIT;
        end
        S_WAIT: if (enc_done || denc_done) begin
          stream_q   <= dict_q ? denc_stream : enc_stream;
          nbits_q    <= dict_q ? denc_nbits : enc_nbits;
          last_nbits <= dict_q ? denc_nbits : enc_nbits;
          ndata_q    <= 4'(((dict_q ? denc_nbits : enc_nbits) + 10'(FLIT_W - 1)) / 10'(FLIT_W));
          fidx       <= '0;
          state      <= S_SEND;
        end
        S_SEND: if (q_push) begin
          fidx <= fidx + 4'd1;
          if (fidx == ndata_q) state <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  // Injection queue and credit-based hand-off to the router
  flit_fifo #(.DEPTH(QDEPTH)) u_injq (
    .clk, .rst_n,
    .push    (q_push),
    .wr_flit (q_in),
    .pop     (q_pop),
    .rd_flit (q_out),
    .empty   (q_empty),
    .full    (q_full)
  );

  assign q_pop     = !q_empty && (credits != '0);
  assign inj_valid = q_pop;
  assign inj_flit  = q_out;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) credits <= CW'(BUF_DEPTH);
    else        credits <= credits - CW'(q_pop) + CW'(inj_credit);
  end

endmodule
