// Receiver network interface with bit-based approximation (FP-BAXX and
// DICT-BAXX).
//
// Flits from the router's local output enter a 4-flit ejection queue; one
// credit goes back to the router per flit taken out. The head flit gives the
// source, the flags and the stream length; the data flits are gathered into a
// stream buffer. The frequent pattern decoder then rebuilds the 16 words, and
// a block marked approximated is transposed again (post-process), which puts
// every bit group back into its original word. Approximated rows come back as
// zeros, so each word is within its error bound of the original.
//
// A head flit with the dict flag sends the stream to the dictionary decoder
// instead, which may also learn a frequent pattern and publish it; such
// update notifications wait in a small queue (upd_req_*) until the sending
// NI injects them. A head flit with the upd flag announces an update for this
// node's encoder: its data flit {index, pattern} is passed on pmt_wr_*, with
// the packet's source as the decoder node, in the cycle it is taken.
//
// Timing: the decoder starts at the clock edge that takes the tail flit from
// the queue; a block of c codes (2..16) is on out_valid from c+1 edges later,
// and is held until out_ready. No flit is taken from the queue while a block
// waits for decoding or delivery. out_err flags a stream the decoder found
// malformed.
module baxx_ni_rx
  import baxx_pkg::*;
#(
  parameter int unsigned QDEPTH = 4,
  parameter int unsigned MESH_X = 8,    // node id = y * MESH_X + x
  parameter int unsigned NODES  = 64
) (
  input  logic               clk,
  input  logic               rst_n,
  // from the router's local output
  input  logic               ej_valid,
  input  flit_t              ej_flit,
  output logic               ej_credit,
  // to the tile
  output logic               out_valid,
  input  logic               out_ready,
  output block_t             out_blk,
  output logic [COORD_W-1:0] out_src_x,
  output logic [COORD_W-1:0] out_src_y,
  output logic               out_approx,
  output logic               out_is_float,
  output logic               out_err,
  // update notifications to send (to the sending NI)
  output logic               upd_req_valid,
  input  logic               upd_req_ready,
  output logic [$clog2(NODES)-1:0] upd_req_dst,
  output word_t              upd_req_pattern,
  output logic [DICT_IDX_W-1:0] upd_req_idx,
  // update notification received for this node's encoder
  output logic               pmt_wr_valid,
  output logic [$clog2(NODES)-1:0] pmt_wr_src,
  output word_t              pmt_wr_pattern,
  output logic [DICT_IDX_W-1:0] pmt_wr_idx
);

  localparam int unsigned NW = $clog2(NODES);

  typedef enum logic [1:0] {S_HEAD, S_DATA, S_DEC, S_OUT} state_e;
  state_e state;

  logic             q_pop, q_empty, q_full;
  flit_t            q_out;

  head_t            head_q;
  logic [3:0]       didx;
  logic [BUF_W-1:0] stream_q;

  logic             dec_start, dec_busy, dec_done, dec_err;
  block_t           dec_blk, post_blk;
  logic             ddec_start, ddec_busy, ddec_done, ddec_err;
  block_t           ddec_blk, sel_blk;
  logic             uq_push, uq_empty, uq_full;
  flit_t            uq_in, uq_out;
  logic             d_upd_valid;
  logic [NW-1:0]    d_upd_dst;
  word_t            d_upd_pattern;
  logic [DICT_IDX_W-1:0] d_upd_idx;
  logic [NW-1:0]    head_src;
  logic [BUF_W-1:0] stream_in;

  flit_fifo #(.DEPTH(QDEPTH)) u_ejq (
    .clk, .rst_n,
    .push    (ej_valid),
    .wr_flit (ej_flit),
    .pop     (q_pop),
    .rd_flit (q_out),
    .empty   (q_empty),
    .full    (q_full)
  );

  assign q_pop     = !q_empty && (state == S_HEAD || state == S_DATA);
  assign ej_credit = q_pop;
  assign stream_in  = stream_q | (BUF_W'(q_out.data) << (didx * FLIT_W));
  assign head_src   = NW'(32'(head_q.src_y) * MESH_X + 32'(head_q.src_x));
  assign dec_start  = (state == S_DATA) && q_pop && q_out.tail && !head_q.upd && !head_q.dict;
  assign ddec_start = (state == S_DATA) && q_pop && q_out.tail && !head_q.upd &&  head_q.dict;

  // update notification for the local encoder
  assign pmt_wr_valid   = (state == S_DATA) && q_pop && head_q.upd;
  assign pmt_wr_src     = head_src;
  assign pmt_wr_pattern = q_out.data[WORD_W-1:0];
  assign pmt_wr_idx     = q_out.data[WORD_W +: DICT_IDX_W];

  dict_decoder #(.NODES(NODES)) u_ddec (
    .clk, .rst_n,
    .start       (ddec_start),
    .stream      (stream_in),
    .nbits       (head_q.nbits),
    .src         (head_src),
    .busy        (ddec_busy),
    .done        (ddec_done),
    .err         (ddec_err),
    .blk         (ddec_blk),
    .upd_valid   (d_upd_valid),
    .upd_ready   (!uq_full),
    .upd_dst     (d_upd_dst),
    .upd_pattern (d_upd_pattern),
    .upd_idx     (d_upd_idx)
  );

  // queue of update notifications waiting for the sending NI
  assign uq_push = d_upd_valid && !uq_full;
  always_comb begin
    uq_in      = '0;
    uq_in.data = FLIT_W'({d_upd_dst, d_upd_idx, d_upd_pattern});
  end

  flit_fifo #(.DEPTH(4)) u_updq (
    .clk, .rst_n,
    .push    (uq_push),
    .wr_flit (uq_in),
    .pop     (upd_req_valid && upd_req_ready),
    .rd_flit (uq_out),
    .empty   (uq_empty),
    .full    (uq_full)
  );

  assign upd_req_valid   = !uq_empty;
  assign upd_req_pattern = uq_out.data[WORD_W-1:0];
  assign upd_req_idx     = uq_out.data[WORD_W +: DICT_IDX_W];
  assign upd_req_dst     = uq_out.data[WORD_W + DICT_IDX_W +: NW];

  fpc_decoder u_dec (
    .clk, .rst_n,
    .start  (dec_start),
    .stream (stream_in),
    .nbits  (head_q.nbits),
    .busy   (dec_busy),
    .done   (dec_done),
    .err    (dec_err),
    .blk    (dec_blk)
  );

  assign sel_blk = head_q.dict ? ddec_blk : dec_blk;

  baxx_transpose u_post (
    .din  (sel_blk),
    .dout (post_blk)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state        <= S_HEAD;
      head_q       <= '0;
      didx         <= '0;
      stream_q     <= '0;
      out_valid    <= 1'b0;
      out_blk      <= '0;
      out_src_x    <= '0;
      out_src_y    <= '0;
      out_approx   <= 1'b0;
      out_is_float <= 1'b0;
      out_err      <= 1'b0;
    end else begin
      case (state)
        S_HEAD: if (q_pop) begin
          head_q   <= head_t'(q_out.data);
          didx     <= '0;
          stream_q <= '0;
          if (!q_out.head) out_err <= 1'b1;   // stray body flit
          else             state   <= S_DATA;
        end
        S_DATA: if (q_pop) begin
          stream_q <= stream_in;
          didx     <= didx + 4'd1;
          if (q_out.tail) state <= head_q.upd ? S_HEAD : S_DEC;
        end
        S_DEC: if (dec_done || ddec_done) begin
          out_valid    <= 1'b1;
          out_blk      <= head_q.approx ? post_blk : sel_blk;
          out_src_x    <= head_q.src_x;
          out_src_y    <= head_q.src_y;
          out_approx   <= head_q.approx;
          out_is_float <= head_q.is_float;
          out_err      <= (head_q.dict ? ddec_err : dec_err) || (didx != head_q.ndata);
          state        <= S_OUT;
        end
        S_OUT: if (out_ready) begin
          out_valid <= 1'b0;
          out_err   <= 1'b0;
          state     <= S_HEAD;
        end
        default: state <= S_HEAD;
      endcase
    end
  end

  a_eject_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) ej_valid |-> !q_full || q_pop);

endmodule
