// Frequent pattern compression (FPC) encoder for one cache block.
//
// Each 32-bit word is replaced by a 3-bit prefix and a payload of 3, 4, 8,
// 16 or 32 bits, following the FPC pattern table:
//   000 zero run (payload = run length - 1, runs of 1..8 zero words)
//   001 4-bit sign-extended        010 byte sign-extended
//   011 halfword sign-extended     100 halfword padded with a zero halfword
//   101 two halfwords, each a sign-extended byte
//   111 uncompressed word
// The shortest matching pattern is chosen. Codes are packed LSB first into a
// bit stream: a code's prefix sits below its payload, and each code starts
// right above the previous one.
//
// Timing: the clock edge that samples start captures blk; the next 16 edges
// encode one word each, and the last of them raises done (for one cycle), so
// done is high 17 cycles after start. stream and nbits stay valid from then
// until the next start. busy is high in between; start is ignored while busy.
// The word-per-cycle schedule and the stream layout are this design's choice.
module fpc_encoder
  import baxx_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  block_t           blk,
  output logic             busy,
  output logic             done,
  output logic [BUF_W-1:0] stream,
  output logic [9:0]       nbits
);

  // Code of one non-zero word: {payload, prefix} in the low bits, and length.
  function automatic void encode_word(input word_t w,
                                      output logic [CODE_MAX-1:0] code,
                                      output logic [5:0] len);
    code = '0;
    if (w == {{28{w[3]}}, w[3:0]}) begin
      code[6:0] = {w[3:0], FPC_SE4};            len = 6'd7;
    end else if (w == {{24{w[7]}}, w[7:0]}) begin
      code[10:0] = {w[7:0], FPC_SE8};           len = 6'd11;
    end else if (w == {{16{w[15]}}, w[15:0]}) begin
      code[18:0] = {w[15:0], FPC_SE16};         len = 6'd19;
    end else if (w[15:0] == 16'h0) begin
      code[18:0] = {w[31:16], FPC_HPAD};        len = 6'd19;
    end else if (w[31:16] == {{8{w[23]}}, w[23:16]} &&
                 w[15:0]  == {{8{w[7]}},  w[7:0]}) begin
      code[18:0] = {w[23:16], w[7:0], FPC_2SE8}; len = 6'd19;
    end else begin
      code = {w, FPC_UNC};                      len = 6'd35;
    end
  endfunction

  block_t      blk_q;
  logic [4:0]  idx;        // word being encoded
  logic [3:0]  run;        // zero words waiting to be emitted
  logic [9:0]  pos;        // next free stream bit

  // Combinational: what this cycle appends (a pending zero run and/or a word)
  logic [CODE_MAX+5:0] app_code;
  logic [6:0]          app_len;
  logic [3:0]          run_nx;

  always_comb begin
    logic [CODE_MAX-1:0] wcode;
    logic [5:0]          wlen;
    word_t               w;
    logic                last;
    w        = blk_q[idx[3:0]];
    last     = (idx == 5'(WORDS - 1));
    app_code = '0;
    app_len  = '0;
    run_nx   = run;
    encode_word(w, wcode, wlen);
    if (w == '0) begin
      if (run == 4'd7 || last) begin
        app_code[5:0] = {3'(run), FPC_ZRUN};   // run + this word = run+1 words
        app_len       = 7'd6;
        run_nx        = '0;
      end else begin
        run_nx = run + 4'd1;
      end
    end else begin
      if (run != '0) begin
        app_code = {wcode, 3'(run - 4'd1), FPC_ZRUN};
        app_len  = 7'd6 + 7'(wlen);
      end else begin
        app_code = {6'b0, wcode};
        app_len  = 7'(wlen);
      end
      run_nx = '0;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy   <= 1'b0;
      done   <= 1'b0;
      idx    <= '0;
      run    <= '0;
      pos    <= '0;
      stream <= '0;
      nbits  <= '0;
      blk_q  <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy   <= 1'b1;
          blk_q  <= blk;
          idx    <= '0;
          run    <= '0;
          pos    <= '0;
          stream <= '0;
        end
      end else begin
        stream <= stream | (BUF_W'(app_code) << pos);
        pos    <= pos + 10'(app_len);
        run    <= run_nx;
        idx    <= idx + 5'd1;
        if (idx == 5'(WORDS - 1)) begin
          busy  <= 1'b0;
          done  <= 1'b1;
          nbits <= pos + 10'(app_len);
        end
      end
    end
  end

endmodule
