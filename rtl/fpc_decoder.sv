// Frequent pattern compression (FPC) decoder for one cache block.
//
// Reads the bit stream written by fpc_encoder: at each step the 3-bit prefix
// at the read position selects the pattern, the payload above it is expanded
// back to one 32-bit word (or, for a zero run, to 1..8 zero words), and the
// read position moves past the code. Prefix 110 is not a valid code.
//
// Timing: the clock edge that samples start captures stream and nbits; each
// later edge expands one code, and the edge that writes the last word raises
// done for one cycle. A block holds 2 (two runs of 8 zero words) to 16 codes,
// so done is high 3 to 17 cycles after start; blk stays valid until the next
// start. err is set with done if the stream held an
// invalid prefix, more than 16 words, or a length other than nbits.
module fpc_decoder
  import baxx_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  logic             start,
  input  logic [BUF_W-1:0] stream,
  input  logic [9:0]       nbits,
  output logic             busy,
  output logic             done,
  output logic             err,
  output block_t           blk
);

  logic [BUF_W+CODE_MAX-1:0] buf_q;
  logic [9:0]                len_q;
  logic [9:0]                pos;
  logic [4:0]                widx;
  logic                      bad;

  // Current code
  logic [2:0]          prefix;
  logic [WORD_W-1:0]   payload;
  word_t               word;
  logic [5:0]          code_len;
  logic [3:0]          nwords;      // words produced by this code
  logic                invalid;

  always_comb begin
    prefix   = buf_q[pos +: 3];
    payload  = buf_q[(pos + 10'd3) +: WORD_W];
    word     = '0;
    nwords   = 4'd1;
    invalid  = 1'b0;
    case (prefix)
      FPC_ZRUN: nwords = 4'(payload[2:0]) + 4'd1;
      FPC_SE4:  word = {{28{payload[3]}}, payload[3:0]};
      FPC_SE8:  word = {{24{payload[7]}}, payload[7:0]};
      FPC_SE16: word = {{16{payload[15]}}, payload[15:0]};
      FPC_HPAD: word = {payload[15:0], 16'h0};
      FPC_2SE8: word = {{8{payload[15]}}, payload[15:8], {8{payload[7]}}, payload[7:0]};
      FPC_UNC:  word = payload;
      default:  invalid = 1'b1;
    endcase
    code_len = 6'd3 + 6'(fpc_payload_w(prefix));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy  <= 1'b0;
      done  <= 1'b0;
      err   <= 1'b0;
      blk   <= '0;
      buf_q <= '0;
      len_q <= '0;
      pos   <= '0;
      widx  <= '0;
      bad   <= 1'b0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy  <= 1'b1;
          buf_q <= {{CODE_MAX{1'b0}}, stream};
          len_q <= nbits;
          pos   <= '0;
          widx  <= '0;
          bad   <= 1'b0;
          err   <= 1'b0;
        end
      end else begin
        logic [5:0] wend;
        wend = 6'(widx) + 6'(nwords);
        for (int i = 0; i < int'(WORDS); i++)
          if (6'(i) >= 6'(widx) && 6'(i) < wend) blk[i] <= word;
        pos <= pos + 10'(code_len);
        if (invalid || wend > 6'(WORDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
          err  <= 1'b1;
        end else if (wend == 6'(WORDS)) begin
          busy <= 1'b0;
          done <= 1'b1;
          err  <= bad || ((pos + 10'(code_len)) != len_q);
        end
        widx <= 5'(wend);
      end
    end
  end

endmodule
