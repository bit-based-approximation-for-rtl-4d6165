// Shared types and constants of the bit-based approximation (BAXX) network.
//
// A cache block is 16 words of 32 bits (64 bytes). Flits are 64 bits wide.
// The frequent-pattern codes follow the FPC table: a 3-bit prefix followed by
// a payload whose width depends on the pattern. Prefix 110 is not used.
// The head-flit layout and mesh coordinate widths are this design's choice.
// The dictionary PMTs have 8 entries; the 3-bit index and 4-bit frequency
// counters follow from that and from this design's choice.
package baxx_pkg;

  localparam int unsigned WORD_W   = 32;
  localparam int unsigned WORDS    = 16;                 // words per cache block
  localparam int unsigned BLOCK_W  = WORD_W * WORDS;     // 512
  localparam int unsigned FLIT_W   = 64;
  localparam int unsigned GROUP_W  = 2;                  // bits taken from each word per transposed row
  localparam int unsigned ROWS     = WORD_W / GROUP_W;   // 16 transposed rows
  localparam int unsigned CODE_MAX = 35;                 // longest FPC code: 3 + 32
  localparam int unsigned STREAM_W = WORDS * CODE_MAX;   // worst-case compressed stream: 560 bits
  localparam int unsigned MAX_DFLITS = (STREAM_W + FLIT_W - 1) / FLIT_W;   // 9
  localparam int unsigned BUF_W    = MAX_DFLITS * FLIT_W;                  // 576
  localparam int unsigned COORD_W  = 4;                  // mesh coordinate width (meshes up to 16x16)

  typedef logic [WORD_W-1:0]           word_t;
  typedef logic [WORDS-1:0][WORD_W-1:0] block_t;        // word i in block[i]

  // Frequent-pattern prefixes (encoded index)
  typedef enum logic [2:0] {
    FPC_ZRUN  = 3'b000,   // run of 1..8 zero words, 3-bit payload = run-1
    FPC_SE4   = 3'b001,   // 4-bit sign-extended
    FPC_SE8   = 3'b010,   // one byte sign-extended
    FPC_SE16  = 3'b011,   // halfword sign-extended
    FPC_HPAD  = 3'b100,   // halfword padded with a zero halfword (upper half kept)
    FPC_2SE8  = 3'b101,   // two halfwords, each a byte sign-extended
    FPC_UNC   = 3'b111    // uncompressed word
  } fpc_prefix_e;

  // Payload width of each prefix
  function automatic int unsigned fpc_payload_w(logic [2:0] p);
    case (p)
      FPC_ZRUN: return 3;
      FPC_SE4:  return 4;
      FPC_SE8:  return 8;
      FPC_SE16, FPC_HPAD, FPC_2SE8: return 16;
      default:  return 32;
    endcase
  endfunction

  // Flit on a link. head marks the first flit of a packet, tail the last.
  typedef struct packed {
    logic              head;
    logic              tail;
    logic [FLIT_W-1:0] data;
  } flit_t;

  // Layout of the data field of a head flit
  typedef struct packed {
    logic [FLIT_W-35:0] rsvd;      // 30 bits, zero
    logic [9:0]         nbits;     // length of the compressed stream in bits
    logic [3:0]         ndata;     // number of data flits that follow
    logic               upd;       // dictionary update notification, not a block
    logic               dict;      // stream is dictionary-coded, not FPC
    logic               is_float;  // data type of the block
    logic               approx;    // block was transposed and approximated
    logic [COORD_W-1:0] src_y;
    logic [COORD_W-1:0] src_x;
    logic [COORD_W-1:0] dst_y;
    logic [COORD_W-1:0] dst_x;
  } head_t;

  // Dictionary compression (DICT-BAXX)
  localparam int unsigned DICT_ENTRIES = 8;              // PMT entries
  localparam int unsigned DICT_IDX_W   = 3;              // encoded index width
  localparam int unsigned DICT_FREQ_W  = 4;              // frequency counter width

  // Router ports
  localparam int unsigned NPORTS = 5;
  typedef enum logic [2:0] {
    P_LOCAL = 3'd0,
    P_NORTH = 3'd1,   // towards y-1
    P_EAST  = 3'd2,   // towards x+1
    P_SOUTH = 3'd3,   // towards y+1
    P_WEST  = 3'd4    // towards x-1
  } port_e;

  // Error threshold (percent, 1..100) to the right shift that estimates the
  // allowed error range: the largest S with (pct << S) <= 100, i.e.
  // S = floor(log2(100/pct)). 25 % gives 2 (value/4), 10 % gives 3 (value/8),
  // 20 % gives 2, 5 % gives 4. A threshold of 0 disables approximation.
  function automatic logic [2:0] thresh_shift(logic [6:0] pct);
    logic [2:0] s;
    s = '0;
    for (int i = 1; i <= 6; i++)
      if ((32'(pct) << i) <= 32'd100) s = 3'(i);
    return s;
  endfunction

  // Number of significant bits of v (position of the leading one plus one)
  function automatic logic [5:0] bit_length(logic [WORD_W-1:0] v);
    logic [5:0] n;
    n = '0;
    for (int i = 0; i < int'(WORD_W); i++)
      if (v[i]) n = 6'(i + 1);
    return n;
  endfunction

endpackage
