// Bit-based approximate network-on-chip: a MESH_X x MESH_Y mesh (8 x 8 by
// default) of routers, each with a network interface that approximates,
// compresses and packetizes cache blocks on the way in and decompresses and
// restores them on the way out.
//
// Node n sits at x = n % MESH_X, y = n / MESH_X. Neighbouring routers are
// joined by a link in each direction (flit, valid, and a credit wire going
// back). Router ports at the mesh edge are left unconnected: XY routing never
// selects them for a destination inside the mesh.
//
// Per node, the tile side is brought out as ports, since the cores and caches
// that drive them are outside this design:
//   req_*   a cache block to send: destination, approximable flag, data type
//   out_*   a received block: source, flags, decoder error
// err_pct is the error threshold in percent shared by all nodes (0 = exact).
// comp_dict selects, for blocks accepted while it is set, dictionary
// compression (DICT-BAXX) instead of frequent pattern compression (FP-BAXX).
// In each node the receiving NI hands the sending NI the dictionary update
// notifications its decoder produces, and the updates it receives for the
// node's own encoder.
// tx_rows / tx_nbits give, per node, how many transposed rows the last sent
// block had zeroed and how long its compressed stream was.
module baxx_noc_top
  import baxx_pkg::*;
#(
  parameter int unsigned MESH_X    = 8,
  parameter int unsigned MESH_Y    = 8,
  parameter int unsigned BUF_DEPTH = 4,
  localparam int unsigned N        = MESH_X * MESH_Y
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic [6:0]                 err_pct,
  input  logic                       comp_dict,
  // tile -> network
  input  logic   [N-1:0]              req_valid,
  output logic   [N-1:0]              req_ready,
  input  block_t [N-1:0]              req_blk,
  input  logic   [N-1:0][COORD_W-1:0] req_dst_x,
  input  logic   [N-1:0][COORD_W-1:0] req_dst_y,
  input  logic   [N-1:0]              req_approximable,
  input  logic   [N-1:0]              req_is_float,
  // network -> tile
  output logic   [N-1:0]              out_valid,
  input  logic   [N-1:0]              out_ready,
  output block_t [N-1:0]              out_blk,
  output logic   [N-1:0][COORD_W-1:0] out_src_x,
  output logic   [N-1:0][COORD_W-1:0] out_src_y,
  output logic   [N-1:0]              out_approx,
  output logic   [N-1:0]              out_is_float,
  output logic   [N-1:0]              out_err,
  // statistics
  output logic   [N-1:0][4:0]         tx_rows,
  output logic   [N-1:0][9:0]         tx_nbits
);

  // Router-side signals, per node and port
  logic  [N-1:0][NPORTS-1:0] r_in_valid, r_credit_out, r_out_valid, r_credit_in;
  flit_t [N-1:0][NPORTS-1:0] r_in_flit, r_out_flit;

  localparam int unsigned NW = $clog2(N);

  for (genvar n = 0; n < int'(N); n++) begin : g_node
    localparam int unsigned X = n % MESH_X;
    localparam int unsigned Y = n / MESH_X;

    // dictionary protocol between the node's receiving and sending NI
    logic                  upd_valid, upd_ready, pmt_valid;
    logic [NW-1:0]         upd_dst, pmt_src;
    word_t                 upd_pattern, pmt_pattern;
    logic [DICT_IDX_W-1:0] upd_idx, pmt_idx;

    noc_router #(.BUF_DEPTH(BUF_DEPTH)) u_router (
      .clk, .rst_n,
      .my_x       (COORD_W'(X)),
      .my_y       (COORD_W'(Y)),
      .in_valid   (r_in_valid[n]),
      .in_flit    (r_in_flit[n]),
      .credit_out (r_credit_out[n]),
      .out_valid  (r_out_valid[n]),
      .out_flit   (r_out_flit[n]),
      .credit_in  (r_credit_in[n])
    );

    baxx_ni_tx #(.BUF_DEPTH(BUF_DEPTH), .MESH_X(MESH_X), .NODES(N)) u_ni_tx (
      .clk, .rst_n,
      .my_x             (COORD_W'(X)),
      .my_y             (COORD_W'(Y)),
      .err_pct          (err_pct),
      .comp_dict        (comp_dict),
      .upd_req_valid    (upd_valid),
      .upd_req_ready    (upd_ready),
      .upd_req_dst      (upd_dst),
      .upd_req_pattern  (upd_pattern),
      .upd_req_idx      (upd_idx),
      .pmt_wr_valid     (pmt_valid),
      .pmt_wr_src       (pmt_src),
      .pmt_wr_pattern   (pmt_pattern),
      .pmt_wr_idx       (pmt_idx),
      .req_valid        (req_valid[n]),
      .req_ready        (req_ready[n]),
      .req_blk          (req_blk[n]),
      .req_dst_x        (req_dst_x[n]),
      .req_dst_y        (req_dst_y[n]),
      .req_approximable (req_approximable[n]),
      .req_is_float     (req_is_float[n]),
      .inj_valid        (r_in_valid[n][P_LOCAL]),
      .inj_flit         (r_in_flit[n][P_LOCAL]),
      .inj_credit       (r_credit_out[n][P_LOCAL]),
      .last_rows        (tx_rows[n]),
      .last_nbits       (tx_nbits[n])
    );

    baxx_ni_rx #(.QDEPTH(BUF_DEPTH), .MESH_X(MESH_X), .NODES(N)) u_ni_rx (
      .clk, .rst_n,
      .upd_req_valid   (upd_valid),
      .upd_req_ready   (upd_ready),
      .upd_req_dst     (upd_dst),
      .upd_req_pattern (upd_pattern),
      .upd_req_idx     (upd_idx),
      .pmt_wr_valid    (pmt_valid),
      .pmt_wr_src      (pmt_src),
      .pmt_wr_pattern  (pmt_pattern),
      .pmt_wr_idx      (pmt_idx),
      .ej_valid     (r_out_valid[n][P_LOCAL]),
      .ej_flit      (r_out_flit[n][P_LOCAL]),
      .ej_credit    (r_credit_in[n][P_LOCAL]),
      .out_valid    (out_valid[n]),
      .out_ready    (out_ready[n]),
      .out_blk      (out_blk[n]),
      .out_src_x    (out_src_x[n]),
      .out_src_y    (out_src_y[n]),
      .out_approx   (out_approx[n]),
      .out_is_float (out_is_float[n]),
      .out_err      (out_err[n])
    );

    // East/west links
    if (X + 1 < MESH_X) begin : g_east
      assign r_in_valid[n+1][P_WEST]  = r_out_valid[n][P_EAST];
      assign r_in_flit[n+1][P_WEST]   = r_out_flit[n][P_EAST];
      assign r_credit_in[n][P_EAST]   = r_credit_out[n+1][P_WEST];
      assign r_in_valid[n][P_EAST]    = r_out_valid[n+1][P_WEST];
      assign r_in_flit[n][P_EAST]     = r_out_flit[n+1][P_WEST];
      assign r_credit_in[n+1][P_WEST] = r_credit_out[n][P_EAST];
    end else begin : g_east_edge
      assign r_in_valid[n][P_EAST]  = 1'b0;
      assign r_in_flit[n][P_EAST]   = '0;
      assign r_credit_in[n][P_EAST] = 1'b0;
    end
    if (X == 0) begin : g_west_edge
      assign r_in_valid[n][P_WEST]  = 1'b0;
      assign r_in_flit[n][P_WEST]   = '0;
      assign r_credit_in[n][P_WEST] = 1'b0;
    end

    // North/south links (south = y+1)
    if (Y + 1 < MESH_Y) begin : g_south
      assign r_in_valid[n+MESH_X][P_NORTH]  = r_out_valid[n][P_SOUTH];
      assign r_in_flit[n+MESH_X][P_NORTH]   = r_out_flit[n][P_SOUTH];
      assign r_credit_in[n][P_SOUTH]        = r_credit_out[n+MESH_X][P_NORTH];
      assign r_in_valid[n][P_SOUTH]         = r_out_valid[n+MESH_X][P_NORTH];
      assign r_in_flit[n][P_SOUTH]          = r_out_flit[n+MESH_X][P_NORTH];
      assign r_credit_in[n+MESH_X][P_NORTH] = r_credit_out[n][P_SOUTH];
    end else begin : g_south_edge
      assign r_in_valid[n][P_SOUTH]  = 1'b0;
      assign r_in_flit[n][P_SOUTH]   = '0;
      assign r_credit_in[n][P_SOUTH] = 1'b0;
    end
    if (Y == 0) begin : g_north_edge
      assign r_in_valid[n][P_NORTH]  = 1'b0;
      assign r_in_flit[n][P_NORTH]   = '0;
      assign r_credit_in[n][P_NORTH] = 1'b0;
    end
  end

endmodule
