// Five-port mesh router: XY routing, wormhole switching, credit flow control.
//
// Ports 0..4 are local, north (y-1), east (x+1), south (y+1), west (x-1).
// Each input port has a FIFO of BUF_DEPTH flits. A head flit at the front of
// an input FIFO is routed by dimension order: first along x until the column
// matches, then along y, then to the local port. An output port, once granted
// to a head flit, stays with that input until the packet's tail flit has
// passed (wormhole). Each output keeps a credit count of the free slots in
// the downstream buffer: a flit leaves only with a credit, and the downstream
// router returns one credit per flit it pops.
//
// Pipeline, three stages per hop: buffer write (the flit enters the input
// FIFO), route computation and switch allocation on the FIFO front (round
// robin over the inputs per output), and switch traversal into the output
// register that drives the link. A flit with no contention therefore leaves
// the output register two cycles after it was presented at the input.
//
// The document's router also has four virtual channels per port; this router
// has a single channel per port, which is this design's simplification.
//
// Interface per port p: in_valid[p]/in_flit[p] with credit_out[p] (one pulse
// per flit popped); out_valid[p]/out_flit[p] with credit_in[p].
module noc_router
  import baxx_pkg::*;
#(
  parameter int unsigned BUF_DEPTH = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic [COORD_W-1:0]  my_x,
  input  logic [COORD_W-1:0]  my_y,
  input  logic  [NPORTS-1:0]  in_valid,
  input  flit_t [NPORTS-1:0]  in_flit,
  output logic  [NPORTS-1:0]  credit_out,
  output logic  [NPORTS-1:0]  out_valid,
  output flit_t [NPORTS-1:0]  out_flit,
  input  logic  [NPORTS-1:0]  credit_in
);

  localparam int unsigned CW = $clog2(BUF_DEPTH + 1);

  flit_t [NPORTS-1:0]      fifo_flit;
  logic  [NPORTS-1:0]      fifo_empty;
  logic  [NPORTS-1:0]      fifo_full;
  logic  [NPORTS-1:0]      fifo_pop;

  logic  [NPORTS-1:0][2:0] in_route_q;     // output held by the packet at each input
  logic  [NPORTS-1:0][2:0] in_route;       // output wanted by the front flit
  logic  [NPORTS-1:0]      out_busy;       // output owned by a packet in flight
  logic  [NPORTS-1:0][2:0] out_owner;
  logic  [NPORTS-1:0][CW-1:0] credits;
  logic  [NPORTS-1:0][2:0] rr_ptr;         // round-robin priority per output
  logic  [NPORTS-1:0][2:0] grant_in;       // input granted to each output
  logic  [NPORTS-1:0]      grant_vld;

  for (genvar p = 0; p < int'(NPORTS); p++) begin : g_in
    flit_fifo #(.DEPTH(BUF_DEPTH)) u_buf (
      .clk, .rst_n,
      .push    (in_valid[p]),
      .wr_flit (in_flit[p]),
      .pop     (fifo_pop[p]),
      .rd_flit (fifo_flit[p]),
      .empty   (fifo_empty[p]),
      .full    (fifo_full[p])
    );
  end

  // Route computation (XY)
  function automatic logic [2:0] xy_route(head_t h, logic [COORD_W-1:0] x, logic [COORD_W-1:0] y);
    if (h.dst_x > x)      return 3'(P_EAST);
    else if (h.dst_x < x) return 3'(P_WEST);
    else if (h.dst_y > y) return 3'(P_SOUTH);
    else if (h.dst_y < y) return 3'(P_NORTH);
    else                  return 3'(P_LOCAL);
  endfunction

  always_comb begin
    for (int p = 0; p < int'(NPORTS); p++)
      in_route[p] = fifo_flit[p].head ? xy_route(head_t'(fifo_flit[p].data), my_x, my_y)
                                      : in_route_q[p];
  end

  // Switch allocation: per output, round robin over requesting inputs
  always_comb begin
    fifo_pop  = '0;
    grant_in  = '0;
    grant_vld = '0;
    for (int o = 0; o < int'(NPORTS); o++) begin
      for (int k = 0; k < int'(NPORTS); k++) begin
        int i;
        i = (int'(rr_ptr[o]) + k) % int'(NPORTS);
        if (!grant_vld[o] && !fifo_empty[i] && in_route[i] == 3'(o) && credits[o] != '0 &&
            (out_busy[o] ? (out_owner[o] == 3'(i) && !fifo_flit[i].head) : fifo_flit[i].head)) begin
          grant_vld[o] = 1'b1;
          grant_in[o]  = 3'(i);
          fifo_pop[i]  = 1'b1;
        end
      end
    end
  end

  assign credit_out = fifo_pop;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_route_q <= '0;
      out_busy   <= '0;
      out_owner  <= '0;
      rr_ptr     <= '0;
      out_valid  <= '0;
      out_flit   <= '0;
      for (int o = 0; o < int'(NPORTS); o++) credits[o] <= CW'(BUF_DEPTH);
    end else begin
      for (int p = 0; p < int'(NPORTS); p++)
        if (!fifo_empty[p] && fifo_flit[p].head) in_route_q[p] <= in_route[p];
      for (int o = 0; o < int'(NPORTS); o++) begin
        out_valid[o] <= grant_vld[o];
        credits[o]   <= credits[o] - CW'(grant_vld[o]) + CW'(credit_in[o]);
        if (grant_vld[o]) begin
          out_flit[o] <= fifo_flit[grant_in[o]];
          rr_ptr[o]   <= (grant_in[o] == 3'(NPORTS - 1)) ? '0 : grant_in[o] + 3'd1;
          if (fifo_flit[grant_in[o]].tail) begin
            out_busy[o] <= 1'b0;
          end else begin
            out_busy[o]  <= 1'b1;
            out_owner[o] <= grant_in[o];
          end
        end
      end
    end
  end

  for (genvar o = 0; o < int'(NPORTS); o++) begin : g_chk
    a_credit_range: assert property (@(posedge clk) disable iff (!rst_n) credits[o] <= CW'(BUF_DEPTH));
  end

endmodule
