// Testbench for noc_router, placed at (1,1) of a 3 x 3 mesh. Every input port
// sends random packets (2..5 flits) to random destinations, obeying the
// router's credits. Sinks on the outputs take flits at random rates and
// return credits. Checks: each packet leaves by its XY output port, its flits
// stay together and in order (wormhole), every packet arrives, no output
// ever sends without a credit, and an unloaded head flit crosses the router
// in 2 cycles. Output contention and credit stalls must both occur.
module tb_noc_router;
  import baxx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic  [NPORTS-1:0] in_valid, credit_out, out_valid, credit_in;
  flit_t [NPORTS-1:0] in_flit, out_flit;
  int checks = 0, failures = 0;
  int sent_pk = 0, recv_pk = 0, contention = 0, stalls = 0;

  noc_router dut (.clk, .rst_n, .my_x(4'd1), .my_y(4'd1), .in_valid, .in_flit, .credit_out,
                  .out_valid, .out_flit, .credit_in);
  always #5 clk = ~clk;

  function automatic int xy_port(int dx, int dy);
    if (dx > 1) return P_EAST;
    if (dx < 1) return P_WEST;
    if (dy > 1) return P_SOUTH;
    if (dy < 1) return P_NORTH;
    return P_LOCAL;
  endfunction

  // source state
  int src_cred[NPORTS], src_left[NPORTS], src_len[NPORTS], src_seq[NPORTS], src_id[NPORTS];
  int src_dx[NPORTS], src_dy[NPORTS];
  // sink state
  int sink_q[NPORTS], sink_id[NPORTS], sink_seq[NPORTS], sink_len[NPORTS];
  bit sink_open[NPORTS];
  int pk_port[int];
  int pk_len[int];
  int next_id = 1;
  bit traffic_on = 0;

  function automatic flit_t make_flit(int p);
    flit_t f;
    head_t h;
    f = '0;
    if (src_seq[p] == 0) begin
      h = '0; h.dst_x = 4'(src_dx[p]); h.dst_y = 4'(src_dy[p]);
      h.rsvd = 30'(src_id[p]);
      f.data = FLIT_W'(h);
      f.head = 1;
    end else begin
      f.data = {32'(src_id[p]), 32'(src_seq[p])};
    end
    f.tail = (src_seq[p] == src_len[p] - 1);
    return f;
  endfunction

  always @(negedge clk) begin
    in_valid  <= '0;
    credit_in <= '0;
    if (rst_n) begin
      // contention / stall statistics
      for (int o = 0; o < NPORTS; o++) begin
        int req = 0;
        for (int i = 0; i < NPORTS; i++)
          if (!dut.fifo_empty[i] && dut.in_route[i] == 3'(o)) req++;
        if (req > 1) contention++;
        if (req > 0 && dut.credits[o] == 0) stalls++;
      end
      for (int p = 0; p < NPORTS; p++) begin
        // sources
        if (src_left[p] == 0 && traffic_on && ($urandom % 3 == 0)) begin
          src_len[p] = 2 + $urandom % 4; src_left[p] = src_len[p]; src_seq[p] = 0;
          src_id[p] = next_id++;
          do begin src_dx[p] = $urandom % 3; src_dy[p] = $urandom % 3; end
          while (xy_port(src_dx[p], src_dy[p]) == p && p != P_LOCAL);   // no U-turns
          if (p == P_LOCAL && src_dx[p] == 1 && src_dy[p] == 1) src_dx[p] = 0;
          pk_port[src_id[p]] = xy_port(src_dx[p], src_dy[p]);
          pk_len[src_id[p]] = src_len[p];
          sent_pk++;
        end
        if (src_left[p] > 0 && src_cred[p] > 0 && ($urandom % 4 != 0)) begin
          in_valid[p] <= 1'b1;
          in_flit[p]  <= make_flit(p);
          src_cred[p]--; src_seq[p]++; src_left[p]--;
        end
        // sinks: drain at a random rate (slow on east to force credit stalls)
        if (sink_q[p] > 0 && ($urandom % ((p == P_EAST) ? 6 : 2) == 0)) begin
          sink_q[p]--; credit_in[p] <= 1'b1;
        end
      end
    end
  end

  always @(posedge clk) if (rst_n) begin
    for (int p = 0; p < NPORTS; p++) if (credit_out[p]) src_cred[p]++;
    for (int o = 0; o < NPORTS; o++) if (out_valid[o]) begin
      automatic flit_t f = out_flit[o];
      sink_q[o]++;
      checks++;
      if (sink_q[o] > 4) begin failures++; $display("FAIL overflow at output %0d", o); end
      if (f.head) begin
        automatic head_t h = head_t'(f.data);
        automatic int id = int'(h.rsvd);
        checks += 2;
        if (sink_open[o]) begin failures++; $display("FAIL interleaved packet at output %0d", o); end
        if (!pk_port.exists(id) || pk_port[id] != o) begin failures++; $display("FAIL packet %0d at wrong port %0d", id, o); end
        sink_open[o] = 1; sink_id[o] = id; sink_seq[o] = 1;
        sink_len[o] = pk_len.exists(id) ? pk_len[id] : 0;
      end else begin
        checks++;
        if (!sink_open[o] || f.data != {32'(sink_id[o]), 32'(sink_seq[o])}) begin
          failures++; $display("FAIL body flit out of order at output %0d", o);
        end
        sink_seq[o]++;
      end
      if (f.tail) begin
        checks++;
        if (sink_seq[o] != sink_len[o]) begin failures++; $display("FAIL packet length at output %0d", o); end
        sink_open[o] = 0; recv_pk++;
      end
    end
  end

  initial begin
    int lat;
    in_valid = '0; in_flit = '0; credit_in = '0;
    for (int p = 0; p < NPORTS; p++) begin src_cred[p] = 4; src_left[p] = 0; sink_q[p] = 0; sink_open[p] = 0; end
    repeat (3) @(negedge clk);
    rst_n = 1;
    // unloaded latency: one packet west -> east
    @(negedge clk);
    src_len[P_WEST] = 2; src_left[P_WEST] = 2; src_seq[P_WEST] = 0; src_id[P_WEST] = next_id++;
    src_dx[P_WEST] = 2; src_dy[P_WEST] = 1; pk_port[src_id[P_WEST]] = P_EAST; pk_len[src_id[P_WEST]] = 2; sent_pk++;
    @(posedge clk); lat = 0;
    while (!out_valid[P_EAST] && lat < 20) begin @(posedge clk); lat++; end
    checks++;
    if (lat != 2) begin failures++; $display("FAIL unloaded latency %0d", lat); end
    repeat (5) @(negedge clk);
    traffic_on = 1;
    repeat (3000) @(negedge clk);
    traffic_on = 0;
    repeat (300) @(negedge clk);
    checks += 3;
    if (recv_pk != sent_pk) begin failures++; $display("FAIL sent %0d received %0d", sent_pk, recv_pk); end
    if (contention == 0) begin failures++; $display("FAIL no output contention"); end
    if (stalls == 0) begin failures++; $display("FAIL no credit stall"); end
    $display("packets=%0d contention=%0d stalls=%0d", recv_pk, contention, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
