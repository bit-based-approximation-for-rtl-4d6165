// End-to-end testbench for baxx_noc_top at its default size (8 x 8 mesh).
// Every node sends cache blocks to random destinations in three FP-BAXX
// phases with different error thresholds (10 %, then 20 %, then 0 %, i.e.
// exact), then in a DICT-BAXX phase at 10 % in which each node sends blocks
// drawn from a few recurring blocks to one fixed destination, so that the
// decoders learn patterns and publish them. Threshold and compressor are
// changed while the network is idle. Blocks are integer or
// float, approximable or not. Each received block is checked against a
// scoreboard kept per source/destination pair (XY routing keeps their order):
// under FP-BAXX it must equal the sent block with the low 2*rows bits of every
// word cleared, rows being the reference model's count; under DICT-BAXX it
// may differ from the sent block only in those low 2*rows bits. Source and
// flags must match.
// Counted mechanisms, each of which must occur: blocks approximated, blocks
// bypassed (not approximable), float blocks with approximated mantissas,
// exact blocks at the 0 % threshold, packets shorter than the 8 flits of an
// uncompressed block, packets longer than that (incompressible data), NI
// back-pressure (req_ready low), router credit stalls, tile back-pressure,
// dictionary update notifications delivered to encoders, rows sent as a
// dictionary index, and approximable rows replaced by a different pattern.
module tb_baxx_noc_top;
  import tb_ref_pkg::*;
  import baxx_pkg::*;

  localparam int MX = 8, MY = 8, N = MX * MY;
  localparam int PER_PHASE = 4;

  logic clk = 0, rst_n = 0;
  logic [6:0] err_pct;
  logic comp_dict;
  logic   [N-1:0]         req_valid, req_ready, req_approximable, req_is_float;
  block_t [N-1:0]         req_blk;
  logic   [N-1:0][3:0]    req_dst_x, req_dst_y;
  logic   [N-1:0]         out_valid, out_ready, out_approx, out_is_float, out_err;
  block_t [N-1:0]         out_blk;
  logic   [N-1:0][3:0]    out_src_x, out_src_y;
  logic   [N-1:0][4:0]    tx_rows;
  logic   [N-1:0][9:0]    tx_nbits;

  baxx_noc_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sent = 0, n_recv = 0;
  int c_approx = 0, c_bypass = 0, c_float_apx = 0, c_exact = 0, c_short = 0, c_long = 0;
  int c_ni_bp = 0, c_credit_stall = 0, c_tile_bp = 0;
  int left[N];
  blk_t expq[N][N][$];       // expected blocks, [src][dst]
  bit   apxq[N][N][$];
  bit   fltq[N][N][$];
  int   rowq[N][N][$];
  bit   dctq[N][N][$];
  int c_upd = 0, c_dhits = 0, c_dapx = 0;
  blk_t base[4];

  // router credit stalls: an output with a flit waiting and no credit
  logic [N-1:0] stall_now;
  for (genvar n = 0; n < N; n++) begin : g_mon
    always_comb begin
      stall_now[n] = 1'b0;
      for (int o = 0; o < NPORTS; o++)
        for (int i = 0; i < NPORTS; i++)
          if (!dut.g_node[n].u_router.fifo_empty[i] && dut.g_node[n].u_router.in_route[i] == 3'(o) &&
              dut.g_node[n].u_router.credits[o] == '0) stall_now[n] = 1'b1;
    end
  end

  // request generation and scoreboard entry
  always @(negedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (req_valid[n] && !req_ready[n]) c_ni_bp++;
      if (!req_valid[n] && left[n] > 0 && ($urandom % 4 == 0)) begin
        automatic int mode = comp_dict ? 1 : $urandom % 4;
        automatic int d;
        automatic blk_t b = rand_block(mode);
        if (comp_dict) begin
          b = base[$urandom % 4];
          if ($urandom % 2) b[$urandom % 16] = $urandom;
        end
        req_valid[n]        <= 1'b1;
        req_blk[n]          <= b;
        req_is_float[n]     <= (mode == 2);
        req_approximable[n] <= ($urandom % 4 != 0);      // 75 % approximable
        d = comp_dict ? (n + 9) % N : $urandom % N;
        if (d == n) d = (d + 1) % N;
        req_dst_x[n] <= 4'(d % MX);
        req_dst_y[n] <= 4'(d / MX);
      end
      out_ready[n] <= ($urandom % 4 != 0);
      if (out_valid[n] && !out_ready[n]) c_tile_bp++;
    end
    if (stall_now != '0) c_credit_stall++;
  end

  always @(posedge clk) if (rst_n) begin
    for (int n = 0; n < N; n++) begin
      if (req_valid[n] && req_ready[n]) begin
        automatic int d = int'(req_dst_y[n]) * MX + int'(req_dst_x[n]);
        automatic int rows = ref_rows(req_blk[n], req_approximable[n], req_is_float[n], int'(err_pct));
        expq[n][d].push_back(req_approximable[n] ? ref_approx_words(req_blk[n], rows) : req_blk[n]);
        apxq[n][d].push_back(req_approximable[n]);
        fltq[n][d].push_back(req_is_float[n]);
        rowq[n][d].push_back(rows);
        dctq[n][d].push_back(comp_dict);
        if (rows > 0) c_approx++;
        if (rows > 0 && req_is_float[n]) c_float_apx++;
        if (!req_approximable[n]) c_bypass++;
        if (req_approximable[n] && err_pct == 0) c_exact++;
        req_valid[n] <= 1'b0;
        left[n]--;
        n_sent++;
      end
      if (out_valid[n] && out_ready[n]) begin
        automatic int s = int'(out_src_y[n]) * MX + int'(out_src_x[n]);
        checks++;
        n_recv++;
        if (expq[s][n].size() == 0) begin
          failures++; $display("FAIL unexpected block at %0d from %0d", n, s);
        end else begin
          automatic blk_t e = expq[s][n].pop_front();
          automatic bit a = apxq[s][n].pop_front();
          automatic bit f = fltq[s][n].pop_front();
          automatic int r = rowq[s][n].pop_front();
          automatic bit dc = dctq[s][n].pop_front();
          automatic bit ok = 1;
          // DICT-BAXX: only the approximable low bits may differ
          if (dc) for (int w = 0; w < 16; w++)
            if (((out_blk[n][w] ^ e[w]) >> (2 * r)) != 0) ok = 0;
          if (!dc && out_blk[n] != e) ok = 0;
          if (!ok || out_approx[n] != a || out_is_float[n] != f || out_err[n]) begin
            failures++; $display("FAIL block %0d -> %0d", s, n);
          end
        end
      end
    end
  end

  // compressed packet sizes, sampled when each NI finishes encoding, and
  // dictionary activity
  for (genvar n = 0; n < N; n++) begin : g_len
    always @(posedge clk) if (rst_n) begin
      if (dut.g_node[n].u_ni_tx.enc_done) begin
        if (dut.g_node[n].u_ni_tx.enc_nbits <= 10'd448) c_short++;
        if (dut.g_node[n].u_ni_tx.enc_nbits >  10'd512) c_long++;
      end
      if (dut.g_node[n].u_ni_tx.denc_done) begin
        c_dhits += int'(dut.g_node[n].u_ni_tx.denc_hits);
        c_dapx  += int'(dut.g_node[n].u_ni_tx.denc_apx_hits);
      end
      if (dut.g_node[n].pmt_valid) c_upd++;
    end
  end

  task automatic phase(int pct, bit dict, int per_node);
    int t = 0;
    err_pct = 7'(pct);
    comp_dict = dict;
    for (int n = 0; n < N; n++) left[n] = per_node;
    while ((n_recv < n_sent || left.sum() > 0 || req_valid != '0) && t < 200000) begin
      @(negedge clk); t++;
    end
    repeat (50) @(negedge clk);
    $display("phase %0d%% dict=%0d: sent %0d received %0d after %0d cycles", pct, dict, n_sent, n_recv, t);
  endtask

  initial begin
    req_valid = '0; req_blk = '0; req_approximable = '0; req_is_float = '0;
    req_dst_x = '0; req_dst_y = '0; out_ready = '0; err_pct = 7'd10; comp_dict = 0;
    for (int k = 0; k < 4; k++) base[k] = rand_block(1);
    for (int n = 0; n < N; n++) left[n] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    phase(10, 0, PER_PHASE);
    phase(20, 0, PER_PHASE);
    phase(0, 0, PER_PHASE);
    phase(10, 1, 3 * PER_PHASE);
    checks++;
    if (n_recv != n_sent || n_sent != 6 * PER_PHASE * N) begin
      failures++; $display("FAIL sent %0d received %0d", n_sent, n_recv);
    end
    $display("approximated=%0d bypassed=%0d float_approximated=%0d exact=%0d short=%0d long=%0d",
             c_approx, c_bypass, c_float_apx, c_exact, c_short, c_long);
    $display("ni_backpressure=%0d credit_stall_cycles=%0d tile_backpressure=%0d",
             c_ni_bp, c_credit_stall, c_tile_bp);
    $display("dict_updates=%0d dict_index_rows=%0d dict_approximated_rows=%0d", c_upd, c_dhits, c_dapx);
    checks += 12;
    if (c_upd == 0)          begin failures++; $display("FAIL no dictionary update"); end
    if (c_dhits == 0)        begin failures++; $display("FAIL no dictionary hit"); end
    if (c_dapx == 0)         begin failures++; $display("FAIL no approximate dictionary hit"); end
    if (c_approx == 0)       begin failures++; $display("FAIL no approximation"); end
    if (c_bypass == 0)       begin failures++; $display("FAIL no bypass"); end
    if (c_float_apx == 0)    begin failures++; $display("FAIL no float approximation"); end
    if (c_exact == 0)        begin failures++; $display("FAIL no exact block"); end
    if (c_short == 0)        begin failures++; $display("FAIL no compressed packet"); end
    if (c_long == 0)         begin failures++; $display("FAIL no expanded packet"); end
    if (c_ni_bp == 0)        begin failures++; $display("FAIL no NI back-pressure"); end
    if (c_credit_stall == 0) begin failures++; $display("FAIL no credit stall"); end
    if (c_tile_bp == 0)      begin failures++; $display("FAIL no tile back-pressure"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
