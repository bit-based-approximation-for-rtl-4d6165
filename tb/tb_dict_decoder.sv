// Testbench for dict_decoder. A reference model of the decoder PMT (learn
// literals, install in a free or least-used unpublished entry, publish to the
// source once an entry's count reaches 2, never replace a published entry)
// runs next to the module. Streams from four source nodes mix literals drawn
// from a pattern pool with index codes for entries already published to that
// source. Checks: decoded blocks, err low, every update notification (node,
// pattern, index) against the model, done c+1 cycles after start; an index
// not published to the packet's source and a wrong stream length must raise
// err; updates are withheld while upd_ready is low.
module tb_dict_decoder;
  import baxx_pkg::*;

  localparam int NODES = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic [BUF_W-1:0] stream;
  logic [9:0] nbits;
  logic [5:0] src;
  logic busy, done, err;
  logic [15:0][31:0] blk;
  logic upd_valid, upd_ready;
  logic [5:0] upd_dst;
  logic [31:0] upd_pattern;
  logic [2:0] upd_idx;
  int checks = 0, failures = 0, n_upd = 0, n_idx = 0;

  dict_decoder dut (.clk, .rst_n, .start, .stream, .nbits, .src, .busy, .done, .err, .blk,
                    .upd_valid, .upd_ready, .upd_dst, .upd_pattern, .upd_idx);
  always #5 clk = ~clk;

  bit        m_valid[8];
  bit [31:0] m_pat[8];
  int        m_freq[8];
  bit        m_pub[8][NODES];
  logic [31:0] pool[14];
  // expected update notifications
  int q_dst[$], q_idx[$];
  logic [31:0] q_pat[$];

  function automatic bit any_pub(int e);
    for (int n = 0; n < NODES; n++) if (m_pub[e][n]) return 1;
    return 0;
  endfunction

  // model of one literal; returns nothing, queues expected updates
  function automatic void m_literal(logic [31:0] w, int s, bit ready);
    int f = -1, v = -1;
    for (int e = 7; e >= 0; e--) if (m_valid[e] && m_pat[e] == w) f = e;
    if (f >= 0) begin
      if (!m_pub[f][s] && m_freq[f] + 1 >= 2 && ready) begin
        m_pub[f][s] = 1; q_dst.push_back(s); q_idx.push_back(f); q_pat.push_back(w);
      end
      if (m_freq[f] < 15) m_freq[f]++;
      return;
    end
    for (int e = 0; e < 8; e++) if (!any_pub(e) && (v < 0 || m_freq[e] < m_freq[v])) v = e;
    for (int e = 7; e >= 0; e--) if (!m_valid[e]) v = e;
    if (v >= 0) begin m_valid[v] = 1; m_pat[v] = w; m_freq[v] = 1; end
  endfunction

  always @(posedge clk) if (rst_n && upd_valid && upd_ready) begin
    checks++;
    n_upd++;
    if (q_dst.size() == 0) begin failures++; $display("FAIL unexpected update"); end
    else begin
      automatic int d = q_dst.pop_front(), i = q_idx.pop_front();
      automatic logic [31:0] p = q_pat.pop_front();
      if (int'(upd_dst) != d || int'(upd_idx) != i || upd_pattern != p) begin
        failures++; $display("FAIL update %0d/%0d/%h exp %0d/%0d/%h", upd_dst, upd_idx, upd_pattern, d, i, p);
      end
    end
  end

  task automatic run(logic [BUF_W-1:0] st, int len, int s, output int cyc);
    @(negedge clk); stream = st; nbits = 10'(len); src = 6'(s); start = 1;
    @(negedge clk); start = 0;
    cyc = 1;
    while (!done && cyc < 50) begin @(negedge clk); cyc++; end
  endtask

  initial begin
    automatic int cyc;
    for (int e = 0; e < 8; e++) begin m_valid[e] = 0; m_freq[e] = 0; for (int n = 0; n < NODES; n++) m_pub[e][n] = 0; end
    for (int i = 0; i < 14; i++) pool[i] = $urandom;
    stream = '0; nbits = '0; src = '0; upd_ready = 1;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      automatic int s = 1 + $urandom % 4;
      automatic logic [BUF_W-1:0] st = '0;
      automatic int len = 0;
      automatic logic [15:0][31:0] exp_b;
      upd_ready = (it % 5 != 4);
      for (int w = 0; w < 16; w++) begin
        automatic int pubs[$];
        for (int e = 0; e < 8; e++) if (m_valid[e] && m_pub[e][s]) pubs.push_back(e);
        if (pubs.size() > 0 && $urandom % 2) begin
          automatic int e = pubs[$urandom % pubs.size()];
          st[len] = 1; for (int i = 0; i < 3; i++) st[len + 1 + i] = e[i];
          len += 4; exp_b[w] = m_pat[e]; n_idx++;
        end else begin
          automatic logic [31:0] v = ($urandom % 5 == 0) ? $urandom : pool[$urandom % 14];
          st[len] = 0; for (int i = 0; i < 32; i++) st[len + 1 + i] = v[i];
          len += 33; exp_b[w] = v;
          m_literal(v, s, upd_ready);
        end
      end
      run(st, len, s, cyc);
      checks += 3;
      if (blk != exp_b) begin failures++; $display("FAIL block it %0d", it); end
      if (err) begin failures++; $display("FAIL err it %0d src %0d", it, s); for (int e = 0; e < 8; e++) $display("  e%0d v%0d pat %h pub %h mv%0d mpat %h mpub %0d", e, dut.ent_valid[e], dut.ent_pat[e], dut.pub[e], m_valid[e], m_pat[e], m_pub[e][s]); end
      if (cyc != 17) begin failures++; $display("FAIL latency %0d", cyc); end
    end
    upd_ready = 1;
    // index not published to source 40
    run(BUF_W'(4'b0001) | (BUF_W'(1) << 4), 64, 40, cyc);
    checks++; if (!err) begin failures++; $display("FAIL no err for unpublished index"); end
    // wrong length
    run('0, 100, 2, cyc);
    checks++; if (!err) begin failures++; $display("FAIL no err for bad length"); end
    checks += 3;
    if (q_dst.size() != 0) begin failures++; $display("FAIL %0d updates missing", q_dst.size()); end
    if (n_upd < 4) begin failures++; $display("FAIL only %0d updates", n_upd); end
    if (n_idx == 0) begin failures++; $display("FAIL no index codes"); end
    $display("updates=%0d index_codes=%0d", n_upd, n_idx);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
