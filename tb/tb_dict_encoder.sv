// Testbench for dict_encoder. A reference model of the encoder PMT (8
// entries, free entry first, else least used; exact match preferred, any
// entry valid for the destination accepted for approximable rows) runs next
// to the module. Random update notifications from a few decoder nodes and
// blocks drawn from a small pattern pool, with 0..16 approximable rows, are
// applied; every stream, its length and the hit counts must match the model
// bit for bit, and done must come 17 cycles after start. Updates are also
// applied in the middle of an encoding.
module tb_dict_encoder;
  import baxx_pkg::*;

  localparam int NODES = 64;
  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0][31:0] blk;
  logic [4:0] rows;
  logic [5:0] dst;
  logic busy, done;
  logic [BUF_W-1:0] stream;
  logic [9:0] nbits;
  logic [4:0] hits, approx_hits;
  logic upd_valid = 0;
  logic [5:0] upd_src;
  logic [31:0] upd_pattern;
  logic [2:0] upd_idx;
  int checks = 0, failures = 0, n_hits = 0, n_apx = 0, n_repl = 0;

  dict_encoder dut (.clk, .rst_n, .start, .blk, .rows, .dst, .busy, .done, .stream, .nbits,
                    .hits, .approx_hits, .upd_valid, .upd_src, .upd_pattern, .upd_idx);
  always #5 clk = ~clk;

  // reference PMT
  bit       m_valid[8];
  bit [31:0] m_pat[8];
  int       m_freq[8];
  bit       m_vv[8][NODES];
  int       m_vi[8][NODES];
  logic [31:0] pool[12];

  function automatic void m_update(int src, logic [31:0] p, int idx);
    int v = -1;
    for (int e = 0; e < 8; e++) if (m_valid[e] && m_pat[e] == p) v = e;
    if (v >= 0) begin m_vv[v][src] = 1; m_vi[v][src] = idx; return; end
    v = 0;
    for (int e = 1; e < 8; e++) if (m_freq[e] < m_freq[v]) v = e;
    for (int e = 7; e >= 0; e--) if (!m_valid[e]) v = e;
    if (m_valid[v]) n_repl++;
    m_valid[v] = 1; m_pat[v] = p; m_freq[v] = 0;
    for (int n = 0; n < NODES; n++) m_vv[v][n] = 0;
    m_vv[v][src] = 1; m_vi[v][src] = idx;
  endfunction

  function automatic void m_encode(logic [15:0][31:0] b, int r, int d,
                                   output logic [BUF_W-1:0] s, output int len, output int h);
    s = '0; len = 0; h = 0;
    for (int w = 0; w < 16; w++) begin
      int ex = -1, any = -1, sel;
      for (int e = 0; e < 8; e++) if (m_valid[e] && m_vv[e][d]) begin
        if (any < 0) any = e;
        if (ex < 0 && m_pat[e] == b[w]) ex = e;
      end
      sel = (ex >= 0) ? ex : ((w < r) ? any : -1);
      if (sel >= 0) begin
        s[len] = 1; for (int i = 0; i < 3; i++) s[len + 1 + i] = m_vi[sel][d][i];
        len += 4; h++;
        if (m_freq[sel] < 15) m_freq[sel]++;
      end else begin
        s[len] = 0; for (int i = 0; i < 32; i++) s[len + 1 + i] = b[w][i];
        len += 33;
      end
    end
  endfunction

  task automatic send_update(int src, logic [31:0] p, int idx);
    @(negedge clk);
    upd_valid = 1; upd_src = 6'(src); upd_pattern = p; upd_idx = 3'(idx);
    m_update(src, p, idx);
    @(negedge clk);
    upd_valid = 0;
  endtask

  initial begin
    for (int e = 0; e < 8; e++) begin m_valid[e] = 0; m_freq[e] = 0; for (int n = 0; n < NODES; n++) m_vv[e][n] = 0; end
    for (int i = 0; i < 12; i++) pool[i] = $urandom;
    blk = '0; rows = '0; dst = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int it = 0; it < 400; it++) begin
      automatic int nu = $urandom % 3;
      automatic logic [BUF_W-1:0] es;
      automatic int elen, eh, cyc;
      automatic logic [15:0][31:0] b;
      automatic int r = (it % 3 == 0) ? $urandom % 17 : 0;
      automatic int d = 1 + $urandom % 4;
      for (int k = 0; k < nu; k++) send_update(1 + $urandom % 4, pool[$urandom % 12], $urandom % 8);
      for (int w = 0; w < 16; w++) b[w] = ($urandom % 4 == 0) ? $urandom : pool[$urandom % 12];
      @(negedge clk);
      blk = b; rows = 5'(r); dst = 6'(d); start = 1;
      m_encode(b, r, d, es, elen, eh);
      @(negedge clk); start = 0;
      cyc = 1;
      // an update in the middle of the block, for a node the block is not
      // sent to and a pattern already in the table (so nothing is replaced)
      if (it % 7 == 0 && m_valid[0]) begin
        upd_valid = 1; upd_src = 6'd10; upd_pattern = m_pat[0]; upd_idx = 3'd1;
        m_update(10, upd_pattern, 1);
        @(negedge clk); upd_valid = 0; cyc++;
      end
      while (!done && cyc < 50) begin @(negedge clk); cyc++; end
      checks += 4;
      if (cyc != 17) begin failures++; $display("FAIL latency %0d", cyc); end
      if (int'(nbits) != elen) begin failures++; $display("FAIL nbits %0d exp %0d", nbits, elen); end
      if (stream != es) begin failures++; $display("FAIL stream it %0d", it); end
      if (int'(hits) != eh) begin failures++; $display("FAIL hits %0d exp %0d", hits, eh); end
      n_hits += eh;
      n_apx += int'(approx_hits);
    end
    checks += 3;
    if (n_hits == 0) begin failures++; $display("FAIL no hits"); end
    if (n_apx == 0)  begin failures++; $display("FAIL no approximate hits"); end
    if (n_repl == 0) begin failures++; $display("FAIL no replacement"); end
    $display("hits=%0d approximate=%0d replacements=%0d", n_hits, n_apx, n_repl);
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
