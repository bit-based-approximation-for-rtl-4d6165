// Testbench for baxx_ni_rx: packets built by the reference (head flit plus
// the reference encoding of a block, transposed and row-zeroed when marked
// approximated) are fed in, respecting the 4 credits of the ejection queue.
// The delivered block must equal the original with the low 2*rows bits
// cleared (or the original when exact), with the source and flags of the
// head, and out_err low. The tile accepts at a random rate. A packet whose
// head claims one data flit too many must be flagged with out_err. An
// update-notification packet must come out once on the pmt_wr port.
module tb_baxx_ni_rx;
  import tb_ref_pkg::*;
  import baxx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ej_valid, ej_credit, out_valid, out_ready, out_approx, out_is_float, out_err;
  flit_t ej_flit;
  logic [15:0][31:0] out_blk;
  logic [3:0] out_src_x, out_src_y;
  int checks = 0, failures = 0, credits = 4, n_apx = 0;

  logic upd_req_valid, pmt_wr_valid;
  logic [5:0] upd_req_dst, pmt_wr_src;
  logic [31:0] upd_req_pattern, pmt_wr_pattern;
  logic [2:0] upd_req_idx, pmt_wr_idx;
  int n_pmt = 0;

  baxx_ni_rx dut (.clk, .rst_n, .ej_valid, .ej_flit, .ej_credit, .out_valid, .out_ready, .out_blk,
                  .out_src_x, .out_src_y, .out_approx, .out_is_float, .out_err,
                  .upd_req_valid, .upd_req_ready(1'b1), .upd_req_dst, .upd_req_pattern, .upd_req_idx,
                  .pmt_wr_valid, .pmt_wr_src, .pmt_wr_pattern, .pmt_wr_idx);

  always @(posedge clk) if (pmt_wr_valid) begin
    n_pmt++;
    checks++;
    if (pmt_wr_src != 6'd21 || pmt_wr_pattern != 32'h1234_5678 || pmt_wr_idx != 3'd6) begin
      failures++; $display("FAIL pmt write");
    end
  end
  always #5 clk = ~clk;
  always @(posedge clk) if (ej_credit) credits++;
  always @(negedge clk) out_ready <= ($urandom % 3 != 0);

  task automatic send(flit_t f);
    @(negedge clk);
    while (credits == 0) @(negedge clk);
    ej_valid = 1; ej_flit = f; credits--;
    @(negedge clk);
    ej_valid = 0;
  endtask

  task automatic packet(logic [15:0][31:0] b, bit apx, bit flt, int pct, int extra_nd, int sx, int sy,
                        output logic [15:0][31:0] expect_blk);
    automatic int rows = ref_rows(b, apx, flt, pct);
    automatic logic [15:0][31:0] sent;
    automatic int nd;
    bit s[$];
    head_t h;
    flit_t f;
    expect_blk = apx ? ref_approx_words(b, rows) : b;
    sent = apx ? ref_transpose(expect_blk) : b;
    if (rows > 0) n_apx++;
    ref_encode(sent, s);
    nd = (s.size() + 63) / 64;
    h = '0; h.src_x = 4'(sx); h.src_y = 4'(sy); h.approx = apx; h.is_float = flt;
    h.ndata = 4'(nd + extra_nd); h.nbits = 10'(s.size());
    f = '0; f.head = 1; f.data = FLIT_W'(h);
    send(f);
    for (int k = 0; k < nd; k++) begin
      f = '0;
      for (int j = 0; j < 64; j++) if (k * 64 + j < s.size()) f.data[j] = s[k * 64 + j];
      f.tail = (k == nd - 1);
      send(f);
    end
  endtask

  task automatic expect_out(logic [15:0][31:0] e, bit apx, bit flt, int sx, int sy, bit want_err);
    automatic int cyc = 0;
    while (!(out_valid && out_ready) && cyc < 200) begin @(posedge clk); #1 cyc++; end
    checks += 2;
    if (out_err != want_err) begin failures++; $display("FAIL out_err=%0d", out_err); end
    if (!want_err && (out_blk != e || out_approx != apx || out_is_float != flt ||
        out_src_x != 4'(sx) || out_src_y != 4'(sy))) begin failures++; $display("FAIL delivered block"); end
    @(posedge clk); #1;
  endtask

  initial begin
    automatic int pcts[4] = '{0, 5, 10, 25};
    ej_valid = 0; ej_flit = '0; out_ready = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      automatic int mode = $urandom % 4;
      automatic logic [15:0][31:0] b = rand_block(mode), e;
      automatic bit apx = ($urandom % 4 != 0), flt = (mode == 2);
      automatic int pct = pcts[$urandom % 4], sx = $urandom % 8, sy = $urandom % 8;
      fork
        packet(b, apx, flt, pct, 0, sx, sy, e);
        begin #2; end
      join
      expect_out(e, apx, flt, sx, sy, 0);
    end
    begin
      automatic logic [15:0][31:0] e;
      packet(rand_block(0), 0, 0, 0, 1, 1, 1, e);
      expect_out(e, 0, 0, 1, 1, 1);
    end
    // update notification from the decoder at node 21 (x 5, y 2)
    begin
      head_t h;
      flit_t f;
      h = '0; h.src_x = 4'd5; h.src_y = 4'd2; h.upd = 1; h.ndata = 1;
      f = '0; f.head = 1; f.data = FLIT_W'(h);
      send(f);
      f = '0; f.tail = 1; f.data = 64'({3'd6, 32'h1234_5678});
      send(f);
      repeat (5) @(negedge clk);
      checks++;
      if (n_pmt != 1) begin failures++; $display("FAIL update not passed on"); end
    end
    checks++;
    if (n_apx < 20) begin failures++; $display("FAIL only %0d approximated", n_apx); end
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
