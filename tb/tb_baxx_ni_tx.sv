// Testbench for baxx_ni_tx: random integer and float blocks, approximable or
// not, at thresholds 0..25 %, are sent to random destinations. The flits that
// leave (with credits returned at a random rate) are checked against the
// reference: head flit route, source and flags, data-flit count and stream
// length, and the stream itself, which must be the reference encoding of the
// transposed, row-zeroed block (or of the block itself when bypassed). With
// free credits the router must take the head flit on the 20th clock edge
// after the edge that took the request. A dictionary update notification
// must leave as a two-flit packet to the node it names.
module tb_baxx_ni_tx;
  import tb_ref_pkg::*;
  import baxx_pkg::*;

  logic clk = 0, rst_n = 0;
  logic [6:0] err_pct;
  logic req_valid = 0, req_ready, req_approximable, req_is_float;
  logic [15:0][31:0] req_blk;
  logic [3:0] req_dst_x, req_dst_y;
  logic inj_valid, inj_credit;
  flit_t inj_flit;
  logic [4:0] last_rows;
  logic [9:0] last_nbits;
  int checks = 0, failures = 0, n_rows = 0, n_bypass = 0;
  int pending = 0;
  bit slow = 0;

  logic upd_req_valid = 0, upd_req_ready;
  logic [5:0] upd_req_dst;
  logic [31:0] upd_req_pattern;
  logic [2:0] upd_req_idx;

  baxx_ni_tx dut (.clk, .rst_n, .my_x(4'd2), .my_y(4'd5), .err_pct, .comp_dict(1'b0),
                  .upd_req_valid, .upd_req_ready, .upd_req_dst, .upd_req_pattern, .upd_req_idx,
                  .pmt_wr_valid(1'b0), .pmt_wr_src('0), .pmt_wr_pattern('0), .pmt_wr_idx('0),
                  .req_valid, .req_ready,
                  .req_blk, .req_dst_x, .req_dst_y, .req_approximable, .req_is_float,
                  .inj_valid, .inj_flit, .inj_credit, .last_rows, .last_nbits);
  always #5 clk = ~clk;

  // credit return: the model of the router buffer drains one flit at a time
  always @(posedge clk) if (inj_valid) pending++;
  always @(negedge clk) begin
    inj_credit <= 0;
    if (pending > 0 && (!slow || $urandom % 3 == 0)) begin pending--; inj_credit <= 1; end
  end

  flit_t got[$];
  always @(posedge clk) if (inj_valid) got.push_back(inj_flit);

  initial begin
    automatic int pcts[4] = '{0, 5, 10, 25};
    inj_credit = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 300; i++) begin
      automatic int mode = (i < 4) ? 1 : $urandom % 4;
      automatic logic [15:0][31:0] b = rand_block(mode);
      automatic bit apx = (i < 4) ? 1 : ($urandom % 4 != 0);
      automatic bit flt = (mode == 2);
      automatic int pct = (i < 4) ? 10 : pcts[$urandom % 4];
      automatic int rows, nd, cyc;
      automatic logic [15:0][31:0] sent;
      bit s[$];
      head_t h;
      slow = (i % 2 == 1);
      got.delete();
      @(negedge clk);
      req_valid = 1; req_blk = b; req_approximable = apx; req_is_float = flt;
      req_dst_x = 4'($urandom % 8); req_dst_y = 4'($urandom % 8); err_pct = 7'(pct);
      while (!req_ready) @(negedge clk);
      @(posedge clk); #1 req_valid = 0;
      cyc = 0;
      while (got.size() == 0 && cyc < 100) begin @(posedge clk); #1 cyc++; end
      if (!slow) begin
        checks++;
        if (cyc != 20) begin failures++; $display("FAIL head latency %0d", cyc); end
      end
      rows = ref_rows(b, apx, flt, pct);
      sent = apx ? ref_transpose(ref_approx_words(b, rows)) : b;
      if (rows > 0) n_rows++;
      if (!apx) n_bypass++;
      ref_encode(sent, s);
      nd = (s.size() + 63) / 64;
      while (got.size() < nd + 1 && cyc < 400) begin @(posedge clk); #1 cyc++; end
      h = head_t'(got[0].data);
      checks += 5;
      if (got.size() != nd + 1) begin failures++; $display("FAIL flit count %0d exp %0d", got.size(), nd + 1); continue; end
      if (!got[0].head || got[0].tail || !got[nd].tail) begin failures++; $display("FAIL head/tail marks"); end
      if (h.dst_x != req_dst_x || h.dst_y != req_dst_y || h.src_x != 2 || h.src_y != 5 ||
          h.approx != apx || h.is_float != flt) begin failures++; $display("FAIL head fields"); end
      if (int'(h.ndata) != nd || int'(h.nbits) != s.size() || int'(last_rows) != rows) begin
        failures++; $display("FAIL ndata %0d nbits %0d rows %0d exp %0d %0d %0d", h.ndata, h.nbits, last_rows, nd, s.size(), rows);
      end
      for (int k = 0; k < s.size(); k++)
        if (got[1 + k / 64].data[k % 64] != s[k]) begin failures++; $display("FAIL stream bit %0d", k); break; end
    end
    // an update notification for the encoder at node 43 (x 3, y 5)
    got.delete();
    @(negedge clk);
    upd_req_valid = 1; upd_req_dst = 6'd43; upd_req_pattern = 32'hCAFE_F00D; upd_req_idx = 3'd5;
    while (!upd_req_ready) @(negedge clk);
    @(posedge clk); #1 upd_req_valid = 0;
    repeat (30) @(posedge clk);
    begin
      automatic head_t h = head_t'(got[0].data);
      checks++;
      if (got.size() != 2 || !h.upd || h.dst_x != 3 || h.dst_y != 5 || !got[1].tail ||
          got[1].data[34:0] != {3'd5, 32'hCAFE_F00D}) begin
        failures++; $display("FAIL update packet");
      end
    end
    checks += 2;
    if (n_rows < 20)   begin failures++; $display("FAIL only %0d approximated blocks", n_rows); end
    if (n_bypass < 20) begin failures++; $display("FAIL only %0d bypassed blocks", n_bypass); end
    $display("approximated=%0d bypassed=%0d", n_rows, n_bypass);
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
