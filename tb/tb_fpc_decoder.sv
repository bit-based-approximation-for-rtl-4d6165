// Testbench for fpc_decoder: streams built by the reference encoder from
// random blocks must decode to the same blocks without error, with done
// one cycle more after start than the stream has codes. A stream carrying the unused
// prefix 110 and a stream whose length field is wrong must raise err.
module tb_fpc_decoder;
  import tb_ref_pkg::*;
  import baxx_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [BUF_W-1:0] stream;
  logic [9:0] nbits;
  logic busy, done, err;
  logic [15:0][31:0] blk;
  int checks = 0, failures = 0;

  fpc_decoder dut (.clk, .rst_n, .start, .stream, .nbits, .busy, .done, .err, .blk);
  always #5 clk = ~clk;

  // number of codes in a reference stream
  function automatic int count_codes(bit s[$]);
    int p = 0, n = 0;
    while (p < s.size()) begin
      automatic int pre = s[p] + 2 * s[p+1] + 4 * s[p+2];
      p += 3 + ((pre == 0) ? 3 : (pre == 1) ? 4 : (pre == 2) ? 8 : (pre == 7) ? 32 : 16);
      n++;
    end
    return n;
  endfunction

  task automatic run(logic [BUF_W-1:0] st, int len, output int cycles);
    @(negedge clk); stream = st; nbits = 10'(len); start = 1;
    @(negedge clk); start = 0; stream = '0;
    cycles = 1;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
  endtask

  initial begin
    automatic logic [15:0][31:0] b;
    automatic int cycles;
    stream = '0; nbits = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      bit s[$];
      logic [BUF_W-1:0] st;
      b = (i == 0) ? '0 : rand_block(i % 4);
      if (i % 5 == 1) for (int w = 0; w < 16; w++) if ($urandom % 2) b[w] = 0;
      ref_encode(b, s);
      st = '0;
      foreach (s[k]) st[k] = s[k];
      run(st, s.size(), cycles);
      checks += 3;
      if (blk != b)  begin failures++; $display("FAIL block %0d", i); end
      if (err)       begin failures++; $display("FAIL err set %0d", i); end
      if (cycles != count_codes(s) + 1) begin failures++; $display("FAIL cycles %0d codes %0d", cycles, count_codes(s)); end
    end
    // invalid prefix 110
    run(BUF_W'(3'b110), 35, cycles);
    checks++; if (!err) begin failures++; $display("FAIL no err on prefix 110"); end
    // wrong length: one zero run of 8 twice = 12 bits, claim 13
    run(BUF_W'(12'b111_000_111_000), 13, cycles);
    checks += 2;
    if (!err) begin failures++; $display("FAIL no err on bad length"); end
    if (blk != '0) begin failures++; $display("FAIL zero block"); end
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
