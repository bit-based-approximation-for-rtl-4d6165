// Testbench for fpc_encoder: random blocks mixing every pattern (and blocks
// with long zero runs, all zeros, incompressible words) are encoded and the
// stream and its length compared bit for bit with the reference encoder.
// The encoder must report done exactly 17 cycles after start (one capture
// cycle, then one word per cycle).
module tb_fpc_encoder;
  import tb_ref_pkg::*;
  import baxx_pkg::*;

  logic clk = 0, rst_n = 0, start = 0;
  logic [15:0][31:0] blk;
  logic busy, done;
  logic [BUF_W-1:0] stream;
  logic [9:0] nbits;
  int checks = 0, failures = 0;
  int hist[8];

  fpc_encoder dut (.clk, .rst_n, .start, .blk, .busy, .done, .stream, .nbits);
  always #5 clk = ~clk;

  task automatic run(logic [15:0][31:0] b);
    bit ref_s[$];
    logic [BUF_W-1:0] exp_stream;
    int cycles;
    ref_encode(b, ref_s);
    exp_stream = '0;
    foreach (ref_s[i]) exp_stream[i] = ref_s[i];
    @(negedge clk); blk = b; start = 1;
    @(negedge clk); start = 0; blk = '0;
    cycles = 1;
    while (!done && cycles < 100) begin @(negedge clk); cycles++; end
    checks += 3;
    if (cycles != 17) begin failures++; $display("FAIL latency %0d", cycles); end
    if (int'(nbits) != ref_s.size()) begin failures++; $display("FAIL nbits %0d exp %0d", nbits, ref_s.size()); end
    if (stream != exp_stream) begin failures++; $display("FAIL stream"); end
  endtask

  initial begin
    automatic logic [15:0][31:0] b;
    blk = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    run('0);                                   // two runs of 8
    b = '0; b[3] = 32'h7; b[12] = 32'hDEAD_BEEF; run(b);
    for (int w = 0; w < 16; w++) b[w] = 32'hFFFF_FF80 + w; run(b);
    for (int i = 0; i < 400; i++) begin
      b = rand_block(i % 4);
      if (i % 5 == 0) for (int w = 0; w < 16; w++) if ($urandom % 2) b[w] = 0;
      run(b);
    end
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
