// Testbench for baxx_engine: for random integer and float blocks, with and
// without the approximable flag and at several thresholds, the minimum bit
// count, the zeroed row count and the output block are compared with the
// reference; the output transposed back must equal the input with the low
// 2*rows bits of every word cleared, and stay within each word's error range.
module tb_baxx_engine;
  import tb_ref_pkg::*;

  logic [15:0][31:0] blk_in, blk_out;
  logic approximable, is_float, approx_out;
  logic [6:0] err_pct;
  logic [5:0] min_bits;
  logic [4:0] rows;
  int checks = 0, failures = 0, n_approx = 0;

  baxx_engine dut (.blk_in, .approximable, .is_float, .err_pct, .blk_out, .approx_out, .min_bits, .rows);

  initial begin
    automatic int pcts[5] = '{0, 5, 10, 20, 25};
    for (int i = 0; i < 2000; i++) begin
      automatic int mode = $urandom % 4;
      automatic int exp_rows;
      automatic logic [15:0][31:0] expect_blk;
      blk_in       = rand_block(mode);
      is_float     = (mode == 2);
      approximable = ($urandom % 4) != 0;
      err_pct      = 7'(pcts[$urandom % 5]);
      #1;
      exp_rows = ref_rows(blk_in, approximable, is_float, int'(err_pct));
      checks++;
      if (int'(rows) != exp_rows || approx_out != approximable) begin
        failures++; $display("FAIL rows=%0d expected=%0d", rows, exp_rows);
      end
      expect_blk = approximable ? ref_transpose(ref_approx_words(blk_in, exp_rows)) : blk_in;
      checks++;
      if (blk_out != expect_blk) begin failures++; $display("FAIL block %0d", i); end
      // error bound: every word within its own allowed range
      if (approximable && exp_rows > 0) begin
        automatic logic [15:0][31:0] rec = ref_transpose(blk_out);
        n_approx++;
        for (int w = 0; w < 16; w++) begin
          automatic longint unsigned d = (blk_in[w] >= rec[w]) ? blk_in[w] - rec[w] : rec[w] - blk_in[w];
          checks++;
          if (d >= (64'd1 << ref_bits(blk_in[w], is_float, int'(err_pct)))) begin
            failures++; $display("FAIL error bound word %0d", w);
          end
        end
      end
    end
    checks++;
    if (n_approx < 50) begin failures++; $display("FAIL too few approximated blocks: %0d", n_approx); end
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
