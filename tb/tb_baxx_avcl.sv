// Testbench for baxx_avcl: the document's worked examples (9 at 20 % -> two
// bits, 128 at 25 % -> range 32), then random integers and floats at the
// thresholds 5, 10, 20, 25 and 100 % against the reference model.
module tb_baxx_avcl;
  import tb_ref_pkg::*;
  import baxx_pkg::thresh_shift;

  logic [31:0] word;
  logic        is_float, err_en;
  logic [2:0]  err_shift;
  logic [5:0]  nbits;
  int checks = 0, failures = 0;

  baxx_avcl dut (.word, .is_float, .err_en, .err_shift, .nbits);

  task automatic check(logic [31:0] w, bit f, int pct, int expected);
    word = w; is_float = f; err_en = (pct != 0); err_shift = thresh_shift(7'(pct));
    #1;
    checks++;
    if (int'(nbits) != expected) begin
      failures++;
      $display("FAIL word=%h float=%0d pct=%0d nbits=%0d expected=%0d", w, f, pct, nbits, expected);
    end
  endtask

  initial begin
    automatic int pcts[6] = '{0, 5, 10, 20, 25, 100};
    check(32'd9, 0, 20, 2);           // 1001 -> 10xx
    check(32'd128, 0, 25, 6);         // range 32: 6 bits
    check(32'hFFFF_FFF7, 0, 20, 2);   // -9
    check(32'h3F80_0000, 1, 10, 21);  // 1.0f: (1<<23)>>3 -> 21 bits
    check(32'h7F80_0000, 1, 10, 0);   // infinity
    check(32'h0000_0001, 1, 10, 0);   // subnormal
    check(32'hFFFF_FFFF, 0, 100, 1);  // -1
    check(32'h8000_0000, 0, 100, 32); // most negative
    for (int i = 0; i < 3000; i++) begin
      automatic logic [31:0] w = (i % 3 == 0) ? $urandom : ($urandom >> ($urandom % 32));
      automatic bit f = i[0];
      automatic int p = pcts[$urandom % 6];
      check(w, f, p, ref_bits(w, f, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
