// Testbench for baxx_transpose: the pre-process example of the design notes
// (the LSB pairs 01, 00, 11 of words 0..2 land at the low end of row 0),
// random blocks against a bit-level reference, and the post-process property
// that transposing twice restores the block.
module tb_baxx_transpose;
  import tb_ref_pkg::*;

  logic [15:0][31:0] din, dout, back;
  int checks = 0, failures = 0;

  baxx_transpose dut  (.din(din),  .dout(dout));
  baxx_transpose dut2 (.din(dout), .dout(back));

  initial begin
    din = '0;
    din[0][1:0] = 2'b01; din[1][1:0] = 2'b00; din[2][1:0] = 2'b11;
    din[15][31:30] = 2'b01;
    #1;
    checks++;
    if (dout[0][5:0] != 6'b11_00_01 || dout[15][31:30] != 2'b01) begin
      failures++; $display("FAIL example row0=%h row15=%h", dout[0], dout[15]);
    end
    for (int i = 0; i < 500; i++) begin
      for (int w = 0; w < 16; w++) din[w] = $urandom;
      #1;
      checks += 2;
      if (dout != ref_transpose(din)) begin failures++; $display("FAIL transpose %0d", i); end
      if (back != din) begin failures++; $display("FAIL round trip %0d", i); end
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
