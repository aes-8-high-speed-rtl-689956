// tb_aes_sbox - exhaustive check of the S-box against the reference (inverse found by search)
// and against a few constants from FIPS-197 Figure 7.
module tb_aes_sbox;
  import aes_ref_pkg::*;
  logic [7:0] din, dout;
  int checks = 0, failures = 0;

  aes_sbox dut (.din(din), .dout(dout));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input logic [7:0] x, input logic [7:0] exp);
    din = x;
    #1;
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("S(%02x) = %02x, expected %02x", x, dout, exp);
    end
  endtask

  initial begin
    chk(8'h00, 8'h63); chk(8'h01, 8'h7c); chk(8'h53, 8'hed); chk(8'hff, 8'h16);
    chk(8'h10, 8'hca); chk(8'h9a, 8'hb8);
    for (int i = 0; i < 256; i++) chk(8'(i), ref_sbox(8'(i)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
