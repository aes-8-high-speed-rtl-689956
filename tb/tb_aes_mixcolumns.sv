// tb_aes_mixcolumns - shifts random columns (and the FIPS-197 column db 13 53 45 -> 8e 4d a1 bc)
// into the unit and checks all four sel outputs against the MixColumns matrix.
module tb_aes_mixcolumns;
  import aes_ref_pkg::*;
  logic clk = 0, en = 0;
  logic [7:0] din = 0, dout;
  logic [1:0] sel = 0;
  int checks = 0, failures = 0;

  aes_mixcolumns dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic column(input logic [7:0] col [4]);
    blk_t s, m;
    for (int i = 0; i < 16; i++) s[i] = 0;
    for (int r = 0; r < 4; r++) s[r] = col[r];
    m = ref_mix(s);
    for (int r = 0; r < 4; r++) begin
      @(negedge clk);
      en = 1; din = col[r];
    end
    @(negedge clk);
    en = 0; din = 8'($urandom);
    for (int r = 0; r < 4; r++) begin
      sel = 2'(r);
      #1;
      checks++;
      if (dout !== m[r]) begin
        failures++;
        $display("sel %0d: %02x expected %02x", r, dout, m[r]);
      end
    end
  endtask

  initial begin
    logic [7:0] col [4];
    col = '{8'hdb, 8'h13, 8'h53, 8'h45};
    column(col);
    checks++;
    begin
      blk_t s;
      for (int i = 0; i < 16; i++) s[i] = 0;
      s[0] = 8'hdb; s[1] = 8'h13; s[2] = 8'h53; s[3] = 8'h45;
      if (ref_mix(s)[0] != 8'h8e || ref_mix(s)[3] != 8'hbc) failures++;
    end
    for (int n = 0; n < 200; n++) begin
      for (int r = 0; r < 4; r++) col[r] = 8'($urandom);
      column(col);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
