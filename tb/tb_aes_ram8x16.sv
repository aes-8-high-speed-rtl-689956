// tb_aes_ram8x16 - random reads and writes against an array model: one-cycle read latency,
// rdata held across cycles without a read and across writes.
module tb_aes_ram8x16;
  logic clk = 0, we = 0, re = 0;
  logic [3:0] addr = 0;
  logic [7:0] wdata = 0, rdata;
  logic [7:0] model [16];
  logic [7:0] exp_rd;
  int checks = 0, failures = 0;

  aes_ram8x16 dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    // fill
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      we = 1; re = 0; addr = 4'(i); wdata = 8'($urandom); model[i] = wdata;
    end
    @(negedge clk);
    we = 0; re = 1; addr = 0;
    @(negedge clk);
    exp_rd = model[0];
    for (int n = 0; n < 2000; n++) begin
      // check the held / new read value
      checks++;
      if (rdata !== exp_rd) begin
        failures++;
        $display("cycle %0d: rdata %02x expected %02x", n, rdata, exp_rd);
      end
      we = 0; re = 0;
      addr = 4'($urandom);
      case ($urandom % 3)
        0: begin we = 1; wdata = 8'($urandom); end
        1: re = 1;
        default: ;
      endcase
      @(negedge clk);
      if (re) exp_rd = model[addr];
      if (we) model[addr] = wdata;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
