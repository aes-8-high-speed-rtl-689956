// tb_aes_rcon - checks the ten AES-128 round constants and the rcon_en gating.
module tb_aes_rcon;
  logic clk = 0, init = 0, next = 0, rcon_en = 0;
  logic [7:0] rcon;
  int checks = 0, failures = 0;
  logic [7:0] exp_rc [10] = '{8'h01, 8'h02, 8'h04, 8'h08, 8'h10, 8'h20, 8'h40, 8'h80, 8'h1b, 8'h36};

  aes_rcon dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int pass = 0; pass < 2; pass++) begin
      @(negedge clk); init = 1;
      @(negedge clk); init = 0;
      for (int i = 0; i < 10; i++) begin
        rcon_en = 0; #1;
        checks++;
        if (rcon !== 8'h00) begin failures++; $display("rcon not gated"); end
        rcon_en = 1; #1;
        checks++;
        if (rcon !== exp_rc[i]) begin
          failures++;
          $display("round %0d: rcon %02x expected %02x", i + 1, rcon, exp_rc[i]);
        end
        // a few idle cycles must not advance it
        repeat (2) @(negedge clk);
        next = 1;
        @(negedge clk);
        next = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
