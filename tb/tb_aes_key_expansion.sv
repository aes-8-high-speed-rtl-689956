// tb_aes_key_expansion - checks the in-place key schedule against the reference.
//
// Loads a cipher key, then ten times: starts the schedule while it emulates the encryption
// block's AddRoundKey reads (port taken on random cycles, rows_read rising from 0 to 4 over the
// first 36 cycles), waits for busy to fall, and reads the 16 bytes back through the round key
// port to compare with the FIPS-197 round key. Also checks that a schedule with a free port
// and rows_read = 4 takes exactly 48 cycles, and that port and interlock stalls both occurred.
module tb_aes_key_expansion;
  import aes_ref_pkg::*;
  import aes8_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load_we = 0, rcon_init = 0, start = 0, busy, wait_stall, port_stall, dp_re = 0;
  addr_t load_addr = 0, dp_addr = 0;
  byte_t load_data = 0, round_key;
  logic [2:0] rows_read = 3'd4;
  int checks = 0, failures = 0, n_wait = 0, n_port = 0;

  aes_key_expansion dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (wait_stall) n_wait++;
    if (port_stall && busy) n_port++;
  end

  task automatic run_key(input blk_t key, input bit contended);
    blk_t rk [11];
    int cyc;
    ref_key_schedule(key, rk);
    for (int i = 0; i < 16; i++) begin
      load_we <= 1; load_addr <= 4'(i); load_data <= key[i]; rcon_init <= (i == 0);
      @(posedge clk);
    end
    load_we <= 0; rcon_init <= 0;
    for (int r = 1; r <= 10; r++) begin
      start <= 1;
      rows_read <= contended ? 3'd0 : 3'd4;
      @(posedge clk);
      start <= 0;
      #1;
      cyc = 1;
      while (busy) begin
        if (contended) begin
          rows_read <= (cyc >= 36) ? 3'd4 : 3'(cyc / 9);
          dp_re <= (cyc < 36) && ($urandom % 2 == 0);
          dp_addr <= 4'($urandom);
        end
        @(posedge clk);
        #1;
        cyc++;
      end
      dp_re <= 0;
      if (!contended) begin
        checks++;
        if (cyc != 49) begin failures++; $display("schedule took %0d cycles", cyc - 1); end
      end
      // read back
      for (int i = 0; i < 16; i++) begin
        dp_re <= 1; dp_addr <= 4'(i);
        @(posedge clk);
        dp_re <= 0;
        #1;
        checks++;
        if (round_key !== rk[r][i]) begin
          failures++;
          $display("round %0d byte %0d: got %02x expected %02x", r, i, round_key, rk[r][i]);
        end
      end
    end
  endtask

  initial begin
    blk_t key;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    run_key(from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c), 0);
    for (int n = 0; n < 4; n++) begin
      for (int i = 0; i < 16; i++) key[i] = 8'($urandom);
      run_key(key, 1);
    end
    checks += 2;
    if (n_wait == 0) failures++;
    if (n_port == 0) failures++;
    $display("port stalls %0d, interlock waits %0d", n_port, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
