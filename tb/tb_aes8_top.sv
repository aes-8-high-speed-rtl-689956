// tb_aes8_top - end-to-end test of the 8-bit AES-128 encryptor.
//
// Encrypts the two FIPS-197 example blocks and a set of random key/plaintext pairs, loading
// the 16 byte pairs with random gaps in in_valid, and compares each ciphertext byte with the
// software reference in aes_ref_pkg. It also checks the cycle count of a block (first load
// byte accepted to done, with no gaps) and counts how often each mechanism of the design
// occurred: load pauses, the key schedule losing the Key RAM port to AddRoundKey reads, the
// key schedule waiting for the row interlock, rounds waiting for the key schedule,
// MixColumns passes, Rcon advances. A mechanism never seen counts as a failure.
module tb_aes8_top;
  import aes_ref_pkg::*;

  localparam int N_RANDOM = 20;
  // 16 load + 10 x 36 fused passes + 9 x 33 MixColumns + 17 final + 1 done = 691 cycles of
  // work; the rest is time the rounds wait for the key schedule (which needs about 70 cycles
  // per round key once the AddRoundKey reads and the row interlock are counted, and in round
  // 10 has no MixColumns pass to hide behind). Counted from the first accepted byte to done.
  localparam int EXP_CYCLES = 743;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, ct_valid, busy, done;
  logic [7:0] pt_in = 0, key_in = 0, ct_out;

  int checks = 0, failures = 0;
  int n_pause = 0, n_port_stall = 0, n_wait_stall = 0, n_sync_wait = 0, n_mixcol = 0, n_rcon = 0;

  aes8_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters (observed inside the design)
  always @(posedge clk) if (rst_n) begin
    if (dut.u_ke.port_stall && dut.u_ke.busy) n_port_stall++;
    if (dut.u_ke.wait_stall) n_wait_stall++;
    if (dut.state_q == dut.S_SYNC && dut.u_ke.busy) n_sync_wait++;
    if (dut.u_enc.busy && dut.u_enc.cmd_q == aes8_pkg::CMD_MIXCOL && dut.u_enc.cnt_q == 0) n_mixcol++;
    if (dut.u_ke.u_rcon.next) n_rcon++;
  end

  task automatic encrypt(input blk_t pt, input blk_t key, input bit gaps, output int cycles);
    blk_t exp_ct, got;
    int k, nct, t0;
    exp_ct = ref_encrypt(pt, key);
    k = 0; nct = 0; t0 = 0;
    while (k < 16) begin
      if (gaps && ($urandom % 3 == 0)) begin
        in_valid <= 0;
        n_pause++;
        @(posedge clk);
        continue;
      end
      in_valid <= 1; pt_in <= pt[k]; key_in <= key[k];
      @(posedge clk);
      if (in_ready) begin
        if (k == 0) t0 = int'($time / 10);
        k++;
      end
    end
    in_valid <= 0;
    forever begin
      @(posedge clk);
      if (ct_valid) begin
        if (nct < 16) got[nct] = ct_out;
        nct++;
      end
      if (done) break;
    end
    cycles = int'($time / 10) - t0;
    checks++;
    if (nct != 16) begin failures++; $display("got %0d ciphertext bytes", nct); end
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (got[i] !== exp_ct[i]) begin
        failures++;
        $display("byte %0d: got %02x expected %02x", i, got[i], exp_ct[i]);
      end
    end
  endtask

  initial begin
    blk_t pt, key;
    int cyc;
    repeat (3) @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    // FIPS-197 Appendix C.1 and Appendix B
    encrypt(from_hex(128'h00112233445566778899aabbccddeeff),
            from_hex(128'h000102030405060708090a0b0c0d0e0f), 0, cyc);
    checks++;
    if (ref_encrypt(from_hex(128'h00112233445566778899aabbccddeeff),
                    from_hex(128'h000102030405060708090a0b0c0d0e0f)) !=
        from_hex(128'h69c4e0d86a7b0430d8cdb78070b4c55a)) begin
      failures++; $display("reference model disagrees with FIPS-197");
    end
    $display("cycles per block (load to done): %0d", cyc);
    checks++;
    if (cyc != EXP_CYCLES) begin failures++; $display("expected %0d cycles", EXP_CYCLES); end
    encrypt(from_hex(128'h3243f6a8885a308d313198a2e0370734),
            from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c), 1, cyc);
    for (int n = 0; n < N_RANDOM; n++) begin
      for (int i = 0; i < 16; i++) begin pt[i] = 8'($urandom); key[i] = 8'($urandom); end
      encrypt(pt, key, 1, cyc);
    end
    $display("load pauses %0d, key port lost %0d, row-interlock waits %0d, round waits for key %0d, MixColumns passes %0d, Rcon steps %0d",
             n_pause, n_port_stall, n_wait_stall, n_sync_wait, n_mixcol, n_rcon);
    checks += 6;
    if (n_pause == 0) failures++;
    if (n_port_stall == 0) failures++;
    if (n_wait_stall == 0) failures++;
    if (n_sync_wait == 0) failures++;
    if (n_mixcol != 9 * (N_RANDOM + 2)) failures++;
    if (n_rcon != 10 * (N_RANDOM + 2)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
