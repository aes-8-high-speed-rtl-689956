// tb_aes_enc_block - drives the encryption block command by command.
//
// A behavioural Key RAM (array + registered read, like the real one) answers key_re/key_addr.
// For random states and keys it checks, through a FINAL_ARK read-out with an all-zero key:
// the fused AddRoundKey/SubBytes/ShiftRows pass, the MixColumns pass, and a complete
// encryption scripted command by command with the reference round keys (also the FIPS-197
// Appendix B block). It checks the busy length of each command (36, 33, 17 cycles), that 16
// ciphertext bytes leave per read-out, that rows_read reaches each row, and that a start in
// last_cycle chains two commands without a gap.
module tb_aes_enc_block;
  import aes_ref_pkg::*;
  import aes8_pkg::*;

  logic clk = 0, rst_n = 0;
  logic load_we = 0, start = 0, busy, last_cycle, key_re, ct_valid;
  addr_t load_addr = 0, key_addr;
  byte_t load_data = 0, key_in, ct_data;
  enc_cmd_e cmd = CMD_ARK_SB_SR;
  logic [2:0] rows_read;

  byte_t kmem [16];
  int checks = 0, failures = 0;
  int ct_cnt = 0;
  byte_t ct_buf [16];
  int rows_seen [5];

  aes_enc_block dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (key_re) key_in <= kmem[key_addr];
  always @(posedge clk) if (ct_valid) begin
    if (ct_cnt < 16) ct_buf[ct_cnt] = ct_data;
    ct_cnt++;
  end
  always @(posedge clk) if (busy && dut.cmd_q == CMD_ARK_SB_SR) rows_seen[rows_read]++;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic set_key(input blk_t k);
    for (int i = 0; i < 16; i++) kmem[i] = k[i];
  endtask

  task automatic load(input blk_t s);
    for (int i = 0; i < 16; i++) begin
      @(negedge clk);
      load_we = 1; load_addr = 4'(i); load_data = s[i];
    end
    @(negedge clk);
    load_we = 0;
  endtask

  task automatic run(input enc_cmd_e c, input int exp_len);
    int len;
    @(negedge clk);
    start = 1; cmd = c;
    @(negedge clk);
    start = 0;
    len = 0;
    while (busy) begin
      len++;
      @(negedge clk);
    end
    checks++;
    if (len != exp_len) begin
      failures++;
      $display("command %s busy %0d cycles, expected %0d", c.name(), len, exp_len);
    end
  endtask

  // read the state out through FINAL_ARK with a zero key
  task automatic read_state(output blk_t s);
    blk_t z;
    for (int i = 0; i < 16; i++) z[i] = 0;
    set_key(z);
    ct_cnt = 0;
    run(CMD_FINAL_ARK, 17);
    @(negedge clk);
    checks++;
    if (ct_cnt != 16) begin failures++; $display("%0d bytes read out", ct_cnt); end
    for (int i = 0; i < 16; i++) s[i] = ct_buf[i];
  endtask

  task automatic cmp(input blk_t got, input blk_t exp, input string what);
    for (int i = 0; i < 16; i++) begin
      checks++;
      if (got[i] !== exp[i]) begin
        failures++;
        $display("%s byte %0d: %02x expected %02x", what, i, got[i], exp[i]);
      end
    end
  endtask

  task automatic full_encrypt(input blk_t pt, input blk_t key);
    blk_t rk [11];
    blk_t got;
    ref_key_schedule(key, rk);
    load(pt);
    for (int r = 1; r <= 10; r++) begin
      set_key(rk[r-1]);
      run(CMD_ARK_SB_SR, 36);
      if (r != 10) run(CMD_MIXCOL, 33);
    end
    set_key(rk[10]);
    ct_cnt = 0;
    run(CMD_FINAL_ARK, 17);
    @(negedge clk);
    for (int i = 0; i < 16; i++) got[i] = ct_buf[i];
    cmp(got, ref_encrypt(pt, key), "ciphertext");
  endtask

  initial begin
    blk_t s, k, got;
    int gap;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 10; n++) begin
      for (int i = 0; i < 16; i++) begin s[i] = 8'($urandom); k[i] = 8'($urandom); end
      load(s);
      set_key(k);
      run(CMD_ARK_SB_SR, 36);
      read_state(got);
      cmp(got, ref_sub_shift(ref_xor(s, k)), "ARK/SB/SR");
      run(CMD_MIXCOL, 33);
      read_state(got);
      cmp(got, ref_mix(ref_sub_shift(ref_xor(s, k))), "MixColumns");
    end
    full_encrypt(from_hex(128'h3243f6a8885a308d313198a2e0370734),
                 from_hex(128'h2b7e151628aed2a6abf7158809cf4f3c));
    for (int n = 0; n < 3; n++) begin
      for (int i = 0; i < 16; i++) begin s[i] = 8'($urandom); k[i] = 8'($urandom); end
      full_encrypt(s, k);
    end
    // back-to-back: MixColumns started in the last cycle of the fused pass
    for (int i = 0; i < 16; i++) begin s[i] = 8'($urandom); k[i] = 8'($urandom); end
    load(s);
    set_key(k);
    @(negedge clk);
    start = 1; cmd = CMD_ARK_SB_SR;
    @(negedge clk);
    cmd = CMD_MIXCOL;
    start = 0;
    gap = 0;
    while (!last_cycle) @(negedge clk);
    start = 1;
    @(negedge clk);
    start = 0;
    checks++;
    if (!busy || dut.cmd_q != CMD_MIXCOL || dut.cnt_q != 0) begin
      failures++; $display("chained start not taken");
    end
    while (busy) @(negedge clk);
    read_state(got);
    cmp(got, ref_mix(ref_sub_shift(ref_xor(s, k))), "chained");
    for (int r = 0; r < 5; r++) begin
      checks++;
      if (rows_seen[r] == 0) begin failures++; $display("rows_read never %0d", r); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
