// aes8_top - 8-bit AES-128 encryptor with separate S-boxes for the round and the key schedule.
//
// An 8-bit datapath keeps the area small; giving the key expansion its own S-box lets the
// next round key be computed while the encryption block works through the current round,
// instead of the two taking turns on one shared S-box. The top holds the round controller:
//
//   load   16 cycles: plaintext byte and cipher key byte k (k = 0..15, AES byte order) are
//          written into the Data RAM and the Key RAM in the same cycle, one pair per cycle
//          with in_valid && in_ready.
//   rounds 1..10: the fused AddRoundKey/SubBytes/ShiftRows pass (36 cycles) with round key
//          i-1, then MixColumns (33 cycles) except in round 10. The key expansion is started
//          together with the fused pass and turns round key i-1 into round key i in place;
//          the next round waits until it has finished.
//   final  AddRoundKey with round key 10; the ciphertext leaves byte 0..15 on ct_out with
//          ct_valid, one per cycle, then done pulses for one cycle.
//
// One block is encrypted at a time; the cipher key is loaded with every block because the
// schedule overwrites it. A block takes 743 cycles from the first input byte to done: 691
// cycles of work plus about 2 cycles per round, and about 40 in round 10, spent waiting for
// the key schedule.
// The two-part structure (encryption block, key expansion with its own S-box, both fed from
// 8x16 RAMs through 2:1 input muxes) and the 16-cycle loads follow the architecture; the
// handshake, the controller and the per-phase cycle counts other than 16 and 36 are choices
// of this design.
module aes8_top
  import aes8_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  byte_t pt_in,
  input  byte_t key_in,
  output logic  ct_valid,
  output byte_t ct_out,
  output logic  busy,
  output logic  done
);
  typedef enum logic [2:0] {S_LOAD, S_ARK, S_MC, S_SYNC, S_FINAL, S_DONE} state_e;

  state_e     state_q, state_d;
  logic [3:0] round_q;        // 1..10
  logic [3:0] load_cnt_q;
  logic       round_inc;

  logic       load_we;
  logic       enc_start, ke_start, enc_busy, enc_last, ke_busy;
  enc_cmd_e   enc_cmd;
  logic       key_re;
  addr_t      key_addr;
  byte_t      round_key;
  logic [2:0] rows_read;

  assign in_ready = (state_q == S_LOAD);
  assign load_we  = in_valid && in_ready;

  // Round controller. A state names the command running in the encryption block (S_SYNC:
  // none, waiting for the key schedule). The next command is started in the last cycle of
  // the current one, so commands follow each other without gaps.
  always_comb begin
    state_d   = state_q;
    enc_start = 1'b0;
    ke_start  = 1'b0;
    enc_cmd   = CMD_ARK_SB_SR;
    round_inc = 1'b0;
    unique case (state_q)
      S_LOAD: if (load_we && load_cnt_q == 4'd15) begin
        enc_start = 1'b1;
        ke_start  = 1'b1;
        state_d   = S_ARK;
      end
      S_ARK: if (enc_last) begin
        if (round_q != 4'(NUM_ROUNDS)) begin
          enc_start = 1'b1;
          enc_cmd   = CMD_MIXCOL;
          state_d   = S_MC;
        end else state_d = S_SYNC;
      end
      S_MC: if (enc_last) state_d = S_SYNC;
      S_FINAL: if (enc_last) state_d = S_DONE;
      S_DONE: state_d = S_LOAD;
      default: ;
    endcase
    // leave S_SYNC, or skip it, as soon as the next round key is complete
    if (state_d == S_SYNC && !ke_busy) begin
      enc_start = 1'b1;
      if (round_q == 4'(NUM_ROUNDS)) begin
        enc_cmd = CMD_FINAL_ARK;
        state_d = S_FINAL;
      end else begin
        ke_start  = 1'b1;
        round_inc = 1'b1;
        state_d   = S_ARK;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state_q    <= S_LOAD;
      round_q    <= 4'd1;
      load_cnt_q <= '0;
    end else begin
      state_q <= state_d;
      if (load_we) load_cnt_q <= load_cnt_q + 4'd1;
      if (state_q == S_LOAD) round_q <= 4'd1;
      else if (round_inc)    round_q <= round_q + 4'd1;
    end
  end

  // a state that names a command must find the encryption block running it
  assert property (@(posedge clk) disable iff (!rst_n)
                   (state_q inside {S_ARK, S_MC, S_FINAL}) |-> enc_busy)
    else $error("encryption block idle in a command state");

  assign busy = (state_q != S_LOAD);
  assign done = (state_q == S_DONE);

  aes_enc_block u_enc (
    .clk      (clk),
    .rst_n    (rst_n),
    .load_we  (load_we),
    .load_addr(load_cnt_q),
    .load_data(pt_in),
    .start    (enc_start),
    .cmd      (enc_cmd),
    .busy     (enc_busy),
    .last_cycle(enc_last),
    .key_re   (key_re),
    .key_addr (key_addr),
    .key_in   (round_key),
    .rows_read(rows_read),
    .ct_valid (ct_valid),
    .ct_data  (ct_out)
  );

  aes_key_expansion u_ke (
    .clk       (clk),
    .rst_n     (rst_n),
    .load_we   (load_we),
    .load_addr (load_cnt_q),
    .load_data (key_in),
    .rcon_init (load_we && load_cnt_q == 4'd0),
    .start     (ke_start),
    .busy      (ke_busy),
    .wait_stall(),
    .port_stall(),
    .dp_re     (key_re),
    .dp_addr   (key_addr),
    .rows_read (rows_read),
    .round_key (round_key)
  );
endmodule
