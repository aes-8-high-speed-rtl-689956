// aes_key_expansion - on-the-fly AES-128 key schedule working in place in an 8x16 Key RAM.
//
// The Key RAM holds the current round key (the cipher key after loading). A start pulse makes
// the block overwrite it with the next round key, byte by byte, with its own S-box, so it can
// run while the encryption block works on the state. Its datapath: the RAM read byte goes
// (1) out as the round key byte for AddRoundKey, (2) through the S-box and the Rcon XOR, or
// (3) straight on; a 2:1 mux picks (2) or (3), an XOR adds Reg_0 (the previous result), and
// the sum is stored in Reg_0 and in Reg_1, which writes it back through the RAM input mux.
//
// Order: column-major. New byte (r,c) = old(r,c) ^ t, where t = SB(old(r+1 mod 4,3)) ^ Rcon(r==0)
// for column 0 and t = new(r,c-1) otherwise. Each byte costs two reads (t-source "A", then
// old(r,c) "B") and one write, issued in the overlapped order
//   RA0 RB0 | RA1 W0 RB1 | RA2 W1 RB2 | ... | RA14 W13 RB14 | RA15 RB15 W14 W15
// i.e. exactly 48 RAM accesses per round key. (The last two writes trail the last read so
// that Reg_1 already holds byte 15 when it is written.) A read's byte is consumed the next cycle
// (A: Reg_0 <= mux; B: Reg_0, Reg_1 <= Reg_0 ^ byte).
//
// Sharing and timing: the RAM has one port. A key write from outside (key loading, load_we)
// has first priority, an AddRoundKey read of the encryption block (dp_re/dp_addr; the byte is
// on round_key one cycle later) second, and the key schedule uses every cycle left over. A
// write of row r is held back until rows_read > r, i.e. until the encryption block has read
// that row of the current round key; wait_stall flags such a cycle. busy stays high from
// start until the last write has been issued (48 cycles when nothing interferes).
// The structure (RAM, S-box, Rcon, mux, XOR, Reg_0, Reg_1) follows the architecture; the
// byte order, the port arbitration and the row interlock are choices of this design.
module aes_key_expansion
  import aes8_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // key loading
  input  logic       load_we,
  input  addr_t      load_addr,
  input  byte_t      load_data,
  input  logic       rcon_init,    // restart Rcon at 01 (new cipher key)
  // schedule control
  input  logic       start,        // compute the next round key (ignored while busy)
  output logic       busy,
  output logic       wait_stall,   // a ready write waits for the row interlock
  output logic       port_stall,   // a ready access lost the port to the encryption block
  // round key port for AddRoundKey
  input  logic       dp_re,
  input  addr_t      dp_addr,
  input  logic [2:0] rows_read,    // rows of the current round key already consumed
  output byte_t      round_key
);
  typedef enum logic [1:0] {OP_RA, OP_RB, OP_W} op_e;

  logic  [5:0] op_q;               // 0..47
  logic        busy_q;
  op_e         op;
  logic  [3:0] k;                  // byte being produced, k = 4*c + r
  logic  [1:0] r, c;
  addr_t       op_addr;
  logic        issue;

  // consume stage
  logic  cons_q, cons_b_q, cons_sb_q, cons_rc_q;
  byte_t reg0_q, reg1_q;

  // RAM port
  logic  ram_we, ram_re;
  addr_t ram_addr;
  byte_t ram_wdata, ram_rdata;

  // datapath of Fig. 6
  byte_t sb_out, rcon, mux_out, xor_out;

  // op decode
  always_comb begin
    logic [5:0] j;
    j = op_q - 6'd2;
    if (op_q == 6'd0)       begin op = OP_RA; k = 4'd0; end
    else if (op_q == 6'd1)  begin op = OP_RB; k = 4'd0; end
    else if (op_q == 6'd45) begin op = OP_RB; k = 4'd15; end
    else if (op_q == 6'd46) begin op = OP_W;  k = 4'd14; end
    else if (op_q == 6'd47) begin op = OP_W;  k = 4'd15; end
    else begin
      unique case (j % 6'd3)
        6'd0:    begin op = OP_RA; k = 4'(j / 6'd3 + 6'd1); end
        6'd1:    begin op = OP_W;  k = 4'(j / 6'd3);        end
        default: begin op = OP_RB; k = 4'(j / 6'd3 + 6'd1); end
      endcase
    end
    r = k[1:0];
    c = k[3:2];
    if (op == OP_RA) op_addr = (c == 2'd0) ? mk_addr(r + 2'd1, 2'd3) : mk_addr(r, c - 2'd1);
    else             op_addr = mk_addr(r, c);
  end

  assign wait_stall = busy_q && !load_we && !dp_re && (op == OP_W) && !(rows_read > {1'b0, r});
  assign port_stall = busy_q && (load_we || dp_re);
  assign issue      = busy_q && !load_we && !dp_re && !wait_stall;

  // port arbitration: load > encryption block read > key schedule
  always_comb begin
    ram_we    = 1'b0;
    ram_re    = 1'b0;
    ram_addr  = op_addr;
    ram_wdata = reg1_q;
    if (load_we) begin
      ram_we    = 1'b1;
      ram_addr  = load_addr;
      ram_wdata = load_data;
    end else if (dp_re) begin
      ram_re   = 1'b1;
      ram_addr = dp_addr;
    end else if (issue) begin
      ram_we = (op == OP_W);
      ram_re = (op != OP_W);
    end
  end

  aes_ram8x16 u_key_ram (
    .clk  (clk),
    .we   (ram_we),
    .re   (ram_re),
    .addr (ram_addr),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );

  assign round_key = ram_rdata;

  aes_sbox u_sbox (.din(ram_rdata), .dout(sb_out));

  aes_rcon u_rcon (
    .clk    (clk),
    .init   (rcon_init),
    .next   (issue && op_q == 6'd47),
    .rcon_en(cons_rc_q),
    .rcon   (rcon)
  );

  assign mux_out = cons_sb_q ? (sb_out ^ rcon) : ram_rdata;
  assign xor_out = mux_out ^ (cons_b_q ? reg0_q : 8'h00);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      op_q      <= '0;
      busy_q    <= 1'b0;
      cons_q    <= 1'b0;
      cons_b_q  <= 1'b0;
      cons_sb_q <= 1'b0;
      cons_rc_q <= 1'b0;
      reg0_q    <= '0;
      reg1_q    <= '0;
    end else begin
      // sequencer
      if (!busy_q) begin
        if (start) begin
          busy_q <= 1'b1;
          op_q   <= '0;
        end
      end else if (issue) begin
        if (op_q == 6'd47) busy_q <= 1'b0;
        op_q <= op_q + 6'd1;
      end
      // remember what the byte read this cycle is for
      cons_q    <= issue && (op != OP_W);
      cons_b_q  <= (op == OP_RB);
      cons_sb_q <= (op == OP_RA) && (c == 2'd0);
      cons_rc_q <= (op == OP_RA) && (c == 2'd0) && (r == 2'd0);
      // consume the byte read last cycle
      if (cons_q) begin
        reg0_q <= xor_out;
        if (cons_b_q) reg1_q <= xor_out;
      end
    end
  end

  assign busy = busy_q;

  // the external key port must not be used while a schedule runs
  assert property (@(posedge clk) disable iff (!rst_n) busy_q |-> !load_we)
    else $error("key loaded while the key schedule is running");
endmodule
