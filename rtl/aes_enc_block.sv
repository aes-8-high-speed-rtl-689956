// aes_enc_block - byte-serial AES round datapath (the "encryption block") with its sequencer.
//
// The 16-byte state lives in an 8x16 Data RAM (address = 4*col + row). One command runs at a
// time, started by a start pulse while busy is low:
//
//  CMD_ARK_SB_SR (36 cycles): AddRoundKey, SubBytes and ShiftRows in one pass. Each row takes
//    one control cycle and 8 RAM cycles in the pattern R R W R W R W W. A read byte is XORed
//    with the round key byte (read from the Key RAM at the same address in the same cycle),
//    substituted by the S-box and caught in the 8-bit ShiftRows buffer D; D is written back to
//    the column the byte moves to under ShiftRows (col - row mod 4). The registered RAM output
//    holds the next byte meanwhile, so with the read order below no byte is overwritten before
//    it is read: row 0: cols 0,1,2,3; row 1: 0,3,2,1; row 2: 0,2,1,3; row 3: 0,1,2,3.
//  CMD_MIXCOL (33 cycles): per column, 4 reads shifted into the MixColumns registers, then
//    4 writes of its output with sel = row. The first byte of the next column is read in the
//    cycle that loads the last register and waits in the RAM output register during the
//    writes, so a column costs 8 cycles plus one at the start (1 + 4 x 8).
//  CMD_FINAL_ARK (17 cycles): the state and the last round key are read byte 0..15 and their
//    XOR leaves on ct_data with ct_valid, one byte per cycle, one cycle after each read.
//
// A start in the last cycle of a command (last_cycle) chains the next command with no gap.
// Plaintext is written through the RAM input mux (load_we) while no command runs.
// rows_read tells the key expansion how many rows of the current round key have been read
// (4 when no AddRoundKey pass is running) so it may overwrite them.
// Structure (RAM, input and output 2:1 muxes, ARK XOR, S-box, D buffer, MixColumns, ARK +
// SubBytes + ShiftRows fused in one 36-cycle pass with 8 cycles per row and 4 control cycles)
// follows the architecture. The read/write schedule, the command interface and the
// 33-cycle MixColumns pass (the architecture quotes 28, which a single-port RAM needing 4
// reads and 4 writes per column cannot reach) are choices of this design.
module aes_enc_block
  import aes8_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  // plaintext loading
  input  logic       load_we,
  input  addr_t      load_addr,
  input  byte_t      load_data,
  // command
  input  logic       start,
  input  enc_cmd_e   cmd,
  output logic       busy,
  output logic       last_cycle,   // busy and in the last cycle: a new start is accepted
  // round key
  output logic       key_re,
  output addr_t      key_addr,
  input  byte_t      key_in,
  output logic [2:0] rows_read,
  // ciphertext
  output logic       ct_valid,
  output byte_t      ct_data
);
  enc_cmd_e    cmd_q;
  logic        busy_q;
  logic  [5:0] cnt_q;
  logic  [5:0] last;
  logic  [1:0] grp;          // row (ARK pass) or column (MixColumns)
  logic  [3:0] ph;           // cycle within a group, 0..8
  logic  [1:0] mc_col;       // MixColumns: column
  logic  [2:0] mc_u;         // MixColumns: cycle within the column, 0..7

  // RAM port
  logic  ram_we, ram_re;
  addr_t ram_addr;
  byte_t ram_wdata, ram_rdata;

  // datapath
  byte_t ark, sb_out, d_q, mc_out;
  logic  d_load, mc_en, ct_pend_q;
  logic  [1:0] mc_sel;
  logic  use_mc;

  // read order of a row in the fused pass
  function automatic logic [1:0] rd_col(input logic [1:0] row, input logic [1:0] i);
    unique case (row)
      2'd1:    return 2'd0 - i;                      // 0,3,2,1
      2'd2:    return (i == 2'd1) ? 2'd2 :
                      (i == 2'd2) ? 2'd1 : i;       // 0,2,1,3
      default: return i;                             // 0,1,2,3
    endcase
  endfunction

  always_comb begin
    grp    = 2'(cnt_q / 6'd9);
    ph     = 4'(cnt_q % 6'd9);
    mc_col = 2'((cnt_q - 6'd1) >> 3);
    mc_u   = 3'(cnt_q - 6'd1);
    unique case (cmd_q)
      CMD_FINAL_ARK: last = 6'd16;
      CMD_MIXCOL:    last = 6'd32;
      default:       last = 6'd35;
    endcase
  end

  always_comb begin
    ram_we   = 1'b0;
    ram_re   = 1'b0;
    ram_addr = load_addr;
    use_mc   = 1'b0;
    d_load   = 1'b0;
    mc_en    = 1'b0;
    mc_sel   = 2'd0;
    key_re   = 1'b0;
    rows_read = 3'd4;
    if (load_we && !busy_q) begin
      ram_we = 1'b1;
    end else if (busy_q) begin
      unique case (cmd_q)
        CMD_ARK_SB_SR: begin
          // ph 0: control cycle; ph 1..8: R R W R W R W W
          rows_read = {1'b0, grp} + ((ph >= 4'd7) ? 3'd1 : 3'd0);
          d_load    = (ph == 4'd2) || (ph == 4'd3) || (ph == 4'd5) || (ph == 4'd7);
          unique case (ph)
            4'd1: begin ram_re = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd0)); end
            4'd2: begin ram_re = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd1)); end
            4'd4: begin ram_re = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd2)); end
            4'd6: begin ram_re = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd3)); end
            4'd3: begin ram_we = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd0) - grp); end
            4'd5: begin ram_we = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd1) - grp); end
            4'd7: begin ram_we = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd2) - grp); end
            4'd8: begin ram_we = 1'b1; ram_addr = mk_addr(grp, rd_col(grp, 2'd3) - grp); end
            default: ;
          endcase
          key_re = ram_re;
        end
        CMD_MIXCOL: begin
          // cycle 0 reads row 0 of column 0; then 8 cycles per column (t = cnt - 1):
          // u 0..2 read rows 1..3, u 3 reads row 0 of the next column ahead (it waits in the
          // RAM output register), u 0..3 shift the previous read byte in, u 4..7 write rows 0..3
          use_mc = 1'b1;
          if (cnt_q == 6'd0) begin
            ram_re   = 1'b1;
            ram_addr = mk_addr(2'd0, 2'd0);
          end else begin
            mc_en = (mc_u <= 3'd3);
            if (mc_u <= 3'd2) begin
              ram_re   = 1'b1;
              ram_addr = mk_addr(2'(mc_u + 3'd1), mc_col);
            end else if (mc_u == 3'd3) begin
              ram_re   = (mc_col != 2'd3);
              ram_addr = mk_addr(2'd0, mc_col + 2'd1);
            end else begin
              ram_we   = 1'b1;
              mc_sel   = 2'(mc_u - 3'd4);
              ram_addr = mk_addr(mc_sel, mc_col);
            end
          end
        end
        default: begin // CMD_FINAL_ARK
          rows_read = 3'd0;
          if (cnt_q <= 6'd15) begin
            ram_re   = 1'b1;
            ram_addr = cnt_q[3:0];
          end
          key_re = ram_re;
        end
      endcase
    end
  end

  assign key_addr  = ram_addr;
  assign ram_wdata = (load_we && !busy_q) ? load_data : (use_mc ? mc_out : d_q);

  aes_ram8x16 u_data_ram (
    .clk  (clk),
    .we   (ram_we),
    .re   (ram_re),
    .addr (ram_addr),
    .wdata(ram_wdata),
    .rdata(ram_rdata)
  );

  // AddRoundKey, SubBytes, ShiftRows buffer
  assign ark = ram_rdata ^ key_in;
  aes_sbox u_sbox (.din(ark), .dout(sb_out));

  aes_mixcolumns u_mixcol (
    .clk (clk),
    .en  (mc_en),
    .din (ram_rdata),
    .sel (mc_sel),
    .dout(mc_out)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy_q    <= 1'b0;
      cmd_q     <= CMD_ARK_SB_SR;
      cnt_q     <= '0;
      d_q       <= '0;
      ct_pend_q <= 1'b0;
    end else begin
      if (start && (!busy_q || cnt_q == last)) begin
        busy_q <= 1'b1;
        cmd_q  <= cmd;
        cnt_q  <= '0;
      end else if (busy_q) begin
        cnt_q <= cnt_q + 6'd1;
        if (cnt_q == last) busy_q <= 1'b0;
      end
      if (d_load) d_q <= sb_out;
      ct_pend_q <= busy_q && (cmd_q == CMD_FINAL_ARK) && ram_re;
    end
  end

  assign busy       = busy_q;
  assign last_cycle = busy_q && (cnt_q == last);
  assign ct_valid = ct_pend_q;
  assign ct_data  = ark;

  // plaintext may only be written while no command runs
  assert property (@(posedge clk) disable iff (!rst_n) busy_q |-> !load_we)
    else $error("plaintext written while a command runs");
endmodule
