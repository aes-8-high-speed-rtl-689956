// aes_rcon - round constant generator of the key expansion.
//
// Holds Rcon for the round key being generated: 01 after init, multiplied by x in GF(2^8) on
// every next pulse (01,02,04,...,80,1b,36). The constant reaches the key datapath only while
// rcon_en is high (the byte that takes it is row 0 of column 0); otherwise rcon is 00.
// Registered value, combinational gating. init has priority over next.
module aes_rcon
  import aes8_pkg::*;
(
  input  logic  clk,
  input  logic  init,     // load 01 (start of a new key schedule)
  input  logic  next,     // advance to the next round's constant
  input  logic  rcon_en,  // pass the constant to the output
  output byte_t rcon
);
  byte_t rc_q;

  always_ff @(posedge clk) begin
    if (init)      rc_q <= 8'h01;
    else if (next) rc_q <= xtime(rc_q);
  end

  assign rcon = rcon_en ? rc_q : 8'h00;
endmodule
