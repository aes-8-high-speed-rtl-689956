// aes_mixcolumns - byte-serial MixColumns unit.
//
// Four 8-bit registers S0..S3 hold one state column. While en is high a byte is shifted in
// per clock (S0<-S1, S1<-S2, S2<-S3, S3<-din), so after four enables S0 holds row 0 and S3
// row 3. A shifter rotates the four register outputs by sel, and the result byte is
//   dout = 02*S[sel] ^ 03*S[sel+1] ^ S[sel+2] ^ S[sel+3]   (indices mod 4),
// built from two constant multipliers (x02, x03) and three GF(2^8) adders, i.e. sel = 0..3
// gives the new row 0..3 of the column. dout is combinational from the registers and sel.
// The register/shifter/multiplier structure and the per-sel formula follow the architecture;
// the shift direction of the load is a choice of this design.
module aes_mixcolumns
  import aes8_pkg::*;
(
  input  logic       clk,
  input  logic       en,
  input  byte_t      din,
  input  logic [1:0] sel,
  output byte_t      dout
);
  byte_t s [4];
  byte_t a, b, c, d;

  always_ff @(posedge clk) begin
    if (en) begin
      s[0] <= s[1];
      s[1] <= s[2];
      s[2] <= s[3];
      s[3] <= din;
    end
  end

  // shifter
  always_comb begin
    a = s[sel];
    b = s[2'(sel + 2'd1)];
    c = s[2'(sel + 2'd2)];
    d = s[2'(sel + 2'd3)];
  end

  // two multipliers, three adders
  assign dout = (xtime(a) ^ (xtime(b) ^ b)) ^ (c ^ d);
endmodule
