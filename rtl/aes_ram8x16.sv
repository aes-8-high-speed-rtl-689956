// aes_ram8x16 - 16 x 8-bit single-port RAM used as the Data RAM and as the Key RAM.
//
// One access per clock: a write (we=1) stores wdata at addr; a read (re=1) loads the byte at
// addr into the registered output rdata, which then holds its value until the next read
// (a write does not disturb it). Reads thus have one cycle of latency, like a synchronous FPGA
// RAM. Holding the read byte in rdata gives the datapath a second byte of storage next to the
// ShiftRows buffer, which is what lets a row be rotated in place with one buffer register.
// we and re are never asserted together by the users; if they are, the write wins the
// array and the read returns the old contents. The 8x16 size follows the architecture;
// the synchronous, held read port is a choice of this design.
module aes_ram8x16
  import aes8_pkg::*;
#(
  parameter int unsigned DEPTH = 16,
  parameter int unsigned WIDTH = 8
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic                     re,
  input  logic [$clog2(DEPTH)-1:0] addr,
  input  logic [WIDTH-1:0]         wdata,
  output logic [WIDTH-1:0]         rdata
);
  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    if (re) rdata <= mem[addr];
  end
endmodule
