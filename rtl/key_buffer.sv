// key_buffer - register file for the decryption round keys.
//
// DEPTH entries of WIDTH bits, written synchronously (we, waddr, wdata) and
// read asynchronously (raddr -> rdata). The core fills it during key setup
// with the 11 round keys of the equivalent inverse cipher, entry r holding
// the key used in decryption round r, and reads it by round number while
// decrypting. No reset: every entry is written before it is read.
module key_buffer #(
  parameter int unsigned DEPTH = 11,
  parameter int unsigned WIDTH = 128,
  localparam int unsigned AW = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk)
    if (we && waddr < AW'(DEPTH)) mem[waddr] <= wdata;

  assign rdata = (raddr < AW'(DEPTH)) ? mem[raddr] : '0;

endmodule
