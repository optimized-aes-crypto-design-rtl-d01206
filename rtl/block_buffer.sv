// block_buffer - a data register with a valid flag.
//
// Used as the core's input buffer (a 128-bit block plus its mode bit) and
// output buffer. load captures d and sets valid; clear drops valid (load
// wins when both are high). Data is held until the next load. Asynchronous
// active-low reset clears valid; the data register is not reset.
module block_buffer #(
  parameter int unsigned WIDTH = 128
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic             clear,
  input  logic [WIDTH-1:0] d,
  output logic [WIDTH-1:0] q,
  output logic             valid
);

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)     valid <= 1'b0;
    else if (load)  valid <= 1'b1;
    else if (clear) valid <= 1'b0;

  always_ff @(posedge clk)
    if (load) q <= d;

endmodule
