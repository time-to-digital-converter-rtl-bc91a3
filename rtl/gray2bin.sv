// Gray to binary converter (one per counter sample).
//
// Reflected gray code to binary: the top bit is copied and every lower binary
// bit is the XOR of the binary bit above it and its own gray bit.
// Combinational.
`timescale 1ps / 1fs
module gray2bin #(
  parameter int unsigned WIDTH = tdc_pkg::CNT_BITS
) (
  input  logic [WIDTH-1:0] g,
  output logic [WIDTH-1:0] b
);
  always_comb begin
    b[WIDTH-1] = g[WIDTH-1];
    for (int i = int'(WIDTH) - 2; i >= 0; i--) b[i] = b[i+1] ^ g[i];
  end
endmodule
