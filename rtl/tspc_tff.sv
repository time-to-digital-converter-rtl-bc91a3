// Toggle flip-flop of the gray counter.
//
// On a rising clock edge the output inverts when t is high and holds when t is
// low. reset_n (active low) forces 0 and set (active high) forces 1, both
// asynchronously, as the published true-single-phase-clock cell does; in
// normal operation reset_n is high and set is low. Giving reset priority over
// set is this design's choice. The dynamic storage of the transistor cell is
// not modelled: this is its logic function.
`timescale 1ps / 1fs
module tspc_tff (
  input  logic clk,
  input  logic t,
  input  logic reset_n,
  input  logic set,
  output logic q
);
  // set and reset merged into one asynchronous load; the loaded value is
  // reset_n, so an active reset wins over set
  logic aload;
  always_comb aload = !reset_n || set;

  always_ff @(posedge clk or posedge aload) begin
    if (aload)  q <= reset_n;
    else if (t) q <= !q;
  end
endmodule
