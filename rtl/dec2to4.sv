// dec2to4 -- 2-to-4 decoder with active-low enable and active-low outputs.
//
// y_n[k] is low while en_n is low and a == k; otherwise every output is high.
// The timing controller uses two of them, one for writes and one for reads.
// Purely combinational. The active-low polarity is chosen so that a write
// strobe returns high, with a rising edge, when the CPU's write ends.
`timescale 1ns / 1ps
module dec2to4 (
  input  logic       en_n,
  input  logic [1:0] a,
  output logic [3:0] y_n
);
  always_comb begin
    y_n = 4'b1111;
    if (!en_n) y_n[a] = 1'b0;
  end
endmodule
