// delay_chain -- behavioural model of a serial chain of N_INV inverter cells, the
// delay element of the edge detected clock generator.
//
// Every cell drives the input of the next one over a two-pin net; the last cell
// drives the chain's load (0.1 pF over a one-pin wiring estimate), as in the
// design's four-stage chain model. The chain delay is therefore the sum of
// alternating rise and fall stage delays. For 0.5X cells one rise plus one fall
// costs 0.80655 ns, so 50 cells (the default) give about 20.1 ns (the lighter
// end load makes the last stage a little faster than an inner one); an even N_INV
// keeps the sense of the input, an odd one inverts it.
// Cell type, chain length, the per-stage loads and the end load follow the
// design; everything is a timing model, not synthesisable logic.
//
// Ports: din (chain input), dout (output of the last cell).
`timescale 1ns / 1ps
module delay_chain
  import delay_model_pkg::*;
#(
  parameter int     N_INV   = 50,
  parameter drive_e DRIVE   = DRIVE_0P5X,
  parameter real    END_PF  = C_END_LOAD
) (
  input  logic din,
  output logic dout
);
  logic [N_INV:0] node;

  assign node[0] = din;

  for (genvar k = 0; k < N_INV; k++) begin : g_stage
    if (k < N_INV - 1) begin : g_mid
      inv_cell #(.DRIVE(DRIVE), .LOAD_PF(c_in_of(DRIVE)), .N_PINS(2))
        u_inv (.i(node[k]), .zn(node[k+1]));
    end else begin : g_last
      inv_cell #(.DRIVE(DRIVE), .LOAD_PF(END_PF), .N_PINS(1))
        u_inv (.i(node[k]), .zn(node[k+1]));
    end
  end

  assign dout = node[N_INV];
endmodule
