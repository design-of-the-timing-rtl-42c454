// edge_clk_gen -- edge detected clock generator: turns the rising edge of a write
// strobe into the "reset of data" pulse P1 that clears the output ports.
//
// The strobe passes through a first delay chain of N_INV1 0.5X inverters (even,
// so D1 keeps the strobe's sense) and then through a second chain of N_INV2
// inverters (odd, so D2 is the inverted, further delayed copy). P1 = D1 AND D2 is
// high only in the window after D1 has risen and before D2 has fallen: it starts
// about 20 ns after the strobe's rising edge and lasts about 20 ns. A falling
// strobe reaches D1 (falling) before D2 rises, so it makes no pulse. The AND gate
// adds T_AND of delay. With the defaults P1 rises 20.09 + 1 ns after the strobe
// edge and is 20.37 ns wide.
// The two-chain structure, the 0.5X cell, the chain lengths of 50 and 50 + 1
// cells and the 1 ns AND delay follow the design. The strobe must stay high
// for at least 20.4 ns: if it falls earlier, D1 falls before D2 does and the
// pulse is cut short. At time zero the output settles without delay and makes
// no pulse (a choice of this model). This is a timing model (gate delays), not
// synthesisable logic.
//
// Ports: strobe (rising edge starts the pulse), d1, d2 (the two chain outputs,
// brought out for observation), p1 (reset of data, active high).
`timescale 1ns / 1ps
module edge_clk_gen
  import delay_model_pkg::*;
#(
  parameter int  N_INV1 = 50,
  parameter int  N_INV2 = 51,
  parameter real T_AND  = 1.0
) (
  input  logic strobe,
  output logic d1,
  output logic d2,
  output logic p1
);
  delay_chain #(.N_INV(N_INV1), .DRIVE(DRIVE_0P5X)) u_chain1 (.din(strobe), .dout(d1));
  delay_chain #(.N_INV(N_INV2), .DRIVE(DRIVE_0P5X)) u_chain2 (.din(d1),     .dout(d2));

  initial begin
    p1 = d1 & d2;
    forever begin
      @(d1 or d2);
      if ($realtime == 0.0) p1 = d1 & d2;   // power-up settling
      else                  p1 <= #(T_AND) (d1 & d2);
    end
  end
endmodule
