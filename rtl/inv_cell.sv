// inv_cell -- behavioural model of the IN01D0 (0.5X) / IN01D1 (1X) inverter cell
// of a 0.8 um CMOS sea-of-gates library. This is a timing model, not logic to
// synthesise: the cell exists only to give the delay chain its physical delay.
//
// zn follows ~i after a transport delay that depends on the direction of the
// output edge. Both delays come from the linear delay predict equation in
// delay_model_pkg: internal delay plus slew rate times the capacitance on the
// output net (own ZN pin, the pins driven, and a wiring estimate per pin), all
// times the derating factor. The cell data, the wiring estimate and the 0.5
// derating are the design's. Two choices are this model's own: the delay is
// inertial (an input change cancels an output change still pending from an
// earlier one, so pulses shorter than the delay are swallowed), and at time
// zero the output settles to ~i without delay.
//
// Ports: i (input pin I), zn (output pin ZN).
// Parameters: DRIVE selects the cell, LOAD_PF is the input capacitance the cell
// drives, N_PINS the pins on its output net, DERATING the derating factor.
// With the defaults (0.5X cell driving one 0.5X input) the output rises
// 0.5542 ns and falls 0.25235 ns after the input edge.
`timescale 1ns / 1ps
module inv_cell
  import delay_model_pkg::*;
#(
  parameter drive_e DRIVE    = DRIVE_0P5X,
  parameter real    LOAD_PF  = 0.043,
  parameter int     N_PINS   = 2,
  parameter real    DERATING = DERATING_FACTOR
) (
  input  logic i,
  output logic zn
);
  localparam real T_RISE = stage_delay(DRIVE, 1'b1, LOAD_PF, N_PINS, DERATING);
  localparam real T_FALL = stage_delay(DRIVE, 1'b0, LOAD_PF, N_PINS, DERATING);

  // Every input change gets a new sequence number; a delayed output change
  // is applied only if no newer input change has happened meanwhile.
  int unsigned seq;

  initial begin
    seq = 0;
    zn  = ~i;
    forever begin
      @(i);
      seq++;
      // changes at time zero are the power-up settling of the chain: no delay
      if ($realtime == 0.0) zn = ~i;
      else if (i) begin
        fork
          begin
            automatic int unsigned s = seq;
            #(T_FALL);
            if (s == seq) zn = 1'b0;
          end
        join_none
      end else begin
        fork
          begin
            automatic int unsigned s = seq;
            #(T_RISE);
            if (s == seq) zn = 1'b1;
          end
        join_none
      end
    end
  end
endmodule
