// delay_model_pkg -- cell data and the linear delay predict equation for the
// 0.8 um sea-of-gates inverter cells used in the timing controller's delay chains.
//
// The total delay of one inverter stage is
//   t = ( Dint + Clinear * [ sum of pin caps on the output net
//                            + (Cestimation * pins on the net + Cap0) ] ) * derating
// where Dint and Clinear depend on the cell and on the direction of the output
// transition. The sum of pin caps is the cell's own output pin cap plus the input
// pin caps it drives. Cestimation and Cap0 are the wiring estimate of the chosen
// base array (0.096 pF per pin and 0.029 pF), the derating factor is 0.5.
// All cell numbers follow the cell table of the design (IN01D0 = 0.5X drive,
// IN01D1 = 1X drive); times are in ns and capacitances in pF.
// The functions are evaluated at elaboration time only; nothing here is logic.
`timescale 1ns / 1ps
package delay_model_pkg;

  typedef enum logic {DRIVE_0P5X = 1'b0, DRIVE_1X = 1'b1} drive_e;

  // IN01D0 (0.5X)
  localparam real IN01D0_DINT_RISE = 0.09;   // ns, internal delay, output rising
  localparam real IN01D0_CLIN_RISE = 3.35;   // ns/pF, slew rate, output rising
  localparam real IN01D0_DINT_FALL = 0.07;   // ns, internal delay, output falling
  localparam real IN01D0_CLIN_FALL = 1.43;   // ns/pF, slew rate, output falling
  localparam real IN01D0_C_IN      = 0.043;  // pF, input pin I
  localparam real IN01D0_C_ZN      = 0.040;  // pF, output pin ZN
  // IN01D1 (1X)
  localparam real IN01D1_DINT_RISE = 0.11;
  localparam real IN01D1_CLIN_RISE = 1.68;
  localparam real IN01D1_DINT_FALL = 0.06;
  localparam real IN01D1_CLIN_FALL = 0.71;
  localparam real IN01D1_C_IN      = 0.087;
  localparam real IN01D1_C_ZN      = 0.043;

  // Wiring estimate of the base array (vgc400186) and derating factor.
  localparam real C_ESTIMATION    = 0.096;  // pF per connected pin
  localparam real CAP0            = 0.029;  // pF per net
  localparam real DERATING_FACTOR = 0.5;

  // Load at the end of a delay chain (the pin the chain drives).
  localparam real C_END_LOAD      = 0.1;    // pF

  function automatic real c_in_of(drive_e drive);
    return (drive == DRIVE_1X) ? IN01D1_C_IN : IN01D0_C_IN;
  endfunction

  // Stage delay for one output transition (rise = 1: output rising).
  // load_pins: input pin capacitance driven by the stage (pF);
  // n_pins: number of pins connected on the output net.
  function automatic real stage_delay(drive_e drive, bit rise, real load_pins,
                                      int n_pins, real derating);
    real dint, clin, czn, cnet;
    if (drive == DRIVE_1X) begin
      dint = rise ? IN01D1_DINT_RISE : IN01D1_DINT_FALL;
      clin = rise ? IN01D1_CLIN_RISE : IN01D1_CLIN_FALL;
      czn  = IN01D1_C_ZN;
    end else begin
      dint = rise ? IN01D0_DINT_RISE : IN01D0_DINT_FALL;
      clin = rise ? IN01D0_CLIN_RISE : IN01D0_CLIN_FALL;
      czn  = IN01D0_C_ZN;
    end
    cnet = czn + load_pins + (C_ESTIMATION * real'(n_pins) + CAP0);
    return (dint + clin * cnet) * derating;
  endfunction

  // Delay of one inverter pair inside a chain of equal cells (rise + fall),
  // the per-pair slope of the delay predict value D(x) = pair_delay * N.
  function automatic real pair_delay(drive_e drive);
    real cin;
    cin = c_in_of(drive);
    return stage_delay(drive, 1'b1, cin, 2, DERATING_FACTOR) +
           stage_delay(drive, 1'b0, cin, 2, DERATING_FACTOR);
  endfunction

endpackage
