// ppi_pkg -- shared constants of the peripheral interface: the register selected
// by the two address lines A1,A0 and the data width.
// Port A, port B, port C and the control word register sit on decoder outputs
// 0, 1, 2 and 3; the binary address-to-output mapping is this design's choice.
`timescale 1ns / 1ps
package ppi_pkg;
  typedef enum logic [1:0] {
    SEL_PORT_A = 2'd0,
    SEL_PORT_B = 2'd1,
    SEL_PORT_C = 2'd2,
    SEL_CTRL   = 2'd3
  } sel_e;

  localparam int DATA_W_DEFAULT = 8;
endpackage
