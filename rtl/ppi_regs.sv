// ppi_regs -- register file of the peripheral interface: the control word
// register, the output registers of ports A, B and C, and the read path back
// onto the CPU data bus.
//
// Each register is loaded from d_in on the rising edge of its active-low write
// strobe, i.e. when the CPU's write ends: the interface is clocked by the bus
// strobes, there is no system clock. The port output registers are cleared
// asynchronously by clr_out (the reset-of-data pulse made after a control word
// write) and by rst; the control word register is cleared only by rst.
// While a read enable is low, d_oe is high and d_out carries the control word
// (index 3) or the pins of port C, B or A (index 2, 1, 0).
// What the registers are for (store the control word, clear the output ports,
// put register contents on the bus) follows the design. The data width, reading
// the port pins rather than the output registers, the reset input and the
// strobe-edge clocking details are this design's choices; port direction and
// operating modes coded in the control word are not part of this block.
// Immediate assertions check that at most one write strobe and one read enable
// are active at a time, which the bus decoder guarantees.
`timescale 1ns / 1ps
module ppi_regs
  import ppi_pkg::*;
#(
  parameter int DATA_W = DATA_W_DEFAULT
) (
  input  logic              rst,      // asynchronous, active high
  input  logic              clr_out,  // reset of data, active high
  input  logic [3:0]        wr_y_n,   // write strobes, register loads on rising edge
  input  logic [3:0]        rd_y_n,   // read enables, active low
  input  logic [DATA_W-1:0] d_in,
  output logic [DATA_W-1:0] d_out,
  output logic              d_oe,
  input  logic [DATA_W-1:0] pa_i,
  input  logic [DATA_W-1:0] pb_i,
  input  logic [DATA_W-1:0] pc_i,
  output logic [DATA_W-1:0] pa_o,
  output logic [DATA_W-1:0] pb_o,
  output logic [DATA_W-1:0] pc_o,
  output logic [DATA_W-1:0] ctrl_word
);
  logic clr;
  assign clr = rst | clr_out;

  always_ff @(posedge wr_y_n[SEL_CTRL] or posedge rst)
    if (rst) ctrl_word <= '0;
    else     ctrl_word <= d_in;

  always_ff @(posedge wr_y_n[SEL_PORT_A] or posedge clr)
    if (clr) pa_o <= '0;
    else     pa_o <= d_in;

  always_ff @(posedge wr_y_n[SEL_PORT_B] or posedge clr)
    if (clr) pb_o <= '0;
    else     pb_o <= d_in;

  always_ff @(posedge wr_y_n[SEL_PORT_C] or posedge clr)
    if (clr) pc_o <= '0;
    else     pc_o <= d_in;

  // bus rule: the decoder activates at most one write strobe and one read
  // enable at a time
  always_comb begin
    if (!rst) begin
      assert ($countones(~wr_y_n) <= 1) else $error("several write strobes active");
      assert ($countones(~rd_y_n) <= 1) else $error("several read enables active");
    end
  end

  always_comb begin
    d_oe  = ~&rd_y_n;
    d_out = '0;
    unique case (1'b0)
      rd_y_n[SEL_CTRL]:   d_out = ctrl_word;
      rd_y_n[SEL_PORT_C]: d_out = pc_i;
      rd_y_n[SEL_PORT_B]: d_out = pb_i;
      rd_y_n[SEL_PORT_A]: d_out = pa_i;
      default:            d_out = '0;
    endcase
  end
endmodule
