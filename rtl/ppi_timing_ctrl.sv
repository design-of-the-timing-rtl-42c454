// ppi_timing_ctrl -- timing control block of a programmable peripheral interface
// (PPI) that sits between a CPU bus and the ports of a magnetizing and
// inspection system.
//
// The CPU bus (active-low WRN, RDN, CSN and address A1,A0) is decoded into four
// write strobes and four read enables (bus_decode). Registers load on the rising
// edge of their write strobe and are read back through d_out/d_oe (ppi_regs).
// The write strobe of the control word register also feeds the edge detected
// clock generator (edge_clk_gen): two inverter delay chains and an AND make the
// reset-of-data pulse, about 20 ns wide and starting about 20 ns after the
// write ends, which clears the port output registers. So writing a control word
// stores it at once and then clears all three output ports.
// The block structure follows the design's timing control block diagram; the
// register file behind it and the data width are this design's choices. The
// delay chains are gate-delay models, so the pulse timing is only meaningful in
// simulation; the rest is ordinary synthesisable logic.
//
// Timing (defaults): reset_of_data rises 21.09 ns after wr_n rises at the end of
// a control word write and falls 20.37 ns later; chain outputs d1 and d2
// are brought out for observation.
`timescale 1ns / 1ps
module ppi_timing_ctrl
  import ppi_pkg::*;
#(
  parameter int DATA_W = DATA_W_DEFAULT
) (
  input  logic              rst,
  input  logic              wr_n,
  input  logic              rd_n,
  input  logic              cs_n,
  input  logic [1:0]        a,
  input  logic [DATA_W-1:0] d_in,
  output logic [DATA_W-1:0] d_out,
  output logic              d_oe,
  input  logic [DATA_W-1:0] pa_i,
  input  logic [DATA_W-1:0] pb_i,
  input  logic [DATA_W-1:0] pc_i,
  output logic [DATA_W-1:0] pa_o,
  output logic [DATA_W-1:0] pb_o,
  output logic [DATA_W-1:0] pc_o,
  output logic [DATA_W-1:0] ctrl_word,
  output logic              d1,
  output logic              d2,
  output logic              reset_of_data
);
  logic [3:0] wr_y_n, rd_y_n;

  bus_decode u_bus_decode (
    .wr_n(wr_n), .rd_n(rd_n), .cs_n(cs_n), .a(a),
    .wr_y_n(wr_y_n), .rd_y_n(rd_y_n)
  );

  edge_clk_gen u_edge_clk_gen (
    .strobe(wr_y_n[SEL_CTRL]), .d1(d1), .d2(d2), .p1(reset_of_data)
  );

  ppi_regs #(.DATA_W(DATA_W)) u_regs (
    .rst(rst), .clr_out(reset_of_data),
    .wr_y_n(wr_y_n), .rd_y_n(rd_y_n),
    .d_in(d_in), .d_out(d_out), .d_oe(d_oe),
    .pa_i(pa_i), .pb_i(pb_i), .pc_i(pc_i),
    .pa_o(pa_o), .pb_o(pb_o), .pc_o(pc_o),
    .ctrl_word(ctrl_word)
  );
endmodule
