// bus_decode -- CPU bus command decoder of the timing controller.
//
// WRN, RDN and CSN are inverted and combined: a NAND of WR and CS enables the
// write decoder, a NAND of RD and CS enables the read decoder. Each 2-to-4
// decoder turns the address A1,A0 into one active-low line per register:
// wr_y_n[k] is the write strobe of register k and rises when the write ends,
// rd_y_n[k] is the read enable that puts register k on the data bus.
// Index 0..3 = port A, port B, port C, control word (see ppi_pkg).
// The gates and the two decoders follow the design's block diagram; the output
// polarity and the index order are this design's reading of it.
// Purely combinational, no clock.
`timescale 1ns / 1ps
module bus_decode (
  input  logic       wr_n,
  input  logic       rd_n,
  input  logic       cs_n,
  input  logic [1:0] a,
  output logic [3:0] wr_y_n,
  output logic [3:0] rd_y_n
);
  logic wr, rd, cs;
  logic wr_en_n, rd_en_n;

  assign wr = ~wr_n;
  assign rd = ~rd_n;
  assign cs = ~cs_n;

  assign wr_en_n = ~(wr & cs);
  assign rd_en_n = ~(rd & cs);

  dec2to4 u_dec_wr (.en_n(wr_en_n), .a(a), .y_n(wr_y_n));
  dec2to4 u_dec_rd (.en_n(rd_en_n), .a(a), .y_n(rd_y_n));
endmodule
