// tb_bus_decode -- exhaustive check of the bus command decoder over WRN, RDN,
// CSN and A1,A0: a write line is low only for WR and CS both active at its
// address, a read line likewise for RD and CS.
`timescale 1ns / 1ps
module tb_bus_decode;
  int checks = 0, failures = 0;
  logic wr_n, rd_n, cs_n;
  logic [1:0] a;
  logic [3:0] wr_y_n, rd_y_n;

  bus_decode dut (.wr_n(wr_n), .rd_n(rd_n), .cs_n(cs_n), .a(a),
                  .wr_y_n(wr_y_n), .rd_y_n(rd_y_n));

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      logic [3:0] exp_w, exp_r;
      {wr_n, rd_n, cs_n, a} = v[4:0];
      #1;
      exp_w = 4'hF;
      exp_r = 4'hF;
      if (wr_n == 1'b0 && cs_n == 1'b0) exp_w = ~(4'b0001 << a);
      if (rd_n == 1'b0 && cs_n == 1'b0) exp_r = ~(4'b0001 << a);
      checks += 2;
      if (wr_y_n !== exp_w) begin
        failures++;
        $display("FAIL wr_n=%0b rd_n=%0b cs_n=%0b a=%0d wr_y_n=%b expected %b", wr_n, rd_n, cs_n, a, wr_y_n, exp_w);
      end
      if (rd_y_n !== exp_r) begin
        failures++;
        $display("FAIL wr_n=%0b rd_n=%0b cs_n=%0b a=%0d rd_y_n=%b expected %b", wr_n, rd_n, cs_n, a, rd_y_n, exp_r);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
