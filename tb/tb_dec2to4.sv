// tb_dec2to4 -- exhaustive check of the 2-to-4 decoder: every enable and address
// combination, expected outputs worked out bit by bit.
`timescale 1ns / 1ps
module tb_dec2to4;
  int checks = 0, failures = 0;
  logic en_n;
  logic [1:0] a;
  logic [3:0] y_n;

  dec2to4 dut (.en_n(en_n), .a(a), .y_n(y_n));

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 2; r++)
      for (int e = 0; e < 2; e++)
        for (int k = 0; k < 4; k++) begin
          en_n = e[0];
          a = k[1:0];
          #1;
          for (int b = 0; b < 4; b++) begin
            logic exp_b;
            exp_b = (e == 0 && b == k) ? 1'b0 : 1'b1;
            checks++;
            if (y_n[b] !== exp_b) begin
              failures++;
              $display("FAIL en_n=%0d a=%0d y_n[%0d]=%0b expected %0b", e, k, b, y_n[b], exp_b);
            end
          end
        end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
