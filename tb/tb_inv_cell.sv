// tb_inv_cell -- checks the rise and fall delays and the logic of the inverter
// cell model for both drive strengths against hand-computed values.
`timescale 1ns / 1ps
module tb_inv_cell;
  import delay_model_pkg::*;
  int checks = 0, failures = 0;

  logic a;
  logic zn_0p5, zn_1x;
  realtime t_in, t_0p5, t_1x;

  // 0.5X cell driving one 0.5X input; 1X cell driving one 1X input
  inv_cell #(.DRIVE(DRIVE_0P5X), .LOAD_PF(0.043), .N_PINS(2)) dut0 (.i(a), .zn(zn_0p5));
  inv_cell #(.DRIVE(DRIVE_1X),   .LOAD_PF(0.087), .N_PINS(2)) dut1 (.i(a), .zn(zn_1x));

  always @(posedge zn_0p5 or negedge zn_0p5) t_0p5 = $realtime;
  always @(posedge zn_1x or negedge zn_1x)  t_1x  = $realtime;

  task automatic check_delay(string what, realtime got, real exp);
    checks++;
    if (got < exp - 0.002 || got > exp + 0.002) begin
      failures++;
      $display("FAIL %s: delay %0.4f ns, expected %0.4f ns", what, got, exp);
    end
  endtask

  task automatic check_val(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %0b, expected %0b", what, got, exp);
    end
  endtask

  initial begin
    #1000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    a = 1'b1;
    #10;
    check_val("0.5X settled high input", zn_0p5, 1'b0);
    check_val("1X settled high input", zn_1x, 1'b0);
    repeat (3) begin
      // falling input -> rising output
      a = 1'b0; t_in = $realtime;
      #10;
      check_val("0.5X out after fall", zn_0p5, 1'b1);
      check_val("1X out after fall", zn_1x, 1'b1);
      // (0.09 + 3.35*(0.040+0.043+0.192+0.029))*0.5
      check_delay("0.5X rise", t_0p5 - t_in, 0.5542);
      // (0.11 + 1.68*(0.043+0.087+0.192+0.029))*0.5
      check_delay("1X rise", t_1x - t_in, 0.34984);
      // rising input -> falling output
      a = 1'b1; t_in = $realtime;
      #10;
      check_val("0.5X out after rise", zn_0p5, 1'b0);
      check_val("1X out after rise", zn_1x, 1'b0);
      check_delay("0.5X fall", t_0p5 - t_in, 0.25235);
      check_delay("1X fall", t_1x - t_in, 0.154605);
    end
    // output must not have moved before the rise delay has passed
    a = 1'b0;
    #0.3;
    check_val("0.5X still low at 0.3 ns", zn_0p5, 1'b0);
    check_val("1X still low at 0.3 ns", zn_1x, 1'b0);
    #0.1;
    check_val("1X high at 0.4 ns", zn_1x, 1'b1);
    check_val("0.5X still low at 0.4 ns", zn_0p5, 1'b0);
    #10;
    // inertial delay: an input pulse shorter than the delay is swallowed
    a = 1'b1;
    #10;
    t_0p5 = 0.0; t_1x = 0.0;
    a = 1'b0;
    #0.2 a = 1'b1;
    #10;
    check_val("0.5X short pulse swallowed", zn_0p5, 1'b0);
    check_val("1X short pulse swallowed", zn_1x, 1'b0);
    checks++;
    if (t_0p5 != 0.0 || t_1x != 0.0) begin
      failures++;
      $display("FAIL short input pulse reached an output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
