// tb_delay_chain -- measures inverter chain delays for both edges and for every
// chain length studied for the design (2 to 50 cells, plus 4 and 51), and
// compares them with the per-stage reference (tb_delay_ref_pkg), with the
// four-stage worked example (1.585225 ns) and with the per-pair predict
// values D(x) = 0.80655 ns * pairs (0.5X) and 0.514 ns * pairs (1X).
`timescale 1ns / 1ps
module tb_delay_chain;
  import delay_model_pkg::*;
  import tb_delay_ref_pkg::*;
  int checks = 0, failures = 0;

  // every length of the delay-versus-length study (2, 6, ..., 50), plus the
  // four-cell example and the 51-cell inverting chain
  localparam int NL = 15;
  localparam int LENS [NL] = '{2, 4, 6, 10, 14, 18, 22, 26, 30, 34, 38, 42, 46, 50, 51};

  logic din;
  logic [NL-1:0] out_0p5, out_1x;
  realtime t_0p5 [NL];
  realtime t_1x  [NL];
  realtime t_in;

  for (genvar g = 0; g < NL; g++) begin : g_len
    delay_chain #(.N_INV(LENS[g]), .DRIVE(DRIVE_0P5X)) u_0p5 (.din(din), .dout(out_0p5[g]));
    delay_chain #(.N_INV(LENS[g]), .DRIVE(DRIVE_1X))   u_1x  (.din(din), .dout(out_1x[g]));
    always @(posedge out_0p5[g] or negedge out_0p5[g]) t_0p5[g] = $realtime;
    always @(posedge out_1x[g] or negedge out_1x[g])  t_1x[g]  = $realtime;
  end

  task automatic check_near(string what, real got, real exp, real tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: %0.4f ns, expected %0.4f ns", what, got, exp);
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
    #2000;
    failures++;
    $display("FAIL watchdog");
    // table of rising-input delays against the pair prediction
    $display("cells  0.5X ns  D(x) 0.80655*N/2   1X ns  D(x) 0.514*N/2");
    for (int g = 0; g < NL; g++)
      $display("%5d  %7.3f  %17.3f  %6.3f  %15.3f", LENS[g],
               ref_chain(1'b0, LENS[g], 1'b1), 0.80655 * LENS[g] / 2.0,
               ref_chain(1'b1, LENS[g], 1'b1), 0.514 * LENS[g] / 2.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = 1'b0;
    #100;
    for (int e = 0; e < 4; e++) begin
      bit rising;
      rising = (e % 2 == 0);
      din = rising; t_in = $realtime;
      #100;
      for (int g = 0; g < NL; g++) begin
        logic exp_v;
        exp_v = (LENS[g] % 2 == 0) ? din : ~din;
        check_val($sformatf("0.5X n=%0d level", LENS[g]), out_0p5[g], exp_v);
        check_val($sformatf("1X n=%0d level", LENS[g]), out_1x[g], exp_v);
        check_near($sformatf("0.5X n=%0d %s", LENS[g], rising ? "rise" : "fall"),
                   t_0p5[g] - t_in, ref_chain(1'b0, LENS[g], rising), 0.003);
        check_near($sformatf("1X n=%0d %s", LENS[g], rising ? "rise" : "fall"),
                   t_1x[g] - t_in, ref_chain(1'b1, LENS[g], rising), 0.003);
        // predict equation: pairs * per-pair delay; the end stage load makes
        // the chain slightly faster, within 1.5 % (0.5X) and 3 % (1X)
        if (LENS[g] >= 22) begin
          check_near($sformatf("0.5X n=%0d vs D(x)", LENS[g]), t_0p5[g] - t_in,
                     0.80655 * LENS[g] / 2.0, 0.015 * 0.80655 * LENS[g] / 2.0);
          check_near($sformatf("1X n=%0d vs D(x)", LENS[g]), t_1x[g] - t_in,
                     0.514 * LENS[g] / 2.0, 0.03 * 0.514 * LENS[g] / 2.0);
        end
        // four-cell worked example: falling input, D1 + D2 + D3 + D4 = 1.585225 ns
        if (LENS[g] == 4 && !rising)
          check_near("0.5X four-cell example", t_0p5[g] - t_in, 1.585225, 0.003);
      end
    end
    // table of rising-input delays against the pair prediction
    $display("cells  0.5X ns  D(x) 0.80655*N/2   1X ns  D(x) 0.514*N/2");
    for (int g = 0; g < NL; g++)
      $display("%5d  %7.3f  %17.3f  %6.3f  %15.3f", LENS[g],
               ref_chain(1'b0, LENS[g], 1'b1), 0.80655 * LENS[g] / 2.0,
               ref_chain(1'b1, LENS[g], 1'b1), 0.514 * LENS[g] / 2.0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
