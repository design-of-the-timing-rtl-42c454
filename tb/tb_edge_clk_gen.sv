// tb_edge_clk_gen -- checks the reset-of-data pulse of the edge detected clock
// generator: it starts about 20 ns after a rising strobe edge (chain of 50 cells
// plus the 1 ns AND) and lasts about 20 ns (chain of 51 cells), and a falling
// strobe edge makes no pulse. Expected times come from tb_delay_ref_pkg.
`timescale 1ns / 1ps
module tb_edge_clk_gen;
  import tb_delay_ref_pkg::*;
  int checks = 0, failures = 0;

  logic strobe, d1, d2, p1;
  realtime t_d1, t_d2, t_p1_rise, t_p1_fall, t_edge;
  int n_pulses;

  edge_clk_gen dut (.strobe(strobe), .d1(d1), .d2(d2), .p1(p1));

  always @(posedge d1 or negedge d1) t_d1 = $realtime;
  always @(posedge d2 or negedge d2) t_d2 = $realtime;
  always @(posedge p1) begin t_p1_rise = $realtime; n_pulses++; end
  always @(negedge p1) t_p1_fall = $realtime;

  task automatic check_near(string what, real got, real exp, real tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: %0.4f ns, expected %0.4f ns", what, got, exp);
    end
  endtask

  task automatic check_int(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: %0d, expected %0d", what, got, exp);
    end
  endtask

  initial begin
    #5000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real c50_r, c51_r;

  initial begin
    c50_r = ref_chain(1'b0, 50, 1'b1);   // strobe rise -> d1 rise
    c51_r = ref_chain(1'b0, 51, 1'b1);   // d1 rise -> d2 fall
    n_pulses = 0;
    strobe = 1'b0;
    #200;
    check_int("idle: d1 follows strobe", int'(d1), 0);
    check_int("idle: d2 is inverted d1", int'(d2), 1);
    check_int("idle: p1 low", int'(p1), 0);
    check_int("no pulse while settling", n_pulses, 0);
    n_pulses = 0;
    // strobe high for hold_ns, then low again, several times
    foreach (hold[i]) begin
      strobe = 1'b1; t_edge = $realtime;
      repeat (hold[i]) #1;
      strobe = 1'b0;
      #150;
      check_int($sformatf("pulse %0d count", i), n_pulses, 1);
      check_near($sformatf("pulse %0d d1 rise", i),  t_d1 - t_edge, c50_r + c50_f_after(hold[i]), 0.003);
      check_near($sformatf("pulse %0d p1 rise", i),  t_p1_rise - t_edge, c50_r + 1.0, 0.003);
      // the pulse ends when D2 falls, or earlier when a short strobe makes D1 fall first
      begin
        real d1_fall;
        d1_fall = real'(hold[i]) + ref_chain(1'b0, 50, 1'b0);
        check_near($sformatf("pulse %0d p1 fall", i), t_p1_fall - t_edge,
                   ((d1_fall < c50_r + c51_r) ? d1_fall : c50_r + c51_r) + 1.0, 0.003);
      end
      // specification: 20 ns after the edge, 20 ns wide (within 2 ns)
      check_near($sformatf("pulse %0d delay vs 20 ns", i), t_p1_rise - t_edge, 20.0, 2.0);
      if (hold[i] > 21)
        check_near($sformatf("pulse %0d width vs 20 ns", i), t_p1_fall - t_p1_rise, 20.0, 2.0);
      // timing diagram: reset for output data lasts above 4 ns
      checks++;
      if (t_p1_fall - t_p1_rise <= 4.0) begin
        failures++;
        $display("FAIL pulse %0d not above 4 ns", i);
      end
      n_pulses = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int hold [4] = '{100, 60, 45, 12};   // ns the strobe stays high
  // after the strobe has fallen again d1 falls too; its last change is the fall
  function automatic real c50_f_after(int h);
    return real'(h) + ref_chain(1'b0, 50, 1'b0) - ref_chain(1'b0, 50, 1'b1);
  endfunction
endmodule
