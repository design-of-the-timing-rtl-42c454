// tb_ppi_timing_ctrl -- end-to-end test of the timing controller at its default
// parameters. A CPU bus model writes the three ports, reads the control word and
// the port pins back, and writes control words. After each control word write
// the reset-of-data pulse must appear about 20 ns after WRN rises, last about
// 20 ns, and clear all three port outputs, while the control word itself is
// stored at once. Writes with CSN high and port writes must not make a pulse.
// Every mechanism is counted and must happen at least once.
`timescale 1ns / 1ps
module tb_ppi_timing_ctrl;
  import tb_delay_ref_pkg::*;
  localparam int W = 8;
  int checks = 0, failures = 0;

  logic rst, wr_n, rd_n, cs_n;
  logic [1:0] a;
  logic [W-1:0] d_in, d_out, pa_i, pb_i, pc_i, pa_o, pb_o, pc_o, ctrl_word;
  logic d_oe, d1, d2, reset_of_data;

  ppi_timing_ctrl dut (.*);

  logic [W-1:0] m_port [3];
  logic [W-1:0] m_ctrl;
  realtime t_wr_rise, t_p1_rise, t_p1_fall;
  int n_pulse = 0;
  int n_port_wr = 0, n_ctrl_wr = 0, n_clear = 0, n_read_port = 0, n_read_ctrl = 0;
  int n_cs_ignored = 0, n_rst = 0;

  always @(posedge reset_of_data) begin t_p1_rise = $realtime; n_pulse++; end
  always @(negedge reset_of_data) t_p1_fall = $realtime;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h, expected %h", what, got, exp);
    end
  endtask

  task automatic check_near(string what, real got, real exp, real tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: %0.3f ns, expected %0.3f ns", what, got, exp);
    end
  endtask

  task automatic check_ports(string when);
    check({when, " pa_o"}, pa_o, m_port[0]);
    check({when, " pb_o"}, pb_o, m_port[1]);
    check({when, " pc_o"}, pc_o, m_port[2]);
  endtask

  // CPU write cycle: address and CSN set up 20 ns before WRN falls, WRN low
  // 100 ns, data valid 50 ns before and 10 ns after WRN rises.
  task automatic cpu_write(logic [1:0] addr, logic [W-1:0] data, logic cs = 1'b1);
    a = addr; cs_n = ~cs;
    #20 wr_n = 1'b0;
    #50 d_in = data;
    #50 wr_n = 1'b1; t_wr_rise = $realtime;
    #10 d_in = W'($urandom); cs_n = 1'b1;
  endtask

  task automatic cpu_read(logic [1:0] addr, output logic [W-1:0] data, output logic oe);
    a = addr; cs_n = 1'b0;
    #20 rd_n = 1'b0;
    #50 data = d_out; oe = d_oe;
    #50 rd_n = 1'b1;
    #10 cs_n = 1'b1;
  endtask

  task automatic read_all();
    logic [W-1:0] v;
    logic oe;
    pa_i = W'($urandom); pb_i = W'($urandom); pc_i = W'($urandom);
    cpu_read(2'd0, v, oe); check("read port A", v, pa_i); check("oe A", W'(oe), 1);
    cpu_read(2'd1, v, oe); check("read port B", v, pb_i);
    cpu_read(2'd2, v, oe); check("read port C", v, pc_i);
    n_read_port += 3;
    cpu_read(2'd3, v, oe); check("read control word", v, m_ctrl); check("oe ctrl", W'(oe), 1);
    n_read_ctrl++;
    #5 check("d_oe after read", W'(d_oe), 0);
  endtask

  task automatic write_ports();
    for (int k = 0; k < 3; k++) begin
      int n_before;
      logic [W-1:0] v;
      n_before = n_pulse;
      v = W'($urandom) | 8'h01;     // never zero, so a clear is visible
      cpu_write(2'(k), v);
      m_port[k] = v;
      n_port_wr++;
      #60;
      check("port write makes no pulse", W'(n_pulse - n_before), 0);
    end
    check_ports("after port writes");
  endtask

  task automatic write_ctrl(logic [W-1:0] v);
    int n_before;
    real c50, c51;
    c50 = ref_chain(1'b0, 50, 1'b1);
    c51 = ref_chain(1'b0, 51, 1'b1);
    n_before = n_pulse;
    cpu_write(2'd3, v);
    m_ctrl = v;
    // control word is stored at the end of the write
    #1 check("control word stored", ctrl_word, v);
    n_ctrl_wr++;
    // ports still hold their data until the pulse starts
    #9 check_ports("10 ns after control write");
    #40;
    check("one pulse per control write", W'(n_pulse - n_before), 1);
    check_near("pulse start after WRN rise", t_p1_rise - t_wr_rise, c50 + 1.0, 0.005);
    check_near("pulse start vs 20 ns", t_p1_rise - t_wr_rise, 20.0, 2.0);
    check_near("pulse end after WRN rise", t_p1_fall - t_wr_rise, c50 + c51 + 1.0, 0.005);
    check_near("pulse width vs 20 ns", t_p1_fall - t_p1_rise, 20.0, 2.0);
    m_port[0] = '0; m_port[1] = '0; m_port[2] = '0;
    check_ports("after reset of data");
    if (pa_o == '0 && pb_o == '0 && pc_o == '0) n_clear++;
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_n = 1'b1; rd_n = 1'b1; cs_n = 1'b1; a = '0; d_in = '0;
    pa_i = '0; pb_i = '0; pc_i = '0;
    rst = 1'b0;
    #1 rst = 1'b1;
    n_pulse = 0;                 // time-zero settling of the model is not counted
    #10 rst = 1'b0;
    n_rst++;
    m_ctrl = '0;
    foreach (m_port[k]) m_port[k] = '0;
    #50;
    check_ports("after reset");
    check("control word after reset", ctrl_word, '0);
    check("no pulse after power-up", W'(n_pulse), 0);
    check("reset of data idle", W'(reset_of_data), 0);

    for (int round = 0; round < 4; round++) begin
      write_ports();
      read_all();
      write_ctrl(W'($urandom));
      read_all();
    end

    // a write with CSN high changes nothing and makes no pulse
    begin
      int n_before;
      write_ports();
      n_before = n_pulse;
      cpu_write(2'd3, 8'h5A, 1'b0);
      cpu_write(2'd0, 8'hA5, 1'b0);
      #60;
      check("no pulse without chip select", W'(n_pulse - n_before), 0);
      check("control word kept", ctrl_word, m_ctrl);
      check_ports("after deselected writes");
      n_cs_ignored++;
    end

    // reset clears control word and ports
    #2 rst = 1'b1;
    #10 rst = 1'b0;
    n_rst++;
    m_ctrl = '0;
    foreach (m_port[k]) m_port[k] = '0;
    #5 check_ports("after second reset");
    check("control word after second reset", ctrl_word, '0);

    $display("mechanisms: port writes=%0d control writes=%0d pulses=%0d port clears=%0d port reads=%0d control reads=%0d deselected=%0d resets=%0d",
             n_port_wr, n_ctrl_wr, n_pulse, n_clear, n_read_port, n_read_ctrl, n_cs_ignored, n_rst);
    checks++;
    if (n_port_wr == 0 || n_ctrl_wr == 0 || n_pulse == 0 || n_clear == 0 ||
        n_read_port == 0 || n_read_ctrl == 0 || n_cs_ignored == 0 || n_rst == 0) begin
      failures++;
      $display("FAIL a mechanism never happened");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
