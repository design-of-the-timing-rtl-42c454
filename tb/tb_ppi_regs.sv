// tb_ppi_regs -- random sequence of register writes, reads, output clears and
// resets against a reference model kept in the testbench. Writes load on the
// rising edge of the write strobe; clr_out clears only the port outputs; rst
// clears everything; reads put the control word or the port pins on d_out.
`timescale 1ns / 1ps
module tb_ppi_regs;
  localparam int W = 8;
  int checks = 0, failures = 0;

  logic rst, clr_out;
  logic [3:0] wr_y_n, rd_y_n;
  logic [W-1:0] d_in, d_out, pa_i, pb_i, pc_i, pa_o, pb_o, pc_o, ctrl_word;
  logic d_oe;

  ppi_regs #(.DATA_W(W)) dut (.*);

  logic [W-1:0] m_reg [4];   // 0..2 port outputs, 3 control word
  int n_wr = 0, n_rd = 0, n_clr = 0, n_rst = 0;

  task automatic check(string what, logic [W-1:0] got, logic [W-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: %h, expected %h", what, got, exp);
    end
  endtask

  task automatic check_state();
    check("ctrl_word", ctrl_word, m_reg[3]);
    check("pa_o", pa_o, m_reg[0]);
    check("pb_o", pb_o, m_reg[1]);
    check("pc_o", pc_o, m_reg[2]);
    check("d_oe idle", W'(d_oe), '0);
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_y_n = 4'hF; rd_y_n = 4'hF; clr_out = 1'b0; d_in = '0;
    pa_i = '0; pb_i = '0; pc_i = '0;
    rst = 1'b0;                            // a real edge for the async reset
    #1 rst = 1'b1;
    #5 rst = 1'b0;
    foreach (m_reg[k]) m_reg[k] = '0;
    #5 check_state();
    for (int it = 0; it < 400; it++) begin
      int op, k;
      op = $urandom_range(0, 9);
      k  = $urandom_range(0, 3);
      if (op < 5) begin                       // write register k
        d_in = W'($urandom);
        #2 wr_y_n[k] = 1'b0;
        #10 d_in = W'($urandom);              // data changes while strobe low
        #3 d_in = W'($urandom);
        // the value present at the rising edge is the one stored
        m_reg[k] = d_in;
        #2 wr_y_n[k] = 1'b1;
        #2 d_in = ~d_in;
        n_wr++;
      end else if (op < 8) begin              // read register k
        pa_i = W'($urandom); pb_i = W'($urandom); pc_i = W'($urandom);
        #2 rd_y_n[k] = 1'b0;
        #5;
        checks++;
        if (d_oe !== 1'b1) begin failures++; $display("FAIL d_oe low during read"); end
        case (k)
          0: check("read port A pins", d_out, pa_i);
          1: check("read port B pins", d_out, pb_i);
          2: check("read port C pins", d_out, pc_i);
          default: check("read control word", d_out, m_reg[3]);
        endcase
        #2 rd_y_n[k] = 1'b1;
        n_rd++;
      end else if (op < 9) begin              // reset of data pulse
        #2 clr_out = 1'b1;
        #20 clr_out = 1'b0;
        m_reg[0] = '0; m_reg[1] = '0; m_reg[2] = '0;
        n_clr++;
      end else begin                          // reset
        #2 rst = 1'b1;
        #5 rst = 1'b0;
        foreach (m_reg[j]) m_reg[j] = '0;
        n_rst++;
      end
      #3 check_state();
    end
    checks++;
    if (n_wr == 0 || n_rd == 0 || n_clr == 0 || n_rst == 0) begin
      failures++;
      $display("FAIL some operation never ran: wr=%0d rd=%0d clr=%0d rst=%0d", n_wr, n_rd, n_clr, n_rst);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
