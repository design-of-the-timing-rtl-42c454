// tb_delay_ref_pkg -- reference delays for the testbenches, written out
// independently of the cell model: per stage
//   t = (Dint + Clinear * (C_ZN + C_load + 0.096 pF * pins + 0.029 pF)) * 0.5
// with the IN01D0 / IN01D1 cell data. A chain of n cells has 2-pin nets between
// cells and ends on a 0.1 pF pin over a 1-pin net.
`timescale 1ns / 1ps
package tb_delay_ref_pkg;
  // is_1x: 0 = IN01D0, 1 = IN01D1; rise: output edge rising
  function automatic real ref_stage(bit is_1x, bit rise, real cload, int pins);
    real dint, cl, czn;
    if (!is_1x) begin
      czn = 0.040;
      dint = rise ? 0.09 : 0.07;
      cl   = rise ? 3.35 : 1.43;
    end else begin
      czn = 0.043;
      dint = rise ? 0.11 : 0.06;
      cl   = rise ? 1.68 : 0.71;
    end
    return 0.5 * (dint + cl * (czn + cload + 0.096 * pins + 0.029));
  endfunction

  // Delay of an n-cell chain for an input edge (in_rise = 1: input rising).
  // Each stage delay is rounded to 1 ps, as the simulator does.
  function automatic real ref_chain(bit is_1x, int n, bit in_rise);
    real t, d, cin;
    bit  out_rise;
    cin = is_1x ? 0.087 : 0.043;
    t = 0.0;
    out_rise = !in_rise;
    for (int k = 0; k < n; k++) begin
      if (k < n - 1) d = ref_stage(is_1x, out_rise, cin, 2);
      else           d = ref_stage(is_1x, out_rise, 0.1, 1);
      t += real'($rtoi(d * 1000.0 + 0.5)) / 1000.0;
      out_rise = !out_rise;
    end
    return t;
  endfunction
endpackage
