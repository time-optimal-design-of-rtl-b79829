// black_cell_ba: static-CMOS black cell taking positive-true inputs.
//
// Computes the carry concatenation (g_l,p_l) o (g_r,p_r) = (g_l + p_l g_r, p_l p_r)
// with one inverting gate per output, so both outputs come out complemented:
// an AOI gate gives gout_n, a NAND gate gives pout_n. The horizontal (gr,pr)
// pair also leaves the cell unchanged on gr_thru/pr_thru, so a row of black
// cells can be chained along one broadcast wire. Purely combinational.
// Logic follows the published gate equations; only function, not transistor
// sizing, is modelled.
module black_cell_ba (
  input  logic gl,
  input  logic pl,
  input  logic gr,
  input  logic pr,
  output logic gout_n,
  output logic pout_n,
  output logic gr_thru,
  output logic pr_thru
);
  assign gout_n  = ~(gl | (pl & gr));
  assign pout_n  = ~(pl & pr);
  assign gr_thru = gr;
  assign pr_thru = pr;
endmodule
