// black_cell_bb: static-CMOS black cell taking complemented inputs.
//
// Same carry concatenation as black_cell_ba, but every input is the
// complement of the true signal and the outputs are positive-true:
// gout = ~(gl_n & (gr_n | pl_n)) (an OAI gate), pout = ~(pl_n | pr_n) (a NOR
// gate). By De Morgan these equal g_l + p_l g_r and p_l p_r. The horizontal
// pair is passed through on gr_thru/pr_thru, still complemented. Purely
// combinational; logic follows the published gate equations.
module black_cell_bb (
  input  logic gl_n,
  input  logic pl_n,
  input  logic gr_n,
  input  logic pr_n,
  output logic gout,
  output logic pout,
  output logic gr_thru,
  output logic pr_thru
);
  assign gout    = ~(gl_n & (gr_n | pl_n));
  assign pout    = ~(pl_n | pr_n);
  assign gr_thru = gr_n;
  assign pr_thru = pr_n;
endmodule
