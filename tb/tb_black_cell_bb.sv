// tb_black_cell_bb: exhaustive check of the complemented-input black cell.
// Inputs are the complements of true (g,p) pairs; the outputs must be the
// true concatenation (g_l + p_l g_r, p_l p_r), and the horizontal pair must
// pass through unchanged.
module tb_black_cell_bb;
  logic gl_n, pl_n, gr_n, pr_n, gout, pout, gr_thru, pr_thru;
  logic gl, pl, gr, pr;
  int checks = 0, failures = 0;

  black_cell_bb dut (.*);

  initial begin : watchdog
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 16; v++) begin
      {gl, pl, gr, pr} = 4'(v);
      {gl_n, pl_n, gr_n, pr_n} = ~4'(v);
      #1;
      checks++;
      if (gout !== (gl || (pl && gr)) || pout !== (pl && pr) ||
          gr_thru !== gr_n || pr_thru !== pr_n) begin
        failures++;
        $display("mismatch gl=%b pl=%b gr=%b pr=%b -> %b %b", gl, pl, gr, pr, gout, pout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
