// tb_black_cell_ba: exhaustive check of the positive-input black cell.
// All 16 input combinations; expected outputs are the complement of the
// carry concatenation (g_l + p_l g_r, p_l p_r) and an unchanged pass-through.
module tb_black_cell_ba;
  logic gl, pl, gr, pr, gout_n, pout_n, gr_thru, pr_thru;
  int checks = 0, failures = 0;

  black_cell_ba dut (.*);

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
      #1;
      checks++;
      if (gout_n !== !(gl || (pl && gr)) || pout_n !== !(pl && pr) ||
          gr_thru !== gr || pr_thru !== pr) begin
        failures++;
        $display("mismatch gl=%b pl=%b gr=%b pr=%b -> %b %b %b %b",
                 gl, pl, gr, pr, gout_n, pout_n, gr_thru, pr_thru);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
