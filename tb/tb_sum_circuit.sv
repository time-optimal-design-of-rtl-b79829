// tb_sum_circuit: the XOR row at 32 bits with positive carries (default)
// and at 5 bits with complemented carries. s[0] must equal p[0] and s[i]
// must equal p[i] XOR the true carry c[i-1].
module tb_sum_circuit;
  logic [31:0] p, c, s;
  logic [4:0]  p5, c5_n, s5;
  int checks = 0, failures = 0;

  sum_circuit dut (.p, .c, .s);
  sum_circuit #(.N(5), .CARRY_INV(1'b1)) dut_inv (.p(p5), .c(c5_n), .s(s5));

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1000; v++) begin
      p = $urandom;
      c = $urandom;
      p5 = p[4:0];
      c5_n = ~c[4:0];
      #1;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (s[i] !== (i == 0 ? p[0] : p[i] ^ c[i-1])) begin
          failures++;
          $display("mismatch bit %0d p=%h c=%h s=%h", i, p, c, s);
        end
      end
      for (int i = 0; i < 5; i++) begin
        checks++;
        if (s5[i] !== (i == 0 ? p[0] : p[i] ^ c[i-1])) begin
          failures++;
          $display("mismatch (inverted carries) bit %0d p=%h c=%h s=%h", i, p5, c[4:0], s5);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
