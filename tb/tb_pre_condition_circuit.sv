// tb_pre_condition_circuit: random and corner operands on the 32-bit
// pre-condition circuit; g must be the bitwise AND and p the bitwise XOR,
// checked bit by bit.
module tb_pre_condition_circuit;
  logic [31:0] a, b, g, p;
  int checks = 0, failures = 0;

  pre_condition_circuit dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 1004; v++) begin
      case (v)
        0: begin a = '0; b = '0; end
        1: begin a = '1; b = '1; end
        2: begin a = '1; b = '0; end
        3: begin a = 32'h5555_5555; b = 32'hFFFF_0000; end
        default: begin a = $urandom; b = $urandom; end
      endcase
      #1;
      for (int i = 0; i < 32; i++) begin
        checks++;
        if (g[i] !== (a[i] && b[i]) || p[i] !== (a[i] != b[i])) begin
          failures++;
          $display("mismatch bit %0d a=%b b=%b g=%b p=%b", i, a[i], b[i], g[i], p[i]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
