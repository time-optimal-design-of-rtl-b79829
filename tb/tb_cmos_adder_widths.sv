// tb_cmos_adder_widths: the adder at every width from 1 to 32. Widths whose
// carry generator has an odd number of inverting layers (3, 5, 6, 10-13,
// 19-24) deliver complemented carries and use XNOR sum gates and an
// inverted carry out, so this covers the polarity handling the 32-bit adder
// does not need. Each result is compared with the simulator's addition.
module tb_cmos_adder_widths;
  localparam int unsigned MAXN = 32;

  logic [MAXN-1:0] a, b;
  logic [MAXN:0]   res [1:MAXN];
  int checks = 0, failures = 0;

  for (genvar n = 1; n <= MAXN; n++) begin : g_w
    logic [n-1:0] s;
    logic         c;
    cmos_adder #(.N(n)) u_add (.a(a[n-1:0]), .b(b[n-1:0]), .s(s), .cout(c));
    assign res[n] = (MAXN+1)'({c, s});
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 3000; v++) begin
      a = $urandom;
      b = (v % 2 == 1) ? ~a ^ (v[4] ? 32'h1 : 32'h0) : $urandom;
      if (v == 0) begin a = '1; b = 32'h1; end
      #1;
      for (int unsigned n = 1; n <= MAXN; n++) begin
        logic [MAXN:0] want;
        want = '0;
        for (int unsigned i = 0; i < n; i++) begin
          want[i] = a[i];
        end
        want = want + (MAXN+1)'(b & ((33'h1 << n) - 1));
        checks++;
        if (res[n] !== want) begin
          failures++;
          if (failures < 20) $display("mismatch N=%0d a=%h b=%h got %h want %h", n, a, b, res[n], want);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
