// tb_cmos_adder: end-to-end test of the 32-bit adder at its default size.
// Operands are corner cases plus random pairs, some built to force long
// carry chains. Each result {cout, s} is compared with a + b computed by the
// simulator's own 33-bit addition. The adder is combinational; its settling
// delay is a circuit property the RTL does not carry, so outputs are sampled
// one time step after the operands change.
//
// The tb also counts how often each mechanism of the design was exercised:
//   overflow   - a carry leaves the top bit (cout = 1)
//   full_chain - a carry generated in bit 1 ripples through all 31 bits above
//   broadcast  - the carry out of bit 8, the most significant output of the
//                right sub-block R(8), is 1 and is broadcast through the
//                3-stage driver to the 24 bits above
//   inner_bc   - the carry out of bit 14 (the broadcast point inside the
//                24-bit left block) is 1 and changes the upper sum bits
//   killed     - a carry generated low is stopped by a bit with p = 0
// A mechanism that never happened counts as a failure.
module tb_cmos_adder;
  localparam int unsigned N = 32;

  logic [N-1:0] a, b, s;
  logic         cout;
  int checks = 0, failures = 0;
  int n_overflow = 0, n_full_chain = 0, n_broadcast = 0, n_inner_bc = 0, n_killed = 0;

  cmos_adder dut (.a, .b, .s, .cout);

  initial begin : watchdog
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [N-1:0] x, logic [N-1:0] y);
    logic [N:0]   want;
    logic [N-1:0] carry;   // carry[i] = carry out of bit i
    logic         c;
    a = x;
    b = y;
    #1;
    want = {1'b0, x} + {1'b0, y};
    c = 1'b0;
    for (int i = 0; i < N; i++) begin
      c = (x[i] & y[i]) | ((x[i] ^ y[i]) & c);
      carry[i] = c;
    end
    checks++;
    if ({cout, s} !== want) begin
      failures++;
      if (failures < 20) $display("mismatch %h + %h: got %b_%h want %h", x, y, cout, s, want);
    end
    if (cout) n_overflow++;
    if ((x[0] & y[0]) && ((x[N-1:1] ^ y[N-1:1]) == '1)) n_full_chain++;
    if (carry[7]) n_broadcast++;
    if (carry[13] && ((x[N-1:14] ^ y[N-1:14]) != '0)) n_inner_bc++;
    if ((x[0] & y[0]) && !carry[N-1] && ((x[N-1:1] ^ y[N-1:1]) != '1)) n_killed++;
  endtask

  initial begin
    apply('0, '0);
    apply('1, 32'h1);                  // full carry chain, overflow
    apply(32'h7FFF_FFFF, 32'h1);       // chain into the top bit
    apply(32'h0000_00FF, 32'h0000_0001);
    apply(32'h0000_3FFF, 32'h0000_0001);
    apply('1, '1);
    apply(32'h8000_0000, 32'h8000_0000);
    apply(32'hAAAA_AAAA, 32'h5555_5555);
    for (int v = 0; v < 20000; v++) begin
      logic [N-1:0] x, y;
      x = $urandom;
      y = $urandom;
      if (v % 4 == 1) y = ~x ^ (32'h1 << ($urandom % 32));   // one break in a long chain
      if (v % 4 == 2) begin y = ~x; x[0] = 1'b1; y[0] = 1'b1; end
      apply(x, y);
    end
    $display("mechanisms: overflow=%0d full_chain=%0d broadcast=%0d inner_bc=%0d killed=%0d",
             n_overflow, n_full_chain, n_broadcast, n_inner_bc, n_killed);
    if (n_overflow == 0)   begin failures++; $display("overflow never happened"); end
    if (n_full_chain == 0) begin failures++; $display("full carry chain never happened"); end
    if (n_broadcast == 0)  begin failures++; $display("broadcast from R(8) never happened"); end
    if (n_inner_bc == 0)   begin failures++; $display("inner broadcast never happened"); end
    if (n_killed == 0)     begin failures++; $display("killed carry never happened"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
