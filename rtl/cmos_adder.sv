// cmos_adder: N-bit parallel adder with an optimal R(N) carry generator.
//
// Three stages, all combinational: the pre-condition circuit forms per-bit
// generate/propagate terms from a and b; the R(N) fast carry generator
// (r_adder) turns them into the carry out of every bit through depth(N)
// layers of inverting static-CMOS cells (8 layers for N = 32); the sum
// circuit XORs each propagate term with the carry from the bit below. The
// carry out of the top bit leaves as cout. There is no carry-in and no clock.
// The split of every sub-block comes from the optimum table in adder_pkg, so
// N may be 1 to 32; N = 32 is the published adder. Bit 0 of a, b and s is
// the least significant.
module cmos_adder
  import adder_pkg::*;
#(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] s,
  output logic         cout
);
  // carries leave the generator complemented when its depth is odd
  localparam bit CARRY_INV = depth(N) % 2 == 1;

  logic [N-1:0] g_in, p_in, g_grp, p_grp;

  pre_condition_circuit #(.N(N)) u_pre (
    .a(a),
    .b(b),
    .g(g_in),
    .p(p_in)
  );

  r_adder #(.N(N), .IN_INV(1'b0)) u_carry (
    .g_in (g_in),
    .p_in (p_in),
    .g_out(g_grp),
    .p_out(p_grp)
  );

  sum_circuit #(.N(N), .CARRY_INV(CARRY_INV)) u_sum (
    .p(p_in),
    .c(g_grp),
    .s(s)
  );

  assign cout = CARRY_INV ? ~g_grp[N-1] : g_grp[N-1];

  // p_grp (group propagate of bits 1..i) is produced by the network but an
  // adder without carry-in has no use for it.
  logic unused_p_grp;
  assign unused_p_grp = ^p_grp;
endmodule
