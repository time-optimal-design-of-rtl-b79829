// pre_condition_circuit: per-bit carry generate and propagate.
//
// For each bit i it forms gIN_i = a_i & b_i (the bit generates a carry) and
// pIN_i = a_i ^ b_i (the bit propagates an incoming carry). Both leave
// positive-true, the polarity the first layer of the carry generator (ba
// black cells) expects. pIN also feeds the sum circuit. Combinational.
module pre_condition_circuit #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic [N-1:0] g,
  output logic [N-1:0] p
);
  assign g = a & b;
  assign p = a ^ b;
endmodule
