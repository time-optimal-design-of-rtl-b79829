// sum_circuit: row of exclusive-OR gates forming the sum bits.
//
// s_1 = pIN_1 and s_i = pIN_i ^ c_{i-1} for i > 1, where c_{i-1} is the carry
// out of the bit below, delivered by the carry generator. The adder has no
// carry-in, so the lowest bit needs no gate. When the carry generator has an
// odd number of inverting layers its carries arrive complemented; CARRY_INV = 1
// then turns the row into XNOR gates (this design's choice; the published
// 32-bit adder has an even depth and plain XOR gates). Combinational.
module sum_circuit #(
  parameter int unsigned N         = 32,
  parameter bit          CARRY_INV = 1'b0
) (
  input  logic [N-1:0] p,
  input  logic [N-1:0] c,
  output logic [N-1:0] s
);
  logic [N-1:0] c_true;
  assign c_true = CARRY_INV ? ~c : c;

  always_comb begin
    s[0] = p[0];
    for (int unsigned i = 1; i < N; i++) s[i] = p[i] ^ c_true[i-1];
  end
endmodule
