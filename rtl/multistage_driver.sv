// multistage_driver: cascade of STAGES driver cells on one (g,p) pair.
//
// Placed on the most significant output of the right sub-block of an R(n)
// block, it drives the broadcast wire that feeds the row of black cells over
// the left sub-block. Each stage inverts, so the output is inverted when
// STAGES is odd; the stage count is chosen with the parity that delivers the
// polarity the black-cell row expects. With STAGES = 0 the pair passes
// straight through. In silicon successive stages grow by the ratio
// r = f^(1/(STAGES+1)) for a total fan-out f; sizing is not modelled.
//
// go/po is the final output; g_taps/p_taps give the pair after each stage
// (element 0 is the input, element STAGES equals go/po), because each stage
// occupies one cell layer of the carry network and the layer grid records
// every one. Combinational; STAGES cell layers deep.
module multistage_driver #(
  parameter int unsigned STAGES = 3
) (
  input  logic              gi,
  input  logic              pi_,
  output logic              go,
  output logic              po,
  output logic [STAGES:0]   g_taps,
  output logic [STAGES:0]   p_taps
);
  assign g_taps[0] = gi;
  assign p_taps[0] = pi_;
  for (genvar k = 0; k < STAGES; k++) begin : g_stage
    driver_cell u_drv (
      .gl  (g_taps[k]),
      .pl  (p_taps[k]),
      .gout(g_taps[k+1]),
      .pout(p_taps[k+1])
    );
  end
  assign go = g_taps[STAGES];
  assign po = p_taps[STAGES];
endmodule
