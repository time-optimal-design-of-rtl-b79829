// r_adder: R(N) fast carry generator.
//
// Computes, for every bit i, the group pair (G_i, P_i) of bits 1..i under the
// carry concatenation (g_l,p_l) o (g_r,p_r) = (g_l + p_l g_r, p_l p_r); G_i is
// the carry out of bit i. The network is the recursive R(N) construction: a
// left block R(N-M) beside a right block R(M), the most significant pair of
// R(M) broadcast through an S-stage driver to one row of black cells over
// R(N-M), and the same rule applied inside each sub-block, with M and S from
// the optimum table in adder_pkg.
//
// The recursion is unrolled into a grid of D = depth(N) layers by N columns
// in which every slot holds exactly one inverting cell; adder_pkg::slot()
// tells what each slot holds (white, black or driver) and, for a black cell,
// which column broadcasts into its row. Because every cell inverts, all
// signals of one layer share a polarity: a black cell whose inputs are
// positive-true is a ba cell, one whose inputs are complemented a bb cell.
// The horizontal wire of a row enters at the broadcast column and is handed
// leftwards through each black cell's pass-through port. IN_INV gives the
// polarity of g_in/p_in (1 = complemented); g_out/p_out are complemented
// when IN_INV ^ (D odd).
//
// The split table, the cell types, the inverting layers and the driver
// placement under the broadcast row follow the published design. Putting the
// white padding of a broadcast column below its driver, and the grid form
// itself, are this implementation's choices. Purely combinational.
module r_adder
  import adder_pkg::*;
#(
  parameter int unsigned N      = 32,
  parameter bit          IN_INV = 1'b0
) (
  input  logic [N-1:0] g_in,
  input  logic [N-1:0] p_in,
  output logic [N-1:0] g_out,
  output logic [N-1:0] p_out
);
  localparam int unsigned D = depth(N);

  if (N < 1 || N > MAX_WIDTH) begin : g_bad_width
    $error("r_adder: N must be between 1 and %0d", MAX_WIDTH);
  end

  // g_v/p_v[l]: outputs of layer l (layer 0 = inputs).
  // g_h/p_h[l]: horizontal wire of layer l as seen at each column, leaving
  // that column towards the more significant bits.
  logic [N-1:0] g_v [D+1];
  logic [N-1:0] p_v [D+1];
  logic [N-1:0] g_h [D+1];
  logic [N-1:0] p_h [D+1];

  assign g_v[0] = g_in;
  assign p_v[0] = p_in;
  assign g_h[0] = '0;   // no row below the first layer
  assign p_h[0] = '0;

  for (genvar l = 1; l <= D; l++) begin : g_layer
    // polarity of the signals entering this layer
    localparam bit LAYER_IN_INV = IN_INV ^ ((l - 1) % 2 == 1);

    for (genvar c = 0; c < N; c++) begin : g_col
      localparam slot_t SL = slot(N, l, c);

      if (SL.kind == CELL_BLACK) begin : g_black
        if (!LAYER_IN_INV) begin : g_ba
          black_cell_ba u_cell (
            .gl     (g_v[l-1][c]),
            .pl     (p_v[l-1][c]),
            .gr     (g_h[l][c-1]),
            .pr     (p_h[l][c-1]),
            .gout_n (g_v[l][c]),
            .pout_n (p_v[l][c]),
            .gr_thru(g_h[l][c]),
            .pr_thru(p_h[l][c])
          );
        end else begin : g_bb
          black_cell_bb u_cell (
            .gl_n   (g_v[l-1][c]),
            .pl_n   (p_v[l-1][c]),
            .gr_n   (g_h[l][c-1]),
            .pr_n   (p_h[l][c-1]),
            .gout   (g_v[l][c]),
            .pout   (p_v[l][c]),
            .gr_thru(g_h[l][c]),
            .pr_thru(p_h[l][c])
          );
        end
      end else begin : g_vertical
        // a broadcast enters its row at the column below which it was driven
        assign g_h[l][c] = g_v[l-1][c];
        assign p_h[l][c] = p_v[l-1][c];

        if (SL.kind == CELL_WHITE) begin : g_white
          white_cell u_cell (
            .gl  (g_v[l-1][c]),
            .pl  (p_v[l-1][c]),
            .gout(g_v[l][c]),
            .pout(p_v[l][c])
          );
        end else if (SL.stage == 1) begin : g_driver
          // the whole cascade is placed at its lowest slot
          localparam int unsigned S = int'(SL.stages);
          logic [S:0] g_t, p_t;
          logic       g_o, p_o;
          multistage_driver #(.STAGES(S)) u_drv (
            .gi    (g_v[l-1][c]),
            .pi_   (p_v[l-1][c]),
            .go    (g_o),
            .po    (p_o),
            .g_taps(g_t),
            .p_taps(p_t)
          );
          for (genvar k = 1; k <= S; k++) begin : g_tap
            assign g_v[l-1+k][c] = g_t[k];
            assign p_v[l-1+k][c] = p_t[k];
          end
          // tap 0 is the input and go/po repeat the last tap
          logic unused_ends;
          assign unused_ends = g_t[0] ^ p_t[0] ^ g_o ^ p_o;
        end
      end
    end
  end

  assign g_out = g_v[D];
  assign p_out = p_v[D];
endmodule
