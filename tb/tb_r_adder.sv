// tb_r_adder: the R(N) carry generator at every width from 1 to 32, fed
// with positive-true inputs and, in a second set of instances, with
// complemented inputs. Random (g,p) pairs are used without restricting them
// to the pairs an adder produces, so the full concatenation operator is
// exercised. For every bit i the tb computes, bit-serially, the prefix
// G_i = g_i | p_i G_{i-1}, P_i = p_i P_{i-1} and compares it with the
// outputs after undoing the polarity the generator delivers: complemented
// when the input polarity XOR the layer count is odd. The layer counts are
// the published ones (1-bit: 0 layers ... 32-bit: 8 layers), entered here
// independently of the split table, so a wrong depth shows as a polarity
// error.
//
// It also checks the cell map of two networks slot by slot: the 5-bit one
// (layers 1-3: W B W B W / B W W D W / B B B W W from bit 5 down to bit 1)
// and the driver columns of the 32-bit one (3-stage drivers at bit 8,
// layers 5-7, and at bit 14, layers 4-6).
module tb_r_adder;
  import adder_pkg::*;
  localparam int unsigned MAXN = 32;
  // published layer count of the optimal R(n), n = 1..32
  localparam int unsigned DEPTH_TAB [1:MAXN] = '{
    0, 1, 2, 2, 3, 3, 4, 4, 4, 5, 5, 5, 5, 6, 6, 6,
    6, 6, 7, 7, 7, 7, 7, 7, 8, 8, 8, 8, 8, 8, 8, 8};

  logic [MAXN-1:0] g, p;
  logic [MAXN-1:0] go_pos [1:MAXN];
  logic [MAXN-1:0] po_pos [1:MAXN];
  logic [MAXN-1:0] go_neg [1:MAXN];
  logic [MAXN-1:0] po_neg [1:MAXN];
  int checks = 0, failures = 0;

  for (genvar n = 1; n <= MAXN; n++) begin : g_w
    logic [n-1:0] gp_o, pp_o, gn_o, pn_o;
    r_adder #(.N(n), .IN_INV(1'b0)) u_pos (
      .g_in(g[n-1:0]), .p_in(p[n-1:0]), .g_out(gp_o), .p_out(pp_o));
    r_adder #(.N(n), .IN_INV(1'b1)) u_neg (
      .g_in(~g[n-1:0]), .p_in(~p[n-1:0]), .g_out(gn_o), .p_out(pn_o));
    assign go_pos[n] = MAXN'(gp_o);
    assign po_pos[n] = MAXN'(pp_o);
    assign go_neg[n] = MAXN'(gn_o);
    assign po_neg[n] = MAXN'(pn_o);
  end

  initial begin : watchdog
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_width(int unsigned n, bit in_inv);
    logic ge, pe, flip, gr, pr;
    flip = in_inv ^ DEPTH_TAB[n][0];
    ge = 1'b0;
    pe = 1'b1;
    for (int unsigned i = 0; i < n; i++) begin
      ge = g[i] | (p[i] & ge);
      pe = p[i] & pe;
      gr = (in_inv ? go_neg[n][i] : go_pos[n][i]) ^ flip;
      pr = (in_inv ? po_neg[n][i] : po_pos[n][i]) ^ flip;
      checks++;
      if (gr !== ge || pr !== pe) begin
        failures++;
        if (failures < 20)
          $display("mismatch N=%0d in_inv=%0d bit %0d: got G=%b P=%b want G=%b P=%b (g=%h p=%h)",
                   n, in_inv, i, gr, pr, ge, pe, g, p);
      end
    end
  endtask

  // expected 5-bit map, [layer][bit 5 .. bit 1]: 0 white, 1 black, 2 driver
  localparam int MAP5 [1:3][5] = '{
    '{0, 1, 0, 1, 0},
    '{1, 0, 0, 2, 0},
    '{1, 1, 1, 0, 0}};

  initial begin
    for (int l = 1; l <= 3; l++)
      for (int b = 5; b >= 1; b--) begin
        slot_t sl;
        int kind;
        sl = slot(5, l, b - 1);
        kind = (sl.kind == CELL_BLACK) ? 1 : (sl.kind == CELL_DRIVER) ? 2 : 0;
        checks++;
        if (kind != MAP5[l][5-b]) begin
          failures++;
          $display("5-bit map: slot (%0d,%0d) holds %0d, want %0d", l, b, kind, MAP5[l][5-b]);
        end
      end
    for (int l = 1; l <= 8; l++) begin
      slot_t s8, s14;
      s8  = slot(32, l, 7);
      s14 = slot(32, l, 13);
      checks++;
      if ((s8.kind == CELL_DRIVER) != (l >= 5 && l <= 7) ||
          (s14.kind == CELL_DRIVER) != (l >= 4 && l <= 6)) begin
        failures++;
        $display("32-bit map: driver placement wrong at layer %0d", l);
      end
    end
    for (int v = 0; v < 600; v++) begin
      case (v)
        0: begin g = '0; p = '1; end          // full propagate, nothing generated
        1: begin g = 32'h1; p = '1; end       // generate at bit 1, propagate all the way
        2: begin g = '0; p = '0; end
        3: begin g = '1; p = '1; end
        default: begin
          g = $urandom;
          p = $urandom | $urandom;            // long propagate runs are common
        end
      endcase
      #1;
      for (int unsigned n = 1; n <= MAXN; n++) begin
        check_width(n, 1'b0);
        check_width(n, 1'b1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
