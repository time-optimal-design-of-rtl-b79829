// adder_pkg: configuration of the optimal R(n) carry-generator family.
//
// An R(n) block is built from a left block R(n-m) and a right block R(m).
// The most significant (g,p) pair of R(m) is broadcast, through an s-stage
// inverting driver, to one row of black cells over the left block. The split
// m and the stage count s that minimise the time of the most significant
// output, for 1 <= n <= 32, are the optimum of the delay recurrence
//   t(n) = min over m of max( t(n-m) + 2, t(m) + min_s (s+1)(n-m+1)^(1/(s+1)) )
// with t(1) = 0 (time in units of the cell RC constant tau). s is limited to
// the depth difference u between the two sub-blocks and must have the parity
// of u, so that the broadcast arrives with the polarity of the left block.
// The table below is that optimum, as published for this adder family; where
// two choices tie the published one is kept. depth() follows from it:
//   depth(1) = 0, depth(n) = max(depth(n-m), depth(m) + s) + 1.
package adder_pkg;

  localparam int unsigned MAX_WIDTH = 32;

  // Width m of the right (less significant) sub-block of an optimal R(n).
  function automatic int unsigned right_width(int unsigned n);
    case (n)
      2:                         return 1;
      3, 4, 5, 6, 7:             return 2;
      8, 9, 10, 11:              return 3;
      12, 13, 14:                return 4;
      15, 16, 17, 18, 19, 20, 21: return 5;
      22, 23, 24, 25:            return 6;
      26, 27, 28, 29, 30, 31:    return 7;
      32:                        return 8;
      default:                   return 1;
    endcase
  endfunction

  // Number of inverting driver stages between the MSB of R(m) and the
  // broadcast row of an optimal R(n).
  function automatic int unsigned driver_stages(int unsigned n);
    case (n)
      5, 6, 8, 9, 14, 19:                          return 1;
      7, 10, 11, 12, 13, 15, 16, 17, 18, 25:       return 2;
      20, 21, 22, 23, 24, 26, 27, 28, 29, 30, 31, 32: return 3;
      default:                                     return 0;
    endcase
  endfunction

  // Number of cell layers of an optimal R(n).
  function automatic int unsigned depth(int unsigned n);
    int unsigned d [MAX_WIDTH+1];
    d[0] = 0;
    d[1] = 0;
    for (int unsigned k = 2; k <= MAX_WIDTH; k++) begin
      int unsigned dl, dr;
      dl = d[k - right_width(k)];
      dr = d[right_width(k)] + driver_stages(k);
      d[k] = ((dl > dr) ? dl : dr) + 1;
    end
    return (n <= MAX_WIDTH) ? d[n] : 0;
  endfunction

  // ---------------------------------------------------------------------
  // Cell grid of an R(n) block. Layer 1 is the first cell layer above the
  // inputs, layer depth(n) the last; column 0 is the least significant bit.
  // slot() walks down the recursion to the sub-block that owns a slot:
  //  * the last layer of a block holds black cells over its left sub-block
  //    and white cells over its right sub-block;
  //  * a left column above its sub-block's own layers holds white padding;
  //  * the broadcast column (MSB of the right sub-block) holds white padding
  //    and then s driver stages directly under the broadcast row;
  //  * other right columns above their sub-block hold white padding.
  // ---------------------------------------------------------------------
  typedef enum logic [1:0] {
    CELL_WHITE  = 2'd0,
    CELL_BLACK  = 2'd1,
    CELL_DRIVER = 2'd2
  } cell_e;

  typedef struct packed {
    cell_e      kind;
    logic [7:0] src;     // black: column that broadcasts into this row
    logic [7:0] stage;   // driver: position in its cascade, 1 = lowest
    logic [7:0] stages;  // driver: number of stages in its cascade
  } slot_t;

  function automatic slot_t slot(int unsigned n, int unsigned layer, int unsigned col);
    int unsigned w, c, base;
    slot_t r;
    w    = n;
    c    = col;
    base = 0;
    r    = '{kind: CELL_WHITE, src: '0, stage: '0, stages: '0};
    while (w > 1) begin
      int unsigned m, l, s, d, dl, dr;
      m  = right_width(w);
      l  = w - m;
      s  = driver_stages(w);
      d  = depth(w);
      dl = depth(l);
      dr = depth(m);
      if (layer > d) begin
        return r;                                  // above this block: none
      end else if (layer == d) begin               // broadcast row
        if (c >= m) begin
          r.kind = CELL_BLACK;
          r.src  = 8'(base + m - 1);
        end
        return r;
      end else if (c >= m) begin                   // left sub-block
        if (layer > dl) return r;                  // padding
        base += m;
        c    -= m;
        w     = l;
      end else begin                               // right sub-block
        if (layer > dr) begin
          if (c == m - 1 && layer + s >= d) begin  // driver under the row
            r.kind   = CELL_DRIVER;
            r.stage  = 8'(layer + s - d + 1);
            r.stages = 8'(s);
          end
          return r;
        end
        w = m;
      end
    end
    return r;
  endfunction

endpackage
