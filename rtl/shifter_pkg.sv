// shifter_pkg: types, constants and elaboration-time functions shared by the
// fanout-splitting cyclic shifter.
//
// The shifter is a logarithmic rotator of N bits with log2(N) stages. Level 0
// holds the input cells, level log2(N) the output cells, and the levels in
// between hold the intermediate cells. Logical cell i of level l carries bit i
// of the word rotated by the amount the first l stages have applied. The input
// and output levels keep the natural bit order, physical slot p holding cell p.
// The intermediate levels may be laid out in any order. A different order does
// not change the function, only the lengths of the wires between levels.
//
// This package holds the intermediate-level orders that minimise the longest
// path for 8, 16 and 32 bits. The 8- and 16-bit orders are global optima; the
// 32-bit order comes from a sliding-window search and is not proven optimal.
// Each table row lists one level from the leftmost slot (p = N-1) down to the
// rightmost slot (p = 0), row 0 being the input level. For any other N,
// or when ORDER_LINEAR is chosen, every level uses the natural order.
//
// Gate styles: GATE_NAND builds each DEMUX from two NAND2 gates and each merge
// from one NAND2 (suits static CMOS). GATE_NOR is the dual network of NOR2
// gates (suits dynamic logic). Both are non-inverting from D to Z.
package shifter_pkg;

  typedef enum logic {
    GATE_NAND = 1'b0,
    GATE_NOR  = 1'b1
  } gate_style_e;

  typedef enum logic {
    ORDER_LINEAR    = 1'b0,
    ORDER_OPTIMIZED = 1'b1
  } cell_order_e;

  // Level value at which a branch wire of a DEMUX rests while it is not the
  // selected branch: NAND DEMUX outputs are active low, NOR DEMUX outputs
  // active high.
  function automatic logic branch_rest(gate_style_e g);
    return (g == GATE_NAND) ? 1'b1 : 1'b0;
  endfunction

  // Minimum-delay cell order, 8 bits (3 stages, levels 0..3).
  localparam int ORDER8 [4][8] = '{
    '{7, 6, 5, 4, 3, 2, 1, 0},
    '{6, 5, 4, 3, 7, 2, 1, 0},
    '{3, 4, 2, 6, 7, 5, 1, 0},
    '{7, 6, 5, 4, 3, 2, 1, 0}
  };

  // Minimum-delay cell order, 16 bits (4 stages, levels 0..4).
  localparam int ORDER16 [5][16] = '{
    '{15, 14, 13, 12, 11, 10,  9,  8,  7,  6,  5,  4,  3,  2,  1,  0},
    '{13, 14, 12,  9, 11, 10,  8, 15,  7,  6,  5,  3,  4,  1,  2,  0},
    '{11, 12,  7, 10,  9, 15, 14,  6, 13,  5,  8,  3,  4,  2,  1,  0},
    '{ 7,  6,  5, 15, 14,  3, 12, 13, 11, 10,  9,  8,  4,  2,  0,  1},
    '{15, 14, 13, 12, 11, 10,  9,  8,  7,  6,  5,  4,  3,  2,  1,  0}
  };

  // Sliding-window cell order, 32 bits (5 stages, levels 0..5).
  localparam int ORDER32 [6][32] = '{
    '{31, 30, 29, 28, 27, 26, 25, 24, 23, 22, 21, 20, 19, 18, 17, 16,
      15, 14, 13, 12, 11, 10,  9,  8,  7,  6,  5,  4,  3,  2,  1,  0},
    '{30, 29, 28, 27, 26, 25, 24, 23, 22, 21, 20, 19, 18, 17, 16, 15,
      31, 14, 13, 12, 11, 10,  9,  8,  6,  7,  5,  4,  3,  2,  1,  0},
    '{28, 27, 26, 25, 24, 23, 22, 21, 20, 19, 18, 17, 16, 31, 15, 14,
      30, 13, 12, 29, 11, 10,  9,  8,  7,  5,  6,  4,  3,  0,  1,  2},
    '{24, 23, 22, 21, 20, 19, 18, 17, 16, 15, 14, 31, 13, 12, 30, 29,
      28, 27, 26, 11, 10, 25,  8,  9,  7,  6,  5,  2,  3,  4,  0,  1},
    '{15, 14, 13, 12, 16, 11, 10, 31,  9,  8, 30, 29, 28, 27, 26, 25,
      24, 23, 22, 21, 20, 19, 18,  7,  6, 17,  5,  2,  4,  3,  1,  0},
    '{31, 30, 29, 28, 27, 26, 25, 24, 23, 22, 21, 20, 19, 18, 17, 16,
      15, 14, 13, 12, 11, 10,  9,  8,  7,  6,  5,  4,  3,  2,  1,  0}
  };

  // Logical cell placed in physical slot `slot` of level `level`.
  function automatic int cell_at(int n, cell_order_e ord, int level, int slot);
    if (ord == ORDER_OPTIMIZED) begin
      if (n == 8)  return ORDER8[level][n-1-slot];
      if (n == 16) return ORDER16[level][n-1-slot];
      if (n == 32) return ORDER32[level][n-1-slot];
    end
    return slot;
  endfunction

  // Physical slot that holds logical cell `cell_id` of level `level`.
  function automatic int slot_of(int n, cell_order_e ord, int level, int cell_id);
    for (int p = 0; p < n; p++)
      if (cell_at(n, ord, level, p) == cell_id) return p;
    return -1;
  endfunction

  // 1 when every level of the chosen order is a permutation of 0..n-1 and
  // the input and output levels are in natural order.
  function automatic bit order_valid(int n, cell_order_e ord, int levels);
    for (int l = 0; l <= levels; l++)
      for (int c = 0; c < n; c++) begin
        if (slot_of(n, ord, l, c) < 0) return 1'b0;
        if ((l == 0 || l == levels) && slot_of(n, ord, l, c) != c) return 1'b0;
      end
    return 1'b1;
  endfunction

endpackage
