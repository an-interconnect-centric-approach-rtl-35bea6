// fs_stage: one shift-by-2^STAGE level of the fanout-splitting rotator.
//
// The stage holds the N DEMUX cells of level STAGE and the N merge gates of
// level STAGE+1. One select line steers every DEMUX: with sel = 0 each bit
// takes its `stay` branch to the cell of the same logical position, with
// sel = 1 its `shift` branch to the cell 2^STAGE positions to the right
// (modulo N, so the low bits wrap to the top). Logical cell i of level
// STAGE+1 therefore merges the stay branch of cell i and the shift branch of
// cell (i + 2^STAGE) mod N, which is a right rotation by 2^STAGE when sel = 1.
//
// Cells are kept in physical slot order on both levels, as a bit-sliced
// layout places them: lvl_in[p] and the branch wires stay_w[p], shift_w[p]
// belong to the cell in slot p of level STAGE, lvl_out[q] to the cell in slot
// q of level STAGE+1. Which logical cell sits in which slot comes from
// shifter_pkg::cell_at for the chosen ORDER; the wiring between the two rows
// follows from it. The branch wires are brought out so that the quiet
// (unselected) branches can be observed; they need not be connected.
//
// Combinational: two gate delays (DEMUX gate, merge gate) from lvl_in or sel
// to lvl_out. The complement of sel is formed here with one inverter.
module fs_stage
  import shifter_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter int unsigned STAGE = 0,
  parameter gate_style_e GATE  = GATE_NAND,
  parameter cell_order_e ORDER = ORDER_OPTIMIZED
) (
  input  logic [N-1:0] lvl_in,   // level STAGE, indexed by physical slot
  input  logic         sel,      // shift-amount bit STAGE
  output logic [N-1:0] lvl_out,  // level STAGE+1, indexed by physical slot
  output logic [N-1:0] stay_w,   // non-shifting branches, by source slot
  output logic [N-1:0] shift_w   // shifting branches, by source slot
);

  localparam int unsigned SHIFT = (1 << STAGE) % N;

  logic sel_n;
  assign sel_n = ~sel;

  for (genvar p = 0; p < N; p++) begin : g_demux
    fs_demux #(.GATE(GATE)) u_demux (
      .x    (lvl_in[p]),
      .sel  (sel),
      .sel_n(sel_n),
      .stay (stay_w[p]),
      .shift(shift_w[p])
    );
  end

  for (genvar q = 0; q < N; q++) begin : g_merge
    // logical cell of this output slot and the slots of its two sources
    localparam int CELL     = cell_at(N, ORDER, STAGE + 1, q);
    localparam int SRC_STAY = slot_of(N, ORDER, STAGE, CELL);
    localparam int SRC_SHFT = slot_of(N, ORDER, STAGE, (CELL + SHIFT) % N);
    fs_merge #(.GATE(GATE)) u_merge (
      .a(stay_w[SRC_STAY]),
      .b(shift_w[SRC_SHFT]),
      .y(lvl_out[q])
    );
  end

endmodule
