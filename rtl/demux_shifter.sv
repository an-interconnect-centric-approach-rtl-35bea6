// demux_shifter: N-bit right cyclic shifter built from fanout-splitting
// (DEMUX) stages, with the intermediate cells in an optimised physical order.
//
// Function: z[j] = d[(j + sh) mod N], a rotation to the right by sh places.
//
// Structure: log2(N) stages in series, stage k rotating by 2^k when sh[k] is
// set (1, 2, 4, ... from input to output). Each stage (fs_stage) is a row of
// DEMUX cells that send every bit down exactly one of two branch wires, and a
// row of merge gates that recombine the branches. Compared with the usual
// MUX-per-cell log shifter this separates the shifting and non-shifting
// paths: the unselected branches stay at rest, and each data wire drives one
// gate instead of two. The cells of the input level (D) and of the output
// level (Z) are in natural bit order; with ORDER = ORDER_OPTIMIZED the
// intermediate levels use the minimum-delay orders stored in shifter_pkg for
// N = 8, 16 and 32, and natural order for any other N (including the default
// N = 64, for which no order is tabulated). GATE selects the NAND2 network
// (default) or its NOR2 dual.
//
// The default N = 64 with NAND2 gates is the configuration the document
// implements; the choice of rotate direction, the stage order (1, 2, 4, ...)
// and the NAND/NOR structure follow the document. The absence of registers,
// the binary shift-amount port and generating each select's complement
// inside the stage are this design's own choices.
//
// Timing: purely combinational, 2*log2(N) gate levels from d or sh to z.
module demux_shifter
  import shifter_pkg::*;
#(
  parameter int unsigned N     = 64,
  parameter gate_style_e GATE  = GATE_NAND,
  parameter cell_order_e ORDER = ORDER_OPTIMIZED,
  localparam int unsigned LOGN = $clog2(N)
) (
  input  logic [N-1:0]    d,   // data in
  input  logic [LOGN-1:0] sh,  // right-rotate amount
  output logic [N-1:0]    z    // rotated data
);

  if (N < 2 || (1 << LOGN) != N) begin : g_bad_n
    $error("demux_shifter: N must be a power of two of at least 2");
  end
  if (!order_valid(N, ORDER, LOGN)) begin : g_bad_order
    $error("demux_shifter: cell order table is not a valid permutation");
  end

  // lvl[l] is level l in physical slot order; level 0 and level LOGN are in
  // natural order, so they are d and z directly.
  logic [N-1:0] lvl [LOGN+1];

  assign lvl[0] = d;

  for (genvar k = 0; k < LOGN; k++) begin : g_stage
    // branch wires of the stage, kept visible for observing quiet lines
    logic [N-1:0] stay_w, shift_w;
    fs_stage #(
      .N    (N),
      .STAGE(k),
      .GATE (GATE),
      .ORDER(ORDER)
    ) u_stage (
      .lvl_in (lvl[k]),
      .sel    (sh[k]),
      .lvl_out(lvl[k+1]),
      .stay_w (stay_w),
      .shift_w(shift_w)
    );
  end

  assign z = lvl[LOGN];

endmodule
