// rot_harness: wraps one demux_shifter configuration for the end-to-end
// testbench. It truncates the shared 64-bit stimulus to N bits, computes the
// expected rotation z[j] = d[(j + sh) mod N] on its own, and reports:
//   ok       - the shifter output matches the expectation;
//   quiet    - in every stage, all branch wires of the unselected kind
//              (stay wires of a shifting stage, shift wires of a passing
//              stage) sit at their rest level;
//   stage_sh - which stages took the shifting path for this shift amount.
module rot_harness
  import shifter_pkg::*;
#(
  parameter int unsigned N     = 8,
  parameter gate_style_e GATE  = GATE_NAND,
  parameter cell_order_e ORDER = ORDER_OPTIMIZED
) (
  input  logic [63:0] d_all,
  input  logic [5:0]  sh_all,
  output logic        ok,
  output logic        quiet,
  output logic [5:0]  stage_sh
);
  localparam int unsigned LOGN = $clog2(N);

  logic [N-1:0]    d, z, z_exp;
  logic [LOGN-1:0] sh;
  logic [LOGN-1:0] q;

  assign d  = d_all[N-1:0];
  assign sh = sh_all[LOGN-1:0];

  demux_shifter #(.N(N), .GATE(GATE), .ORDER(ORDER)) u_dut (
    .d(d), .sh(sh), .z(z));

  always_comb
    for (int j = 0; j < int'(N); j++)
      z_exp[j] = d[(j + int'(sh)) % int'(N)];

  for (genvar k = 0; k < LOGN; k++) begin : g_q
    localparam logic REST = (GATE == GATE_NAND);
    assign q[k] = sh[k] ? (u_dut.g_stage[k].stay_w  == {N{REST}})
                        : (u_dut.g_stage[k].shift_w == {N{REST}});
  end

  assign ok       = (z == z_exp);
  assign quiet    = &q;
  assign stage_sh = 6'(sh);
endmodule
