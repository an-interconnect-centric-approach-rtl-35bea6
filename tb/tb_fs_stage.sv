// tb_fs_stage: checks the three stages of an 8-bit rotator, each in the NAND
// and the NOR gate style, with the intermediate levels in the optimised
// 8-bit cell order. The testbench keeps its own copy of that order (one row
// per level, leftmost slot first) and from it works out, for random data and
// both select values:
//   - lvl_out: logical cell i of the next level must hold logical cell i of
//     this level when sel = 0 and cell (i + 2^k) mod 8 when sel = 1;
//   - the active branch of every DEMUX carries its data, and every branch of
//     the unselected kind sits at the rest level (1 for NAND, 0 for NOR).
module tb_fs_stage;
  import shifter_pkg::*;

  localparam int N = 8;
  localparam int ROW [4][8] = '{
    '{7, 6, 5, 4, 3, 2, 1, 0},
    '{6, 5, 4, 3, 7, 2, 1, 0},
    '{3, 4, 2, 6, 7, 5, 1, 0},
    '{7, 6, 5, 4, 3, 2, 1, 0}
  };

  int checks = 0;
  int failures = 0;

  logic [N-1:0] din;
  logic         sel;
  logic         ok_out   [3][2];
  logic         ok_quiet [3][2];
  logic         ok_act   [3][2];

  for (genvar k = 0; k < 3; k++) begin : g_k
    for (genvar g = 0; g < 2; g++) begin : g_g
      localparam gate_style_e GS = (g == 0) ? GATE_NAND : GATE_NOR;
      logic [N-1:0] dout, st, sh;
      fs_stage #(.N(N), .STAGE(k), .GATE(GS), .ORDER(ORDER_OPTIMIZED)) u_dut (
        .lvl_in(din), .sel(sel), .lvl_out(dout), .stay_w(st), .shift_w(sh));

      always_comb begin
        logic [N-1:0] lin, lout;
        logic rest;
        rest = (g == 0);
        // physical -> logical on the input level, then the expected logical
        // output, then compare slot by slot on the output level
        for (int p = 0; p < N; p++) lin[ROW[k][N-1-p]] = din[p];
        for (int i = 0; i < N; i++) lout[i] = sel ? lin[(i + (1 << k)) % N] : lin[i];
        ok_out[k][g] = 1'b1;
        for (int q = 0; q < N; q++)
          if (dout[q] !== lout[ROW[k+1][N-1-q]]) ok_out[k][g] = 1'b0;
        ok_quiet[k][g] = sel ? (st == {N{rest}}) : (sh == {N{rest}});
        ok_act[k][g]   = sel ? (sh == ~din) : (st == ~din);
      end
    end
  end

  initial begin : watchdog
    #100000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    din = '0;
    sel = 1'b0;
    for (int t = 0; t < 200; t++) begin
      din = N'($urandom);
      sel = t[0];
      #1;
      for (int k = 0; k < 3; k++)
        for (int g = 0; g < 2; g++) begin
          checks += 3;
          if (!ok_out[k][g]) begin
            failures++;
            $display("FAIL stage %0d style %0d: wrong output din=%b sel=%0b", k, g, din, sel);
          end
          if (!ok_quiet[k][g]) begin
            failures++;
            $display("FAIL stage %0d style %0d: idle branch not at rest sel=%0b", k, g, sel);
          end
          if (!ok_act[k][g]) begin
            failures++;
            $display("FAIL stage %0d style %0d: active branch wrong sel=%0b", k, g, sel);
          end
        end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
