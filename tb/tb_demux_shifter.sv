// tb_demux_shifter: end-to-end test of the rotator in the four sizes the
// design is evaluated at (8, 16, 32 and 64 bits), in the NAND network and its
// NOR dual, with the optimised cell orders and, for 8 bits, also the natural
// order. Every shift amount is applied with random words and with walking
// ones; each output word is compared with an independently computed
// rotation, and the quiet-line property (unselected branches at rest) is
// checked in every stage. The 8-bit "rotate right by 5" example is checked
// bit for bit.
//
// Mechanisms counted, each must occur: every stage of the 64-bit rotator
// both shifting and passing, wrap-around of low bits to the top, quiet
// branches in both gate styles, and a non-trivial (optimised) cell order.
module tb_demux_shifter;
  import shifter_pkg::*;

  localparam int H = 9;

  int checks = 0;
  int failures = 0;

  logic [63:0] d;
  logic [5:0]  sh;
  logic        ok    [H];
  logic        quiet [H];
  logic [5:0]  ssh   [H];

  rot_harness #(.N(8),  .GATE(GATE_NAND), .ORDER(ORDER_OPTIMIZED)) h0 (d, sh, ok[0], quiet[0], ssh[0]);
  rot_harness #(.N(8),  .GATE(GATE_NOR),  .ORDER(ORDER_OPTIMIZED)) h1 (d, sh, ok[1], quiet[1], ssh[1]);
  rot_harness #(.N(8),  .GATE(GATE_NAND), .ORDER(ORDER_LINEAR))    h2 (d, sh, ok[2], quiet[2], ssh[2]);
  rot_harness #(.N(16), .GATE(GATE_NAND), .ORDER(ORDER_OPTIMIZED)) h3 (d, sh, ok[3], quiet[3], ssh[3]);
  rot_harness #(.N(16), .GATE(GATE_NOR),  .ORDER(ORDER_OPTIMIZED)) h4 (d, sh, ok[4], quiet[4], ssh[4]);
  rot_harness #(.N(32), .GATE(GATE_NAND), .ORDER(ORDER_OPTIMIZED)) h5 (d, sh, ok[5], quiet[5], ssh[5]);
  rot_harness #(.N(32), .GATE(GATE_NOR),  .ORDER(ORDER_OPTIMIZED)) h6 (d, sh, ok[6], quiet[6], ssh[6]);
  rot_harness #(.N(64), .GATE(GATE_NAND), .ORDER(ORDER_OPTIMIZED)) h7 (d, sh, ok[7], quiet[7], ssh[7]);
  rot_harness #(.N(64), .GATE(GATE_NOR),  .ORDER(ORDER_OPTIMIZED)) h8 (d, sh, ok[8], quiet[8], ssh[8]);

  int n_shift [6];
  int n_pass  [6];
  int n_wrap;
  int n_quiet_nand, n_quiet_nor;
  int n_perm_order;

  initial begin : watchdog
    #1000000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [63:0] dv, logic [5:0] sv);
    d  = dv;
    sh = sv;
    #1;
    for (int i = 0; i < H; i++) begin
      checks += 2;
      if (!ok[i]) begin
        failures++;
        $display("FAIL config %0d: wrong rotation d=%h sh=%0d", i, d, sh);
      end
      if (!quiet[i]) begin
        failures++;
        $display("FAIL config %0d: idle branch active d=%h sh=%0d", i, d, sh);
      end else if (i == 7) n_quiet_nand++;
      else if (i == 8) n_quiet_nor++;
    end
    for (int k = 0; k < 6; k++)
      if (ssh[7][k]) n_shift[k]++; else n_pass[k]++;
    // a set bit below position sh of the 64-bit word wraps to the top
    if (sh != 0 && (d & ((64'd1 << sh) - 64'd1)) != 0) n_wrap++;
  endtask

  initial begin
    n_wrap = 0; n_quiet_nand = 0; n_quiet_nor = 0; n_perm_order = 0;
    for (int k = 0; k < 6; k++) begin n_shift[k] = 0; n_pass[k] = 0; end
    d = '0; sh = '0;

    // the 8-bit example: rotate right by 5
    apply(64'h0000_0000_0000_00B1, 6'd5);
    checks++;
    if (h0.z !== 8'h8D) begin
      failures++;
      $display("FAIL 8-bit rotate-by-5 example: got %h", h0.z);
    end

    for (int s = 0; s < 64; s++) begin
      for (int r = 0; r < 16; r++) apply({$urandom, $urandom}, 6'(s));
      for (int b = 0; b < 64; b++) apply(64'd1 << b, 6'(s));
      apply('1, 6'(s));
      apply('0, 6'(s));
    end

    // the tabulated orders really place cells out of natural order
    for (int n = 8; n <= 32; n *= 2)
      for (int l = 1; l < $clog2(n); l++)
        for (int p = 0; p < n; p++)
          if (cell_at(n, ORDER_OPTIMIZED, l, p) != p) n_perm_order++;

    for (int k = 0; k < 6; k++) begin
      $display("stage %0d (>> %0d): shifting %0d, passing %0d", k, 1 << k, n_shift[k], n_pass[k]);
      checks += 2;
      if (n_shift[k] == 0) begin failures++; $display("FAIL stage %0d never shifted", k); end
      if (n_pass[k] == 0)  begin failures++; $display("FAIL stage %0d never passed", k); end
    end
    $display("wrap-around %0d, quiet lines nand %0d nor %0d, permuted cells %0d",
             n_wrap, n_quiet_nand, n_quiet_nor, n_perm_order);
    checks += 4;
    if (n_wrap == 0)       begin failures++; $display("FAIL no wrap-around"); end
    if (n_quiet_nand == 0) begin failures++; $display("FAIL no quiet NAND branches"); end
    if (n_quiet_nor == 0)  begin failures++; $display("FAIL no quiet NOR branches"); end
    if (n_perm_order == 0) begin failures++; $display("FAIL no permuted cell order"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
