// tb_fs_demux: exhaustive check of the fanout-splitting DEMUX cell in both
// gate styles. For every data value and select, the selected branch must
// carry the data (active low in the NAND style, inverted in the NOR style)
// and the other branch must sit at its rest level: 1 for NAND, 0 for NOR.
module tb_fs_demux;
  import shifter_pkg::*;

  int checks = 0;
  int failures = 0;

  logic x, sel;
  logic stay_nand, shift_nand, stay_nor, shift_nor;

  fs_demux #(.GATE(GATE_NAND)) u_nand (
    .x(x), .sel(sel), .sel_n(~sel), .stay(stay_nand), .shift(shift_nand));
  fs_demux #(.GATE(GATE_NOR)) u_nor (
    .x(x), .sel(sel), .sel_n(~sel), .stay(stay_nor), .shift(shift_nor));

  task automatic expect_bit(string what, logic got, logic exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: x=%0b sel=%0b got %0b expected %0b", what, x, sel, got, exp);
    end
  endtask

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int rep = 0; rep < 2; rep++)
      for (int i = 0; i < 4; i++) begin
        {sel, x} = 2'(i);
        #1;
        // NAND cell: branches active low, idle branch high
        expect_bit("nand stay",  stay_nand,  sel ? 1'b1 : !x);
        expect_bit("nand shift", shift_nand, sel ? !x : 1'b1);
        // NOR cell: branches carry inverted data, idle branch low
        expect_bit("nor stay",   stay_nor,   sel ? 1'b0 : !x);
        expect_bit("nor shift",  shift_nor,  sel ? !x : 1'b0);
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
