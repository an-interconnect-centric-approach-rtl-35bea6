// tb_fs_merge: exhaustive check of the merge gate in both gate styles. The
// merge recovers the data carried on whichever branch is active: in the NAND
// network a branch carries the data active low (so a 0 on either input means
// a 1 bit), in the NOR network it carries the data inverted and rests at 0
// (so a 1 on either input means a 0 bit, and two 0s mean a 1 bit).
module tb_fs_merge;
  import shifter_pkg::*;

  int checks = 0;
  int failures = 0;

  logic a, b, y_nand, y_nor;

  fs_merge #(.GATE(GATE_NAND)) u_nand (.a(a), .b(b), .y(y_nand));
  fs_merge #(.GATE(GATE_NOR))  u_nor  (.a(a), .b(b), .y(y_nor));

  initial begin : watchdog
    #10000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_nand, exp_nor;
    for (int i = 0; i < 4; i++) begin
      {a, b} = 2'(i);
      #1;
      exp_nand = (a == 1'b0) || (b == 1'b0);  // either active-low branch low
      exp_nor  = !((a == 1'b1) || (b == 1'b1)); // no branch carrying a 0 bit
      checks++;
      if (y_nand !== exp_nand) begin
        failures++;
        $display("FAIL nand a=%0b b=%0b got %0b", a, b, y_nand);
      end
      checks++;
      if (y_nor !== exp_nor) begin
        failures++;
        $display("FAIL nor a=%0b b=%0b got %0b", a, b, y_nor);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
