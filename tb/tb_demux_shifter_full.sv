// tb_demux_shifter_full: the rotator exactly as built by default (64 bits,
// NAND network), taken through every shift amount with random words, walking
// ones and all-ones, each output compared with an independently computed
// right rotation z[j] = d[(j + sh) mod 64].
module tb_demux_shifter_full;
  int checks = 0;
  int failures = 0;

  logic [63:0] d, z, z_exp;
  logic [5:0]  sh;

  demux_shifter u_dut (.d(d), .sh(sh), .z(z));

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
    for (int j = 0; j < 64; j++) z_exp[j] = dv[(j + int'(sv)) % 64];
    checks++;
    if (z !== z_exp) begin
      failures++;
      $display("FAIL d=%h sh=%0d got %h expected %h", dv, sv, z, z_exp);
    end
  endtask

  initial begin
    for (int s = 0; s < 64; s++) begin
      for (int r = 0; r < 32; r++) apply({$urandom, $urandom}, 6'(s));
      for (int b = 0; b < 64; b++) apply(64'd1 << b, 6'(s));
      apply('1, 6'(s));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
