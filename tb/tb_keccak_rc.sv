// tb_keccak_rc: checks every round-constant bit delivered by keccak_rc against the
// published 64-bit KECCAK round constants, for KECCAK-f[1600] (one slice per lookup)
// and KECCAK-f[200] (two slices per lookup, 18 rounds, constants truncated to 8 bits).
module tb_keccak_rc;
  import keccak_ref_pkg::*;

  logic [4:0] r64;
  logic [5:0] g64;
  logic [0:0] rc64;
  logic [4:0] r8;
  logic [1:0] g8;
  logic [1:0] rc8;

  keccak_rc #(.W(64), .SP(1)) u64 (.round_i(r64), .group_i(g64), .rc_o(rc64));
  keccak_rc #(.W(8),  .SP(2)) u8  (.round_i(r8),  .group_i(g8),  .rc_o(rc8));

  int checks = 0, failures = 0;

  initial begin
    for (int r = 0; r < 24; r++)
      for (int z = 0; z < 64; z++) begin
        r64 = 5'(r); g64 = 6'(z);
        #1;
        checks++;
        if (rc64[0] !== RC[r][z]) begin
          failures++;
          $display("FAIL W=64 round %0d bit %0d", r, z);
        end
      end
    for (int r = 0; r < 18; r++)
      for (int g = 0; g < 4; g++) begin
        r8 = 5'(r); g8 = 2'(g);
        #1;
        checks++;
        if (rc8 !== RC[r][2*g +: 2]) begin
          failures++;
          $display("FAIL W=8 round %0d group %0d", r, g);
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
