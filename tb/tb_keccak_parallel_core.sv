// tb_keccak_parallel_core: self-checking test of the round-parallel masked KECCAK core.
// First order pipelined and double-clocked (KECCAK-f[1600], SHA3-256 known answer),
// unprotected, second order with fresh randomness on KECCAK-f[200], and first-order
// KECCAK-f[25] with and without the randomness optimisation (twelve rounds); each against the
// unmasked reference and the cycle count per permutation (24/48/72 for W = 64).
module tb_keccak_parallel_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 6;
  logic [N-1:0] fin;
  int ch [N], fl [N];

  parallel_core_check #(.PIPELINED(1), .KAT(1))                c0 (clk, rst_n, fin[0], ch[0], fl[0]);
  parallel_core_check #(.PIPELINED(0), .KAT(1))                c1 (clk, rst_n, fin[1], ch[1], fl[1]);
  parallel_core_check #(.SHARES(1), .NBLK(1))                  c2 (clk, rst_n, fin[2], ch[2], fl[2]);
  parallel_core_check #(.SHARES(3), .W(8), .RATE_LANES(18), .NBLK(3)) c3 (clk, rst_n, fin[3], ch[3], fl[3]);
  parallel_core_check #(.SHARES(2), .W(1), .RATE_LANES(16), .NBLK(20), .RAND_OPT(0)) c4 (clk, rst_n, fin[4], ch[4], fl[4]);
  parallel_core_check #(.SHARES(2), .W(1), .RATE_LANES(16), .NBLK(20), .PIPELINED(0)) c5 (clk, rst_n, fin[5], ch[5], fl[5]);

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    for (int i = 0; i < N; i++) begin
      checks += ch[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
