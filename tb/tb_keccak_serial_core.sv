// tb_keccak_serial_core: self-checking test of the slice-serial masked KECCAK core.
//
// Runs several configurations side by side, each against the unmasked reference:
// SERIAL-AREA and SERIAL-TP at first order (KECCAK-f[1600], SHA3-256 known answer),
// second order with fresh randomness, a double-clocked S-box, four parallel slices,
// the unprotected core, a small KECCAK-f[200], ninth order (10 shares) on KECCAK-f[200],
// SERIAL-TP with 2 slices at fourth order and 8 slices at first order, and lane-based
// absorption one lane (with the known answer), a quarter lane and two lanes per transfer.
// Every run also checks the cycle count.
module tb_keccak_serial_core;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 13;
  logic [N-1:0] fin;
  int ch [N], fl [N], st [N];

  serial_core_check #(.RHO_ITER(1), .KAT(1))                       c0 (clk, rst_n, fin[0], ch[0], fl[0], st[0]);
  serial_core_check #(.RHO_ITER(0), .KAT(1))                       c1 (clk, rst_n, fin[1], ch[1], fl[1], st[1]);
  serial_core_check #(.SHARES(3), .RHO_ITER(1), .NBLK(1))          c2 (clk, rst_n, fin[2], ch[2], fl[2], st[2]);
  serial_core_check #(.SHARES(2), .PIPELINED(0), .RHO_ITER(0))     c3 (clk, rst_n, fin[3], ch[3], fl[3], st[3]);
  serial_core_check #(.SHARES(2), .SP(4), .RHO_ITER(0))            c4 (clk, rst_n, fin[4], ch[4], fl[4], st[4]);
  serial_core_check #(.SHARES(1), .RHO_ITER(1), .NBLK(1))          c5 (clk, rst_n, fin[5], ch[5], fl[5], st[5]);
  serial_core_check #(.SHARES(3), .W(8), .RATE_LANES(18), .RAND_OPT(0), .NBLK(3)) c6 (clk, rst_n, fin[6], ch[6], fl[6], st[6]);
  serial_core_check #(.SHARES(10), .W(8), .RATE_LANES(18), .RHO_ITER(1), .NBLK(2)) c7 (clk, rst_n, fin[7], ch[7], fl[7], st[7]);
  serial_core_check #(.SHARES(5), .SP(2), .RHO_ITER(0), .NBLK(1))  c8 (clk, rst_n, fin[8], ch[8], fl[8], st[8]);
  serial_core_check #(.SHARES(2), .SP(8), .RHO_ITER(0), .NBLK(1))  c9 (clk, rst_n, fin[9], ch[9], fl[9], st[9]);
  serial_core_check #(.RHO_ITER(0), .KAT(1), .LANE_ABS(1))         c10 (clk, rst_n, fin[10], ch[10], fl[10], st[10]);
  serial_core_check #(.RHO_ITER(0), .NBLK(1), .LANE_ABS(1), .AW(16)) c11 (clk, rst_n, fin[11], ch[11], fl[11], st[11]);
  serial_core_check #(.SHARES(3), .W(8), .RATE_LANES(18), .NBLK(2), .LANE_ABS(1), .AW(16)) c12 (clk, rst_n, fin[12], ch[12], fl[12], st[12]);

  int checks = 0, failures = 0;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (&fin);
    for (int i = 0; i < N; i++) begin
      checks += ch[i];
      failures += fl[i];
      checks++;
      if (st[i] == 0) begin
        failures++;
        $display("FAIL config %0d never stalled on absorption", i);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
