// tb_keccak_ctrl: self-checking test of the serial sequencer in the SERIAL-AREA and
// SERIAL-TP settings, with and without S-box latency, and with four slices per cycle.
module tb_keccak_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 4;
  logic [N-1:0] fin;
  int ch [N], fl [N];

  ctrl_check #(.W(64), .SP(1), .LAT(1), .RHO_ITER(1)) c0 (clk, rst_n, fin[0], ch[0], fl[0]);
  ctrl_check #(.W(64), .SP(1), .LAT(1), .RHO_ITER(0)) c1 (clk, rst_n, fin[1], ch[1], fl[1]);
  ctrl_check #(.W(64), .SP(1), .LAT(0), .RHO_ITER(1)) c2 (clk, rst_n, fin[2], ch[2], fl[2]);
  ctrl_check #(.W(32), .SP(4), .LAT(1), .RHO_ITER(0)) c3 (clk, rst_n, fin[3], ch[3], fl[3]);

  int checks = 0, failures = 0;
  initial begin
    repeat (2) @(posedge clk);
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
