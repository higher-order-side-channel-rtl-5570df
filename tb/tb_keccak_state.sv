// tb_keccak_state: self-checking test of the serial state memory for 64-bit lanes with
// one slice per cycle (lane-based absorption a quarter lane at a time) and 16-bit lanes
// with four slices per cycle (absorption two lanes at a time).
module tb_keccak_state;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 2;
  logic [N-1:0] fin;
  int ch [N], fl [N];

  state_check #(.SHARES(2), .W(64), .SP(1), .AW(16)) c0 (clk, rst_n, fin[0], ch[0], fl[0]);
  state_check #(.SHARES(3), .W(16), .SP(4), .AW(32)) c1 (clk, rst_n, fin[1], ch[1], fl[1]);

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
    repeat (2000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
