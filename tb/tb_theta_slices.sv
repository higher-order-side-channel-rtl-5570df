// tb_theta_slices: self-checking test of the iterative theta step with one, two and
// eight slices per cycle on 8- and 64-bit lanes, against theta of the unshared state.
module tb_theta_slices;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  localparam int N = 4;
  logic [N-1:0] fin;
  int ch [N], fl [N];

  theta_check #(.SHARES(2), .SP(1), .W(8))  c0 (clk, rst_n, fin[0], ch[0], fl[0]);
  theta_check #(.SHARES(2), .SP(2), .W(8))  c1 (clk, rst_n, fin[1], ch[1], fl[1]);
  theta_check #(.SHARES(3), .SP(1), .W(64), .N(10)) c2 (clk, rst_n, fin[2], ch[2], fl[2]);
  theta_check #(.SHARES(1), .SP(8), .W(64), .N(20)) c3 (clk, rst_n, fin[3], ch[3], fl[3]);

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
