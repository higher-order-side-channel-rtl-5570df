// tb_dom_and: self-checking test of the DOM AND gate in the configurations the design
// uses: unprotected, first order with and without the randomness optimisation, second
// and third order, each pipelined and double-clocked. Checks function, latency and that
// output shares stay randomised.
module tb_dom_and;
  logic clk = 0;
  always #5 clk = ~clk;

  localparam int N = 8;
  logic [N-1:0] fin;
  int ch [N], fl [N];

  dom_and_check #(.SHARES(1), .PIPELINED(1), .RAND_OPT(1)) c0 (clk, fin[0], ch[0], fl[0]);
  dom_and_check #(.SHARES(2), .PIPELINED(1), .RAND_OPT(1)) c1 (clk, fin[1], ch[1], fl[1]);
  dom_and_check #(.SHARES(2), .PIPELINED(0), .RAND_OPT(1)) c2 (clk, fin[2], ch[2], fl[2]);
  dom_and_check #(.SHARES(2), .PIPELINED(1), .RAND_OPT(0)) c3 (clk, fin[3], ch[3], fl[3]);
  dom_and_check #(.SHARES(3), .PIPELINED(1), .RAND_OPT(1)) c4 (clk, fin[4], ch[4], fl[4]);
  dom_and_check #(.SHARES(3), .PIPELINED(0), .RAND_OPT(1)) c5 (clk, fin[5], ch[5], fl[5]);
  dom_and_check #(.SHARES(4), .PIPELINED(1), .RAND_OPT(0)) c6 (clk, fin[6], ch[6], fl[6]);
  dom_and_check #(.SHARES(4), .PIPELINED(0), .RAND_OPT(0)) c7 (clk, fin[7], ch[7], fl[7]);

  int checks = 0, failures = 0;
  initial begin
    wait (&fin);
    for (int i = 0; i < N; i++) begin
      checks += ch[i];
      failures += fl[i];
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
