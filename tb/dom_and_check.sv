// dom_and_check: random test of one dom_and configuration. Every cycle new shares of
// a, b, c and new Z are applied just after the rising edge; the recombined output must
// equal a*b + c of the same cycle (double-clocked, checked just before the next rising
// edge) or of the previous cycle (pipelined). It also checks that each output share on
// its own is not simply the unmasked result (the shares stay randomised).
module dom_and_check #(
  parameter int unsigned SHARES    = 2,
  parameter bit          PIPELINED = 1'b1,
  parameter bit          RAND_OPT  = 1'b1,
  parameter int          N         = 400
) (
  input  logic clk,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned NZ = keccak_pkg::dom_rand_port(SHARES, RAND_OPT);
  localparam bit LAT = PIPELINED && SHARES > 1;

  logic [SHARES-1:0] a, b, c, q;
  logic [NZ-1:0] z;

  dom_and #(.SHARES(SHARES), .PIPELINED(PIPELINED), .RAND_OPT(RAND_OPT)) dut (
    .clk_i(clk), .a_i(a), .b_i(b), .c_i(c), .z_i(z), .q_o(q));

  initial begin
    logic exp_now, exp_prev;
    int share0_eq;
    finished = 0; checks = 0; failures = 0; share0_eq = 0;
    exp_now = 0;
    for (int n = 0; n < N; n++) begin
      @(posedge clk);
      #1;
      exp_prev = exp_now;
      a = SHARES'($urandom); b = SHARES'($urandom); c = SHARES'($urandom);
      z = NZ'($urandom);
      exp_now = (^a & ^b) ^ ^c;
      @(posedge clk);
      #8;
      // hold inputs for the latency, then check
      if (n > 0 || !LAT) begin
        checks++;
        if ((^q) !== (LAT ? exp_now : exp_now)) begin
          failures++;
          $display("FAIL %m n=%0d q=%b exp=%b", n, q, exp_now);
        end
        if (SHARES > 1 && q[0] == exp_now) share0_eq++;
      end
    end
    if (SHARES > 1) begin
      checks++;
      if (share0_eq == N || share0_eq == 0) begin
        failures++;
        $display("FAIL %m output share 0 not randomised (%0d/%0d)", share0_eq, N);
      end
    end
    finished = 1;
  end
endmodule
