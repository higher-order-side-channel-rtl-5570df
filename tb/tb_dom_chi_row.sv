// tb_dom_chi_row: self-checking test of the masked 5-bit chi S-box. Random shared rows go
// into a first-order pipelined instance (latency 1) and a second-order double-clocked
// instance (latency 0, fresh randomness); the recombined outputs must equal
// y[i] = x[i] ^ (~x[i+1] & x[i+2]) of the unshared input.
module tb_dom_chi_row;
  logic clk = 0;
  always #5 clk = ~clk;

  function automatic logic [4:0] chi5(logic [4:0] x);
    logic [4:0] y;
    for (int i = 0; i < 5; i++) y[i] = x[i] ^ (~x[(i+1)%5] & x[(i+2)%5]);
    return y;
  endfunction

  logic [1:0][4:0] x2, y2;
  logic [2:0][4:0] x3, y3;
  logic [4:0] z2;
  logic [14:0] z3;

  dom_chi_row #(.SHARES(2), .PIPELINED(1), .RAND_OPT(1)) u2 (.clk_i(clk), .x_i(x2), .z_i(z2), .y_o(y2));
  dom_chi_row #(.SHARES(3), .PIPELINED(0), .RAND_OPT(1)) u3 (.clk_i(clk), .x_i(x3), .z_i(z3), .y_o(y3));

  int checks = 0, failures = 0;

  initial begin
    logic [4:0] v2, v3;
    for (int n = 0; n < 500; n++) begin
      @(posedge clk);
      #1;
      x2 = 10'($urandom); x3 = 15'($urandom); z2 = 5'($urandom); z3 = 15'($urandom);
      v2 = x2[0] ^ x2[1];
      v3 = x3[0] ^ x3[1] ^ x3[2];
      #7;  // after the falling edge: double-clocked result ready
      checks++;
      if ((y3[0] ^ y3[1] ^ y3[2]) !== chi5(v3)) begin
        failures++;
        $display("FAIL 3 shares x=%b y=%b", v3, y3[0] ^ y3[1] ^ y3[2]);
      end
      @(posedge clk);
      #1;  // pipelined result one edge later
      checks++;
      if ((y2[0] ^ y2[1]) !== chi5(v2)) begin
        failures++;
        $display("FAIL 2 shares x=%b y=%b", v2, y2[0] ^ y2[1]);
      end
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
