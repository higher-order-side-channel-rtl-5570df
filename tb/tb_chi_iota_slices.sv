// tb_chi_iota_slices: self-checking test of the sliced chi/iota unit. A first-order
// pipelined instance with pi in front (two slices per cycle) and an unprotected
// instance without pi get random shared slices and round-constant bits; the
// recombined outputs must equal iota(chi(pi(slice))) computed here, after one cycle
// for the pipelined instance and at once for the unprotected one.
module tb_chi_iota_slices;
  logic clk = 0;
  always #5 clk = ~clk;

  function automatic logic [24:0] ref_slice(logic [24:0] a, logic rc, bit pi);
    logic [24:0] b, o;
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        if (pi) b[y + 5*((2*x + 3*y) % 5)] = a[x + 5*y];
        else    b[x + 5*y] = a[x + 5*y];
    for (int x = 0; x < 5; x++)
      for (int y = 0; y < 5; y++)
        o[x+5*y] = b[x+5*y] ^ (~b[(x+1)%5+5*y] & b[(x+2)%5+5*y]);
    o[0] ^= rc;
    return o;
  endfunction

  logic [1:0][1:0][24:0] sa, oa;
  logic [0:0][0:0][24:0] sb, ob;
  logic [1:0] rca;
  logic [0:0] rcb;
  logic [49:0] rnda;
  logic [24:0] rndb;

  chi_iota_slices #(.SHARES(2), .SP(2), .PIPELINED(1), .RAND_OPT(1), .APPLY_PI(1)) ua (
    .clk_i(clk), .slice_i(sa), .rc_i(rca), .rand_i(rnda), .slice_o(oa));
  chi_iota_slices #(.SHARES(1), .SP(1), .PIPELINED(1), .RAND_OPT(1), .APPLY_PI(0)) ub (
    .clk_i(clk), .slice_i(sb), .rc_i(rcb), .rand_i(rndb), .slice_o(ob));

  int checks = 0, failures = 0;

  initial begin
    logic [1:0][24:0] va;
    logic [1:0] rcs;
    for (int n = 0; n < 300; n++) begin
      @(posedge clk);
      #1;
      for (int s = 0; s < 2; s++) for (int j = 0; j < 2; j++) sa[s][j] = 25'($urandom);
      sb = 25'($urandom);
      rca = 2'($urandom); rcb = 1'($urandom);
      rnda = {$urandom, $urandom}; rndb = 25'($urandom);
      for (int j = 0; j < 2; j++) va[j] = sa[0][j] ^ sa[1][j];
      rcs = rca;
      #1;
      checks++;
      if (ob[0][0] !== ref_slice(sb[0][0], rcb, 0)) begin
        failures++;
        $display("FAIL unprotected");
      end
      @(posedge clk);
      #1;
      for (int j = 0; j < 2; j++) begin
        checks++;
        if ((oa[0][j] ^ oa[1][j]) !== ref_slice(va[j], rcs[j], 1)) begin
          failures++;
          $display("FAIL masked slice %0d", j);
        end
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
