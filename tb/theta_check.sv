// theta_check: streams random shared states of W-bit lanes through theta_slices, SP
// slices per cycle from z = 0 upwards, finishes slice 0 with corr_o after the last group
// (as the state memory does) and compares the recombined result with theta of the
// unshared state.
module theta_check #(
  parameter int unsigned SHARES = 2,
  parameter int unsigned SP     = 1,
  parameter int unsigned W      = 8,
  parameter int          N      = 50
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned G = W / SP;

  logic en, first;
  logic [SHARES-1:0][SP-1:0][24:0] si, so;
  logic [SHARES-1:0][4:0] corr;

  theta_slices #(.SHARES(SHARES), .SP(SP)) dut (
    .clk_i(clk), .rst_ni(rst_n), .en_i(en), .first_i(first), .slice_i(si), .slice_o(so),
    .corr_o(corr));

  logic [SHARES-1:0][W-1:0][24:0] st, res;

  function automatic logic [W-1:0][24:0] theta_ref(logic [W-1:0][24:0] a);
    logic [W-1:0][4:0] c;
    logic [W-1:0][24:0] o;
    for (int z = 0; z < int'(W); z++)
      for (int x = 0; x < 5; x++)
        c[z][x] = a[z][x] ^ a[z][x+5] ^ a[z][x+10] ^ a[z][x+15] ^ a[z][x+20];
    for (int z = 0; z < int'(W); z++)
      for (int i = 0; i < 25; i++)
        o[z][i] = a[z][i] ^ c[z][(i%5+4)%5] ^ c[(z+W-1)%W][(i%5+1)%5];
    return o;
  endfunction

  initial begin
    logic [W-1:0][24:0] u, r;
    finished = 0; checks = 0; failures = 0; en = 0; first = 0; si = '0;
    wait (rst_n);
    for (int n = 0; n < N; n++) begin
      for (int s = 0; s < int'(SHARES); s++)
        for (int z = 0; z < int'(W); z++) st[s][z] = 25'($urandom);
      for (int g = 0; g < int'(G); g++) begin
        @(negedge clk);
        en = 1; first = (g == 0);
        for (int s = 0; s < int'(SHARES); s++)
          for (int j = 0; j < int'(SP); j++) si[s][j] = st[s][g*SP + j];
        #1;
        for (int s = 0; s < int'(SHARES); s++)
          for (int j = 0; j < int'(SP); j++) res[s][g*SP + j] = so[s][j];
        if (g == int'(G) - 1)
          for (int s = 0; s < int'(SHARES); s++)
            for (int i = 0; i < 25; i++) res[s][0][i] ^= corr[s][i%5];
      end
      @(negedge clk);
      en = 0;
      u = '0; r = '0;
      for (int s = 0; s < int'(SHARES); s++) begin
        u = u ^ st[s];
        r = r ^ res[s];
      end
      checks++;
      if (r !== theta_ref(u)) begin
        failures++;
        $display("FAIL %m state %0d", n);
      end
    end
    finished = 1;
  end
endmodule
