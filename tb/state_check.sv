// state_check: exercises every operation of one keccak_state configuration against a
// model kept in the testbench: loading by W/SP slice shifts, a full shift cycle that
// writes back what it reads (state unchanged), one shift with the theta correction,
// W cycles of iterative rho, one-cycle rho+pi, lane-based absorption of AW-bit words at
// random positions, hold and clear. The rho offsets and pi
// come from keccak_ref_pkg, not from the RTL package.
module state_check
  import keccak_pkg::*;
  import keccak_ref_pkg::*;
#(
  parameter int unsigned SHARES = 2,
  parameter int unsigned W      = 64,
  parameter int unsigned SP     = 1,
  parameter int unsigned AW     = W
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned G  = W / SP;
  localparam int unsigned CW = $clog2(W) + 1;
  localparam int unsigned PW = $clog2(25 * W) + 1;

  state_op_e op;
  logic [SHARES-1:0][SP-1:0][24:0] wdata, rd;
  logic corr_en;
  logic [SHARES-1:0][4:0] corr;
  logic [CW-1:0] cnt;
  logic [SHARES-1:0][AW-1:0] abs;
  logic [PW-1:0] abs_pos;
  logic [SHARES-1:0][24:0][W-1:0] lanes, exp_st, tmp;

  keccak_state #(.SHARES(SHARES), .W(W), .SP(SP), .AW(AW)) dut (
    .clk_i(clk), .rst_ni(rst_n), .op_i(op), .wdata_i(wdata), .corr_en_i(corr_en),
    .corr_i(corr), .rho_cnt_i(cnt), .abs_i(abs), .abs_pos_i(abs_pos), .rd_o(rd),
    .lanes_o(lanes));

  task automatic compare(string what);
    checks++;
    if (lanes !== exp_st) begin
      failures++;
      $display("FAIL %m %s", what);
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    op = ST_HOLD; wdata = '0; corr_en = 0; corr = '0; cnt = '0; abs = '0; abs_pos = '0;
    wait (rst_n);
    // load a random state through the slice port
    for (int s = 0; s < int'(SHARES); s++)
      for (int i = 0; i < 25; i++) exp_st[s][i] = W'({$urandom, $urandom});
    for (int g = 0; g < int'(G); g++) begin
      @(negedge clk);
      op = ST_SHIFT;
      for (int s = 0; s < int'(SHARES); s++)
        for (int j = 0; j < int'(SP); j++)
          for (int i = 0; i < 25; i++) wdata[s][j][i] = exp_st[s][i][g*SP + j];
    end
    @(negedge clk);
    op = ST_HOLD;
    compare("load");
    // write back what is read: unchanged after G shifts, slices read in order
    for (int g = 0; g < int'(G); g++) begin
      op = ST_SHIFT;
      #1;
      checks++;
      for (int s = 0; s < int'(SHARES); s++)
        for (int j = 0; j < int'(SP); j++)
          for (int i = 0; i < 25; i++)
            if (rd[s][j][i] !== exp_st[s][i][g*SP + j]) begin
              failures++;
              $display("FAIL %m read order g=%0d", g);
              break;
            end
      wdata = rd;
      @(negedge clk);
    end
    op = ST_HOLD;
    compare("write-back");
    // one shift with theta correction
    op = ST_SHIFT; corr_en = 1; corr = '0;
    for (int s = 0; s < int'(SHARES); s++) corr[s] = 5'($urandom);
    #1 wdata = rd;
    for (int s = 0; s < int'(SHARES); s++)
      for (int i = 0; i < 25; i++) begin
        tmp[s][i] = {exp_st[s][i][SP-1:0], exp_st[s][i][W-1:SP]};
        tmp[s][i][0] ^= corr[s][i%5];
      end
    exp_st = tmp;
    @(negedge clk);
    op = ST_HOLD; corr_en = 0;
    compare("correction");
    // iterative rho over W cycles
    for (int c = 0; c < int'(W); c++) begin
      op = ST_RHO; cnt = CW'(c);
      @(negedge clk);
    end
    op = ST_HOLD;
    for (int s = 0; s < int'(SHARES); s++)
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++) tmp[s][x+5*y] = W'(rot(64'(exp_st[s][x+5*y]), ROT[x][y], W));
    exp_st = tmp;
    compare("iterative rho");
    // rho and pi in one cycle
    op = ST_RHOPI;
    @(negedge clk);
    op = ST_HOLD;
    for (int s = 0; s < int'(SHARES); s++)
      for (int x = 0; x < 5; x++)
        for (int y = 0; y < 5; y++)
          tmp[s][y + 5*((2*x + 3*y) % 5)] = W'(rot(64'(exp_st[s][x+5*y]), ROT[x][y], W));
    exp_st = tmp;
    compare("rho+pi");
    // lane-based absorption: word n covers message bits n*AW .. n*AW+AW-1, bit k being
    // bit k mod W of lane k / W
    for (int t = 0; t < 6; t++) begin
      int unsigned n;
      n = $urandom % (25 * W / AW);
      abs_pos = PW'(n);
      for (int s = 0; s < int'(SHARES); s++)
        for (int b = 0; b < int'(AW); b++) begin
          int unsigned k;
          abs[s][b] = 1'($urandom);
          k = n * AW + 32'(b);
          exp_st[s][k / W][k % W] ^= abs[s][b];
        end
      op = ST_LABS;
      @(negedge clk);
      op = ST_HOLD;
      compare("lane absorption");
    end
    @(negedge clk);
    compare("hold");
    op = ST_CLEAR;
    @(negedge clk);
    op = ST_HOLD;
    exp_st = '0;
    compare("clear");
    finished = 1;
  end
endmodule
