// tb_keccak_dom_archs: the top in its SERIAL-TP and PARALLEL (double-clocked) settings,
// each hashing "abc" with SHA3-256 and compared with the published digest, plus the
// permutation cycle counts 1648 and 48.
module tb_keccak_dom_archs;
  import keccak_pkg::*;

  localparam int SHARES = 2, RATE = 17;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  // SERIAL-TP instance
  logic t_start, t_valid, t_ready, t_dvalid, t_busy, t_done;
  logic [SHARES-1:0][0:0][RATE-1:0] t_din, t_dout;
  logic [24:0] t_rnd;
  logic [5:0] t_group;
  keccak_dom #(.ARCH(ARCH_SERIAL_TP)) u_tp (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(1'b0), .start_i(t_start), .absorb_i(1'b1),
    .din_valid_i(t_valid), .din_ready_o(t_ready), .din_i(t_din), .rand_i(t_rnd),
    .dout_valid_o(t_dvalid), .dout_group_o(t_group), .dout_o(t_dout),
    .busy_o(t_busy), .done_o(t_done));

  // PARALLEL instance
  logic p_start, p_ready, p_dvalid, p_busy, p_done;
  logic [SHARES-1:0][63:0][RATE-1:0] p_din, p_dout;
  logic [1599:0] p_rnd;
  logic [5:0] p_group;
  keccak_dom #(.ARCH(ARCH_PARALLEL), .PIPELINED(1'b0)) u_par (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(1'b0), .start_i(p_start), .absorb_i(1'b1),
    .din_valid_i(1'b0), .din_ready_o(p_ready), .din_i(p_din), .rand_i(p_rnd),
    .dout_valid_o(p_dvalid), .dout_group_o(p_group), .dout_o(p_dout),
    .busy_o(p_busy), .done_o(p_done));

  localparam logic [255:0] ABC = 256'h3a985da74fe225b2045c172d6bd390bd855f086e3e9d525b46bfe24511431532;

  int checks = 0, failures = 0, t_cyc = 0, p_cyc = 0;
  logic [SHARES-1:0][16:0][63:0] blk_sh, t_out;
  logic [3:0][63:0] p_lanes;
  logic p_got = 1'b0;

  always @(negedge clk) begin
    t_rnd <= 25'($urandom);
    for (int i = 0; i < 50; i++) p_rnd[32*i +: 32] <= $urandom;
  end
  always @(posedge clk) begin
    if (t_busy) t_cyc++;
    if (p_busy) p_cyc++;
    if (p_dvalid) begin
      p_got <= 1'b1;
      for (int i = 0; i < 4; i++)
        for (int z = 0; z < 64; z++) p_lanes[i][z] <= p_dout[0][z][i] ^ p_dout[1][z][i];
    end
    if (t_dvalid)
      for (int s = 0; s < SHARES; s++)
        for (int i = 0; i < RATE; i++) t_out[s][i][t_group] <= t_dout[s][0][i];
  end

  function automatic logic [255:0] digest(logic [3:0][63:0] lanes);
    logic [255:0] d;
    for (int k = 0; k < 32; k++) d[255 - 8*k -: 8] = lanes[k/8][8*(k%8) +: 8];
    return d;
  endfunction

  initial begin
    logic [16:0][63:0] blk;
    logic [3:0][63:0] lanes;
    t_start = 0; t_valid = 0; t_din = '0; p_start = 0; p_din = '0;
    blk = '0;
    blk[0] = 64'h0000_0000_0663_6261;   // "abc", then the SHA3 domain/pad byte 0x06
    blk[16] = 64'h8000000000000000;
    for (int i = 0; i < RATE; i++) begin
      blk_sh[1][i] = {$urandom, $urandom};
      blk_sh[0][i] = blk[i] ^ blk_sh[1][i];
    end
    for (int s = 0; s < SHARES; s++)
      for (int z = 0; z < 64; z++)
        for (int i = 0; i < RATE; i++) p_din[s][z][i] = blk_sh[s][i][z];
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    t_start = 1; p_start = 1;
    t_cyc = 0; p_cyc = 0;
    @(negedge clk);
    t_start = 0; p_start = 0;
    for (int z = 0; z < 64; z++) begin
      t_valid = 1;
      for (int s = 0; s < SHARES; s++)
        for (int i = 0; i < RATE; i++) t_din[s][0][i] = blk_sh[s][i][z];
      @(negedge clk);
    end
    t_valid = 0;
    wait (t_done);
    @(negedge clk);
    checks++;
    if (!p_got || digest(p_lanes) !== ABC) begin
      failures++;
      $display("FAIL PARALLEL digest %h", digest(p_lanes));
    end
    for (int i = 0; i < 4; i++) lanes[i] = t_out[0][i] ^ t_out[1][i];
    checks++;
    if (digest(lanes) !== ABC) begin
      failures++;
      $display("FAIL SERIAL-TP digest %h", digest(lanes));
    end
    checks += 2;
    if (t_cyc != 1648) begin failures++; $display("FAIL SERIAL-TP cycles %0d", t_cyc); end
    if (p_cyc != 48)   begin failures++; $display("FAIL PARALLEL cycles %0d", p_cyc);  end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
