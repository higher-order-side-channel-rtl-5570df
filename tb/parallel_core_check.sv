// parallel_core_check: drives one keccak_parallel_core configuration through a sponge
// run (NBLK absorbed blocks of random shared data, then one squeeze permutation) and
// compares the recombined rate with keccak_ref_pkg::keccak_f after every permutation,
// together with the busy cycle count NR * (1, 2 or 3). With KAT = 1 the first block is
// the padded empty message and the SHA3-256 digest is checked.
module parallel_core_check
  import keccak_ref_pkg::*;
#(
  parameter int unsigned SHARES     = 2,
  parameter int unsigned W          = 64,
  parameter bit          PIPELINED  = 1'b1,
  parameter bit          RAND_OPT   = 1'b1,
  parameter int unsigned RATE_LANES = 17,
  parameter int unsigned NBLK       = 2,
  parameter bit          KAT        = 1'b0
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);

  localparam int unsigned NZ    = keccak_pkg::dom_rand_port(SHARES, RAND_OPT);
  localparam int unsigned NRAND = W * 25 * NZ;
  localparam int unsigned NR    = keccak_pkg::num_rounds(W);
  localparam int unsigned CYC   = NR * ((SHARES == 1) ? 1 : (PIPELINED ? 3 : 2));

  logic clear, start, absorb, dout_valid, busy, done;
  logic [SHARES-1:0][W-1:0][RATE_LANES-1:0] din, dout;
  logic [NRAND-1:0] rnd;

  keccak_parallel_core #(
    .SHARES(SHARES), .W(W), .PIPELINED(PIPELINED), .RAND_OPT(RAND_OPT),
    .RATE_LANES(RATE_LANES)
  ) dut (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .start_i(start), .absorb_i(absorb),
    .din_i(din), .rand_i(rnd), .dout_valid_o(dout_valid), .dout_o(dout),
    .busy_o(busy), .done_o(done)
  );

  kstate_t ref_st, blk;
  int busy_cycles;

  always @(negedge clk)
    for (int unsigned i = 0; i < NRAND; i++) rnd[i] <= 1'($urandom);

  always @(posedge clk) if (busy) busy_cycles <= busy_cycles + 1;

  function automatic logic [63:0] out_lane(int i);
    logic [63:0] v;
    v = '0;
    for (int s = 0; s < int'(SHARES); s++)
      for (int z = 0; z < int'(W); z++) v[z] = v[z] ^ dout[s][z][i];
    return v;
  endfunction

  task automatic run(bit do_absorb);
    @(negedge clk);
    for (int i = 0; i < 25; i++) begin
      logic [63:0] acc;
      acc = blk[i];
      for (int s = 1; s < int'(SHARES); s++) begin
        logic [63:0] m;
        m = {$urandom, $urandom};
        for (int z = 0; z < int'(W); z++) if (i < int'(RATE_LANES)) din[s][z][i] = m[z];
        acc = acc ^ m;
      end
      for (int z = 0; z < int'(W); z++) if (i < int'(RATE_LANES)) din[0][z][i] = acc[z];
    end
    start = 1'b1;
    absorb = do_absorb;
    busy_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    while (!dout_valid) @(negedge clk);
    for (int i = 0; i < int'(RATE_LANES); i++) begin
      checks++;
      if ((out_lane(i) & lmask(W)) !== (ref_st[i] & lmask(W))) begin
        failures++;
        $display("FAIL %m lane %0d got %h exp %h", i, out_lane(i), ref_st[i] & lmask(W));
      end
    end
    checks++;
    if (busy_cycles != int'(CYC)) begin
      failures++;
      $display("FAIL %m cycles %0d exp %0d", busy_cycles, CYC);
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    clear = 0; start = 0; absorb = 0; din = '0; ref_st = '0;
    wait (rst_n);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int b = 0; b < int'(NBLK); b++) begin
      blk = '0;
      if (KAT && b == 0) begin
        blk[0]  = 64'h06;
        blk[16] = 64'h8000000000000000;
      end else begin
        for (int i = 0; i < int'(RATE_LANES); i++) blk[i] = {$urandom, $urandom} & lmask(W);
      end
      for (int i = 0; i < 25; i++) ref_st[i] = ref_st[i] ^ blk[i];
      ref_st = keccak_f(ref_st, W);
      run(1'b1);
      if (KAT && b == 0) begin
        logic [255:0] dig;
        for (int k = 0; k < 32; k++) begin
          logic [63:0] v;
          v = out_lane(k / 8);
          dig[255 - 8*k -: 8] = v[8*(k%8) +: 8];
        end
        checks++;
        if (dig !== 256'ha7ffc6f8bf1ed76651c14756a061d662f580ff4de43b49fa82d80a4b80f8434a) begin
          failures++;
          $display("FAIL %m SHA3-256 digest %h", dig);
        end
      end
    end
    blk = '0;
    ref_st = keccak_f(ref_st, W);
    run(1'b0);
    finished = 1;
  end

endmodule
