// serial_core_check: drives one keccak_serial_core configuration through a sponge run
// and compares it with the unmasked reference model.
//
// Sequence: clear, then NBLK blocks, each absorbed with random message data split into
// fresh random shares (din_valid randomly withheld to exercise the absorb stall), then
// one permutation without absorption (squeeze). After every permutation the recombined
// rate output is compared lane by lane with keccak_ref_pkg::keccak_f, and the number of
// busy cycles with the cycle count of the architecture
// G + NR*(RHO_ITER ? W : 1) + NR*(G + LAT) plus the stalled cycles.
// With LANE_ABS = 1 the block is absorbed lane-based, AW bits per transfer in message
// bit order, which adds RATE_LANES*W/AW cycles.
// With KAT = 1 (needs W = 64, RATE_LANES = 17) the first block is the padded empty
// message and the digest is checked against the published SHA3-256("") value.
module serial_core_check
  import keccak_ref_pkg::*;
#(
  parameter int unsigned SHARES     = 2,
  parameter int unsigned W          = 64,
  parameter int unsigned SP         = 1,
  parameter bit          PIPELINED  = 1'b1,
  parameter bit          RAND_OPT   = 1'b1,
  parameter bit          RHO_ITER   = 1'b1,
  parameter int unsigned RATE_LANES = 17,
  parameter int unsigned NBLK       = 2,
  parameter bit          KAT        = 1'b0,
  parameter bit          LANE_ABS   = 1'b0,
  parameter int unsigned AW         = W
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures,
  output int   stalls
);

  localparam int unsigned NZ    = keccak_pkg::dom_rand_port(SHARES, RAND_OPT);
  localparam int unsigned NRAND = SP * 25 * NZ;
  localparam int unsigned G     = W / SP;
  localparam int unsigned GW    = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned LAT   = (PIPELINED && SHARES > 1) ? 1 : 0;
  localparam int unsigned NR    = keccak_pkg::num_rounds(W);
  localparam int unsigned NABS  = RATE_LANES * W / AW;
  localparam int unsigned CYC   = G + NR * (RHO_ITER ? W : 1) + NR * (G + LAT);

  logic clear, start, absorb, din_valid, din_ready, dout_valid, busy, done;
  logic [SHARES-1:0][SP-1:0][RATE_LANES-1:0] din, dout;
  logic [SHARES-1:0][AW-1:0] din_lane;
  logic [NRAND-1:0] rnd;
  logic [GW-1:0] dout_group;

  keccak_serial_core #(
    .SHARES(SHARES), .W(W), .SP(SP), .PIPELINED(PIPELINED), .RAND_OPT(RAND_OPT),
    .RHO_ITER(RHO_ITER), .RATE_LANES(RATE_LANES), .LANE_ABS(LANE_ABS), .AW(AW)
  ) dut (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .start_i(start), .absorb_i(absorb),
    .din_valid_i(din_valid), .din_ready_o(din_ready), .din_i(din), .din_lane_i(din_lane), .rand_i(rnd),
    .dout_valid_o(dout_valid), .dout_group_o(dout_group), .dout_o(dout),
    .busy_o(busy), .done_o(done)
  );

  kstate_t ref_st, blk;
  logic [SHARES-1:0][24:0][63:0] shared_blk, out_sh;
  int busy_cycles, stall_now;

  always @(negedge clk)
    for (int unsigned i = 0; i < NRAND; i++) rnd[i] <= 1'($urandom);

  always @(posedge clk) begin
    if (busy) busy_cycles <= busy_cycles + 1;
    if (dout_valid)
      for (int unsigned s = 0; s < SHARES; s++)
        for (int unsigned j = 0; j < SP; j++)
          for (int unsigned i = 0; i < RATE_LANES; i++)
            out_sh[s][i][32'(dout_group)*SP + j] <= dout[s][j][i];
  end

  task automatic share_block(kstate_t b);
    for (int i = 0; i < 25; i++) begin
      logic [63:0] acc;
      acc = b[i];
      for (int s = 1; s < int'(SHARES); s++) begin
        shared_blk[s][i] = {$urandom, $urandom};
        acc = acc ^ shared_blk[s][i];
      end
      shared_blk[0][i] = acc;
    end
  endtask

  task automatic check(bit do_absorb);
    int nstall;
    nstall = 0;
    @(negedge clk);
    start = 1'b1;
    absorb = do_absorb;
    busy_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    if (do_absorb && LANE_ABS) begin
      int n;
      n = 0;
      while (n < int'(NABS)) begin
        din_valid = ($urandom % 4) != 0;
        for (int unsigned s = 0; s < SHARES; s++)
          for (int unsigned b = 0; b < AW; b++) begin
            int unsigned k;
            k = 32'(n) * AW + b;
            din_lane[s][b] = shared_blk[s][k / W][k % W];
          end
        @(posedge clk);
        if (din_ready && din_valid) n++;
        else if (din_ready) nstall++;
        @(negedge clk);
      end
      din_valid = 1'b0;
      nstall += int'(NABS);
    end else if (do_absorb) begin
      int g;
      g = 0;
      while (g < int'(G)) begin
        din_valid = ($urandom % 4) != 0;
        for (int unsigned s = 0; s < SHARES; s++)
          for (int unsigned j = 0; j < SP; j++)
            for (int unsigned i = 0; i < RATE_LANES; i++)
              din[s][j][i] = shared_blk[s][i][g*SP + j];
        @(posedge clk);
        if (din_ready && din_valid) g++;
        else if (din_ready) nstall++;
        @(negedge clk);
      end
      din_valid = 1'b0;
    end
    while (!done) @(negedge clk);
    stalls += (do_absorb && LANE_ABS) ? nstall - int'(NABS) : nstall;
    // recombine and compare the rate with the reference
    for (int i = 0; i < int'(RATE_LANES); i++) begin
      logic [63:0] v;
      v = '0;
      for (int s = 0; s < int'(SHARES); s++) v = v ^ out_sh[s][i];
      checks++;
      if ((v & lmask(W)) !== (ref_st[i] & lmask(W))) begin
        failures++;
        $display("FAIL %m lane %0d got %h exp %h", i, v & lmask(W), ref_st[i] & lmask(W));
      end
    end
    checks++;
    if (busy_cycles != int'(CYC) + nstall) begin
      failures++;
      $display("FAIL %m cycles %0d exp %0d", busy_cycles, int'(CYC) + nstall);
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0; stalls = 0;
    clear = 0; start = 0; absorb = 0; din_valid = 0; din = '0; din_lane = '0; out_sh = '0;
    ref_st = '0;
    wait (rst_n);
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    for (int b = 0; b < int'(NBLK); b++) begin
      blk = '0;
      if (KAT && b == 0) begin
        blk[0]  = 64'h06;                 // SHA3 domain bits + first pad bit
        blk[16] = 64'h8000000000000000;   // last pad bit, byte 135
      end else begin
        for (int i = 0; i < int'(RATE_LANES); i++) blk[i] = {$urandom, $urandom} & lmask(W);
      end
      share_block(blk);
      for (int i = 0; i < 25; i++) ref_st[i] = ref_st[i] ^ blk[i];
      ref_st = keccak_f(ref_st, W);
      check(1'b1);
      if (KAT && b == 0) begin
        logic [255:0] dig, exp_dig;
        exp_dig = 256'ha7ffc6f8bf1ed76651c14756a061d662f580ff4de43b49fa82d80a4b80f8434a;
        for (int k = 0; k < 32; k++) begin
          logic [63:0] v;
          v = '0;
          for (int s = 0; s < int'(SHARES); s++) v = v ^ out_sh[s][k/8];
          dig[255 - 8*k -: 8] = v[8*(k%8) +: 8];
        end
        checks++;
        if (dig !== exp_dig) begin
          failures++;
          $display("FAIL %m SHA3-256 digest %h", dig);
        end
      end
    end
    ref_st = keccak_f(ref_st, W);
    check(1'b0);
    finished = 1;
  end

endmodule
