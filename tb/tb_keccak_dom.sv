// tb_keccak_dom: end-to-end test of the default keccak_dom (SERIAL-AREA, first order,
// KECCAK[1088,512]) used as a SHA3-256 hash, all parameters at their defaults.
//
// Messages are padded (SHA3 domain bits 01, pad10*1), split into 136-byte blocks, every
// block is split into two random shares and absorbed slice by slice with din_valid
// withheld at random. Checked: the digests of "" and "abc" against the published
// SHA3-256 values, a random 300-byte (three-block) message and a further squeeze
// permutation against the unmasked reference sponge, and the busy cycles of every
// permutation (3160 plus stalled cycles). Mechanisms counted and required at least once:
// clear, absorbing permutation, absorb stall, multi-block absorption, squeeze
// permutation (no absorption).
module tb_keccak_dom;
  import keccak_ref_pkg::*;

  localparam int SHARES = 2, RATE = 17, RATE_BYTES = 136, CYC = 3160;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic clear, start, absorb, din_valid, din_ready, dout_valid, busy, done;
  logic [SHARES-1:0][0:0][RATE-1:0] din, dout;
  logic [24:0] rnd;
  logic [5:0] dout_group;

  keccak_dom dut (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .start_i(start), .absorb_i(absorb),
    .din_valid_i(din_valid), .din_ready_o(din_ready), .din_i(din), .rand_i(rnd),
    .dout_valid_o(dout_valid), .dout_group_o(dout_group), .dout_o(dout),
    .busy_o(busy), .done_o(done)
  );

  int checks = 0, failures = 0;
  int n_clear = 0, n_absorb = 0, n_stall = 0, n_multi = 0, n_squeeze = 0;
  int busy_cycles;
  kstate_t ref_st;
  logic [SHARES-1:0][24:0][63:0] sh, out_sh;

  always @(negedge clk) rnd <= 25'($urandom);

  always @(posedge clk) begin
    if (busy) busy_cycles <= busy_cycles + 1;
    if (dout_valid)
      for (int s = 0; s < SHARES; s++)
        for (int i = 0; i < RATE; i++) out_sh[s][i][dout_group] <= dout[s][0][i];
  end

  function automatic logic [63:0] out_lane(int i);
    return out_sh[0][i] ^ out_sh[1][i];
  endfunction

  task automatic do_clear();
    @(negedge clk);
    clear = 1'b1;
    @(negedge clk);
    clear = 1'b0;
    ref_st = '0;
    n_clear++;
  endtask

  // One permutation, absorbing blk first if do_absorb.
  task automatic permute(kstate_t blk, bit do_absorb);
    int stalls, g;
    stalls = 0;
    for (int i = 0; i < 25; i++) begin
      sh[1][i] = {$urandom, $urandom};
      sh[0][i] = blk[i] ^ sh[1][i];
    end
    if (do_absorb) for (int i = 0; i < 25; i++) ref_st[i] ^= blk[i];
    ref_st = keccak_f(ref_st, 64);
    @(negedge clk);
    start = 1'b1;
    absorb = do_absorb;
    busy_cycles = 0;
    @(negedge clk);
    start = 1'b0;
    if (do_absorb) begin
      g = 0;
      while (g < 64) begin
        din_valid = ($urandom % 3) != 0;
        for (int s = 0; s < SHARES; s++)
          for (int i = 0; i < RATE; i++) din[s][0][i] = sh[s][i][g];
        @(posedge clk);
        if (din_ready && din_valid) g++;
        else if (din_ready) stalls++;
        @(negedge clk);
      end
      din_valid = 1'b0;
      n_absorb++;
      n_stall += stalls;
    end else begin
      n_squeeze++;
    end
    while (!done) @(negedge clk);
    checks++;
    if (busy_cycles != CYC + stalls) begin
      failures++;
      $display("FAIL cycles %0d, expected %0d", busy_cycles, CYC + stalls);
    end
    for (int i = 0; i < RATE; i++) begin
      checks++;
      if (out_lane(i) !== ref_st[i]) begin
        failures++;
        $display("FAIL rate lane %0d got %h exp %h", i, out_lane(i), ref_st[i]);
      end
    end
  endtask

  // Hash a message of len bytes held in msg; returns the 32-byte digest.
  task automatic sha3_256(input byte unsigned msg [], output logic [255:0] dig);
    int nblk;
    byte unsigned padded [];
    kstate_t blk;
    nblk = msg.size() / RATE_BYTES + 1;
    padded = new[nblk * RATE_BYTES];
    foreach (padded[k]) padded[k] = (k < msg.size()) ? msg[k] : 8'h00;
    padded[msg.size()] ^= 8'h06;
    padded[nblk * RATE_BYTES - 1] ^= 8'h80;
    do_clear();
    if (nblk > 1) n_multi++;
    for (int b = 0; b < nblk; b++) begin
      blk = '0;
      for (int k = 0; k < RATE_BYTES; k++) blk[k/8][8*(k%8) +: 8] = padded[b*RATE_BYTES + k];
      permute(blk, 1'b1);
    end
    for (int k = 0; k < 32; k++) begin
      logic [63:0] v;
      v = out_lane(k / 8);
      dig[255 - 8*k -: 8] = v[8*(k%8) +: 8];
    end
  endtask

  initial begin
    byte unsigned m [];
    logic [255:0] dig;
    clear = 0; start = 0; absorb = 0; din_valid = 0; din = '0; out_sh = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;

    m = new[0];
    sha3_256(m, dig);
    checks++;
    if (dig !== 256'ha7ffc6f8bf1ed76651c14756a061d662f580ff4de43b49fa82d80a4b80f8434a) begin
      failures++;
      $display("FAIL SHA3-256(\"\") = %h", dig);
    end

    m = new[3];
    m[0] = 8'h61; m[1] = 8'h62; m[2] = 8'h63;
    sha3_256(m, dig);
    checks++;
    if (dig !== 256'h3a985da74fe225b2045c172d6bd390bd855f086e3e9d525b46bfe24511431532) begin
      failures++;
      $display("FAIL SHA3-256(\"abc\") = %h", dig);
    end

    m = new[300];
    foreach (m[k]) m[k] = 8'($urandom);
    sha3_256(m, dig);
    permute('0, 1'b0);   // squeeze one more block of output

    checks += 5;
    if (n_clear == 0)   begin failures++; $display("FAIL no clear");   end
    if (n_absorb == 0)  begin failures++; $display("FAIL no absorb");  end
    if (n_stall == 0)   begin failures++; $display("FAIL no stall");   end
    if (n_multi == 0)   begin failures++; $display("FAIL no multi-block message"); end
    if (n_squeeze == 0) begin failures++; $display("FAIL no squeeze"); end
    $display("mechanisms: clear=%0d absorb=%0d stall_cycles=%0d multiblock=%0d squeeze=%0d",
             n_clear, n_absorb, n_stall, n_multi, n_squeeze);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end
endmodule
