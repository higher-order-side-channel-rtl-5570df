// ctrl_check: runs keccak_ctrl through absorbing and non-absorbing permutations with
// random din_valid gaps and counts what it commands: busy cycles (against
// G + NR*(W or 1) + NR*(G+LAT) plus stalls), slice shifts, rho cycles, theta passes
// (corr_en once per theta pass, NR in all), output groups (G, in order 0..G-1), and
// that chi is enabled in exactly NR passes. clear_i must produce ST_CLEAR when idle.
module ctrl_check
  import keccak_pkg::*;
#(
  parameter int unsigned W        = 64,
  parameter int unsigned SP       = 1,
  parameter bit          LAT      = 1'b1,
  parameter bit          RHO_ITER = 1'b1
) (
  input  logic clk,
  input  logic rst_n,
  output logic finished,
  output int   checks,
  output int   failures
);
  localparam int unsigned NR = num_rounds(W);
  localparam int unsigned RW = $clog2(NR);
  localparam int unsigned G  = W / SP;
  localparam int unsigned GW = (G > 1) ? $clog2(G) : 1;
  localparam int unsigned CW = $clog2(W) + 1;

  logic clear, start, absorb, din_valid, din_ready;
  state_op_e op;
  logic corr_en, chi_en, absorb_en, theta_en, theta_first, theta_load, out_valid, busy, done;
  logic [CW-1:0] rho_cnt;
  logic [$clog2(25 * W):0] abs_pos;
  logic [RW-1:0] rc_round;
  logic [GW-1:0] rc_group, out_group;

  keccak_ctrl #(.W(W), .SP(SP), .LAT(LAT), .RHO_ITER(RHO_ITER)) dut (
    .clk_i(clk), .rst_ni(rst_n), .clear_i(clear), .start_i(start), .absorb_i(absorb),
    .din_valid_i(din_valid), .din_ready_o(din_ready), .state_op_o(op), .corr_en_o(corr_en),
    .rho_cnt_o(rho_cnt), .abs_pos_o(abs_pos), .chi_en_o(chi_en), .absorb_en_o(absorb_en),
    .theta_en_o(theta_en),
    .theta_first_o(theta_first), .theta_load_o(theta_load), .rc_round_o(rc_round),
    .rc_group_o(rc_group), .out_valid_o(out_valid), .out_group_o(out_group),
    .busy_o(busy), .done_o(done));

  int n_busy, n_shift, n_rho, n_corr, n_out, n_stall, n_first, n_chi_pass, n_absorb;
  int next_out;
  logic chi_prev;

  always @(posedge clk) begin
    if (busy) n_busy++;
    if (op == ST_SHIFT) n_shift++;
    if (op == ST_RHO || op == ST_RHOPI) n_rho++;
    if (corr_en) n_corr++;
    if (theta_first && theta_load) n_first++;
    if (din_ready && !din_valid) n_stall++;
    if (absorb_en && op == ST_SHIFT) n_absorb++;
    if (chi_en && !chi_prev) n_chi_pass++;
    if (op == ST_LABS || (!busy && abs_pos != '0)) begin
      failures++;
      $display("FAIL %m lane absorption active with slice-based absorption");
    end
    chi_prev <= chi_en;
    if (out_valid) begin
      if (32'(out_group) != next_out) begin
        failures++;
        $display("FAIL %m output group %0d, expected %0d", out_group, next_out);
      end
      next_out++;
    end
  end

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %m %s = %0d, expected %0d", what, got, exp);
    end
  endtask

  task automatic run(bit do_absorb);
    @(negedge clk);
    n_busy = 0; n_shift = 0; n_rho = 0; n_corr = 0; n_out = 0; n_stall = 0;
    n_first = 0; n_chi_pass = 0; n_absorb = 0; next_out = 0;
    start = 1; absorb = do_absorb;
    @(negedge clk);
    start = 0;
    while (!done) begin
      din_valid = ($urandom % 3) != 0;
      @(negedge clk);
    end
    expect_eq("busy cycles", n_busy,
              int'(G + NR * (RHO_ITER ? W : 1) + NR * (G + LAT)) + n_stall);
    expect_eq("shift cycles", n_shift, int'(G + NR * (G + LAT)));
    expect_eq("rho cycles", n_rho, int'(NR * (RHO_ITER ? W : 1)));
    expect_eq("theta passes", n_corr, int'(NR));
    expect_eq("theta starts", n_first, int'(NR));
    expect_eq("chi passes", n_chi_pass, int'(NR));
    expect_eq("output groups", next_out, int'(G));
    expect_eq("absorb shifts", n_absorb, do_absorb ? int'(G) : 0);
    if (!do_absorb) expect_eq("stalls without absorption", n_stall, 0);
    else begin
      checks++;
      if (n_stall == 0) begin
        failures++;
        $display("FAIL %m no stall seen");
      end
    end
  endtask

  initial begin
    finished = 0; checks = 0; failures = 0;
    clear = 0; start = 0; absorb = 0; din_valid = 0; chi_prev = 0;
    wait (rst_n);
    @(negedge clk);
    clear = 1;
    #1;
    expect_eq("clear op", int'(op), int'(ST_CLEAR));
    @(negedge clk);
    clear = 0;
    run(1'b1);
    run(1'b0);
    finished = 1;
  end
endmodule
