// keccak_serial_core: slice-serial masked KECCAK-f[25*W] with slice-based or lane-based
// absorption.
//
// The state memory (keccak_state) streams SP slices per cycle through one chain of
// step logic and back:
//     state -> [pi] chi iota -> absorb XOR -> theta -> state
// Each stage can be bypassed per pass (keccak_ctrl decides), so one pass performs
// chi/iota of round i together with theta of round i+1, the first pass absorbs a block
// together with theta of round 0, and the last pass only finishes chi/iota. rho runs in
// the state memory between passes: iteratively over W cycles (RHO_ITER = 1, the
// SERIAL-AREA configuration, pi is then wired in front of chi) or in one cycle together
// with pi (RHO_ITER = 0, SERIAL-TP). Linear steps run on each share separately; only chi
// combines shares, through DOM ANDs.
//
// Interface:
//   start_i/absorb_i  start a permutation (idle only); with absorb_i the rate lanes of
//                     the state are first XORed with din_i, otherwise the state is just
//                     permuted (squeezing further output).
//   din_i             [SHARES][SP][RATE_LANES] shared message bits, slice group by slice
//                     group (z ascending), accepted when din_valid_i && din_ready_o.
//   din_lane_i        [SHARES][AW] shared message word, used instead of din_i when
//                     LANE_ABS = 1: the RATE_LANES*W/AW words of a block (message bit
//                     order) are absorbed one per handshake before the first theta pass.
//   rand_i            fresh randomness, NZ bits per DOM AND, consumed every chi cycle.
//   dout_o            [SHARES][SP][RATE_LANES] rate slices of the permuted state, valid
//                     with dout_valid_o, group index dout_group_o, during the final pass.
//   clear_i           zero the state (idle only).
// Timing: see keccak_ctrl; done_o pulses once the permutation has finished.
//
// The step chain, slice-based absorption and lane-based absorption with a configurable
// width follow the published design; the port layout
// and the output during the final pass are this design's choices.
module keccak_serial_core
  import keccak_pkg::*;
#(
  parameter int unsigned SHARES     = 2,
  parameter int unsigned W          = 64,
  parameter int unsigned SP         = 1,
  parameter bit          PIPELINED  = 1'b1,
  parameter bit          RAND_OPT   = 1'b1,
  parameter bit          RHO_ITER   = 1'b1,
  parameter int unsigned RATE_LANES = 17,
  parameter bit          LANE_ABS   = 1'b0,
  parameter int unsigned AW         = W,
  localparam int unsigned NZ        = dom_rand_port(SHARES, RAND_OPT),
  localparam int unsigned NRAND     = SP * 25 * NZ,
  localparam int unsigned G         = W / SP,
  localparam int unsigned GW        = (G > 1) ? $clog2(G) : 1
) (
  input  logic                                    clk_i,
  input  logic                                    rst_ni,
  input  logic                                    clear_i,
  input  logic                                    start_i,
  input  logic                                    absorb_i,
  input  logic                                    din_valid_i,
  output logic                                    din_ready_o,
  input  logic [SHARES-1:0][SP-1:0][RATE_LANES-1:0] din_i,
  input  logic [SHARES-1:0][AW-1:0]               din_lane_i,
  input  logic [NRAND-1:0]                        rand_i,
  output logic                                    dout_valid_o,
  output logic [GW-1:0]                           dout_group_o,
  output logic [SHARES-1:0][SP-1:0][RATE_LANES-1:0] dout_o,
  output logic                                    busy_o,
  output logic                                    done_o
);

  localparam bit LAT = PIPELINED && (SHARES > 1);
  localparam int unsigned NR = num_rounds(W);
  localparam int unsigned RW = $clog2(NR);
  localparam int unsigned CW = $clog2(W) + 1;
  localparam int unsigned PW = $clog2(25 * W) + 1;

  typedef logic [SHARES-1:0][SP-1:0][24:0] slices_t;

  state_op_e     state_op;
  logic          corr_en, chi_en, absorb_en, theta_en, theta_first, theta_load, out_valid;
  logic [CW-1:0] rho_cnt;
  logic [PW-1:0] abs_pos;
  logic [RW-1:0] rc_round;
  logic [GW-1:0] rc_group, out_group;
  logic [SP-1:0] rc_bits;
  logic [SHARES-1:0][4:0] corr;

  slices_t rd, chi_out, mixed, theta_out, wdata;
  logic [SHARES-1:0][24:0][W-1:0] lanes_unused;

  keccak_ctrl #(
    .W(W), .SP(SP), .LAT(LAT), .RHO_ITER(RHO_ITER), .LANE_ABS(LANE_ABS),
    .NABS(RATE_LANES * W / AW)
  ) u_ctrl (
    .clk_i, .rst_ni, .clear_i, .start_i, .absorb_i, .din_valid_i, .din_ready_o,
    .state_op_o   (state_op),
    .corr_en_o    (corr_en),
    .rho_cnt_o    (rho_cnt),
    .abs_pos_o    (abs_pos),
    .chi_en_o     (chi_en),
    .absorb_en_o  (absorb_en),
    .theta_en_o   (theta_en),
    .theta_first_o(theta_first),
    .theta_load_o (theta_load),
    .rc_round_o   (rc_round),
    .rc_group_o   (rc_group),
    .out_valid_o  (out_valid),
    .out_group_o  (out_group),
    .busy_o, .done_o
  );

  keccak_state #(.SHARES(SHARES), .W(W), .SP(SP), .AW(AW)) u_state (
    .clk_i, .rst_ni,
    .op_i     (state_op),
    .wdata_i  (wdata),
    .corr_en_i(corr_en),
    .corr_i   (corr),
    .rho_cnt_i(rho_cnt),
    .abs_i    (din_lane_i),
    .abs_pos_i(abs_pos),
    .rd_o     (rd),
    .lanes_o  (lanes_unused)
  );

  keccak_rc #(.W(W), .SP(SP)) u_rc (
    .round_i(rc_round),
    .group_i(rc_group),
    .rc_o   (rc_bits)
  );

  chi_iota_slices #(
    .SHARES(SHARES), .SP(SP), .PIPELINED(PIPELINED), .RAND_OPT(RAND_OPT), .APPLY_PI(RHO_ITER)
  ) u_chi (
    .clk_i,
    .slice_i(rd),
    .rc_i   (rc_bits),
    .rand_i (rand_i),
    .slice_o(chi_out)
  );

  // Absorption: the rate lanes of the slices entering theta take the message bits.
  always_comb begin
    mixed = chi_en ? chi_out : rd;
    if (absorb_en)
      for (int unsigned s = 0; s < SHARES; s++)
        for (int unsigned j = 0; j < SP; j++)
          for (int unsigned i = 0; i < RATE_LANES; i++)
            mixed[s][j][i] = mixed[s][j][i] ^ din_i[s][j][i];
  end

  theta_slices #(.SHARES(SHARES), .SP(SP)) u_theta (
    .clk_i, .rst_ni,
    .en_i   (theta_load),
    .first_i(theta_first),
    .slice_i(mixed),
    .slice_o(theta_out),
    .corr_o (corr)
  );

  assign wdata = theta_en ? theta_out : mixed;

  always_comb
    for (int unsigned s = 0; s < SHARES; s++)
      for (int unsigned j = 0; j < SP; j++)
        dout_o[s][j] = chi_out[s][j][RATE_LANES-1:0];

  assign dout_valid_o = out_valid;
  assign dout_group_o = out_group;

endmodule
