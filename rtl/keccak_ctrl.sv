// keccak_ctrl: sequencer of the slice-serial masked KECCAK-f permutation.
//
// One permutation of NR rounds is run as a chain of slice passes over the state, each
// pass streaming all G = W/SP slice groups once through the step logic:
//   LABS    only with LANE_ABS = 1: lane-based absorption, NABS words of AW bits are
//           XORed into the state one per accepted din_valid_i (ST_LABS, abs_pos_o);
//           the ABSORB pass then computes theta of round 0 only.
//   ABSORB  absorption XOR (if requested) and theta of round 0; G cycles, each waiting
//           for din_valid_i when data is absorbed (the only place the core stalls).
//   RHO     rho of the round just finished by theta: W cycles of one-bit lane rotations
//           (RHO_ITER = 1, SERIAL-AREA; pi then follows inside the chi pass), or one
//           cycle of rho and pi on the whole state (RHO_ITER = 0, SERIAL-TP).
//   PASS    chi and iota of round rnd chained with theta of round rnd+1; G + LAT cycles,
//           LAT being the S-box latency (the extra cycle fills and drains the pipeline:
//           the write-back runs LAT cycles behind the read).
//   FINAL   chi and iota of the last round only; the processed rate slices are
//           presented as output (out_valid_o, out_group_o) while they are written back.
// Cycles per permutation: G + NR*(W or 1) + NR*(G + LAT), plus NABS with LANE_ABS; for
// W = 64, SP = 1, NR = 24 and LAT = 1 this is 3160 (SERIAL-AREA) or 1648 (SERIAL-TP), 3136/1624 when LAT = 0.
// theta_first_o marks the first written group of a theta pass, corr_en_o the last one
// (the state memory then finishes slice 0). start_i and clear_i are honoured only while
// idle; done_o pulses in the cycle after the last write of the FINAL pass.
//
// The pass schedule reproduces the published cycle counts of the serial configurations;
// the command interface and the stall while absorption data is missing are this design's
// choices.
module keccak_ctrl
  import keccak_pkg::*;
#(
  parameter int unsigned W        = 64,
  parameter int unsigned SP       = 1,
  parameter bit          LAT      = 1'b1,
  parameter bit          RHO_ITER = 1'b1,
  parameter bit          LANE_ABS = 1'b0,
  parameter int unsigned NABS     = 17,
  localparam int unsigned NR      = num_rounds(W),
  localparam int unsigned RW      = $clog2(NR),
  localparam int unsigned G       = W / SP,
  localparam int unsigned GW      = (G > 1) ? $clog2(G) : 1,
  localparam int unsigned CW      = $clog2(W) + 1,
  localparam int unsigned PW      = $clog2(25 * W) + 1
) (
  input  logic          clk_i,
  input  logic          rst_ni,
  input  logic          clear_i,
  input  logic          start_i,
  input  logic          absorb_i,
  input  logic          din_valid_i,
  output logic          din_ready_o,
  output state_op_e     state_op_o,
  output logic          corr_en_o,
  output logic [CW-1:0] rho_cnt_o,
  output logic [PW-1:0] abs_pos_o,
  output logic          chi_en_o,
  output logic          absorb_en_o,
  output logic          theta_en_o,
  output logic          theta_first_o,
  output logic          theta_load_o,
  output logic [RW-1:0] rc_round_o,
  output logic [GW-1:0] rc_group_o,
  output logic          out_valid_o,
  output logic [GW-1:0] out_group_o,
  output logic          busy_o,
  output logic          done_o
);

  typedef enum logic [2:0] {S_IDLE, S_LABS, S_ABSORB, S_RHO, S_PASS, S_FINAL} fsm_e;

  localparam int unsigned PASS_LEN = G + 32'(LAT);
  localparam int unsigned RHO_LEN  = RHO_ITER ? W : 1;

  fsm_e          fsm_q, fsm_d;
  logic [PW-1:0] k_q, k_d;
  logic [RW-1:0] rnd_q, rnd_d;
  logic          absorb_q, absorb_d;
  logic          done_d;

  logic          wvalid;
  logic [GW-1:0] wk;   // index of the group written back (LAT cycles behind the read)

  always_comb begin
    wk     = GW'(k_q) - GW'(LAT);
    wvalid = (32'(k_q) >= 32'(LAT));
  end

  always_comb begin
    fsm_d         = fsm_q;
    k_d           = k_q;
    rnd_d         = rnd_q;
    absorb_d      = absorb_q;
    done_d        = 1'b0;
    state_op_o    = ST_HOLD;
    corr_en_o     = 1'b0;
    rho_cnt_o     = CW'(k_q);
    abs_pos_o     = k_q;
    chi_en_o      = 1'b0;
    absorb_en_o   = 1'b0;
    theta_en_o    = 1'b0;
    theta_first_o = 1'b0;
    theta_load_o  = 1'b0;
    din_ready_o   = 1'b0;
    rc_round_o    = rnd_q;
    rc_group_o    = GW'(k_q);
    out_valid_o   = 1'b0;
    out_group_o   = wk;

    unique case (fsm_q)
      S_IDLE: begin
        if (clear_i) state_op_o = ST_CLEAR;
        if (start_i) begin
          fsm_d    = (LANE_ABS && absorb_i) ? S_LABS : S_ABSORB;
          k_d      = '0;
          rnd_d    = '0;
          absorb_d = absorb_i && !LANE_ABS;
        end
      end

      S_LABS: begin
        din_ready_o = 1'b1;
        if (din_valid_i) begin
          state_op_o = ST_LABS;
          if (32'(k_q) == NABS - 1) begin
            fsm_d = S_ABSORB;
            k_d   = '0;
          end else begin
            k_d = k_q + 1'b1;
          end
        end
      end

      S_ABSORB: begin
        din_ready_o   = absorb_q;
        theta_en_o    = 1'b1;
        absorb_en_o   = absorb_q;
        theta_first_o = (k_q == '0);
        if (!absorb_q || din_valid_i) begin
          state_op_o   = ST_SHIFT;
          theta_load_o = 1'b1;
          corr_en_o    = (32'(k_q) == G - 1);
          if (32'(k_q) == G - 1) begin
            fsm_d = S_RHO;
            k_d   = '0;
          end else begin
            k_d = k_q + 1'b1;
          end
        end
      end

      S_RHO: begin
        state_op_o = RHO_ITER ? ST_RHO : ST_RHOPI;
        if (32'(k_q) == RHO_LEN - 1) begin
          fsm_d = (32'(rnd_q) == NR - 1) ? S_FINAL : S_PASS;
          k_d   = '0;
        end else begin
          k_d = k_q + 1'b1;
        end
      end

      S_PASS, S_FINAL: begin
        state_op_o = ST_SHIFT;
        chi_en_o   = 1'b1;
        if (fsm_q == S_PASS) begin
          theta_en_o    = 1'b1;
          theta_load_o  = wvalid;
          theta_first_o = (32'(k_q) == 32'(LAT));
          corr_en_o     = (32'(k_q) == PASS_LEN - 1);
        end else begin
          out_valid_o = wvalid;
        end
        if (32'(k_q) == PASS_LEN - 1) begin
          k_d = '0;
          if (fsm_q == S_PASS) begin
            fsm_d = S_RHO;
            rnd_d = rnd_q + 1'b1;
          end else begin
            fsm_d  = S_IDLE;
            done_d = 1'b1;
          end
        end else begin
          k_d = k_q + 1'b1;
        end
      end

      default: fsm_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      fsm_q    <= S_IDLE;
      k_q      <= '0;
      rnd_q    <= '0;
      absorb_q <= 1'b0;
      done_o   <= 1'b0;
    end else begin
      fsm_q    <= fsm_d;
      k_q      <= k_d;
      rnd_q    <= rnd_d;
      absorb_q <= absorb_d;
      done_o   <= done_d;
    end
  end

  assign busy_o = (fsm_q != S_IDLE);

endmodule
