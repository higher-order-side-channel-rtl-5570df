// keccak_parallel_core: round-parallel masked KECCAK-f[25*W] (the PARALLEL configuration).
//
// All 25*W state bits of every share are processed at once. Unprotected (SHARES = 1) a
// whole round iota.chi.pi.rho.theta is one cycle. Masked, a register stage sits between
// the linear part and the S-boxes, so that glitches of theta cannot reach the DOM ANDs:
//   phase 0  R <= pi(rho(theta(state)))                 (each share on its own)
//   phase 1  5*W masked S-boxes (chi_iota_slices with SP = W) evaluate chi and iota on R;
//            double-clocked S-boxes finish within this cycle and the state takes the
//            result; pipelined S-boxes need
//   phase 2  the state takes the S-box output.
// Rounds therefore take 1, 2 or 3 cycles: for W = 64 a permutation is 24, 48 or 72 cycles.
//
// Interface: din_i/dout_o are [SHARES][W][RATE_LANES] (slice z, lane i = bit z of lane i).
// In the start cycle (start_i while idle) the rate lanes of the state take
// state ^ din_i if absorb_i is set; then the permutation runs. clear_i (idle) zeroes the
// state. rand_i holds NZ fresh bits per DOM AND and is consumed in phase 1. dout_o shows
// the rate lanes of the state; dout_valid_o and done_o pulse for one cycle after the
// last round.
//
// The register stage in front of the S-boxes and the 24/48/72-cycle rounds follow the
// published PARALLEL configuration; absorbing in the start cycle is this design's
// choice.
module keccak_parallel_core
  import keccak_pkg::*;
#(
  parameter int unsigned SHARES     = 2,
  parameter int unsigned W          = 64,
  parameter bit          PIPELINED  = 1'b1,
  parameter bit          RAND_OPT   = 1'b1,
  parameter int unsigned RATE_LANES = 17,
  localparam int unsigned NZ        = dom_rand_port(SHARES, RAND_OPT),
  localparam int unsigned NRAND     = W * 25 * NZ
) (
  input  logic                                   clk_i,
  input  logic                                   rst_ni,
  input  logic                                   clear_i,
  input  logic                                   start_i,
  input  logic                                   absorb_i,
  input  logic [SHARES-1:0][W-1:0][RATE_LANES-1:0] din_i,
  input  logic [NRAND-1:0]                       rand_i,
  output logic                                   dout_valid_o,
  output logic [SHARES-1:0][W-1:0][RATE_LANES-1:0] dout_o,
  output logic                                   busy_o,
  output logic                                   done_o
);

  localparam int unsigned NR     = num_rounds(W);
  localparam int unsigned RW     = $clog2(NR);
  localparam bit          MASKED = (SHARES > 1);
  localparam int unsigned LAST_PH = MASKED ? (PIPELINED ? 2 : 1) : 0;


  logic [SHARES-1:0][24:0][W-1:0] st_q, lin, r_q, th, sb_lanes;
  logic [SHARES-1:0][W-1:0][24:0] sb_in, sb_out;
  logic [SHARES-1:0][4:0][W-1:0]  col;
  logic [SHARES-1:0][24:0][W-1:0] din_lanes;
  logic                           run_q;
  logic [1:0]                     ph_q;
  logic [RW-1:0]                  rnd_q;
  logic [W-1:0]                   rc_lane;

  // Linear layer pi.rho.theta of every share, as wiring and XORs.
  for (genvar s = 0; s < SHARES; s++) begin : g_lin
    for (genvar x = 0; x < 5; x++) begin : g_col
      assign col[s][x] = st_q[s][x] ^ st_q[s][x+5] ^ st_q[s][x+10] ^ st_q[s][x+15]
                         ^ st_q[s][x+20];
    end
    for (genvar i = 0; i < 25; i++) begin : g_lane
      localparam int unsigned X   = i % 5;
      localparam int unsigned SRC = pi_src(i % 5, i / 5);
      localparam int unsigned ROT = rho_offset(SRC % 5, SRC / 5, W);
      assign th[s][i]  = st_q[s][i] ^ col[s][(X+4)%5]
                         ^ W'({col[s][(X+1)%5], col[s][(X+1)%5]} >> (W - 1));
      assign lin[s][i] = W'({th[s][SRC], th[s][SRC]} >> (W - ROT));
      // transpose lanes to slices for the S-boxes and back
      for (genvar z = 0; z < W; z++) begin : g_bit
        assign sb_in[s][z][i]    = MASKED ? r_q[s][i][z] : lin[s][i][z];
        assign sb_lanes[s][i][z] = sb_out[s][z][i];
      end
    end
  end

  // All W round-constant bits of the current round at once.
  keccak_rc #(.W(W), .SP(W)) u_rc (
    .round_i(rnd_q),
    .group_i(1'b0),
    .rc_o   (rc_lane)
  );

  chi_iota_slices #(
    .SHARES(SHARES), .SP(W), .PIPELINED(PIPELINED), .RAND_OPT(RAND_OPT), .APPLY_PI(1'b0)
  ) u_chi (
    .clk_i,
    .slice_i(sb_in),
    .rc_i   (rc_lane),
    .rand_i (rand_i),
    .slice_o(sb_out)
  );

  logic last_step;
  assign last_step = run_q && (ph_q == 2'(LAST_PH)) && (32'(rnd_q) == NR - 1);

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) begin
      st_q   <= '0;
      r_q    <= '0;
      run_q  <= 1'b0;
      ph_q   <= '0;
      rnd_q  <= '0;
      done_o <= 1'b0;
    end else begin
      done_o <= last_step;
      if (!run_q) begin
        if (clear_i) st_q <= '0;
        if (start_i) begin
          run_q <= 1'b1;
          ph_q  <= '0;
          rnd_q <= '0;
          if (absorb_i)
            st_q <= st_q ^ din_lanes;
        end
      end else begin
        if (ph_q == 2'd0) r_q <= lin;
        if (ph_q == 2'(LAST_PH)) begin
          st_q  <= sb_lanes;
          ph_q  <= '0;
          rnd_q <= rnd_q + 1'b1;
          if (32'(rnd_q) == NR - 1) run_q <= 1'b0;
        end else begin
          ph_q <= ph_q + 1'b1;
        end
      end
    end
  end

  // Message block as lanes (capacity lanes zero) and rate lanes as output slices.
  for (genvar s = 0; s < SHARES; s++) begin : g_io
    for (genvar i = 0; i < 25; i++) begin : g_lane
      for (genvar z = 0; z < W; z++) begin : g_bit
        if (i < RATE_LANES) begin : g_rate
          assign din_lanes[s][i][z] = din_i[s][z][i];
          assign dout_o[s][z][i]    = st_q[s][i][z];
        end else begin : g_cap
          assign din_lanes[s][i][z] = 1'b0;
        end
      end
    end
  end

  assign dout_valid_o = done_o;
  assign busy_o       = run_q;

endmodule
