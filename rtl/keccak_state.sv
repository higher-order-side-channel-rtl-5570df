// keccak_state: the masked sponge state of the slice-serial configurations.
//
// The state is 25 lanes of W bits per share domain. Each lane is kept as a circular
// FIFO whose output end is bit 0: the slice group at the output (bits 0..SP-1 of every
// lane, rd_o) is what the iterative steps read. Operations, chosen by op_i each cycle:
//   ST_SHIFT  every lane moves down by SP bits and the SP processed slices wdata_i enter
//             at the top (bits W-SP..W-1). After W/SP shifts the slices are back in
//             place. With corr_en_i the slice moving into bit 0 gets corr_i added to its
//             columns (bit x of corr_i to all five bits of column x): this is how theta
//             finishes slice 0 once the parity of the last slice is known.
//   ST_RHO    iterative rho: lane (x,y) rotates down by one bit while rho_cnt_i is below
//             (W - r(x,y)) mod W; after W cycles (rho_cnt_i = 0..W-1) every lane has been
//             rotated by its offset r(x,y). Only a one-bit shift per lane is needed.
//   ST_RHOPI  rho followed by pi on the whole state in one cycle.
//   ST_LABS   lane-based absorption: the AW-bit word abs_pos_i of the state, counted
//             in message bit order (bit k is bit k mod W of lane k / W), is XORed with
//             abs_i. AW may be a fraction of a lane or several lanes.
//   ST_CLEAR  zero the state (start of a new message).
//   ST_HOLD   keep the state.
// Interface: [SHARES][SP][25] slices, abs_i [SHARES][AW], lanes_o exposes the full state
// [SHARES][25][W].
// All updates on the rising edge; the state is zero after reset.
//
// Lanes as FIFOs, the counter-controlled iterative rho and the one-cycle rho/pi step
// follow the published design, as does absorbing a configurable number of bits per cycle
// in lane order; the operation encoding and the correction input are this
// design's choices.
module keccak_state
  import keccak_pkg::*;
#(
  parameter int unsigned SHARES = 2,
  parameter int unsigned W      = 64,
  parameter int unsigned SP     = 1,
  parameter int unsigned AW     = W,
  localparam int unsigned CW    = $clog2(W) + 1,
  localparam int unsigned PW    = $clog2(25 * W) + 1
) (
  input  logic                            clk_i,
  input  logic                            rst_ni,
  input  state_op_e                       op_i,
  input  logic [SHARES-1:0][SP-1:0][24:0] wdata_i,
  input  logic                            corr_en_i,
  input  logic [SHARES-1:0][4:0]          corr_i,
  input  logic [CW-1:0]                   rho_cnt_i,
  input  logic [SHARES-1:0][AW-1:0]       abs_i,
  input  logic [PW-1:0]                   abs_pos_i,
  output logic [SHARES-1:0][SP-1:0][24:0] rd_o,
  output logic [SHARES-1:0][24:0][W-1:0]  lanes_o
);

  typedef logic [W-1:0] lane_t;

  // Number of one-bit downward shifts that realise the rho rotation of lane i.
  function automatic int unsigned rho_steps(int unsigned i);
    return (W - rho_offset(i % 5, i / 5, W)) % W;
  endfunction

  logic [SHARES-1:0][24:0][W-1:0] st_q, st_d, rhopi;
  logic [25*W-1:0]                flat;

  // rho then pi, as wiring: lane (x,y) takes lane pi_src(x,y) rotated left by its offset.
  for (genvar s = 0; s < SHARES; s++) begin : g_rp_share
    for (genvar i = 0; i < 25; i++) begin : g_rp_lane
      localparam int unsigned SRC = pi_src(i % 5, i / 5);
      localparam int unsigned ROT = rho_offset(SRC % 5, SRC / 5, W);
      assign rhopi[s][i] = W'({st_q[s][SRC], st_q[s][SRC]} >> (W - ROT));
    end
  end

  always_comb begin
    st_d = st_q;
    flat = '0;
    unique case (op_i)
      ST_CLEAR: st_d = '0;
      ST_SHIFT: begin
        for (int unsigned s = 0; s < SHARES; s++)
          for (int unsigned i = 0; i < 25; i++) begin
            for (int unsigned z = 0; z + SP < W; z++) st_d[s][i][z] = st_q[s][i][z+SP];
            for (int unsigned j = 0; j < SP; j++) st_d[s][i][W-SP+j] = wdata_i[s][j][i];
            if (corr_en_i) st_d[s][i][0] = st_d[s][i][0] ^ corr_i[s][i%5];
          end
      end
      ST_RHO: begin
        for (int unsigned s = 0; s < SHARES; s++)
          for (int unsigned i = 0; i < 25; i++)
            if (32'(rho_cnt_i) < rho_steps(i))
              st_d[s][i] = {st_q[s][i][0], st_q[s][i][W-1:1]};
      end
      ST_RHOPI: st_d = rhopi;
      ST_LABS: begin
        for (int unsigned s = 0; s < SHARES; s++) begin
          flat = st_q[s];
          flat[32'(abs_pos_i)*AW +: AW] = flat[32'(abs_pos_i)*AW +: AW] ^ abs_i[s];
          st_d[s] = flat;
        end
      end
      default: ;
    endcase
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) st_q <= '0;
    else         st_q <= st_d;
  end

  always_comb
    for (int unsigned s = 0; s < SHARES; s++)
      for (int unsigned j = 0; j < SP; j++)
        for (int unsigned i = 0; i < 25; i++) rd_o[s][j][i] = st_q[s][i][j];

  assign lanes_o = st_q;

endmodule
