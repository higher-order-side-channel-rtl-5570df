// keccak_rc: round-constant bits for the slices currently processed by iota.
//
// iota adds the round constant RC[round] to lane (0,0). In the slice-serial datapath
// only the SP bits of RC[round] that belong to the slices in flight are needed:
// rc_o[j] = RC[round_i][group_i*SP + j]. RC is the standard KECCAK constant: bit 2^k - 1
// (k = 0..l) of RC[ir] is rc(k + 7*ir) of the x^8+x^6+x^5+x^4+1 LFSR, computed at
// elaboration time into a NR x W table, so the block is a small read-only lookup.
// Purely combinational. Round indices at or above NR give zero.
//
// The constants are the standard KECCAK round constants; organising them as a per-slice
// lookup is this design's choice.
module keccak_rc
  import keccak_pkg::*;
#(
  parameter int unsigned W       = 64,
  parameter int unsigned SP      = 1,
  localparam int unsigned NR     = num_rounds(W),
  localparam int unsigned RW     = $clog2(NR),
  localparam int unsigned G      = W / SP,
  localparam int unsigned GW     = (G > 1) ? $clog2(G) : 1
) (
  input  logic [RW-1:0] round_i,
  input  logic [GW-1:0] group_i,
  output logic [SP-1:0] rc_o
);

  typedef logic [W-1:0] lane_t;

  function automatic lane_t rc_lane(int unsigned ir);
    logic [63:0] full = round_const(ir, W);
    return full[W-1:0];
  endfunction

  function automatic lane_t [NR-1:0] rc_table();
    lane_t [NR-1:0] t;
    for (int unsigned ir = 0; ir < NR; ir++) t[ir] = rc_lane(ir);
    return t;
  endfunction

  localparam lane_t [NR-1:0] RC = rc_table();

  lane_t lane;
  always_comb begin
    lane = (32'(round_i) < NR) ? RC[round_i] : '0;
    rc_o = lane[32'(group_i) * SP +: SP];
  end

endmodule
