// keccak_dom: configurable side-channel protected KECCAK permutation with sponge
// absorption, masked with domain-oriented masking (DOM) of any order.
//
// SHARES = d+1 share domains give protection order d; SHARES = 1 is unprotected. ARCH
// selects one of three datapaths at elaboration time:
//   ARCH_SERIAL_AREA (default)  slice-serial, rho done by one-bit lane rotations over W
//                               cycles, pi wired in front of chi: smallest area,
//                               3160 cycles per KECCAK-f[1600] permutation (first order).
//   ARCH_SERIAL_TP              slice-serial, rho and pi in one cycle: 1648 cycles.
//   ARCH_PARALLEL               whole state per round: 48 (double-clocked S-boxes) or 72
//                               (pipelined S-boxes) cycles, 24 unprotected.
// SP slices are processed per cycle in the serial datapaths. PIPELINED chooses the
// S-box variant (1: inner-domain registers, 0: cross-domain registers on the falling
// clock edge). RAND_OPT reuses the shares of x[i] as the masks of the first-order DOM
// ANDs, so a first-order core needs no fresh randomness. The default instance is
// KECCAK[1088,512] (SHA3-256 rate of 17 lanes), first order, SERIAL-AREA, one slice.
//
// Interface (all data shared: index [share][slice][lane]):
//   clear_i           zero the state (while idle).
//   start_i, absorb_i start a permutation (while idle); with absorb_i the block on din_i
//                     is XORed into the rate first.
//   din_i             serial: SP slices per transfer, taken when din_valid_i && din_ready_o,
//                     slices in ascending z; parallel: the whole block, taken with start_i.
//   rand_i            NZ fresh random bits per DOM AND, new value every cycle.
//   dout_o            serial: SP rate slices per cycle of the final pass (dout_valid_o,
//                     dout_group_o); parallel: the whole rate, valid with dout_valid_o.
//   busy_o, done_o    permutation running / finished (one-cycle pulse).
//
// The three configurations and their parameters follow the published design; the
// interface is this design's own.
module keccak_dom
  import keccak_pkg::*;
#(
  parameter arch_e       ARCH       = ARCH_SERIAL_AREA,
  parameter int unsigned SHARES     = 2,
  parameter int unsigned W          = 64,
  parameter int unsigned SP         = 1,
  parameter bit          PIPELINED  = 1'b1,
  parameter bit          RAND_OPT   = 1'b1,
  parameter int unsigned RATE_LANES = 17,
  localparam int unsigned DSL       = (ARCH == ARCH_PARALLEL) ? W : SP,
  localparam int unsigned NZ        = dom_rand_port(SHARES, RAND_OPT),
  localparam int unsigned NRAND     = DSL * 25 * NZ,
  localparam int unsigned G         = W / SP,
  localparam int unsigned GW        = (G > 1) ? $clog2(G) : 1
) (
  input  logic                                     clk_i,
  input  logic                                     rst_ni,
  input  logic                                     clear_i,
  input  logic                                     start_i,
  input  logic                                     absorb_i,
  input  logic                                     din_valid_i,
  output logic                                     din_ready_o,
  input  logic [SHARES-1:0][DSL-1:0][RATE_LANES-1:0] din_i,
  input  logic [NRAND-1:0]                         rand_i,
  output logic                                     dout_valid_o,
  output logic [GW-1:0]                            dout_group_o,
  output logic [SHARES-1:0][DSL-1:0][RATE_LANES-1:0] dout_o,
  output logic                                     busy_o,
  output logic                                     done_o
);

  if (ARCH == ARCH_PARALLEL) begin : g_parallel
    keccak_parallel_core #(
      .SHARES(SHARES), .W(W), .PIPELINED(PIPELINED), .RAND_OPT(RAND_OPT),
      .RATE_LANES(RATE_LANES)
    ) u_core (
      .clk_i, .rst_ni, .clear_i, .start_i, .absorb_i, .din_i, .rand_i,
      .dout_valid_o, .dout_o, .busy_o, .done_o
    );
    assign din_ready_o  = !busy_o;
    assign dout_group_o = '0;
  end else begin : g_serial
    keccak_serial_core #(
      .SHARES(SHARES), .W(W), .SP(SP), .PIPELINED(PIPELINED), .RAND_OPT(RAND_OPT),
      .RHO_ITER(ARCH == ARCH_SERIAL_AREA), .RATE_LANES(RATE_LANES)
    ) u_core (
      .clk_i, .rst_ni, .clear_i, .start_i, .absorb_i, .din_valid_i, .din_ready_o,
      .din_i, .din_lane_i('0), .rand_i, .dout_valid_o, .dout_group_o, .dout_o,
      .busy_o, .done_o
    );
  end

endmodule
