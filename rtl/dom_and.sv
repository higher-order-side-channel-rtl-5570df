// dom_and: domain-oriented masked AND gate (GF(2) multiplier) for SHARES = d+1 domains.
//
// Computes q = a*b + c with every variable split into SHARES additive shares. Share i
// of the result collects the inner-domain term a_i*b_i and, for every other domain j,
// the cross-domain term a_i*b_j blinded by a mask and then registered. The mask is the
// fresh random bit Z[i + j(j-1)/2] (Z[j + i(i-1)/2] for j < i), so t(i,j) and t(j,i) share
// the same Z. With RAND_OPT and two shares the mask is the share c_i of the added term
// instead of Z, which needs no fresh randomness (the optimisation for S-boxes of the
// form ab + c); otherwise c_i is added into the inner-domain path of domain i.
//
// Variants (PIPELINED):
//   1  pipelined: inner-domain terms are registered as well, q_o is valid one rising
//      edge after the inputs (latency 1 cycle).
//   0  double-clocked: only the cross-domain registers exist and they capture on the
//      falling edge; q_o is valid before the next rising edge (latency 0 cycles, inputs
//      must be stable from the rising edge).
// SHARES = 1 is the unprotected gate: plain combinational a*b + c.
// The registers are data path only and have no reset. Unused z_i bits (first order with
// RAND_OPT) are ignored.
//
// The gate structure, the sharing of Z between mirrored cross terms and both register
// variants follow the published DOM construction; adding c into the inner-domain path
// when its shares are not used as masks is this design's own choice.
module dom_and
  import keccak_pkg::*;
#(
  parameter int unsigned SHARES    = 2,
  parameter bit          PIPELINED = 1'b1,
  parameter bit          RAND_OPT  = 1'b1,
  localparam int unsigned NZ       = dom_rand_port(SHARES, RAND_OPT)
) (
  input  logic              clk_i,
  input  logic [SHARES-1:0] a_i,
  input  logic [SHARES-1:0] b_i,
  input  logic [SHARES-1:0] c_i,
  input  logic [NZ-1:0]     z_i,
  output logic [SHARES-1:0] q_o
);

  if (SHARES == 1) begin : g_unprotected
    assign q_o = (a_i & b_i) ^ c_i;
  end else begin : g_masked
    localparam bit CMASK = RAND_OPT && (SHARES == 2);

    logic [SHARES-1:0][SHARES-1:0] cross_d, cross_q;
    logic [SHARES-1:0]             inner_d;

    always_comb begin
      for (int unsigned i = 0; i < SHARES; i++) begin
        inner_d[i] = (a_i[i] & b_i[i]) ^ (CMASK ? 1'b0 : c_i[i]);
        for (int unsigned j = 0; j < SHARES; j++) begin
          if (i == j) cross_d[i][j] = 1'b0;
          else        cross_d[i][j] = (a_i[i] & b_i[j])
                                      ^ (CMASK ? c_i[i] : z_i[dom_z_index(i, j)]);
        end
      end
    end

    logic [SHARES-1:0] inner;

    if (PIPELINED) begin : g_pipe
      logic [SHARES-1:0] inner_q;
      always_ff @(posedge clk_i) begin
        cross_q <= cross_d;
        inner_q <= inner_d;
      end
      assign inner = inner_q;
    end else begin : g_dclk
      always_ff @(negedge clk_i) cross_q <= cross_d;
      assign inner = inner_d;
    end

    always_comb begin
      for (int unsigned i = 0; i < SHARES; i++) begin
        q_o[i] = inner[i];
        for (int unsigned j = 0; j < SHARES; j++)
          if (i != j) q_o[i] = q_o[i] ^ cross_q[i][j];
      end
    end
  end

endmodule
