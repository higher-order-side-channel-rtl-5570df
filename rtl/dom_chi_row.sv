// dom_chi_row: masked 5-bit KECCAK S-box, i.e. chi on one row of the state.
//
// y[i] = x[i] + (x[i+1] + 1) * x[i+2] (indices mod 5) for every share domain. Each of the
// five products is one dom_and with a = NOT x[i+1], b = x[i+2] and c = x[i]. The NOT is a
// constant addition and is applied to domain A (share 0) only; the XOR with x[i] is done
// inside dom_and so that, in the first-order optimised case, x[i] doubles as the mask of
// the cross-domain terms.
//
// Interface: x_i/y_o are [SHARES][5], z_i carries NZ fresh random bits per AND (AND i uses
// z_i[i*NZ +: NZ]). Latency is that of dom_and: one cycle when PIPELINED and masked,
// otherwise zero.
//
// The structure (five DOM ANDs, inversion in domain A only) follows the published masked
// S-box; folding the XOR with x[i] into the AND is what the first-order optimisation
// implies.
module dom_chi_row
  import keccak_pkg::*;
#(
  parameter int unsigned SHARES    = 2,
  parameter bit          PIPELINED = 1'b1,
  parameter bit          RAND_OPT  = 1'b1,
  localparam int unsigned NZ       = dom_rand_port(SHARES, RAND_OPT)
) (
  input  logic                   clk_i,
  input  logic [SHARES-1:0][4:0] x_i,
  input  logic [5*NZ-1:0]        z_i,
  output logic [SHARES-1:0][4:0] y_o
);

  for (genvar i = 0; i < 5; i++) begin : g_bit
    logic [SHARES-1:0] a, b, c, q;
    always_comb begin
      for (int unsigned s = 0; s < SHARES; s++) begin
        a[s] = x_i[s][(i + 1) % 5] ^ (s == 0);
        b[s] = x_i[s][(i + 2) % 5];
        c[s] = x_i[s][i];
      end
    end

    dom_and #(
      .SHARES   (SHARES),
      .PIPELINED(PIPELINED),
      .RAND_OPT (RAND_OPT)
    ) u_and (
      .clk_i(clk_i),
      .a_i  (a),
      .b_i  (b),
      .c_i  (c),
      .z_i  (z_i[i*NZ +: NZ]),
      .q_o  (q)
    );

    always_comb for (int unsigned s = 0; s < SHARES; s++) y_o[s][i] = q[s];
  end

endmodule
