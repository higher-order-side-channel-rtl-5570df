// chi_iota_slices: masked chi and iota on SP state slices per cycle (optionally pi first).
//
// Each slice holds five rows; every row goes through one dom_chi_row, so SP slices use
// 5*SP masked S-boxes. With APPLY_PI the slice bits are first permuted by pi (pure
// wiring, lane (x,y) takes lane (x+3y mod 5, x)), which is how the SERIAL-AREA
// configuration applies pi together with chi. iota adds the round-constant bits rc_i of
// the SP slices to lane (0,0) of share 0 only; rc_i is delayed inside to line up with
// the S-box latency.
//
// Interface: slice_i/slice_o are [SHARES][SP][25] (bit x+5y is lane (x,y)); rand_i holds
// NZ fresh random bits per DOM AND, row r of slice j using bits
// [((5j + r)*5)*NZ +: 5*NZ]. Latency LAT = 1 cycle for a pipelined masked S-box, 0
// otherwise.
//
// Applying pi and iota together with chi follows the published serial design; delaying
// the round-constant bits inside the unit is this design's choice.
module chi_iota_slices
  import keccak_pkg::*;
#(
  parameter int unsigned SHARES    = 2,
  parameter int unsigned SP        = 1,
  parameter bit          PIPELINED = 1'b1,
  parameter bit          RAND_OPT  = 1'b1,
  parameter bit          APPLY_PI  = 1'b1,
  localparam int unsigned NZ       = dom_rand_port(SHARES, RAND_OPT),
  localparam int unsigned NRAND    = SP * 25 * NZ
) (
  input  logic                            clk_i,
  input  logic [SHARES-1:0][SP-1:0][24:0] slice_i,
  input  logic [SP-1:0]                   rc_i,
  input  logic [NRAND-1:0]                rand_i,
  output logic [SHARES-1:0][SP-1:0][24:0] slice_o
);

  localparam bit LAT = PIPELINED && (SHARES > 1);

  logic [SHARES-1:0][SP-1:0][24:0] pi_out, chi_out;

  always_comb begin
    for (int unsigned s = 0; s < SHARES; s++)
      for (int unsigned j = 0; j < SP; j++)
        for (int unsigned x = 0; x < 5; x++)
          for (int unsigned y = 0; y < 5; y++)
            pi_out[s][j][x+5*y] = APPLY_PI ? slice_i[s][j][pi_src(x, y)]
                                           : slice_i[s][j][x+5*y];
  end

  for (genvar j = 0; j < SP; j++) begin : g_slice
    for (genvar r = 0; r < 5; r++) begin : g_row
      logic [SHARES-1:0][4:0] row_in, row_out;
      always_comb
        for (int unsigned s = 0; s < SHARES; s++) begin
          row_in[s] = pi_out[s][j][5*r +: 5];
          chi_out[s][j][5*r +: 5] = row_out[s];
        end

      dom_chi_row #(
        .SHARES   (SHARES),
        .PIPELINED(PIPELINED),
        .RAND_OPT (RAND_OPT)
      ) u_row (
        .clk_i(clk_i),
        .x_i  (row_in),
        .z_i  (rand_i[((5*j + r)*5)*NZ +: 5*NZ]),
        .y_o  (row_out)
      );
    end
  end

  logic [SP-1:0] rc_d;
  if (LAT) begin : g_rc_delay
    always_ff @(posedge clk_i) rc_d <= rc_i;
  end else begin : g_rc_direct
    assign rc_d = rc_i;
  end

  always_comb begin
    slice_o = chi_out;
    for (int unsigned j = 0; j < SP; j++) slice_o[0][j][0] = chi_out[0][j][0] ^ rc_d[j];
  end

endmodule
