// theta_slices: iterative theta on SP slices per cycle, for every share domain.
//
// theta adds to bit (x,y,z) the parities C[x-1][z] and C[x+1][z-1] of two columns. When
// the state streams through slice by slice (z ascending), the second parity belongs to
// the previous slice: it is kept in a register (per share, five bits) that is updated
// with the parity of the highest slice of every processed group. Slice 0 has no
// predecessor yet; with first_i set the stored parity is ignored and slice 0 leaves
// with only its C[x-1][0] part. The missing part, C[x+1][W-1], is the parity of the very
// last slice; corr_o presents it (per share, bit x is the value to add to column x) so
// the state memory can finish slice 0 when the last group is processed.
//
// Timing: combinational from slice_i to slice_o and corr_o; the parity register loads
// on the rising edge when en_i is high. theta is linear, so each share is handled on its
// own and no randomness is needed. The register is reset to zero.
//
// The parity register and finishing slice 0 together with the last slice follow the
// published iterative theta; handing the correction to the state memory through corr_o
// is this design's choice.
module theta_slices #(
  parameter int unsigned SHARES = 2,
  parameter int unsigned SP     = 1
) (
  input  logic                            clk_i,
  input  logic                            rst_ni,
  input  logic                            en_i,
  input  logic                            first_i,
  input  logic [SHARES-1:0][SP-1:0][24:0] slice_i,
  output logic [SHARES-1:0][SP-1:0][24:0] slice_o,
  output logic [SHARES-1:0][4:0]          corr_o
);

  logic [SHARES-1:0][4:0]        par_q;
  logic [SHARES-1:0][SP-1:0][4:0] col;

  always_comb begin
    for (int unsigned s = 0; s < SHARES; s++) begin
      for (int unsigned j = 0; j < SP; j++) begin
        logic [4:0] prev;
        for (int unsigned x = 0; x < 5; x++)
          col[s][j][x] = ^{slice_i[s][j][x], slice_i[s][j][x+5], slice_i[s][j][x+10],
                          slice_i[s][j][x+15], slice_i[s][j][x+20]};
        if (j == 0) prev = first_i ? 5'b0 : par_q[s];
        else        prev = col[s][j-1];
        for (int unsigned x = 0; x < 5; x++)
          for (int unsigned y = 0; y < 5; y++)
            slice_o[s][j][x+5*y] = slice_i[s][j][x+5*y] ^ col[s][j][(x+4)%5]
                                   ^ prev[(x+1)%5];
      end
      for (int unsigned x = 0; x < 5; x++) corr_o[s][x] = col[s][SP-1][(x+1)%5];
    end
  end

  always_ff @(posedge clk_i or negedge rst_ni) begin
    if (!rst_ni) par_q <= '0;
    else if (en_i)
      for (int unsigned s = 0; s < SHARES; s++) par_q[s] <= col[s][SP-1];
  end

endmodule
