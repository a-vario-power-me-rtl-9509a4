// vp_subsample_mask: regular 8-to-m subsample mask SM for an N x N block.
//
// The mask repeats a 4 x 4 base pattern, SM(i,j) = BM(i mod 4, j mod 4). Each
// base entry is a unit step u(m - k) of the rate numerator m, with
//     k = | 2 5 2 6 |
//         | 3 7 4 8 |   (rows 2 and 3 repeat rows 0 and 1)
// so raising m by one switches on two more pixels of every 4 x 4 tile:
// m = 2 keeps 4 of 16 pixels (4-to-1) and m = 8 keeps all (1-to-1). The
// pattern is the one of the general subsample algorithm; only m = 2..8 is
// meaningful (m <= 1 gives an empty mask).
//
// Interface: m is the numerator of the 8-to-m rate; sm[i][j] is 1 where pixel
// (row i, column j) takes part in the SSAD. Purely combinational.
module vp_subsample_mask
  import vp_pkg::*;
#(
  parameter int unsigned N = 16  // macro-block size
) (
  input  logic [SUBM_W-1:0] m,
  output logic              sm [N][N]
);

  // Step thresholds of the base pattern, indexed [i mod 4][j mod 4].
  function automatic logic [3:0] step_k(input logic r, input logic [1:0] c);
    logic [3:0] k;
    unique case ({r, c})
      3'b0_00: k = 4'd2;
      3'b0_01: k = 4'd5;
      3'b0_10: k = 4'd2;
      3'b0_11: k = 4'd6;
      3'b1_00: k = 4'd3;
      3'b1_01: k = 4'd7;
      3'b1_10: k = 4'd4;
      default: k = 4'd8;
    endcase
    return k;
  endfunction

  always_comb begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        sm[i][j] = (m >= step_k(1'(i % 2), 2'(j % 4)));
  end

endmodule
