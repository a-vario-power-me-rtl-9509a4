// vp_sra: shift register array below the PE array.
//
// Each of the N columns holds a chain of 2p-1 search-area pixels. Together
// with the N PEs above it a column holds N + 2p - 1 pixels, one whole column
// of the search area, so a pixel that leaves the top of PE column j+1 re-enters
// at the bottom of column j's chain and the search window steps sideways by
// one column after every N + 2p - 1 shifts. This makes one pixel per clock
// enough to keep the array evaluating a new candidate each clock in every
// column position.
//
// Interface: sra_in[j] enters the bottom of column j, sra_out[j] leaves its
// top (to PE row N-1). shift moves every chain by one place. Latency from
// sra_in to sra_out is 2p-1 shifts.
module vp_sra
  import vp_pkg::*;
#(
  parameter int unsigned N = 16,  // number of columns
  parameter int unsigned P = 32   // search range: offsets -P .. P-1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic shift,
  input  pix_t sra_in  [N],
  output pix_t sra_out [N]
);

  localparam int unsigned DEPTH = 2 * P - 1;

  // One register per place, column j place d; place 0 is the top.
  for (genvar j = 0; j < N; j++) begin : g_col
    for (genvar d = 0; d < DEPTH; d++) begin : g_reg
      pix_t q, nxt;
      if (d == DEPTH - 1) begin : g_entry
        assign nxt = sra_in[j];
      end else begin : g_link
        assign nxt = g_col[j].g_reg[d+1].q;
      end
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n)     q <= '0;
        else if (shift) q <= nxt;
      end
    end
    assign sra_out[j] = g_col[j].g_reg[0].q;
  end

endmodule
