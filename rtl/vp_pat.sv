// vp_pat: parallel adder tree.
//
// Adds the N column sums of the PE array into the subsample sum of absolute
// differences (SSAD) of one candidate offset. The tree is balanced: inputs are
// padded with zeros to the next power of two and added pairwise level by
// level, each level one bit wider. The result is registered together with a
// valid bit, so a new SSAD can be taken every clock.
//
// Interface: in_valid qualifies col_sum; ssad/ssad_valid follow one clock
// later. The tree is combinational; the single output register is this
// design's choice of pipelining.
module vp_pat
  import vp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 in_valid,
  input  logic [col_w(N)-1:0]  col_sum [N],
  output logic                 ssad_valid,
  output logic [sad_w(N)-1:0]  ssad
);

  localparam int unsigned LV = $clog2(N) > 0 ? $clog2(N) : 1;
  localparam int unsigned NP = 1 << LV;
  localparam int unsigned SW = sad_w(N);

  // Level l of the tree has NP >> l nodes; level 0 are the padded inputs.
  for (genvar l = 0; l <= LV; l++) begin : g_lvl
    logic [SW-1:0] node [NP >> l];
    for (genvar k = 0; k < (NP >> l); k++) begin : g_node
      if (l == 0) begin : g_leaf
        if (k < N) begin : g_in
          assign node[k] = SW'(col_sum[k]);
        end else begin : g_pad
          assign node[k] = '0;
        end
      end else begin : g_add
        assign node[k] = g_lvl[l-1].node[2*k] + g_lvl[l-1].node[2*k+1];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      ssad_valid <= 1'b0;
      ssad       <= '0;
    end else begin
      ssad_valid <= in_valid;
      if (in_valid) ssad <= g_lvl[LV].node[0];
    end
  end

endmodule
