// vp_mode_table: power mode to edge-threshold weights.
//
// The host selects one of eight power modes; each mode fixes the pair
// (m1, m2) of the threshold rule threshold = m1*max(G) + m2*min(G). The eight
// pairs are the operating points of the content-based algorithm:
//   mode 0 (1,0)  1 (0.75,0.25)  2 (0.5,0.5)  3 (0.4,0.6)
//   mode 4 (0.3,0.7)  5 (0.2,0.8)  6 (0.1,0.9)  7 (0,1)
// Mode 0 keeps only the strongest edges (lowest power, about the 4-to-1
// regular rate); mode 7 makes every pixel an edge pixel (1-to-1, full
// search). Weights are rounded to Q1.8 (256 = 1.0) so that m1 + m2 = 256 in
// every mode; the numbering of the modes is this design's choice.
//
// Purely combinational.
module vp_mode_table
  import vp_pkg::*;
(
  input  logic [MODE_W-1:0] mode,
  output mq_t               m1,
  output mq_t               m2
);

  always_comb begin
    unique case (mode)
      3'd0:    m1 = mq_t'(256);
      3'd1:    m1 = mq_t'(192);
      3'd2:    m1 = mq_t'(128);
      3'd3:    m1 = mq_t'(102);
      3'd4:    m1 = mq_t'(77);
      3'd5:    m1 = mq_t'(51);
      3'd6:    m1 = mq_t'(26);
      default: m1 = mq_t'(0);
    endcase
    m2 = mq_t'(MQ_ONE) - m1;
  end

endmodule
