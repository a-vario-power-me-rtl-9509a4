// vp_exu: edge-extraction unit.
//
// The EXU turns the current macro-block (CMB) into the content-based
// subsample mask (CSM) that switches the processing elements. It chains the
// two blocks of the architecture: the gradient filter (filtering phase, one
// pixel per clock) and the CSM generator (edge-determination phase: max/min,
// threshold, edge mask OR regular subsample mask).
//
// Interface: a start pulse begins the work on cmb, which must stay stable
// until csm_valid. m (8-to-m rate), m1 and m2 (Q1.8 threshold weights) are
// sampled by the CSM generator and must also stay stable. Timing: csm_valid
// rises 2*N*N + 2 clocks after the edge that takes start, which is shorter than the N*(N+2p-1)
// clocks of the initial reference-block phase it runs beside at the
// default sizes, so the mask is ready before the first SSAD.
module vp_exu
  import vp_pkg::*;
#(
  parameter int unsigned N      = 16,
  parameter filter_e     FILTER = FILT_HPF
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  pix_t              cmb [N][N],
  input  logic [SUBM_W-1:0] m,
  input  mq_t               m1,
  input  mq_t               m2,
  output logic              csm [N][N],
  output logic [$clog2(N*N+1)-1:0] csm_count,
  output grad_t             threshold,
  output logic              csm_valid
);

  logic  g_valid, g_last;
  grad_t g;

  vp_gradient_filter #(.N(N), .FILTER(FILTER)) u_filter (
    .clk, .rst_n, .start, .cmb,
    .g_valid, .g_last, .g
  );

  vp_csm_gen #(.N(N)) u_csm (
    .clk, .rst_n, .start,
    .g_valid, .g_last, .g,
    .m, .m1, .m2,
    .csm, .csm_count, .threshold, .csm_valid
  );

endmodule
