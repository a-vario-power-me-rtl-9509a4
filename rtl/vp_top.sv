// vp_top: vario-power full-search motion estimator with content-based
// subsampling.
//
// For each N x N current macro-block (CMB) the design finds the offset (u,v),
// -p <= u,v <= p-1, that minimises the subsampled SAD
//     SSAD(u,v) = sum over (i,j) of CSM(i,j) * |S(i+u, j+v) - R(i,j)|.
// The content-based subsample mask CSM is the OR of a regular 8-to-m
// pattern and the block's edge pixels; the edge threshold follows the power
// mode, so the host trades power for quality by changing one mode number.
// Pixels outside the mask switch their processing element off.
//
// Structure: vp_ctrl (phases and streams), vp_exu (gradient filter and CSM
// generator), vp_mode_table (mode -> m1, m2), vp_pe_array (N x N PEs) with
// vp_sra (2p-1 shift registers under each PE column), vp_pat (adder tree) and
// vp_mvs (minimum selector).
//
// Interface: pulse start with power_mode (0 = lowest power .. 7 = full
// search) and sub_m (m of the regular 8-to-m rate, 2..8; 2 is the 4-to-1
// base rate of the content-based operating points). Then stream the CMB in
// raster order on cmb_pix (cmb_valid/cmb_ready) and the
// (N+2p-1) x (N+2p-1) search area, whose pixel (r,c) is S(r-p, c-p),
// column by column, top to bottom, on ref_pix (ref_valid/ref_ready). done
// pulses when mv_u, mv_v and min_ssad hold the result; they stay until the
// next start. csm_count is the number of active PEs of this block.
// Timing: N*N + (N+2p-1)^2 + 2p + 2 clocks from start to done without source
// stalls (6690 clocks for N=16, p=32), one candidate per clock in the SSAD
// phase.
module vp_top
  import vp_pkg::*;
#(
  parameter int unsigned N      = 16,       // macro-block size
  parameter int unsigned P      = 32,       // search range -P .. P-1
  parameter filter_e     FILTER = FILT_HPF  // gradient filter of the EXU
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,
  input  logic [MODE_W-1:0]         power_mode,
  input  logic [SUBM_W-1:0]         sub_m,
  input  logic                      cmb_valid,
  input  pix_t                      cmb_pix,
  output logic                      cmb_ready,
  input  logic                      ref_valid,
  input  pix_t                      ref_pix,
  output logic                      ref_ready,
  output logic                      busy,
  output logic                      stall,
  output logic                      done,
  output logic                      mv_valid,
  output logic signed [mv_w(P)-1:0] mv_u,
  output logic signed [mv_w(P)-1:0] mv_v,
  output logic [sad_w(N)-1:0]       min_ssad,
  output logic [$clog2(N*N+1)-1:0]  csm_count,
  output grad_t                     threshold
);

  localparam int unsigned MVW = mv_w(P);
  localparam int unsigned SW  = sad_w(N);

  // controller
  logic [MODE_W-1:0]    mode_q;
  logic [SUBM_W-1:0]    m_q;
  logic                 r_we, exu_start, csm_valid, csm_we;
  logic [$clog2(N)-1:0] r_row, r_col;
  logic                 shift, pad, eval, mvs_clear;
  logic signed [MVW-1:0] eval_u, eval_v;

  vp_ctrl #(.N(N), .P(P)) u_ctrl (
    .clk, .rst_n, .start, .power_mode, .sub_m, .mode_q, .m_q,
    .cmb_valid, .cmb_ready, .r_we, .r_row, .r_col,
    .exu_start, .csm_valid, .csm_we,
    .ref_valid, .ref_ready, .shift, .pad, .eval, .eval_u, .eval_v,
    .mvs_clear, .busy, .stall, .done
  );

  // power mode
  mq_t m1, m2;
  vp_mode_table u_mode (.mode(mode_q), .m1, .m2);

  // PE array and shift register array
  pix_t cmb [N][N];
  logic csm [N][N];
  pix_t s_top [N], s_bot [N], sra_in [N];
  logic [col_w(N)-1:0] col_sum [N];
  logic [$clog2(N*N+1)-1:0] active_count;

  vp_pe_array #(.N(N)) u_array (
    .clk, .rst_n,
    .r_we, .r_row, .r_col, .r_in(cmb_pix), .r_out(cmb),
    .s_shift(shift), .s_bot_in(s_bot), .s_top_out(s_top),
    .csm_we, .csm,
    .col_sum, .active_count
  );

  for (genvar j = 0; j < N; j++) begin : g_chain
    if (j == N - 1) begin : g_entry
      assign sra_in[j] = pad ? '0 : ref_pix;
    end else begin : g_link
      assign sra_in[j] = s_top[j+1];
    end
  end

  vp_sra #(.N(N), .P(P)) u_sra (
    .clk, .rst_n, .shift, .sra_in, .sra_out(s_bot)
  );

  // edge-extraction unit
  vp_exu #(.N(N), .FILTER(FILTER)) u_exu (
    .clk, .rst_n, .start(exu_start), .cmb,
    .m(m_q), .m1, .m2,
    .csm, .csm_count, .threshold, .csm_valid
  );

  // adder tree, candidate tag and selector
  logic          ssad_valid;
  logic [SW-1:0] ssad;
  logic signed [MVW-1:0] tag_u, tag_v;

  vp_pat #(.N(N)) u_pat (
    .clk, .rst_n, .in_valid(eval), .col_sum, .ssad_valid, .ssad
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tag_u <= '0;
      tag_v <= '0;
    end else if (eval) begin
      tag_u <= eval_u;
      tag_v <= eval_v;
    end
  end

  vp_mvs #(.SW(SW), .MVW(MVW)) u_mvs (
    .clk, .rst_n, .clear(mvs_clear),
    .in_valid(ssad_valid), .in_ssad(ssad), .in_u(tag_u), .in_v(tag_v),
    .best_valid(mv_valid), .best_ssad(min_ssad), .best_u(mv_u), .best_v(mv_v)
  );

  // Every evaluated candidate uses exactly the PEs the mask switched on.
  a_active_matches_csm: assert property (@(posedge clk) disable iff (!rst_n)
                                         eval |-> active_count == csm_count);

endmodule
