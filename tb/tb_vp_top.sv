// tb_vp_top: end-to-end test of the motion estimator at three small sizes:
//   A  N=4, p=2, high-pass  - search shorter than the EXU: the array stalls
//   B  N=4, p=4, Sobel      - no stall
//   C  N=8, p=4, morphological gradient
// Each runs a series of blocks through all power modes, with source gaps,
// mode switches, flat blocks (equal SSADs) and the full-search mode, and is
// compared with the reference search. Every mechanism must occur at least
// once.
module tb_vp_top;
  import vp_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic fin [3];
  int c [3], f [3], ns [3], ng [3], noff [3], nfull [3], nsw [3], ntie [3], nbord [3];

  `define VP_INST(IDX, NN, PP, FE, FI, NB) \
    logic s_``IDX, cv_``IDX, cr_``IDX, rv_``IDX, rr_``IDX, b_``IDX, st_``IDX, d_``IDX, mvv_``IDX; \
    logic [MODE_W-1:0] pm_``IDX; logic [SUBM_W-1:0] sm_``IDX; pix_t cp_``IDX, rp_``IDX; \
    logic signed [mv_w(PP)-1:0] u_``IDX, v_``IDX; logic [sad_w(NN)-1:0] sad_``IDX; \
    logic [$clog2(NN*NN+1)-1:0] cc_``IDX; grad_t th_``IDX; \
    vp_top #(.N(NN), .P(PP), .FILTER(FE)) dut_``IDX ( \
      .clk, .rst_n, .start(s_``IDX), .power_mode(pm_``IDX), .sub_m(sm_``IDX), \
      .cmb_valid(cv_``IDX), .cmb_pix(cp_``IDX), .cmb_ready(cr_``IDX), \
      .ref_valid(rv_``IDX), .ref_pix(rp_``IDX), .ref_ready(rr_``IDX), \
      .busy(b_``IDX), .stall(st_``IDX), .done(d_``IDX), .mv_valid(mvv_``IDX), \
      .mv_u(u_``IDX), .mv_v(v_``IDX), .min_ssad(sad_``IDX), .csm_count(cc_``IDX), .threshold(th_``IDX)); \
    tb_vp_top_drv #(.N(NN), .P(PP), .FILT(FI), .NBLK(NB)) drv_``IDX ( \
      .clk, .rst_n, .start(s_``IDX), .power_mode(pm_``IDX), .sub_m(sm_``IDX), \
      .cmb_valid(cv_``IDX), .cmb_pix(cp_``IDX), .cmb_ready(cr_``IDX), \
      .ref_valid(rv_``IDX), .ref_pix(rp_``IDX), .ref_ready(rr_``IDX), \
      .busy(b_``IDX), .stall(st_``IDX), .done(d_``IDX), .mv_valid(mvv_``IDX), \
      .mv_u(u_``IDX), .mv_v(v_``IDX), .min_ssad(sad_``IDX), .csm_count(cc_``IDX), .threshold(th_``IDX), \
      .finished(fin[IDX]), .checks(c[IDX]), .failures(f[IDX]), .n_stall(ns[IDX]), .n_gap(ng[IDX]), \
      .n_pe_off(noff[IDX]), .n_full(nfull[IDX]), .n_switch(nsw[IDX]), .n_tie(ntie[IDX]), \
      .n_border_edge(nbord[IDX]));

  `VP_INST(0, 4, 2, FILT_HPF,   0, 16)
  `VP_INST(1, 4, 4, FILT_SOBEL, 1, 16)
  `VP_INST(2, 8, 4, FILT_MORPH, 2, 16)

  initial begin
    #20000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  task automatic need(string what, int count);
    checks++;
    $display("  %-34s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("  mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin[0] && fin[1] && fin[2]);
    for (int k = 0; k < 3; k++) begin
      checks += c[k];
      failures += f[k];
    end
    need("stall clocks waiting for CSM (A)", ns[0]);
    checks++;
    if (ns[1] != 0) begin failures++; $display("unexpected stall in B"); end
    need("source gap clocks", ng[0] + ng[1] + ng[2]);
    need("blocks with PEs switched off", noff[0] + noff[1] + noff[2]);
    need("blocks in full search (1:1)", nfull[0] + nfull[1] + nfull[2]);
    need("power-mode switches", nsw[0] + nsw[1] + nsw[2]);
    need("searches with equal minima", ntie[0] + ntie[1] + ntie[2]);
    need("blocks with border edge pixels", nbord[0] + nbord[1] + nbord[2]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
