// tb_vp_top_full: the motion estimator at its default size (16 x 16 blocks,
// search range -32..31, high-pass filter). Eight macro-blocks go through the
// eight power modes and are compared with the reference full search; the
// even ones must finish in 256 + 79*79 + 64 + 2 = 6563 clocks (no stall is
// expected at this size because the EXU needs 514 of the 1264 clocks of the
// initial search-area phase).
module tb_vp_top_full;
  import vp_pkg::*;

  localparam int N = 16, P = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start, cmb_valid, cmb_ready, ref_valid, ref_ready, busy, stall, done, mv_valid, fin;
  logic [MODE_W-1:0] power_mode;
  logic [SUBM_W-1:0] sub_m;
  pix_t cmb_pix, ref_pix;
  logic signed [mv_w(P)-1:0] mv_u, mv_v;
  logic [sad_w(N)-1:0] min_ssad;
  logic [$clog2(N*N+1)-1:0] csm_count;
  grad_t threshold;
  int c, f, ns, ng, noff, nfull, nsw, ntie, nbord;
  int checks = 0, failures = 0;

  vp_top dut (.clk, .rst_n, .start, .power_mode, .sub_m, .cmb_valid, .cmb_pix, .cmb_ready,
              .ref_valid, .ref_pix, .ref_ready, .busy, .stall, .done, .mv_valid,
              .mv_u, .mv_v, .min_ssad, .csm_count, .threshold);

  tb_vp_top_drv #(.N(N), .P(P), .FILT(0), .NBLK(8)) drv (
    .clk, .rst_n, .start, .power_mode, .sub_m, .cmb_valid, .cmb_pix, .cmb_ready,
    .ref_valid, .ref_pix, .ref_ready, .busy, .stall, .done, .mv_valid,
    .mv_u, .mv_v, .min_ssad, .csm_count, .threshold,
    .finished(fin), .checks(c), .failures(f), .n_stall(ns), .n_gap(ng), .n_pe_off(noff),
    .n_full(nfull), .n_switch(nsw), .n_tie(ntie), .n_border_edge(nbord));

  initial begin
    #2000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (fin);
    checks = c + 4;
    failures = f;
    $display("blocks with PEs off %0d, full search %0d, mode switches %0d, stall clocks %0d",
             noff, nfull, nsw, ns);
    if (ns != 0) begin failures++; $display("unexpected stall at full size"); end
    if (noff == 0) begin failures++; $display("no block with PEs switched off"); end
    if (nfull == 0) begin failures++; $display("no full-search block"); end
    if (nsw == 0) begin failures++; $display("no mode switch"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
