// tb_vp_top_drv: stimulus and checker for one vp_top instance.
//
// For each of NBLK macro-blocks it builds a textured search area, cuts the
// current block out of it at a random offset (with noise, or a flat block
// that produces equal SSADs), picks the power mode and 8-to-m rate, streams
// block and area through the handshakes and compares the motion vector,
// the minimum SSAD, the active-PE count and the threshold with the reference
// search of tb_vp_ref_pkg. Odd blocks insert random source gaps; even blocks
// must finish in exactly N*N + (N+2p-1)^2 + 2p + 2 clocks plus stall clocks.
// It counts how often each mechanism of the design happened.
module tb_vp_top_drv
  import vp_pkg::*;
  import tb_vp_ref_pkg::*;
#(
  parameter int unsigned N    = 16,
  parameter int unsigned P    = 32,
  parameter int          FILT = 0,   // 0 high-pass, 1 Sobel, 2 morphological
  parameter int          NBLK = 8
) (
  input  logic                      clk,
  input  logic                      rst_n,
  output logic                      start,
  output logic [MODE_W-1:0]         power_mode,
  output logic [SUBM_W-1:0]         sub_m,
  output logic                      cmb_valid,
  output pix_t                      cmb_pix,
  input  logic                      cmb_ready,
  output logic                      ref_valid,
  output pix_t                      ref_pix,
  input  logic                      ref_ready,
  input  logic                      busy,
  input  logic                      stall,
  input  logic                      done,
  input  logic                      mv_valid,
  input  logic signed [mv_w(P)-1:0] mv_u,
  input  logic signed [mv_w(P)-1:0] mv_v,
  input  logic [sad_w(N)-1:0]       min_ssad,
  input  logic [$clog2(N*N+1)-1:0]  csm_count,
  input  grad_t                     threshold,
  output logic                      finished,
  output int                        checks,
  output int                        failures,
  output int                        n_stall,      // clocks stalled waiting for the mask
  output int                        n_gap,        // clocks a source was not valid
  output int                        n_pe_off,     // blocks with some PEs switched off
  output int                        n_full,       // blocks with every PE on
  output int                        n_switch,     // mode changes between blocks
  output int                        n_tie,        // blocks whose search had equal minima
  output int                        n_border_edge // blocks with an edge pixel on the border
);

  localparam int H = N + 2 * P - 1;

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("[N=%0d P=%0d F=%0d] %s: got %0d exp %0d", N, P, FILT, what, got, exp);
    end
  endtask

  initial begin
    int blk[] = new[N * N];
    int area[] = new[H * H];
    bit csm[];
    int thr, cnt, bu, bv, bs, ties, u0, v0, mode, prev_mode, cyc, st, ci, ri;
    bit gaps;
    checks = 0; failures = 0; finished = 0;
    n_stall = 0; n_gap = 0; n_pe_off = 0; n_full = 0; n_switch = 0; n_tie = 0; n_border_edge = 0;
    start = 0; power_mode = '0; sub_m = 4'd2; cmb_valid = 0; ref_valid = 0; cmb_pix = '0; ref_pix = '0;
    prev_mode = -1;
    wait (rst_n);
    for (int b = 0; b < NBLK; b++) begin
      // search area: smooth gradient plus texture; block cut from it
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++)
          area[r * H + c] = (r * 7 + c * 3 + ((r / 3 + c / 2) % 2) * 60 + $urandom_range(0, 40)) % 256;
      u0 = $urandom_range(0, 2 * P - 1) - P;
      v0 = $urandom_range(0, 2 * P - 1) - P;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          if (b % 4 == 3) blk[i * N + j] = 128;   // flat block: many equal SSADs
          else blk[i * N + j] = area[(i + u0 + P) * H + (j + v0 + P)] ^ $urandom_range(0, 3);
      if (b % 4 == 3)
        for (int k = 0; k < H * H; k++) area[k] = 120 + (k % 2) * 16;
      mode = (b * 3) % 8;
      if (b == NBLK - 1) mode = 7;
      gaps = b % 2;
      ref_csm(FILT, N, blk, 2 + b % 7, mode_m1(mode), 256 - mode_m1(mode), csm, thr, cnt);
      ref_search(N, P, blk, area, csm, bu, bv, bs, ties);
      for (int k = 0; k < N * N; k++)
        if (csm[k] && (k / N == 0 || k / N == N - 1 || k % N == 0 || k % N == N - 1) && !ref_sm(2 + b % 7, k / N, k % N))
          begin n_border_edge++; break; end
      if (prev_mode >= 0 && prev_mode != mode) n_switch++;
      prev_mode = mode;

      @(negedge clk);
      start = 1; power_mode = MODE_W'(mode); sub_m = SUBM_W'(2 + b % 7);
      @(posedge clk); #1;
      start = 0;
      power_mode = MODE_W'((mode + 5) % 8);  // host changes its mind mid-block: takes effect next block
      cyc = 0; st = 0; ci = 0; ri = 0;
      while (!done && cyc < 20 * H * H + 10 * N * N) begin
        @(negedge clk);
        cyc++;
        cmb_valid = (ci < N * N) && (!gaps || $urandom_range(0, 3) != 0);
        cmb_pix   = pix_t'(cmb_valid ? blk[ci] : 0);
        ref_valid = (ri < H * H) && (!gaps || $urandom_range(0, 3) != 0);
        // column by column, top to bottom
        ref_pix   = pix_t'(ref_valid ? area[(ri % H) * H + ri / H] : 0);
        if (gaps && ((ci < N * N && !cmb_valid) || (ri < H * H && !ref_valid))) n_gap++;
        #1;
        if (stall) st++;
        @(posedge clk);
        if (cmb_valid && cmb_ready) ci++;
        if (ref_valid && ref_ready) ri++;
      end
      cmb_valid = 0; ref_valid = 0;
      n_stall += st;
      check("done", int'(done), 1);
      if (!gaps) check("clocks", cyc, N * N + H * H + 2 * P + 2 + st);
      check("ref taken", ri, H * H);
      check("mv_valid", int'(mv_valid), 1);
      check("mv_u", int'(mv_u), bu);
      check("mv_v", int'(mv_v), bv);
      check("min_ssad", int'(min_ssad), bs);
      check("csm_count", int'(csm_count), cnt);
      check("threshold", int'(threshold), thr);
      if (cnt < N * N) n_pe_off++; else n_full++;
      if (ties > 0) n_tie++;
      @(negedge clk);
      check("idle", int'(busy), 0);
    end
    finished = 1;
  end

endmodule
