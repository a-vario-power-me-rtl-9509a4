// tb_vp_frame: the evaluation workload at its real size: one 352 x 288 frame
// (22 x 18 = 396 macro-blocks of 16 x 16, search range -32..31) estimated
// against a reference frame with the default design. The two frames are
// synthetic (textured background moving by a global offset, a bright object
// moving differently, small noise), generated here. Search areas that reach
// past the frame edge use the nearest frame pixel. The power mode steps
// through all eight modes from block to block. Every block's motion vector,
// SSAD and active-PE count is compared with the reference search; at the end
// the average number of active PEs per filter and mode and the resulting load in
// equivalent additions, 3*A*(2p)^2 + (N-1)*(2p)^2 + 9*N^2 per block with A
// active PEs, are printed. For the quality side, each block is also searched
// by the reference model with two baselines: the plain 4-to-1 pattern with no
// edge pixels (general subsampling) and all pixels (full search). For each
// chosen vector the mean absolute difference over all N*N pixels is summed,
// and the averages per filter and mode are printed next to those baselines.
module tb_vp_frame;
  import vp_pkg::*;
  import tb_vp_ref_pkg::*;

  localparam int N = 16, P = 32, H = N + 2 * P - 1;
  localparam int NF = 2;
  localparam int FW = 352, FH = 288, BX = FW / N, BY = FH / N;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic start = 0, cmb_valid = 0, ref_valid = 0;
  logic [MODE_W-1:0] power_mode = '0;
  logic [SUBM_W-1:0] sub_m = 4'd2;
  pix_t cmb_pix = '0, ref_pix = '0;
  logic cmb_ready [NF], ref_ready [NF], busy [NF], stall [NF], done [NF], mv_valid [NF];
  logic signed [mv_w(P)-1:0] mv_u [NF], mv_v [NF];
  logic [sad_w(N)-1:0] min_ssad [NF];
  logic [$clog2(N*N+1)-1:0] csm_count [NF];
  grad_t threshold [NF];
  int checks = 0, failures = 0;
  localparam filter_e FK [NF] = '{FILT_HPF, FILT_SOBEL};

  for (genvar f = 0; f < NF; f++) begin : g_dut
    vp_top #(.FILTER(FK[f])) dut (
      .clk, .rst_n, .start, .power_mode, .sub_m, .cmb_valid, .cmb_pix, .cmb_ready(cmb_ready[f]),
      .ref_valid, .ref_pix, .ref_ready(ref_ready[f]), .busy(busy[f]), .stall(stall[f]),
      .done(done[f]), .mv_valid(mv_valid[f]), .mv_u(mv_u[f]), .mv_v(mv_v[f]),
      .min_ssad(min_ssad[f]), .csm_count(csm_count[f]), .threshold(threshold[f]));
  end

  int cur [FH * FW];
  int prv [FH * FW];

  function automatic int tex(int y, int x);
    return (64 + ((x * 5 + y * 3) % 97) + ((x / 6 + y / 5) % 2) * 50 + ((x * y) % 13)) % 256;
  endfunction

  function automatic int fpx(int y, int x);
    if (y < 0) y = 0;
    if (y >= FH) y = FH - 1;
    if (x < 0) x = 0;
    if (x >= FW) x = FW - 1;
    return prv[y * FW + x];
  endfunction

  initial begin
    #400000000;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    int blk[] = new[N * N];
    int area[] = new[H * H];
    bit csm[];
    bit sm_only[] = new[N * N];
    bit all_on[] = new[N * N];
    int gu, gv, gs, fu, fv, fs;
    longint err_sum [NF][8];
    longint err_gen = 0, err_full = 0;
    int thr [NF], cnt [NF], bu [NF], bv [NF], bs [NF], ties, mode, ci, ri, cyc;
    longint act_sum [NF][8];
    int act_n [8];
    for (int k = 0; k < 8; k++) begin
      act_n[k] = 0;
      for (int f = 0; f < NF; f++) begin act_sum[f][k] = 0; err_sum[f][k] = 0; end
    end
    for (int k = 0; k < N * N; k++) begin
      sm_only[k] = ref_sm(2, k / N, k % N);
      all_on[k] = 1'b1;
    end
    // previous frame: texture plus object; current frame: moved by (+3,-5),
    // object moved by (-6,+4), noise
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int o = ((x - 150) * (x - 150) + (y - 140) * (y - 140) < 900) ? 230 : -1;
        prv[y * FW + x] = o >= 0 ? o : tex(y, x);
      end
    for (int y = 0; y < FH; y++)
      for (int x = 0; x < FW; x++) begin
        int o = ((x - 154) * (x - 154) + (y - 134) * (y - 134) < 900) ? 230 : -1;
        int v = o >= 0 ? o : tex(y - 3, x + 5);
        cur[y * FW + x] = (v + $urandom_range(0, 2)) % 256;
      end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int b = 0; b < BX * BY; b++) begin
      int by = b / BX, bx = b % BX;
      mode = b % 8;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) blk[i * N + j] = cur[(by * N + i) * FW + bx * N + j];
      for (int r = 0; r < H; r++)
        for (int c = 0; c < H; c++) area[r * H + c] = fpx(by * N - P + r, bx * N - P + c);
      for (int f = 0; f < NF; f++) begin
        ref_csm(f, N, blk, 2, mode_m1(mode), 256 - mode_m1(mode), csm, thr[f], cnt[f]);
        ref_search(N, P, blk, area, csm, bu[f], bv[f], bs[f], ties);
      end
      ref_search(N, P, blk, area, sm_only, gu, gv, gs, ties);
      ref_search(N, P, blk, area, all_on, fu, fv, fs, ties);
      err_gen += ref_ssad(N, P, blk, area, all_on, gu, gv);
      err_full += fs;
      @(negedge clk);
      start = 1; power_mode = MODE_W'(mode); sub_m = 4'd2;
      @(posedge clk); #1;
      start = 0;
      ci = 0; ri = 0; cyc = 0;
      while (!done[0] && cyc < 100000) begin
        @(negedge clk);
        cyc++;
        cmb_valid = ci < N * N;
        cmb_pix   = pix_t'(cmb_valid ? blk[ci] : 0);
        ref_valid = ri < H * H;
        ref_pix   = pix_t'(ref_valid ? area[(ri % H) * H + ri / H] : 0);
        #1;
        checks++;
        if (cmb_ready[1] != cmb_ready[0] || ref_ready[1] != ref_ready[0] || done[1] != done[0]) begin
          failures++; $display("blk %0d: estimators out of step", b);
        end
        @(posedge clk);
        if (cmb_valid && cmb_ready[0]) ci++;
        if (ref_valid && ref_ready[0]) ri++;
      end
      cmb_valid = 0; ref_valid = 0;
      if (cyc != N * N + H * H + 2 * P + 2) begin failures++; $display("blk %0d clocks %0d", b, cyc); end
      checks++;
      for (int f = 0; f < NF; f++) begin
        checks += 4;
        if (int'(mv_u[f]) != bu[f] || int'(mv_v[f]) != bv[f]) begin
          failures++; $display("blk %0d f %0d mv (%0d,%0d) exp (%0d,%0d)", b, f, mv_u[f], mv_v[f], bu[f], bv[f]);
        end
        if (int'(min_ssad[f]) != bs[f]) begin failures++; $display("blk %0d f %0d ssad %0d exp %0d", b, f, min_ssad[f], bs[f]); end
        if (int'(csm_count[f]) != cnt[f]) begin failures++; $display("blk %0d f %0d count %0d exp %0d", b, f, csm_count[f], cnt[f]); end
        if (int'(threshold[f]) != thr[f]) begin failures++; $display("blk %0d f %0d thr", b, f); end
        act_sum[f][mode] += cnt[f];
        err_sum[f][mode] += ref_ssad(N, P, blk, area, all_on, int'(mv_u[f]), int'(mv_v[f]));
      end
      act_n[mode]++;
    end
    for (int f = 0; f < NF; f++)
      for (int k = 0; k < 8; k++) begin
        real a, load;
        a = real'(act_sum[f][k]) / real'(act_n[k]);
        load = 3.0 * a * (2 * P) * (2 * P) + (N - 1) * (2 * P) * (2 * P) + 9.0 * N * N;
        $display("%s mode %0d: %0d blocks, mean active PEs %0.1f of %0d, load %0.0f equivalent additions per block, mean error %0.2f per pixel",
                 f == 0 ? "high-pass" : "Sobel    ", k, act_n[k], a, N * N, load,
                 real'(err_sum[f][k]) / real'(act_n[k] * N * N));
      end
    $display("general 4-to-1 subsampling: mean error %0.2f per pixel; full search: %0.2f per pixel",
             real'(err_gen) / real'(BX * BY * N * N), real'(err_full) / real'(BX * BY * N * N));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
