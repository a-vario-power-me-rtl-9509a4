// tb_vp_exu: edge-extraction unit on full 16 x 16 blocks with the high-pass
// and the Sobel filter: the CSM, its count and the threshold are compared
// with the reference algorithm over all eight power modes, and the latency
// from start to csm_valid is checked (2*N*N + 2 clocks).
module tb_vp_exu;
  import vp_pkg::*;
  import tb_vp_ref_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t cmb [N][N];
  logic [SUBM_W-1:0] m = 4'd2;
  mq_t m1 = '0, m2 = '0;
  logic csm [2][N][N];
  logic [$clog2(N*N+1)-1:0] cnt [2];
  grad_t thr [2];
  logic cv [2];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vp_exu #(.N(N), .FILTER(FILT_HPF)) d0 (.clk, .rst_n, .start, .cmb, .m, .m1, .m2,
      .csm(csm[0]), .csm_count(cnt[0]), .threshold(thr[0]), .csm_valid(cv[0]));
  vp_exu #(.N(N), .FILTER(FILT_SOBEL)) d1 (.clk, .rst_n, .start, .cmb, .m, .m1, .m2,
      .csm(csm[1]), .csm_count(cnt[1]), .threshold(thr[1]), .csm_valid(cv[1]));

  initial begin
    #5000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int blk[] = new[N * N];
    bit cref[];
    int t_ref, c_ref, lat;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 16; t++) begin
      for (int k = 0; k < N * N; k++) begin
        // blocks with a bright disc on a textured background
        int di = k / N - 8, dj = k % N - 6;
        blk[k] = (di * di + dj * dj < 20) ? 200 + $urandom_range(0, 20) : 40 + $urandom_range(0, 8 * (t % 4));
        cmb[k / N][k % N] = pix_t'(blk[k]);
      end
      m  = SUBM_W'(t < 8 ? 2 : 2 + t % 7);
      m1 = mq_t'(mode_m1(t % 8));
      m2 = mq_t'(256 - mode_m1(t % 8));
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      lat = 1;
      while (!cv[0] && lat < 4 * N * N) begin @(negedge clk); lat++; end
      checks++;
      if (lat != 2 * N * N + 3) begin failures++; $display("t=%0d latency %0d", t, lat); end
      for (int f = 0; f < 2; f++) begin
        ref_csm(f, N, blk, int'(m), int'(m1), int'(m2), cref, t_ref, c_ref);
        checks += 3;
        if (!cv[f]) begin failures++; $display("t=%0d f=%0d not valid", t, f); end
        if (int'(thr[f]) != t_ref) begin failures++; $display("t=%0d f=%0d thr %0d exp %0d", t, f, thr[f], t_ref); end
        if (int'(cnt[f]) != c_ref) begin failures++; $display("t=%0d f=%0d cnt %0d exp %0d", t, f, cnt[f], c_ref); end
        for (int k = 0; k < N * N; k++) begin
          checks++;
          if (csm[f][k / N][k % N] != cref[k]) begin
            failures++;
            if (failures < 20) $display("t=%0d f=%0d k=%0d", t, f, k);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
