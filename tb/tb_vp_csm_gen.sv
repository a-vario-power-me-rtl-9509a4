// tb_vp_csm_gen: streams random gradient blocks into the CSM generator under
// random 8-to-m rates and power-mode weights and compares the threshold, the
// mask and its population count with the threshold equations. Also checks
// that csm_valid rises N*N + 1 clocks after the clock that takes g_last.
module tb_vp_csm_gen;
  import vp_pkg::*;
  import tb_vp_ref_pkg::*;

  localparam int N = 8;
  logic clk = 0, rst_n = 0, start = 0, g_valid = 0, g_last = 0;
  grad_t g = '0;
  logic [SUBM_W-1:0] m = 4'd2;
  mq_t m1 = '0, m2 = '0;
  logic csm [N][N];
  logic [$clog2(N*N+1)-1:0] csm_count;
  grad_t threshold;
  logic csm_valid;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vp_csm_gen #(.N(N)) dut (.clk, .rst_n, .start, .g_valid, .g_last, .g, .m, .m1, .m2,
                           .csm, .csm_count, .threshold, .csm_valid);

  initial begin
    #2000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gv[] = new[N * N];
    bit csm_ref[];
    int thr, cnt, lat, mode;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 40; t++) begin
      mode = t % 8;
      m  = SUBM_W'(2 + (t / 8) % 7);
      m1 = mq_t'(mode_m1(mode));
      m2 = mq_t'(256 - mode_m1(mode));
      for (int k = 0; k < N * N; k++)
        gv[k] = (t % 5 == 4) ? 17 : ((t % 3 == 0) ? $urandom_range(0, 2040) : $urandom_range(0, 60));
      ref_csm_from_g(N, gv, int'(m), int'(m1), int'(m2), csm_ref, thr, cnt);
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      for (int k = 0; k < N * N; k++) begin
        // occasional gaps in the stream
        if ($urandom_range(0, 3) == 0) begin
          g_valid = 0; @(negedge clk);
        end
        g_valid = 1; g = grad_t'(gv[k]); g_last = (k == N * N - 1);
        @(negedge clk);
      end
      g_valid = 0; g_last = 0;
      lat = 1;  // the edge that took g_last is behind us
      while (!csm_valid && lat < 10 * N * N) begin
        @(negedge clk); lat++;
      end
      checks++;
      if (lat != N * N + 2) begin
        failures++; $display("t=%0d latency %0d", t, lat);
      end
      checks += 2;
      if (int'(threshold) != thr) begin failures++; $display("t=%0d thr %0d exp %0d", t, threshold, thr); end
      if (int'(csm_count) != cnt) begin failures++; $display("t=%0d cnt %0d exp %0d", t, csm_count, cnt); end
      for (int k = 0; k < N * N; k++) begin
        checks++;
        if (csm[k / N][k % N] != csm_ref[k]) begin
          failures++;
          if (failures < 20) $display("t=%0d k=%0d csm %0d exp %0d", t, k, csm[k / N][k % N], csm_ref[k]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
