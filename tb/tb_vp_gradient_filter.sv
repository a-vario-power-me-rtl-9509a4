// tb_vp_gradient_filter: runs the three filter kinds over random and
// edge-pattern blocks and compares every G with the mask-filter equations
// (borders replicated); also checks the output timing (first G two clocks
// after start, g_last on the N*N-th).
module tb_vp_gradient_filter;
  import vp_pkg::*;
  import tb_vp_ref_pkg::*;

  localparam int N = 16;
  logic clk = 0, rst_n = 0, start = 0;
  pix_t cmb [N][N];
  logic  gv [3], gl [3];
  grad_t g  [3];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vp_gradient_filter #(.N(N), .FILTER(FILT_HPF))   d0 (.clk, .rst_n, .start, .cmb, .g_valid(gv[0]), .g_last(gl[0]), .g(g[0]));
  vp_gradient_filter #(.N(N), .FILTER(FILT_SOBEL)) d1 (.clk, .rst_n, .start, .cmb, .g_valid(gv[1]), .g_last(gl[1]), .g(g[1]));
  vp_gradient_filter #(.N(N), .FILTER(FILT_MORPH)) d2 (.clk, .rst_n, .start, .cmb, .g_valid(gv[2]), .g_last(gl[2]), .g(g[2]));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int blk[] = new[N * N];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 4; t++) begin
      for (int k = 0; k < N * N; k++) begin
        case (t)
          0: blk[k] = $urandom_range(0, 255);
          1: blk[k] = ((k % N) < N / 2) ? 0 : 255;        // vertical edge
          2: blk[k] = ((k / N + k % N) % 2) ? 255 : 0;    // checkerboard, largest gradients
          default: blk[k] = 100 + (k / N) * 3 + (k % N);  // smooth ramp
        endcase
        cmb[k / N][k % N] = pix_t'(blk[k]);
      end
      @(negedge clk) start = 1;
      @(negedge clk) start = 0;
      // now one clock after the start edge: first valid appears next edge
      for (int k = 0; k < N * N; k++) begin
        @(posedge clk); #1;
        for (int f = 0; f < 3; f++) begin
          checks++;
          if (!gv[f] || int'(g[f]) != ref_grad(f, N, blk, k / N, k % N) || gl[f] != (k == N * N - 1)) begin
            failures++;
            if (failures < 20)
              $display("t=%0d f=%0d k=%0d valid=%0d g=%0d exp=%0d", t, f, k, gv[f], g[f],
                       ref_grad(f, N, blk, k / N, k % N));
          end
        end
      end
      @(posedge clk); #1;
      checks++;
      if (gv[0]) begin failures++; $display("valid after last"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
