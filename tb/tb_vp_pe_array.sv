// tb_vp_pe_array: 4 x 4 PE array. Loads a random block and mask, moves random
// rows up through the array, and compares each column sum
// sum_i CSM(i,j)*|S(i,j) - R(i,j)|, the top-row outputs, the stored block
// and the active-PE count with a model of the array.
module tb_vp_pe_array;
  import vp_pkg::*;

  localparam int N = 4;
  logic clk = 0, rst_n = 0, r_we = 0, s_shift = 0, csm_we = 0;
  logic [$clog2(N)-1:0] r_row = '0, r_col = '0;
  pix_t r_in = '0;
  pix_t r_out [N][N];
  pix_t s_bot_in [N], s_top_out [N];
  logic csm [N][N];
  logic [col_w(N)-1:0] col_sum [N];
  logic [$clog2(N*N+1)-1:0] active_count;
  int checks = 0, failures = 0;
  int R [N][N], S [N][N], C [N][N];

  always #5 clk = ~clk;

  vp_pe_array #(.N(N)) dut (.clk, .rst_n, .r_we, .r_row, .r_col, .r_in, .r_out, .s_shift,
                            .s_bot_in, .s_top_out, .csm_we, .csm, .col_sum, .active_count);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic compare(int t);
    int e, act;
    act = 0;
    for (int j = 0; j < N; j++) begin
      e = 0;
      for (int i = 0; i < N; i++) begin
        if (C[i][j]) e += (S[i][j] > R[i][j]) ? S[i][j] - R[i][j] : R[i][j] - S[i][j];
        act += C[i][j];
        checks++;
        if (int'(r_out[i][j]) != R[i][j]) failures++;
      end
      checks += 2;
      if (int'(col_sum[j]) != e) begin
        failures++;
        if (failures < 10) $display("t=%0d col %0d sum %0d exp %0d", t, j, col_sum[j], e);
      end
      if (int'(s_top_out[j]) != S[0][j]) failures++;
    end
    checks++;
    if (int'(active_count) != act) failures++;
  endtask

  initial begin
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++) begin
        R[i][j] = 0; S[i][j] = 0; C[i][j] = 0; csm[i][j] = 0;
      end
    for (int j = 0; j < N; j++) s_bot_in[j] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 10; blk++) begin
      // load the block pixel by pixel
      for (int k = 0; k < N * N; k++) begin
        @(negedge clk);
        r_we = 1; r_row = 2'(k / N); r_col = 2'(k % N); r_in = pix_t'($urandom_range(0, 255));
        @(posedge clk); R[k / N][k % N] = int'(r_in);
      end
      @(negedge clk) r_we = 0;
      for (int t = 0; t < 60; t++) begin
        @(negedge clk);
        compare(t);
        csm_we  = (t % 20 == 0);
        s_shift = $urandom_range(0, 3) != 0;
        for (int i = 0; i < N; i++)
          for (int j = 0; j < N; j++) csm[i][j] = (blk == 0) ? 1'b1 : 1'($urandom_range(0, 1));
        for (int j = 0; j < N; j++) s_bot_in[j] = pix_t'($urandom_range(0, 255));
        @(posedge clk);
        if (csm_we)
          for (int i = 0; i < N; i++)
            for (int j = 0; j < N; j++) C[i][j] = csm[i][j];
        if (s_shift)
          for (int j = 0; j < N; j++) begin
            for (int i = 0; i < N - 1; i++) S[i][j] = S[i+1][j];
            S[N-1][j] = int'(s_bot_in[j]);
          end
      end
      @(negedge clk) begin csm_we = 0; s_shift = 0; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
