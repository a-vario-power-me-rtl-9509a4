// tb_vp_subsample_mask: checks the regular 8-to-m subsample mask against the
// step-function definition for every m of 2..8 and checks that each 4 x 4
// tile keeps exactly 2m pixels.
module tb_vp_subsample_mask;
  import vp_pkg::*;
  import tb_vp_ref_pkg::*;

  localparam int N = 16;
  logic [SUBM_W-1:0] m;
  logic sm [N][N];
  int checks = 0, failures = 0;

  vp_subsample_mask #(.N(N)) dut (.m, .sm);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mm = 2; mm <= 8; mm++) begin
      int ones;
      m = SUBM_W'(mm);
      #1;
      ones = 0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) begin
          checks++;
          if (sm[i][j] !== ref_sm(mm, i, j)) begin
            failures++;
            $display("m=%0d (%0d,%0d) got %0d", mm, i, j, sm[i][j]);
          end
          if (i < 4 && j < 4) ones += sm[i][j];
        end
      checks++;
      if (ones != 2 * mm) begin
        failures++;
        $display("m=%0d tile has %0d ones", mm, ones);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
