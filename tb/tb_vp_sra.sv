// tb_vp_sra: shift register array with N = 3 columns and p = 3. Checks that
// each column delays its input by exactly 2p-1 shifts and holds still when
// shift is low.
module tb_vp_sra;
  import vp_pkg::*;

  localparam int N = 3, P = 3, D = 2 * P - 1;
  logic clk = 0, rst_n = 0, shift = 0;
  pix_t sra_in [N], sra_out [N];
  int checks = 0, failures = 0;
  int hist [N][$];

  always #5 clk = ~clk;

  vp_sra #(.N(N), .P(P)) dut (.clk, .rst_n, .shift, .sra_in, .sra_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int j = 0; j < N; j++) begin
      sra_in[j] = '0;
      for (int d = 0; d < D; d++) hist[j].push_back(0);  // reset contents
    end
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 500; t++) begin
      @(negedge clk);
      for (int j = 0; j < N; j++) begin
        checks++;
        if (int'(sra_out[j]) != hist[j][0]) begin
          failures++;
          if (failures < 10) $display("t=%0d col %0d got %0d exp %0d", t, j, sra_out[j], hist[j][0]);
        end
      end
      shift = $urandom_range(0, 3) != 0;
      for (int j = 0; j < N; j++) begin
        sra_in[j] = pix_t'($urandom_range(0, 255));
        if (shift) begin
          void'(hist[j].pop_front());
          hist[j].push_back(int'(sra_in[j]));
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
