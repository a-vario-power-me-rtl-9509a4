// tb_vp_mvs: motion-vector selector. Random SSAD streams with frequent equal
// values; the kept candidate must be the first one of minimum SSAD, and clear
// must start a new search.
module tb_vp_mvs;
  import vp_pkg::*;

  localparam int SW = 16, MVW = 7;
  logic clk = 0, rst_n = 0, clear = 0, in_valid = 0;
  logic [SW-1:0] in_ssad = '0, best_ssad;
  logic signed [MVW-1:0] in_u = '0, in_v = '0, best_u, best_v;
  logic best_valid;
  int checks = 0, failures = 0, ties = 0;

  always #5 clk = ~clk;

  vp_mvs #(.SW(SW), .MVW(MVW)) dut (.clk, .rst_n, .clear, .in_valid, .in_ssad, .in_u, .in_v,
                                    .best_valid, .best_ssad, .best_u, .best_v);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bs, bu, bv;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int blk = 0; blk < 20; blk++) begin
      @(negedge clk) clear = 1;
      @(negedge clk) clear = 0;
      checks++;
      if (best_valid) begin failures++; $display("valid after clear"); end
      bs = -1;
      for (int k = 0; k < 100; k++) begin
        in_valid = $urandom_range(0, 5) != 0;
        in_ssad  = SW'($urandom_range(100, 130));
        in_u     = MVW'($urandom_range(0, 63) - 32);
        in_v     = MVW'($urandom_range(0, 63) - 32);
        if (in_valid) begin
          if (bs < 0 || int'(in_ssad) < bs) begin
            bs = int'(in_ssad); bu = int'(in_u); bv = int'(in_v);
          end else if (int'(in_ssad) == bs) ties++;
        end
        @(negedge clk);
      end
      in_valid = 0;
      checks += 3;
      if (int'(best_ssad) != bs) begin failures++; $display("ssad %0d exp %0d", best_ssad, bs); end
      if (int'(best_u) != bu || int'(best_v) != bv) begin
        failures++; $display("mv (%0d,%0d) exp (%0d,%0d)", best_u, best_v, bu, bv);
      end
      if (!best_valid) failures++;
    end
    checks++;
    if (ties == 0) begin failures++; $display("no tie exercised"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
