// tb_vp_pat: adder tree for N = 16 and for a non-power-of-two N = 5. Random
// and all-maximum column sums are compared with a plain sum one clock later.
module tb_vp_pat;
  import vp_pkg::*;

  localparam int NA = 16, NB = 5;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [col_w(NA)-1:0] ca [NA];
  logic [col_w(NB)-1:0] cb [NB];
  logic va, vb;
  logic [sad_w(NA)-1:0] sa;
  logic [sad_w(NB)-1:0] sb;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vp_pat #(.N(NA)) da (.clk, .rst_n, .in_valid, .col_sum(ca), .ssad_valid(va), .ssad(sa));
  vp_pat #(.N(NB)) db (.clk, .rst_n, .in_valid, .col_sum(cb), .ssad_valid(vb), .ssad(sb));

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int ea, eb, prev_a, prev_b, prev_v;
    repeat (2) @(posedge clk);
    rst_n = 1;
    prev_v = 0; prev_a = 0; prev_b = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      checks += 2;
      if (va != prev_v || vb != prev_v) begin failures++; $display("t=%0d valid", t); end
      if (prev_v && (int'(sa) != prev_a || int'(sb) != prev_b)) begin
        failures++; $display("t=%0d sum %0d/%0d exp %0d/%0d", t, sa, sb, prev_a, prev_b);
      end
      in_valid = $urandom_range(0, 4) != 0;
      ea = 0; eb = 0;
      for (int k = 0; k < NA; k++) begin
        ca[k] = (t % 10 == 0) ? col_w(NA)'(NA * 255) : col_w(NA)'($urandom_range(0, NA * 255));
        ea += int'(ca[k]);
      end
      for (int k = 0; k < NB; k++) begin
        cb[k] = (t % 10 == 0) ? col_w(NB)'(NB * 255) : col_w(NB)'($urandom_range(0, NB * 255));
        eb += int'(cb[k]);
      end
      prev_v = in_valid;
      if (in_valid) begin prev_a = ea; prev_b = eb; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
