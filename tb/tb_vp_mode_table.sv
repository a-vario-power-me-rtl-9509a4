// tb_vp_mode_table: checks the eight (m1, m2) operating points, rounded to
// Q1.8, and that m1 + m2 is 1.0 in every mode.
module tb_vp_mode_table;
  import vp_pkg::*;
  import tb_vp_ref_pkg::*;

  logic [MODE_W-1:0] mode;
  mq_t m1, m2;
  int checks = 0, failures = 0;

  vp_mode_table dut (.mode, .m1, .m2);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int md = 0; md < 8; md++) begin
      int exp1, exp2;
      real m2r;
      mode = MODE_W'(md);
      #1;
      exp1 = mode_m1(md);
      m2r  = 1.0 - real'(exp1) / 256.0;
      exp2 = $rtoi(m2r * 256.0 + 0.5);
      checks += 3;
      if (int'(m1) != exp1) begin
        failures++; $display("mode %0d m1 %0d exp %0d", md, m1, exp1);
      end
      if (int'(m2) != exp2) begin
        failures++; $display("mode %0d m2 %0d", md, m2);
      end
      if (int'(m1) + int'(m2) != 256) begin
        failures++; $display("mode %0d sum %0d", md, m1 + m2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
