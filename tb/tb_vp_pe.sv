// tb_vp_pe: one processing element. Checks |S - R| accumulation when the
// CSM bit is 1, pure forwarding of the partial sum when it is 0, that the
// blocking registers keep the AD inputs still while the PE is off, and that
// S moves along the shift chain whatever the CSM bit.
module tb_vp_pe;
  import vp_pkg::*;

  localparam int PSW = 12;
  logic clk = 0, rst_n = 0;
  logic r_we = 0, s_shift = 0, csm_we = 0, csm_in = 0;
  pix_t r_in = '0, s_in = '0, s_out, r_out;
  logic active;
  logic [PSW-1:0] psum_in = '0, psum_out;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vp_pe #(.PSW(PSW)) dut (.clk, .rst_n, .r_we, .r_in, .r_out, .s_shift, .s_in, .s_out,
                          .csm_we, .csm_in, .active, .psum_in, .psum_out);

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  initial begin
    int r, s, on, ps, frozen_ad;
    repeat (2) @(posedge clk);
    rst_n = 1;
    on = 0; r = 0; s = 0;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      r_we = ($urandom_range(0, 15) == 0);
      r_in = pix_t'($urandom_range(0, 255));
      s_shift = $urandom_range(0, 1);
      s_in = pix_t'($urandom_range(0, 255));
      csm_we = ($urandom_range(0, 20) == 0);
      csm_in = $urandom_range(0, 1);
      psum_in = PSW'($urandom_range(0, 3000));
      @(posedge clk);
      if (r_we) r = int'(r_in);
      if (s_shift) s = int'(s_in);
      if (csm_we) on = csm_in;
      #1;
      ps = int'(psum_in);
      check("s_out", int'(s_out), s);
      check("r_out", int'(r_out), r);
      check("active", int'(active), on);
      check("psum_out", int'(psum_out), on ? ps + (s > r ? s - r : r - s) : ps);
      // while off, the AD operands must stay still
      if (!on) begin
        frozen_ad = int'(dut.s_breg) * 256 + int'(dut.r_breg);
        @(negedge clk);
        s_shift = 1; s_in = pix_t'($urandom_range(0, 255)); r_we = 1; r_in = pix_t'($urandom_range(0, 255));
        csm_we = 0;
        @(posedge clk); s = int'(s_in); r = int'(r_in); #1;
        check("breg still", int'(dut.s_breg) * 256 + int'(dut.r_breg), frozen_ad);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
