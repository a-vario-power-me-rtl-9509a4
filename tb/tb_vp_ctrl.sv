// tb_vp_ctrl: phase controller with N = 4, p = 2 against a cycle model of
// the array. Checks the raster CMB write order, one EXU start, exactly
// (N+2p-1)^2 search pixels taken plus 2p-1 self-inserted pads, that every
// candidate (u,v) is evaluated once in order (v outer, u inner) exactly when
// N*(N+2p-1) + (v+p)*(N+2p-1) + (u+p) shifts have happened, the stall while
// the mask is late, the mode latch, and the start-to-done time without
// source gaps (N*N + (N+2p-1)^2 + 2p + 2 clocks).
module tb_vp_ctrl;
  import vp_pkg::*;

  localparam int N = 4, P = 2, H = N + 2 * P - 1, MVW = mv_w(P);
  logic clk = 0, rst_n = 0, start = 0, cmb_valid = 0, csm_valid = 0, ref_valid = 0;
  logic [MODE_W-1:0] power_mode = '0, mode_q;
  logic [SUBM_W-1:0] sub_m = 4'd2, m_q;
  logic cmb_ready, r_we, exu_start, csm_we, ref_ready, shift, pad, eval, mvs_clear, busy, stall, done;
  logic [$clog2(N)-1:0] r_row, r_col;
  logic signed [MVW-1:0] eval_u, eval_v;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  vp_ctrl #(.N(N), .P(P)) dut (.*);

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("%s: got %0d exp %0d", what, got, exp);
    end
  endtask

  // csm_delay: clocks from exu_start to csm_valid; gaps: random source gaps
  task automatic run_block(int csm_delay, bit gaps, int mode, output int cycles, output int stalls);
    int nwr, nexu, nref, npad, nshift, neval, ncsmwe, exu_at, eu, ev;
    bit exu_seen;
    nwr = 0; nexu = 0; nref = 0; npad = 0; nshift = 0; neval = 0; ncsmwe = 0;
    cycles = 0; stalls = 0; exu_seen = 0; exu_at = 0;
    eu = -P; ev = -P;
    @(negedge clk);
    start = 1; power_mode = MODE_W'(mode); sub_m = SUBM_W'(2 + mode % 7);
    @(posedge clk); #1;
    check("clear", int'(mvs_clear), 0);  // already taken
    start = 0;
    power_mode = MODE_W'(mode + 1);  // changing it now must not matter
    check("mode latch", int'(mode_q), mode);
    check("m latch", int'(m_q), 2 + mode % 7);
    while (!done && cycles < 100000) begin
      @(negedge clk);
      cycles++;
      cmb_valid = gaps ? $urandom_range(0, 2) != 0 : 1'b1;
      ref_valid = gaps ? $urandom_range(0, 2) != 0 : 1'b1;
      csm_valid = exu_seen && (cycles - exu_at >= csm_delay);
      #1;
      if (r_we) begin
        check("r_row", int'(r_row), nwr / N);
        check("r_col", int'(r_col), nwr % N);
        nwr++;
      end
      if (exu_start) begin
        nexu++; exu_seen = 1; exu_at = cycles;
        check("exu_start after CMB", nwr, N * N);
      end
      if (csm_we) ncsmwe++;
      if (stall) begin
        stalls++;
        check("shift in stall", int'(shift), 0);
      end
      if (eval) begin
        check("eval shifts", nshift, N * H + (int'(eval_v) + P) * H + (int'(eval_u) + P));
        check("eval u", int'(eval_u), eu);
        check("eval v", int'(eval_v), ev);
        neval++;
        if (eu == P - 1) begin eu = -P; ev++; end else eu++;
      end
      if (ref_ready && ref_valid) nref++;
      if (shift && pad) npad++;
      if (shift) nshift++;
      if (shift) check("shift source", int'(pad || (ref_valid && ref_ready)), 1);
      @(posedge clk);
    end
    csm_valid = 0;
    check("cmb writes", nwr, N * N);
    check("exu starts", nexu, 1);
    check("csm loads", ncsmwe, 1);
    check("ref pixels", nref, H * H);
    check("pads", npad, 2 * P - 1);
    check("evals", neval, 4 * P * P);
    @(negedge clk);
    check("idle after done", int'(busy), 0);
  endtask

  initial begin
    int cyc, st;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // mask ready early: no stall, exact timing
    run_block(1, 0, 3, cyc, st);
    check("cycles", cyc, N * N + H * H + 2 * P + 2);
    check("no stall", st, 0);
    // mask late: stall
    run_block(3 * N * N, 0, 5, cyc, st);
    checks++;
    if (st == 0) begin failures++; $display("stall never happened"); end
    check("cycles with stall", cyc, N * N + H * H + 2 * P + 2 + st);
    // source gaps
    run_block(10, 1, 0, cyc, st);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
