// vp_ctrl: phase controller of the vario-power motion estimator.
//
// One macro-block is processed in five phases:
//   1. initial CMB phase   - N*N current-block pixels are written into the PEs
//   2. filtering phase     - the EXU runs the gradient filter over the block
//   3. edge determination  - the EXU forms threshold, edge mask and CSM
//   4. initial RMB phase   - N*(N+2p-1) search-area pixels fill the PE array
//                            and the shift register array
//   5. SSAD phase          - one candidate offset is evaluated per shift
// Phases 2-3 run in parallel with phase 4: the controller starts the EXU and
// the search-area stream together as soon as the block is loaded.
//
// Search-area order: the (N+2p-1) x (N+2p-1) area is sent column by column,
// top to bottom. After N*(N+2p-1) pixels PE (i,j) holds area pixel (i, j);
// each further shift moves the window down by one row, and after N+2p-1
// shifts it has moved right by one column. Of the N+2p-1 row positions of a
// column, the first 2p are complete windows (offset u = row - p, v = column
// - p); the other N-1 are skipped. After the last real pixel the controller
// shifts in 2p-1 zero pixels by itself to bring the last windows in.
//
// Stall: if a complete window is reached before the CSM is ready (only
// possible when N*(N+2p-1) < 2*N*N + 4, i.e. small search ranges), the
// search-area stream is held (stall = 1) until the mask is loaded. Mode:
// power_mode and sub_m are sampled at start, so the host may change them at
// any time and the change takes effect at the next block.
//
// Handshakes: cmb_valid/cmb_ready and ref_valid/ref_ready move one pixel when
// both are 1. Timing with no source stalls: done is a one-clock pulse
// N*N + (N+2p-1)^2 + 2p + 2 clocks after the start clock, plus stall clocks.
module vp_ctrl
  import vp_pkg::*;
#(
  parameter int unsigned N = 16,
  parameter int unsigned P = 32
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    start,
  input  logic [MODE_W-1:0]       power_mode,
  input  logic [SUBM_W-1:0]       sub_m,
  output logic [MODE_W-1:0]       mode_q,
  output logic [SUBM_W-1:0]       m_q,
  // CMB stream
  input  logic                    cmb_valid,
  output logic                    cmb_ready,
  output logic                    r_we,
  output logic [$clog2(N)-1:0]    r_row,
  output logic [$clog2(N)-1:0]    r_col,
  // EXU
  output logic                    exu_start,
  input  logic                    csm_valid,
  output logic                    csm_we,
  // search-area stream and array
  input  logic                    ref_valid,
  output logic                    ref_ready,
  output logic                    shift,
  output logic                    pad,
  output logic                    eval,
  output logic signed [mv_w(P)-1:0] eval_u,
  output logic signed [mv_w(P)-1:0] eval_v,
  output logic                    mvs_clear,
  // status
  output logic                    busy,
  output logic                    stall,
  output logic                    done
);

  localparam int unsigned H    = N + 2 * P - 1;   // search-area height = width
  localparam int unsigned FILL = N * H;           // initial RMB phase length
  localparam int unsigned AREA = H * H;           // real search-area pixels
  localparam int unsigned IW   = $clog2(N);
  localparam int unsigned CW   = $clog2(AREA + 1);
  localparam int unsigned HW   = $clog2(H + 1);
  localparam int unsigned MVW  = mv_w(P);

  typedef enum logic [2:0] {S_IDLE, S_LOAD_CMB, S_RUN, S_FLUSH, S_FIN} state_e;
  state_e state;

  logic [IW-1:0] li, lj;         // CMB load position
  logic [CW-1:0] fill_cnt;       // shifts during the initial RMB phase
  logic [CW-1:0] fed_cnt;        // real search-area pixels taken
  logic          filled;
  logic [HW-1:0] r0, c0;         // window position (row, column) in the area
  logic          csm_loaded;
  logic          evaluated;

  logic win_valid, last_win, can_shift, cmb_take, cmb_last;

  assign win_valid = state == S_RUN && filled && r0 < HW'(2 * P);
  assign last_win  = win_valid && c0 == HW'(2 * P - 1) && r0 == HW'(2 * P - 1);
  assign stall     = win_valid && !csm_loaded;
  assign pad       = fed_cnt == CW'(AREA);
  assign can_shift = state == S_RUN && !stall && !last_win;
  assign ref_ready = can_shift && !pad;
  assign shift     = can_shift && (pad || ref_valid);
  assign eval      = win_valid && csm_loaded && !evaluated;
  assign eval_u    = MVW'(signed'({1'b0, r0}) - signed'(P));
  assign eval_v    = MVW'(signed'({1'b0, c0}) - signed'(P));

  assign cmb_ready = state == S_LOAD_CMB;
  assign cmb_take  = cmb_ready && cmb_valid;
  assign cmb_last  = li == IW'(N - 1) && lj == IW'(N - 1);
  assign r_we      = cmb_take;
  assign r_row     = li;
  assign r_col     = lj;
  assign exu_start = cmb_take && cmb_last;
  assign csm_we    = state == S_RUN && csm_valid && !csm_loaded;
  assign mvs_clear = start && (state == S_IDLE);
  assign busy      = state != S_IDLE;
  assign done      = state == S_FIN;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      mode_q     <= '0;
      m_q        <= SUBM_W'(2);
      li         <= '0;
      lj         <= '0;
      fill_cnt   <= '0;
      fed_cnt    <= '0;
      filled     <= 1'b0;
      r0         <= '0;
      c0         <= '0;
      csm_loaded <= 1'b0;
      evaluated  <= 1'b0;
    end else begin
      unique case (state)
        S_IDLE: if (start) begin
          state  <= S_LOAD_CMB;
          mode_q <= power_mode;
          m_q    <= sub_m;
          li     <= '0;
          lj     <= '0;
        end
        S_LOAD_CMB: if (cmb_take) begin
          if (cmb_last) begin
            state      <= S_RUN;
            fill_cnt   <= '0;
            fed_cnt    <= '0;
            filled     <= 1'b0;
            r0         <= '0;
            c0         <= '0;
            csm_loaded <= 1'b0;
            evaluated  <= 1'b0;
          end else if (lj == IW'(N - 1)) begin
            lj <= '0;
            li <= li + 1'b1;
          end else begin
            lj <= lj + 1'b1;
          end
        end
        S_RUN: begin
          if (csm_we) csm_loaded <= 1'b1;
          if (shift) evaluated <= 1'b0;
          else if (eval) evaluated <= 1'b1;
          if (shift && !pad) fed_cnt <= fed_cnt + 1'b1;
          if (shift) begin
            if (!filled) begin
              fill_cnt <= fill_cnt + 1'b1;
              if (fill_cnt == CW'(FILL - 1)) filled <= 1'b1;
            end else if (r0 == HW'(H - 1)) begin
              r0 <= '0;
              c0 <= c0 + 1'b1;
            end else begin
              r0 <= r0 + 1'b1;
            end
          end
          if (last_win && eval) state <= S_FLUSH;
        end
        S_FLUSH: state <= S_FIN;
        default: state <= S_IDLE;  // S_FIN: done for one clock
      endcase
    end
  end

  // A window is evaluated exactly once and only with its mask in place.
  a_eval_needs_csm: assert property (@(posedge clk) disable iff (!rst_n)
                                     eval |-> csm_loaded);
  a_no_shift_on_stall: assert property (@(posedge clk) disable iff (!rst_n)
                                        stall |-> !shift);

endmodule
