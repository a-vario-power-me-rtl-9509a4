// vp_csm_gen: content-based subsample mask (CSM) generator of the EXU.
//
// It takes the gradient values G of one macro-block as the gradient filter
// streams them, stores them, and keeps their running maximum and minimum.
// After the last one it forms the edge threshold
//     threshold = floor((m1 * max(G) + m2 * min(G)) / 256)
// with m1, m2 in Q1.8 (the algorithm's rule m1*max + m2*min; the fixed-point
// format is this design's choice). It then revisits the stored gradients one
// per clock: a pixel is an edge pixel when G >= threshold, and its CSM bit is
// the OR of the edge bit and the regular 8-to-m subsample mask bit.
//
// Interface: start clears the unit for a new block; g_valid/g/g_last come from
// the gradient filter; m, m1, m2 must be stable from start to csm_valid.
// csm and csm_count (number of ones, which sets the content-based subsample
// rate N*N-to-csm_count) hold from csm_valid until the next start.
// Timing: csm_valid rises N*N + 1 clocks after the clock edge that takes
// g_last.
module vp_csm_gen
  import vp_pkg::*;
#(
  parameter int unsigned N = 16  // macro-block size
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic              g_valid,
  input  logic              g_last,
  input  grad_t             g,
  input  logic [SUBM_W-1:0] m,
  input  mq_t               m1,
  input  mq_t               m2,
  output logic              csm [N][N],
  output logic [$clog2(N*N+1)-1:0] csm_count,
  output grad_t             threshold,
  output logic              csm_valid
);

  localparam int unsigned NN = N * N;
  localparam int unsigned KW = $clog2(NN) > 0 ? $clog2(NN) : 1;
  localparam int unsigned TW = G_W + MQ_W + 1;

  typedef enum logic [1:0] {S_COLLECT, S_THRESH, S_COMPARE, S_DONE} state_e;
  state_e state;

  grad_t         gbuf [NN];
  localparam int unsigned IW = $clog2(N) > 0 ? $clog2(N) : 1;
  localparam grad_t GMAX = {G_W{1'b1}};

  logic [KW-1:0] k;       // write pointer, then compare pointer
  logic [IW-1:0] ki, kj;  // row and column of the compare pointer
  logic          seen;    // at least one gradient collected
  grad_t         gmax, gmin;

  logic sm [N][N];
  vp_subsample_mask #(.N(N)) u_sm (.m(m), .sm(sm));

  logic [TW-1:0] thr_full;
  assign thr_full = (TW'(m1) * TW'(gmax) + TW'(m2) * TW'(gmin)) >> 8;

  // CSM bit of the pixel at the compare pointer: edge OR regular pattern.
  logic csm_bit;
  assign csm_bit = (gbuf[k] >= threshold) || sm[ki][kj];

  always_ff @(posedge clk) begin
    if (state == S_COLLECT && g_valid && !start) gbuf[k] <= g;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= S_DONE;
      k         <= '0;
      ki        <= '0;
      kj        <= '0;
      seen      <= 1'b0;
      gmax      <= '0;
      gmin      <= '0;
      threshold <= '0;
      csm_count <= '0;
      csm_valid <= 1'b0;
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++) csm[i][j] <= 1'b0;
    end else if (start) begin
      state     <= S_COLLECT;
      k         <= '0;
      seen      <= 1'b0;
      csm_count <= '0;
      csm_valid <= 1'b0;
    end else begin
      unique case (state)
        S_COLLECT: if (g_valid) begin
          k    <= k + 1'b1;
          seen <= 1'b1;
          if (!seen || g > gmax) gmax <= g;
          if (!seen || g < gmin) gmin <= g;
          if (g_last) state <= S_THRESH;
        end
        S_THRESH: begin
          threshold <= thr_full > TW'(GMAX) ? GMAX : grad_t'(thr_full);
          k         <= '0;
          ki        <= '0;
          kj        <= '0;
          state     <= S_COMPARE;
        end
        S_COMPARE: begin
          csm[ki][kj] <= csm_bit;
          if (kj == IW'(N - 1)) begin
            kj <= '0;
            ki <= ki + 1'b1;
          end else begin
            kj <= kj + 1'b1;
          end
          csm_count <= csm_count + csm_bit;
          if (k == KW'(NN - 1)) begin
            state     <= S_DONE;
            csm_valid <= 1'b1;
          end else begin
            k <= k + 1'b1;
          end
        end
        default: ;
      endcase
    end
  end

endmodule
