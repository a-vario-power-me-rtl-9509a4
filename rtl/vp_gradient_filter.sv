// vp_gradient_filter: 3 x 3 gradient filter of the edge-extraction unit.
//
// After a start pulse the filter visits the N x N current macro-block (CMB)
// in raster order, one pixel per clock, and emits its gradient magnitude G.
// The filter kind is a build-time parameter, one of the three the algorithm
// uses:
//   FILT_HPF   G = |8 c - (sum of the 8 neighbours)|
//   FILT_SOBEL G = |Sx| + |Sy|, Sx = rows below minus rows above weighted
//              1 2 1, Sy = right column minus left column weighted 1 2 1
//   FILT_MORPH G = (3 x 3 maximum) - (3 x 3 minimum), the morphological
//              gradient with a flat 3 x 3 structuring element
// Border pixels: multiplexers replace a neighbour that lies outside the
// block by the nearest pixel inside it (edge replication). The algorithm only
// says that multiplexers avoid the border error; replication is this design's
// choice.
//
// Interface: cmb is the whole block held by the PE array, stable from start
// to done. Timing: G of pixel k (k = i*N + j) appears on g with g_valid one
// clock after it is selected; the first is 2 clocks after start, the last
// (with g_last) N*N + 1 clocks after start.
module vp_gradient_filter
  import vp_pkg::*;
#(
  parameter int unsigned N      = 16,       // macro-block size
  parameter filter_e     FILTER = FILT_HPF  // gradient filter kind
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  start,
  input  pix_t  cmb [N][N],
  output logic  g_valid,
  output logic  g_last,
  output grad_t g
);

  localparam int unsigned IW = $clog2(N) > 0 ? $clog2(N) : 1;

  logic          busy;
  logic [IW-1:0] ci, cj;  // current row and column

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      ci   <= '0;
      cj   <= '0;
    end else if (start) begin
      busy <= 1'b1;
      ci   <= '0;
      cj   <= '0;
    end else if (busy) begin
      if (cj == IW'(N - 1)) begin
        cj <= '0;
        if (ci == IW'(N - 1)) busy <= 1'b0;
        else                  ci   <= ci + 1'b1;
      end else begin
        cj <= cj + 1'b1;
      end
    end
  end

  // 3 x 3 window with border multiplexers.
  pix_t w [3][3];
  always_comb begin
    for (int di = 0; di < 3; di++) begin
      for (int dj = 0; dj < 3; dj++) begin
        int r, c;
        r = int'(ci) + di - 1;
        c = int'(cj) + dj - 1;
        if (r < 0)        r = 0;
        if (r > int'(N) - 1) r = int'(N) - 1;
        if (c < 0)        c = 0;
        if (c > int'(N) - 1) c = int'(N) - 1;
        w[di][dj] = cmb[r][c];
      end
    end
  end

  // Signed filter arithmetic: 13 bits hold -8*255*2 .. 8*255*2.
  localparam int unsigned AW = 13;
  typedef logic signed [AW-1:0] acc_t;

  function automatic acc_t sx(input pix_t p);
    return acc_t'({1'b0, p});
  endfunction

  function automatic grad_t mag(input acc_t x);
    return grad_t'(x < 0 ? -x : x);
  endfunction

  grad_t g_comb;

  if (FILTER == FILT_HPF) begin : g_hpf
    always_comb begin
      acc_t acc;
      acc = sx(w[1][1]) <<< 3;
      for (int di = 0; di < 3; di++)
        for (int dj = 0; dj < 3; dj++)
          if (di != 1 || dj != 1) acc = acc - sx(w[di][dj]);
      g_comb = mag(acc);
    end
  end else if (FILTER == FILT_SOBEL) begin : g_sobel
    acc_t gx, gy;
    assign gx = sx(w[2][0]) + (sx(w[2][1]) <<< 1) + sx(w[2][2])
              - sx(w[0][0]) - (sx(w[0][1]) <<< 1) - sx(w[0][2]);
    assign gy = sx(w[0][2]) + (sx(w[1][2]) <<< 1) + sx(w[2][2])
              - sx(w[0][0]) - (sx(w[1][0]) <<< 1) - sx(w[2][0]);
    assign g_comb = mag(gx) + mag(gy);
  end else begin : g_morph
    always_comb begin
      pix_t mx, mn;
      mx = w[0][0];
      mn = w[0][0];
      for (int di = 0; di < 3; di++)
        for (int dj = 0; dj < 3; dj++) begin
          if (w[di][dj] > mx) mx = w[di][dj];
          if (w[di][dj] < mn) mn = w[di][dj];
        end
      g_comb = grad_t'(mx - mn);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      g_valid <= 1'b0;
      g_last  <= 1'b0;
      g       <= '0;
    end else begin
      g_valid <= busy && !start;
      g_last  <= busy && !start && ci == IW'(N - 1) && cj == IW'(N - 1);
      g       <= g_comb;
    end
  end

endmodule
