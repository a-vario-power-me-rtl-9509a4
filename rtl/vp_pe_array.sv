// vp_pe_array: N x N array of processing elements.
//
// PE (i,j) holds CMB pixel R(i,j) and the CSM bit of that pixel. The
// search-area pixels move upward through each column, one row per shift:
// PE (i,j) takes the pixel of PE (i+1,j), and the bottom row takes s_bot_in[j]
// (from the shift register array below the column). The partial sums run
// down each column, PE (0,j) starting from zero, so col_sum[j] is the sum of
// CSM(i,j)*|S - R(i,j)| over the column. The column chain is combinational
// within a clock (semi-systolic); the adder tree and its register follow
// outside the array.
//
// Interface: the CMB is written one pixel at a time at (r_row, r_col) with
// r_we; all N*N CSM bits are written together with csm_we; s_shift moves the
// search-area data by one row. r_out exposes the stored CMB to the
// edge-extraction unit, s_top_out[j] is the pixel leaving the top of column j.
module vp_pe_array
  import vp_pkg::*;
#(
  parameter int unsigned N = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   r_we,
  input  logic [$clog2(N)-1:0]   r_row,
  input  logic [$clog2(N)-1:0]   r_col,
  input  pix_t                   r_in,
  output pix_t                   r_out [N][N],
  input  logic                   s_shift,
  input  pix_t                   s_bot_in [N],
  output pix_t                   s_top_out [N],
  input  logic                   csm_we,
  input  logic                   csm [N][N],
  output logic [col_w(N)-1:0]    col_sum [N],
  output logic [$clog2(N*N+1)-1:0] active_count
);

  localparam int unsigned PSW = col_w(N);

  logic act [N][N];

  for (genvar j = 0; j < N; j++) begin : g_col
    for (genvar i = 0; i < N; i++) begin : g_row
      pix_t           s_feed, s_q;
      logic [PSW-1:0] ps_in, ps_out;
      if (i == N - 1) begin : g_bot
        assign s_feed = s_bot_in[j];
      end else begin : g_mid
        assign s_feed = g_col[j].g_row[i+1].s_q;
      end
      if (i == 0) begin : g_first
        assign ps_in = '0;
      end else begin : g_next
        assign ps_in = g_col[j].g_row[i-1].ps_out;
      end
      vp_pe #(.PSW(PSW)) u_pe (
        .clk, .rst_n,
        .r_we    (r_we && r_row == i && r_col == j),
        .r_in,
        .r_out   (r_out[i][j]),
        .s_shift,
        .s_in    (s_feed),
        .s_out   (s_q),
        .csm_we,
        .csm_in  (csm[i][j]),
        .active  (act[i][j]),
        .psum_in (ps_in),
        .psum_out(ps_out)
      );
    end
    assign s_top_out[j] = g_col[j].g_row[0].s_q;
    assign col_sum[j]   = g_col[j].g_row[N-1].ps_out;
  end

  always_comb begin
    active_count = '0;
    for (int i = 0; i < N; i++)
      for (int j = 0; j < N; j++)
        active_count += act[i][j];
  end

endmodule
