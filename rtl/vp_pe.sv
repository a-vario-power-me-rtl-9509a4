// vp_pe: processing element of the vario-power SAD array.
//
// Each PE holds one pixel R of the current macro-block (stationary), one
// search-area pixel S that moves through the array's shift chain, and one
// bit of the content-based subsample mask (CSM). The absolute-difference
// unit computes |S - R| and the adder adds it to the partial sum arriving
// from the PE above, passing the result to the PE below in the same column.
//
// Blocking registers: the AD unit does not read the moving S register
// directly but a blocking register copy of it, which is loaded only while the
// CSM bit is 1. A PE whose CSM bit is 0 therefore keeps its AD inputs still
// (no switching) and simply forwards the incoming partial sum. This follows
// the structure of the algorithm's PE; loading the copy when a 0-to-1 CSM
// change happens is this design's detail that keeps the copy equal to S.
//
// Interface: r_we/r_in load R (r_out shows it); s_shift moves s_in into S (s_out is S, fed to
// the next position of the chain); csm_we/csm_in load the mask bit. Timing:
// psum_out is combinational from psum_in and the PE's registers.
module vp_pe
  import vp_pkg::*;
#(
  parameter int unsigned PSW = 12  // partial-sum width
) (
  input  logic           clk,
  input  logic           rst_n,
  input  logic           r_we,
  input  pix_t           r_in,
  output pix_t           r_out,
  input  logic           s_shift,
  input  pix_t           s_in,
  output pix_t           s_out,
  input  logic           csm_we,
  input  logic           csm_in,
  output logic           active,
  input  logic [PSW-1:0] psum_in,
  output logic [PSW-1:0] psum_out
);

  pix_t r_q, s_q, s_breg, r_breg;
  logic csm_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_q    <= '0;
      s_q    <= '0;
      csm_q  <= 1'b0;
      s_breg <= '0;
      r_breg <= '0;
    end else begin
      if (r_we)    r_q <= r_in;
      if (s_shift) s_q <= s_in;
      if (csm_we)  csm_q <= csm_in;
      // Blocking registers: follow S and R only while the PE is active.
      if (csm_we && csm_in) begin
        s_breg <= s_shift ? s_in : s_q;
        r_breg <= r_we ? r_in : r_q;
      end else if (csm_q && !csm_we) begin
        if (s_shift) s_breg <= s_in;
        if (r_we)    r_breg <= r_in;
      end
    end
  end

  pix_t ad;
  assign ad       = (s_breg > r_breg) ? s_breg - r_breg : r_breg - s_breg;
  assign psum_out = csm_q ? psum_in + PSW'(ad) : psum_in;
  assign s_out    = s_q;
  assign r_out    = r_q;
  assign active   = csm_q;

endmodule
