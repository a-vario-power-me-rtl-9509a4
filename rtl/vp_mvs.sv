// vp_mvs: motion-vector selector.
//
// Compare-and-select over the stream of SSADs of one macro-block: the first
// candidate after clear is taken, and a later one replaces the kept one only
// when its SSAD is strictly smaller, so on a tie the earlier candidate in
// scan order wins (the scan order of the array is u fastest, then v).
//
// Interface: clear starts a new block; in_valid qualifies in_ssad and the
// candidate offset (in_u, in_v). best_* are registered and show the
// selection including the candidate taken on the previous clock.
module vp_mvs
  import vp_pkg::*;
#(
  parameter int unsigned SW  = 16,  // SSAD width
  parameter int unsigned MVW = 7    // signed motion-vector component width
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  in_valid,
  input  logic [SW-1:0]         in_ssad,
  input  logic signed [MVW-1:0] in_u,
  input  logic signed [MVW-1:0] in_v,
  output logic                  best_valid,
  output logic [SW-1:0]         best_ssad,
  output logic signed [MVW-1:0] best_u,
  output logic signed [MVW-1:0] best_v
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      best_valid <= 1'b0;
      best_ssad  <= '0;
      best_u     <= '0;
      best_v     <= '0;
    end else if (clear) begin
      best_valid <= 1'b0;
    end else if (in_valid && (!best_valid || in_ssad < best_ssad)) begin
      best_valid <= 1'b1;
      best_ssad  <= in_ssad;
      best_u     <= in_u;
      best_v     <= in_v;
    end
  end

endmodule
