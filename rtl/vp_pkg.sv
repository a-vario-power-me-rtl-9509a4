// vp_pkg: types and constants shared by the vario-power motion estimator.
//
// The design follows the content-based subsample motion estimator: an
// edge-extraction unit (EXU) marks the edge pixels of the current macro-block
// (CMB), merges them with a regular 8-to-m subsample pattern into the
// content-based subsample mask (CSM), and the CSM switches processing elements
// of a full-search SAD array on or off.
//
// Fixed-point convention (a choice of this design): the threshold weights m1
// and m2 of the threshold rule are unsigned Q1.8 numbers, 256 meaning 1.0.
package vp_pkg;

  localparam int unsigned PIX_W  = 8;   // luminance sample width
  localparam int unsigned G_W    = 11;  // gradient width: largest |G| is 8*255 = 2040
  localparam int unsigned MQ_W   = 9;   // Q1.8 threshold weight, 0..256
  localparam int unsigned MQ_ONE = 256; // 1.0 in Q1.8
  localparam int unsigned MODE_W = 3;   // eight power modes
  localparam int unsigned SUBM_W = 4;   // m of the 8-to-m subsample rate, 1..8

  typedef logic [PIX_W-1:0] pix_t;
  typedef logic [G_W-1:0]   grad_t;
  typedef logic [MQ_W-1:0]  mq_t;

  // Gradient filter chosen at build time (one of the three of the algorithm).
  typedef enum logic [1:0] {
    FILT_HPF   = 2'd0,  // |8c - sum of 8 neighbours|
    FILT_SOBEL = 2'd1,  // |Sx| + |Sy|
    FILT_MORPH = 2'd2   // 3x3 dilation minus 3x3 erosion (flat element)
  } filter_e;

  // Column partial-sum width for an N-row column.
  function automatic int unsigned col_w(input int unsigned n);
    return $clog2(n * 255 + 1);
  endfunction

  // SSAD width for an N x N block.
  function automatic int unsigned sad_w(input int unsigned n);
    return $clog2(n * n * 255 + 1);
  endfunction

  // Signed motion-vector component width for offsets -p .. p-1.
  function automatic int unsigned mv_w(input int unsigned p);
    return $clog2(p) + 1;
  endfunction

endpackage
