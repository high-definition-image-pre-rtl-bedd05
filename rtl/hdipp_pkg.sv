// Shared constants and types of the high-definition image pre-processing system.
//
// A strip CIS has 704 pixels and a 10-bit ADC; the ICAI keeps 8 bits per pixel
// (its FIFOs and stacks are 704 bytes deep). One ICAI serves four strips, the
// final system has four ICAIs (sixteen strips). Horizontal overlaps of 0..8
// pixels and vertical gaps of 0..64 lines can be calibrated. Pixel counts,
// widths and ranges follow the original design; the field widths that hold them are
// this design's choice (the smallest that fit).
package hdipp_pkg;

  localparam int unsigned CIS_PIXELS   = 704;  // pixel cells per strip die
  localparam int unsigned ADC_BITS     = 10;   // cyclic ADC resolution
  localparam int unsigned PIX_BITS     = 8;    // bits stored per pixel in the ICAI
  localparam int unsigned CIS_PER_ICAI = 4;    // FIFO, stack, FIFO, stack
  localparam int unsigned N_ICAI       = 4;    // final system
  localparam int unsigned N_CIS        = CIS_PER_ICAI * N_ICAI;
  localparam int unsigned OV_BITS      = 4;    // overlap 0..8 pixels
  localparam int unsigned GP_BITS      = 7;    // vertical gap 0..64 lines
  localparam int unsigned IDX_BITS     = $clog2(CIS_PIXELS + 1); // pixel index 0..704
  localparam int unsigned SDRAM_AW     = 26;   // 64 MB byte address

  typedef logic [PIX_BITS-1:0] pixel_t;
  typedef logic [OV_BITS-1:0]  ov_t;
  typedef logic [GP_BITS-1:0]  gp_t;
  typedef logic [IDX_BITS-1:0] pidx_t;

  // One pixel of a combined line as the ICAI hands it to the host.
  typedef struct packed {
    pixel_t                          pix;
    logic [$clog2(CIS_PER_ICAI)-1:0] cis;    // strip within the ICAI, 0 = CIS1
    logic                            first;  // first kept pixel of this strip
    logic                            last;   // last pixel of the combined line
  } icai_beat_t;

  // Pixel index (1-based, as the strip numbers its pixels) of the calibration
  // point C_K of the overlap rule: for an odd strip (K = 1,3,..) the last kept pixel,
  // for an even strip (read out in reverse) the last kept pixel as well,
  // reached from pixel 704 downwards. Pixel 0 does not exist, so C_K >= 1.
  function automatic pidx_t calib_index(input logic odd_strip, input ov_t ov);
    if (odd_strip) return pidx_t'(CIS_PIXELS) - pidx_t'(ov);
    else           return (ov == '0) ? pidx_t'(1) : pidx_t'(ov);
  endfunction

  // Number of pixels a strip contributes to the combined line ("Pixels").
  function automatic pidx_t kept_pixels(input logic odd_strip, input ov_t ov);
    if (odd_strip) return pidx_t'(CIS_PIXELS) - pidx_t'(ov);
    else           return pidx_t'(CIS_PIXELS + 1) - calib_index(1'b0, ov);
  endfunction

endpackage
