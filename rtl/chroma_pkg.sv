// chroma_pkg: types and constants shared by the chroma resampling converters.
//
// method_e picks how a converter changes the chroma sampling rate: the fixed
// power-of-two FIR filter (shifts and adds only), the cheapest option that
// drops samples on the way down and replicates them on the way up, or the
// programmable multiplier-based FIR filter. conv_e
// names the six conversions between 4:4:4, 4:2:2 and 4:2:0 that the top-level
// core can perform. Both are run-time settings that are meant to be changed
// only between frames (during vertical blanking).
//
// The latency constants are this design's own pipeline depths in pixel
// clocks; luma, syncs and the valid flag are delayed by the same amount so
// they stay aligned with the chroma.
package chroma_pkg;

  typedef enum logic [1:0] {
    METHOD_FIR  = 2'd0,   // fixed-coefficient shift/add filter
    METHOD_DROP = 2'd1,   // drop (decimation) or replicate (interpolation)
    METHOD_PROG = 2'd2    // programmable coefficients and tap count
  } method_e;

  typedef enum logic [2:0] {
    CONV_444_TO_422 = 3'd0,
    CONV_444_TO_420 = 3'd1,
    CONV_422_TO_444 = 3'd2,
    CONV_422_TO_420 = 3'd3,
    CONV_420_TO_444 = 3'd4,
    CONV_420_TO_422 = 3'd5
  } conv_e;

  // Pipeline latencies in pixel clocks.
  localparam int unsigned LAT_444_TO_422 = 3;
  localparam int unsigned LAT_422_TO_444 = 3;
  localparam int unsigned LAT_422_TO_420 = 2;
  localparam int unsigned LAT_420_TO_422 = 2;
  localparam int unsigned LAT_444_TO_420 = LAT_444_TO_422 + LAT_422_TO_420;
  localparam int unsigned LAT_420_TO_444 = LAT_420_TO_422 + LAT_422_TO_444;

  // Programmable filters: at most 24 horizontal and 8 vertical taps, signed coefficients
  // with 14 fraction bits (1.0 = 16384). Their latency depends on the
  // run-time tap count.
  localparam int unsigned PROG_NTAPS     = 24;
  localparam int unsigned PROG_NTAPS_V   = 8;
  localparam int unsigned LAT_V_PROG     = 4;   // both vertical directions
  localparam int unsigned PROG_COEF_W    = 16;
  localparam int unsigned PROG_COEF_FRAC = 14;

  function automatic int unsigned lat_444to422_prog(int unsigned ntaps);
    return (ntaps - 1) / 2 + 5;
  endfunction

  function automatic int unsigned lat_422to444_prog(int unsigned ntaps);
    return 2 * (ntaps / 2) + 6;
  endfunction

endpackage
