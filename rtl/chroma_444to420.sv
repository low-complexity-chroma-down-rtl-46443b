// chroma_444to420: 4:4:4 to 4:2:0 conversion as a separable 2D decimator.
//
// The horizontal stage (chroma_444to422: [1/4 1/2 1/4] filter and Cb/Cr
// interleaving) feeds the vertical stage (chroma_422to420: line buffer and
// [1/2 1/2], [1/4 3/4] or [3/4 1/4] selected by scan type and field). The
// syncs bypass the horizontal stage through a matching delay. With
// method = METHOD_DROP both stages drop samples instead of filtering.
//
// Timing: every output is delayed by LAT_444_TO_420 = 5 clocks; chroma leaves
// on the odd lines, flagged by chr_valid, as one interleaved 4:2:0 line per
// two input lines.
//
// The cascade order (horizontal first, then vertical) follows the document;
// the stage latencies are this design's.
module chroma_444to420
  import chroma_pkg::*;
#(
  parameter int unsigned DATA_W    = 10,
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic              clk,
  input  logic              rst_n,
  input  method_e           method,
  input  logic              interlaced,
  input  logic              vs_in,
  input  logic              hs_in,
  input  logic              din_valid,
  input  logic [DATA_W-1:0] y_in,
  input  logic [DATA_W-1:0] cb_in,
  input  logic [DATA_W-1:0] cr_in,
  output logic              vs_out,
  output logic              hs_out,
  output logic [DATA_W-1:0] y_out,
  output logic [DATA_W-1:0] chr_out,
  output logic              dout_valid,
  output logic              chr_valid
);

  logic [DATA_W-1:0] y_h, chr_h;
  logic              valid_h, vs_h, hs_h;

  chroma_444to422 #(.DATA_W(DATA_W)) u_horiz (
    .clk        (clk),
    .rst_n      (rst_n),
    .method     (method),
    .din_valid  (din_valid),
    .y_in       (y_in),
    .cb_in      (cb_in),
    .cr_in      (cr_in),
    .y_out      (y_h),
    .chr_out    (chr_h),
    .dout_valid (valid_h)
  );

  delay_line #(.WIDTH(2), .DEPTH(LAT_444_TO_422)) u_sync_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({vs_in, hs_in}),
    .q     ({vs_h, hs_h})
  );

  chroma_422to420 #(.DATA_W(DATA_W), .MAX_WIDTH(MAX_WIDTH)) u_vert (
    .clk        (clk),
    .rst_n      (rst_n),
    .method     (method),
    .interlaced (interlaced),
    .vs_in      (vs_h),
    .hs_in      (hs_h),
    .din_valid  (valid_h),
    .y_in       (y_h),
    .chr_in     (chr_h),
    .vs_out     (vs_out),
    .hs_out     (hs_out),
    .y_out      (y_out),
    .chr_out    (chr_out),
    .dout_valid (dout_valid),
    .chr_valid  (chr_valid)
  );

endmodule
