// chroma_420to444: 4:2:0 to 4:4:4 conversion as a separable 2D interpolator.
//
// The vertical stage (chroma_420to422: two interpolated lines per chroma line
// from prev/cur shift/add branches chosen by scan type and field) feeds the
// horizontal stage (chroma_422to444: two-phase [1/2 1/2] interpolation and
// Cb/Cr de-interleaving). The syncs bypass the horizontal stage through a
// matching delay. With method = METHOD_DROP both stages replicate samples.
//
// Input: 4:2:0 chroma on the odd lines of each frame, luma on every line.
// Timing: every output is delayed by LAT_420_TO_444 = 5 clocks.
//
// The cascade order (vertical first, then horizontal) follows the document;
// the stage latencies are this design's.
module chroma_420to444
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
  input  logic [DATA_W-1:0] chr_in,
  output logic              vs_out,
  output logic              hs_out,
  output logic [DATA_W-1:0] y_out,
  output logic [DATA_W-1:0] cb_out,
  output logic [DATA_W-1:0] cr_out,
  output logic              dout_valid
);

  logic [DATA_W-1:0] y_v, chr_v;
  logic              valid_v, vs_v, hs_v;

  chroma_420to422 #(.DATA_W(DATA_W), .MAX_WIDTH(MAX_WIDTH)) u_vert (
    .clk        (clk),
    .rst_n      (rst_n),
    .method     (method),
    .interlaced (interlaced),
    .vs_in      (vs_in),
    .hs_in      (hs_in),
    .din_valid  (din_valid),
    .y_in       (y_in),
    .chr_in     (chr_in),
    .vs_out     (vs_v),
    .hs_out     (hs_v),
    .y_out      (y_v),
    .chr_out    (chr_v),
    .dout_valid (valid_v)
  );

  chroma_422to444 #(.DATA_W(DATA_W)) u_horiz (
    .clk        (clk),
    .rst_n      (rst_n),
    .method     (method),
    .din_valid  (valid_v),
    .y_in       (y_v),
    .chr_in     (chr_v),
    .y_out      (y_out),
    .cb_out     (cb_out),
    .cr_out     (cr_out),
    .dout_valid (dout_valid)
  );

  delay_line #(.WIDTH(2), .DEPTH(LAT_422_TO_444)) u_sync_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({vs_v, hs_v}),
    .q     ({vs_out, hs_out})
  );

endmodule
