// chroma_444to422: horizontal 2:1 chroma decimation, 4:4:4 in, 4:2:2 out.
//
// Cb/U and Cr/V arrive on separate buses, one pixel per clock while din_valid
// is high. Each component passes a three-sample window (delays of 2, 1 and 0
// pixels) whose taps are shifted right by 2, 1 and 2 bits and summed, which is
// the FIR [1/4 1/2 1/4] without multipliers. The sum is registered (pipelined
// adder). Only every second filtered value is kept, centred on the even
// pixels, and Cb and Cr are interleaved onto chr_out: the Cr path has one
// extra register so that a pixel-phase state machine can alternate
// Cb0, Cr0, Cb1, Cr1, ... on one full-rate bus. With method = METHOD_DROP the
// centre tap is passed unfiltered (samples of odd pixels are dropped).
//
// Timing: chr_out carries Cb of pixel 0 three clocks after pixel 0 entered
// (LAT_444_TO_422). y_out and dout_valid are y_in and din_valid delayed by the
// same three clocks. The drop option keeps the same latency.
//
// The filter structure, the shifts and the Cb-first output order with the
// extra Cr register follow the document's circuit diagram and timing chart.
// This design's own choices: the line's left edge is mirrored (the missing
// sample left of pixel 0 is taken to be pixel 1), lines have an even number
// of pixels and are separated by blanking, each term is truncated by its
// shift, and the drop option keeps the filter's latency instead of a shorter
// one.
module chroma_444to422
  import chroma_pkg::*;
#(
  parameter int unsigned DATA_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  method_e           method,
  input  logic              din_valid,
  input  logic [DATA_W-1:0] y_in,
  input  logic [DATA_W-1:0] cb_in,
  input  logic [DATA_W-1:0] cr_in,
  output logic [DATA_W-1:0] y_out,
  output logic [DATA_W-1:0] chr_out,
  output logic              dout_valid
);

  typedef logic [DATA_W-1:0] pix_t;

  logic valid_q;
  logic line_start;
  logic first_q;       // sample in the d1 tap is the first of its line
  logic ph_q1, ph_q2;  // pixel phase of the samples one and two clocks ago
  logic ph_in;
  pix_t cb_d1, cb_d2, cr_d1, cr_d2;
  pix_t sum_cb, sum_cr, cr_dly;

  assign line_start = din_valid & ~valid_q;
  // Pixel phase: 0 for even pixels. Restarts at every line.
  assign ph_in = line_start ? 1'b0 : ~ph_q1;

  function automatic pix_t fir3(pix_t left, pix_t centre, pix_t right,
                                method_e m);
    if (m == METHOD_DROP) return centre;
    return (left >> 2) + (centre >> 1) + (right >> 2);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      first_q <= 1'b0;
      ph_q1   <= 1'b1;
      ph_q2   <= 1'b1;
      cb_d1   <= '0;
      cb_d2   <= '0;
      cr_d1   <= '0;
      cr_d2   <= '0;
      sum_cb  <= '0;
      sum_cr  <= '0;
      cr_dly  <= '0;
      chr_out <= '0;
    end else begin
      valid_q <= din_valid;
      first_q <= line_start;
      ph_q1   <= ph_in;
      ph_q2   <= ph_q1;
      cb_d1   <= cb_in;
      cb_d2   <= cb_d1;
      cr_d1   <= cr_in;
      cr_d2   <= cr_d1;
      // Window centred on the d1 tap; mirror the left edge of the line.
      sum_cb  <= fir3(first_q ? cb_in : cb_d2, cb_d1, cb_in, method);
      sum_cr  <= fir3(first_q ? cr_in : cr_d2, cr_d1, cr_in, method);
      cr_dly  <= sum_cr;
      // sum_cb now holds the value centred on the pixel that entered two
      // clocks ago; take it when that pixel was even, else the delayed Cr.
      chr_out <= (ph_q2 == 1'b0) ? sum_cb : cr_dly;
    end
  end

  delay_line #(.WIDTH(DATA_W + 1), .DEPTH(LAT_444_TO_422)) u_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({y_in, din_valid}),
    .q     ({y_out, dout_valid})
  );

endmodule
