// chroma_422to444: horizontal 1:2 chroma interpolation, 4:2:2 in, 4:4:4 out.
//
// The input chr_in is the interleaved 4:2:2 chroma bus, Cb0, Cr0, Cb1, Cr1,
// ..., one sample per pixel clock while din_valid is high. Two registers
// delay the bus by two samples, so the delayed and the current sample are
// neighbours of the same component. The two-phase polyphase filter then has
// phase 0 = the delayed sample itself (co-sited pixel, no coefficient) and
// phase 1 = the delayed and current samples each shifted right by one bit and
// added (coefficients [1/2 1/2]) in a registered adder. A multiplexer per
// component alternates the two phases. Cr/V arrives one clock after Cb/U, so
// the Cb multiplexer output passes one extra register and both components
// leave in the same clock. With method = METHOD_DROP phase 1 repeats the
// phase-0 sample (replication).
//
// Timing: cb_out/cr_out of pixel 0 appear three clocks after Cb0 entered
// (LAT_422_TO_444), then one pixel per clock. y_out and dout_valid are y_in
// and din_valid delayed by three clocks.
//
// The two delays, the one-bit shifts, the adder, the phase multiplexers and
// the extra Cb register follow the document's circuit diagram and timing
// chart. This design's own choices: at the right edge of a line the missing
// next sample is replaced by the last one (replication), which needs at least
// two blanking cycles between lines; each term is truncated by its shift; the
// replicate option keeps the filter's latency.
module chroma_422to444
  import chroma_pkg::*;
#(
  parameter int unsigned DATA_W = 10
) (
  input  logic              clk,
  input  logic              rst_n,
  input  method_e           method,
  input  logic              din_valid,
  input  logic [DATA_W-1:0] y_in,
  input  logic [DATA_W-1:0] chr_in,
  output logic [DATA_W-1:0] y_out,
  output logic [DATA_W-1:0] cb_out,
  output logic [DATA_W-1:0] cr_out,
  output logic              dout_valid
);

  typedef logic [DATA_W-1:0] pix_t;

  logic valid_q;
  logic line_start;
  logic ph_in, ph_q1, ph_q2;   // sample phase: 0 = Cb/U, 1 = Cr/V
  pix_t d1, d2;                // chroma bus delayed by one and two samples
  pix_t nxt;                   // next sample of the same component
  pix_t interp;                // registered phase-1 value
  pix_t cb_mux, cr_mux;

  assign line_start = din_valid & ~valid_q;
  assign ph_in      = line_start ? 1'b0 : ~ph_q1;
  // Past the end of the line the last sample stands in for the next one.
  assign nxt = din_valid ? chr_in : d2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      ph_q1   <= 1'b1;
      ph_q2   <= 1'b1;
      d1      <= '0;
      d2      <= '0;
      interp  <= '0;
      cb_out  <= '0;
    end else begin
      valid_q <= din_valid;
      ph_q1   <= ph_in;
      ph_q2   <= ph_q1;
      d1      <= chr_in;
      d2      <= d1;
      interp  <= (method == METHOD_DROP) ? d2 : (d2 >> 1) + (nxt >> 1);
      cb_out  <= cb_mux;
    end
  end

  // d2 holds the sample that entered two clocks ago and ph_q2 its phase. If
  // that was a Cb sample, Cb of an even output pixel is d2 and Cr of the
  // preceding odd output pixel is the interpolated value, and vice versa.
  assign cb_mux = (ph_q2 == 1'b0) ? d2 : interp;
  assign cr_mux = (ph_q2 == 1'b1) ? d2 : interp;
  assign cr_out = cr_mux;

  delay_line #(.WIDTH(DATA_W + 1), .DEPTH(LAT_422_TO_444)) u_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({y_in, din_valid}),
    .q     ({y_out, dout_valid})
  );

endmodule
