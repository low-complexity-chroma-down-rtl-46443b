// chroma_420to422_prog: vertical 1:2 chroma interpolation with a programmable
// two-phase FIR filter, 4:2:0 in, 4:2:2 out.
//
// The multiplier-based alternative to chroma_420to422. 4:2:0 chroma arrives
// on the odd input lines; each such chroma line enters a line_window, which
// presents the current chroma sample and those of the NV-1 chroma lines
// above it in the same column. Two fir_macs apply the phase-0 coefficients
// W0 and the phase-1 coefficients W1 to that window, P_out = sum Wp(i) *
// C(k - i) with Wp(0) on the newest chroma line k. The phase-0 result goes
// out at once, on the odd line; the phase-1 result is written to a line
// buffer and sent on the following even line. Line 0 of a frame comes
// before any chroma and carries mid-scale chroma (no colour), as in the fixed
// converter; chroma lines above the first one repeat it.
//
// Timing: 4 clocks of latency (window read 1, MAC 3) for the chroma, the luma,
// the syncs and dout_valid; chr_valid equals dout_valid. Change coef or
// ntaps only in vertical blanking.
//
// From the document: the two-phase structure, the filter equation with
// Wp(0) on the newest line, the default [0.25 0.75] / [0.75 0.25] phase
// pair, run-time coefficients and at most 8 vertical taps. This design's own:
// the coefficient format, the top-edge replication, one coefficient set for
// both fields, the mid-scale line 0 and the latency.
module chroma_420to422_prog
  import chroma_pkg::*;
#(
  parameter int unsigned DATA_W    = 10,
  parameter int unsigned MAX_WIDTH = 1920,
  parameter int unsigned NTAPS     = 8,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14,
  localparam int unsigned AW = (MAX_WIDTH > 1) ? $clog2(MAX_WIDTH) : 1
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [COEF_W-1:0]   coef0 [NTAPS],
  input  logic signed [COEF_W-1:0]   coef1 [NTAPS],
  input  logic [$clog2(NTAPS+1)-1:0] ntaps,
  input  logic                       vs_in,
  input  logic                       hs_in,
  input  logic                       din_valid,
  input  logic [DATA_W-1:0]          y_in,
  input  logic [DATA_W-1:0]          chr_in,
  output logic                       vs_out,
  output logic                       hs_out,
  output logic [DATA_W-1:0]          y_out,
  output logic [DATA_W-1:0]          chr_out,
  output logic                       dout_valid
);

  typedef logic [DATA_W-1:0] pix_t;
  localparam int unsigned NT_W = $clog2(NTAPS + 1);
  localparam int unsigned LAT  = 4;
  localparam pix_t        GREY = pix_t'(1) << (DATA_W - 1);

  logic [AW-1:0] col, col_d;
  logic          line_odd, pair_seen;
  pix_t          taps [NTAPS];
  pix_t          res0, res1, second_rd, second_d;
  logic [NT_W-1:0] nt_eff;
  logic          odd_d, top_d, valid_d;

  line_tracker #(.MAX_WIDTH(MAX_WIDTH)) u_track (
    .clk        (clk),
    .rst_n      (rst_n),
    .vs_in      (vs_in),
    .din_valid  (din_valid),
    .line_start (),
    .col        (col),
    .pix_odd    (),
    .line_odd   (line_odd),
    .pair_seen  (pair_seen),
    .field_odd  ()
  );

  line_window #(.DATA_W(DATA_W), .MAX_WIDTH(MAX_WIDTH), .NV(NTAPS)) u_win (
    .clk   (clk),
    .rst_n (rst_n),
    .push  (din_valid & line_odd),
    .fill  (line_odd & ~pair_seen),   // first chroma line of the frame
    .col   (col),
    .din   (chr_in),
    .taps  (taps)
  );

  always_comb begin
    if (ntaps == '0)              nt_eff = NT_W'(1);
    else if (int'(ntaps) > NTAPS) nt_eff = NT_W'(NTAPS);
    else                          nt_eff = ntaps;
  end

  fir_mac #(.DATA_W(DATA_W), .NTAPS(NTAPS), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC))
  u_mac0 (.clk (clk), .rst_n (rst_n), .taps (taps), .coef (coef0),
          .ntaps (nt_eff), .result (res0));

  fir_mac #(.DATA_W(DATA_W), .NTAPS(NTAPS), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC))
  u_mac1 (.clk (clk), .rst_n (rst_n), .taps (taps), .coef (coef1),
          .ntaps (nt_eff), .result (res1));

  // Sideband and column, delayed to the MAC outputs.
  delay_line #(.WIDTH(DATA_W + AW + 5), .DEPTH(LAT)) u_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({y_in, col, vs_in, hs_in, din_valid, line_odd, ~line_odd & ~pair_seen}),
    .q     ({y_out, col_d, vs_out, hs_out, valid_d, odd_d, top_d})
  );

  // Second (phase-1) line: written on the odd line, read on the even line.
  // The read, one clock, is then delayed to the common latency.
  line_buffer #(.DATA_W(DATA_W), .DEPTH(MAX_WIDTH)) u_second (
    .clk   (clk),
    .we    (valid_d & odd_d),
    .waddr (col_d),
    .wdata (res1),
    .raddr (col),
    .rdata (second_rd)
  );

  delay_line #(.WIDTH(DATA_W), .DEPTH(LAT - 1)) u_second_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     (second_rd),
    .q     (second_d)
  );

  assign dout_valid = valid_d;
  always_comb begin
    if (odd_d)      chr_out = res0;
    else if (top_d) chr_out = GREY;
    else            chr_out = second_d;
  end

endmodule
