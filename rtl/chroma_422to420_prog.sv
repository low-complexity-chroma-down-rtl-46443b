// chroma_422to420_prog: vertical 2:1 chroma decimation with a programmable
// FIR filter, 4:2:2 in, 4:2:0 out.
//
// The multiplier-based alternative to chroma_422to420. Every input line of
// the interleaved chroma bus enters a line_window, which presents the current
// sample and the samples of the NV-1 lines above it in the same column. A
// fir_mac forms P_out = sum W(i) * P_in(line - i) for i < ntaps, with W(0) on
// the current line, exactly the document's causal filter equation. Samples in
// the same column are always the same component, so one MAC serves Cb and Cr.
// The result is sent on the odd lines, where 4:2:0 chroma rides, with
// chr_valid set; on even lines chr_out is zero and chr_valid low. Lines above
// the first line of a frame repeat it. The same coefficients serve
// progressive and interlaced video.
//
// Timing: 4 clocks of latency (window read 1, MAC 3) for the chroma, the luma,
// the syncs and dout_valid. Change coef or ntaps only in vertical blanking.
//
// From the document: the filter equation, W(0) on the newest line, the
// run-time coefficients and tap count with at most 8 vertical taps. This
// design's own: the coefficient format (see fir_mac), the top-edge
// replication, using one coefficient set for both fields, and the latency.
module chroma_422to420_prog
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
  input  logic signed [COEF_W-1:0]   coef [NTAPS],
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
  output logic                       dout_valid,
  output logic                       chr_valid
);

  localparam int unsigned NT_W = $clog2(NTAPS + 1);
  localparam int unsigned LAT  = 4;

  logic [AW-1:0]     col;
  logic              line_odd, pair_seen;
  logic [DATA_W-1:0] taps [NTAPS];
  logic [DATA_W-1:0] mac_res;
  logic [NT_W-1:0]   nt_eff;
  logic              cv_d;

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
    .push  (din_valid),
    .fill  (~line_odd & ~pair_seen),   // line 0 of the frame
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
  u_mac (.clk (clk), .rst_n (rst_n), .taps (taps), .coef (coef),
         .ntaps (nt_eff), .result (mac_res));

  delay_line #(.WIDTH(DATA_W + 4), .DEPTH(LAT)) u_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({y_in, vs_in, hs_in, din_valid, din_valid & line_odd}),
    .q     ({y_out, vs_out, hs_out, dout_valid, cv_d})
  );

  assign chr_valid = cv_d;
  assign chr_out   = cv_d ? mac_res : '0;

endmodule
