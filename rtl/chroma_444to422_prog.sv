// chroma_444to422_prog: horizontal 2:1 chroma decimation with a programmable
// FIR filter, 4:4:4 in, 4:2:2 out.
//
// This is the multiplier-based alternative to chroma_444to422. Cb and Cr each
// run through a window of the NTAPS most recent samples (index 0 is the
// newest) and a fir_mac that forms P_out = sum W0(i) * P_in(n - i) for
// i < ntaps, with the coefficients and the tap count set at run time. The
// filtered value is taken to belong to the pixel h = (ntaps - 1) / 2 places
// behind the newest sample, the window centre (exact for odd ntaps, half a
// pixel late for even ntaps). Only values centred on even pixels are kept;
// Cr is held one clock so Cb and Cr interleave on chr_out as Cb0, Cr0,
// Cb1, Cr1, ..., as in the fixed converter.
//
// Line edges: at the first pixel of a line the whole window is loaded with
// that pixel, and after the last pixel the window keeps shifting in copies of
// it, so samples beyond either edge repeat the edge sample. For that to work
// lines must be separated by at least NTAPS/2 + 1 blanking cycles.
//
// Timing: chr_out carries Cb of pixel 0 h + 5 clocks after pixel 0 entered
// (lat_444to422_prog in chroma_pkg). y_out, the syncs and dout_valid are delayed by
// the same amount, chosen from a tapped delay line, so the latency follows
// ntaps. Change coef or ntaps only in vertical blanking.
//
// From the document: the filter equation, W0(0) on the newest sample, the
// run-time coefficients and tap count with at most 24 horizontal taps, and
// the Cb-first interleaving. This design's own: the window centre rule, the
// edge replication, the coefficient format (see fir_mac) and the latency.
module chroma_444to422_prog
  import chroma_pkg::*;
#(
  parameter int unsigned DATA_W    = 10,
  parameter int unsigned NTAPS     = 24,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic signed [COEF_W-1:0]   coef [NTAPS],
  input  logic [$clog2(NTAPS+1)-1:0] ntaps,
  input  logic                       vs_in,
  input  logic                       hs_in,
  input  logic                       din_valid,
  input  logic [DATA_W-1:0]          y_in,
  input  logic [DATA_W-1:0]          cb_in,
  input  logic [DATA_W-1:0]          cr_in,
  output logic [DATA_W-1:0]          y_out,
  output logic [DATA_W-1:0]          chr_out,
  output logic                       vs_out,
  output logic                       hs_out,
  output logic                       dout_valid
);

  typedef logic [DATA_W-1:0] pix_t;
  typedef struct packed {
    logic vs;
    logic hs;
    logic valid;
    logic odd;     // pixel has an odd column
    pix_t y;
  } side_t;

  localparam int unsigned NT_W = $clog2(NTAPS + 1);
  localparam int unsigned MAC_LAT = 3;

  pix_t  cb_w [NTAPS];
  pix_t  cr_w [NTAPS];
  side_t sb   [NTAPS];
  side_t sb_p [MAC_LAT];
  pix_t  cb_res, cr_res, cr_hold;
  logic  valid_q, odd_q;
  logic  line_start, odd_in;
  logic [NT_W-1:0] nt_eff;
  logic [NT_W-1:0] h;

  assign line_start = din_valid & ~valid_q;
  assign odd_in     = line_start ? 1'b0 : ~odd_q;

  always_comb begin
    if (ntaps == '0)                 nt_eff = NT_W'(1);
    else if (int'(ntaps) > NTAPS)    nt_eff = NT_W'(NTAPS);
    else                             nt_eff = ntaps;
    h = (nt_eff - NT_W'(1)) >> 1;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q <= 1'b0;
      odd_q   <= 1'b1;
      for (int i = 0; i < NTAPS; i++) begin
        cb_w[i] <= '0;
        cr_w[i] <= '0;
        sb[i]   <= '0;
      end
    end else begin
      valid_q <= din_valid;
      if (din_valid) odd_q <= odd_in;
      // Sideband always shifts; blanking entries are marked not valid.
      sb[0] <= '{vs: vs_in, hs: hs_in, valid: din_valid, odd: din_valid & odd_in, y: y_in};
      for (int i = 1; i < NTAPS; i++) sb[i] <= sb[i-1];
      // Sample window: fill with the first pixel at a line start, repeat the
      // newest sample while no pixel arrives.
      for (int i = 1; i < NTAPS; i++) begin
        cb_w[i] <= line_start ? cb_in : cb_w[i-1];
        cr_w[i] <= line_start ? cr_in : cr_w[i-1];
      end
      cb_w[0] <= din_valid ? cb_in : cb_w[0];
      cr_w[0] <= din_valid ? cr_in : cr_w[0];
    end
  end

  fir_mac #(.DATA_W(DATA_W), .NTAPS(NTAPS), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC))
  u_mac_cb (.clk (clk), .rst_n (rst_n), .taps (cb_w), .coef (coef),
            .ntaps (nt_eff), .result (cb_res));

  fir_mac #(.DATA_W(DATA_W), .NTAPS(NTAPS), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC))
  u_mac_cr (.clk (clk), .rst_n (rst_n), .taps (cr_w), .coef (coef),
            .ntaps (nt_eff), .result (cr_res));

  // Sideband of the window centre, delayed to line up with the MAC results.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAC_LAT; i++) sb_p[i] <= '0;
      cr_hold    <= '0;
      chr_out    <= '0;
      y_out      <= '0;
      vs_out     <= 1'b0;
      hs_out     <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      sb_p[0] <= sb[h];
      for (int i = 1; i < MAC_LAT; i++) sb_p[i] <= sb_p[i-1];
      // Even pixel: emit its Cb and keep its Cr for the odd pixel after it.
      if (!sb_p[MAC_LAT-1].odd) begin
        chr_out <= cb_res;
        cr_hold <= cr_res;
      end else begin
        chr_out <= cr_hold;
      end
      y_out      <= sb_p[MAC_LAT-1].y;
      vs_out     <= sb_p[MAC_LAT-1].vs;
      hs_out     <= sb_p[MAC_LAT-1].hs;
      dout_valid <= sb_p[MAC_LAT-1].valid;
    end
  end

endmodule
