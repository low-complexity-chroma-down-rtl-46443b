// chroma_422to444_prog: horizontal 1:2 chroma interpolation with a
// programmable two-phase FIR filter, 4:2:2 in, 4:4:4 out.
//
// This is the multiplier-based alternative to chroma_422to444. The
// interleaved chroma bus (Cb0, Cr0, Cb1, Cr1, ...) runs through a delay line
// of 2*NTAPS stages; every second stage holds a sample of the same component,
// so one window of NTAPS same-component samples (index 0 the newest) feeds a
// single fir_mac that serves Cb and Cr on alternate clocks. Phase 0 output
// pixels (even columns, co-sited with the input) copy the input sample, as in
// the document. Phase 1 pixels (odd columns, half way between chroma samples
// j and j+1) get P_out = sum W1(i) * P_in(j + h - i) for i < ntaps, where
// h = ntaps / 2 puts the window centre between j and j+1 (for ntaps = 4,
// W1 = [a b c d] weighs samples j+2, j+1, j, j-1).
//
// Line edges: at the first pixel pair the whole delay line is loaded with the
// first Cb and then, on the Cr positions, with the first Cr; after the line
// the delay line keeps repeating the last sample of each component, so
// samples beyond either edge repeat the edge sample. Lines must therefore be
// separated by at least NTAPS + 1 blanking cycles.
//
// Timing: cb_out/cr_out of pixel 0 leave 2*h + 6 clocks after pixel 0
// entered (lat_422to444_prog in chroma_pkg); y_out, the syncs and dout_valid are
// delayed alike from a tapped delay line, so the latency follows ntaps. Change coef
// or ntaps only in vertical blanking.
//
// From the document: the two-phase structure with a copied phase 0, the
// filter equation with W1(0) on the newest sample, the coefficient placement
// of its four-tap example and the limit of 24 horizontal taps. This design's
// own: the window centre rule for other tap counts, the edge replication,
// sharing one MAC between Cb and Cr, the coefficient format and the latency.
module chroma_422to444_prog
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
  input  logic [DATA_W-1:0]          chr_in,
  output logic [DATA_W-1:0]          y_out,
  output logic [DATA_W-1:0]          cb_out,
  output logic [DATA_W-1:0]          cr_out,
  output logic                       vs_out,
  output logic                       hs_out,
  output logic                       dout_valid
);

  typedef logic [DATA_W-1:0] pix_t;
  typedef struct packed {
    logic vs;
    logic hs;
    logic valid;
    logic odd;     // odd column: the bus carries Cr
    pix_t y;
  } side_t;

  localparam int unsigned NT_W    = $clog2(NTAPS + 1);
  localparam int unsigned NSTAGE  = 2 * NTAPS;
  localparam int unsigned MAC_LAT = 3;

  pix_t  bus [NSTAGE];
  side_t sb  [NSTAGE];
  pix_t  win [NTAPS];
  side_t sb_p  [MAC_LAT];
  pix_t  cen_p [MAC_LAT];
  side_t sb_q;
  pix_t  mac_res;
  pix_t  cb_copy, cb_int, cr_int;
  logic  valid_q, odd_q, second_q;
  logic  line_start, odd_in;
  logic [NT_W-1:0] nt_eff;
  logic [NT_W-1:0] h;

  assign line_start = din_valid & ~valid_q;
  assign odd_in     = line_start ? 1'b0 : ~odd_q;

  always_comb begin
    if (ntaps == '0)                 nt_eff = NT_W'(1);
    else if (int'(ntaps) > NTAPS)    nt_eff = NT_W'(NTAPS);
    else                             nt_eff = ntaps;
    h = nt_eff >> 1;
    for (int i = 0; i < NTAPS; i++) win[i] = bus[2*i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q  <= 1'b0;
      odd_q    <= 1'b1;
      second_q <= 1'b0;
      for (int i = 0; i < NSTAGE; i++) begin
        bus[i] <= '0;
        sb[i]  <= '0;
      end
    end else begin
      valid_q  <= din_valid;
      second_q <= line_start;
      if (din_valid) odd_q <= odd_in;
      sb[0] <= '{vs: vs_in, hs: hs_in, valid: din_valid, odd: din_valid & odd_in, y: y_in};
      for (int i = 1; i < NSTAGE; i++) sb[i] <= sb[i-1];
      // Chroma delay line: on the first Cb fill everything with it, on the
      // first Cr refill the Cr positions, and in blanking repeat the sample
      // two stages back (the last one of the same component).
      bus[0] <= din_valid ? chr_in : bus[1];
      for (int i = 1; i < NSTAGE; i++) begin
        if (line_start || (second_q && (i % 2 == 0)))
          bus[i] <= chr_in;
        else
          bus[i] <= bus[i-1];
      end
    end
  end

  fir_mac #(.DATA_W(DATA_W), .NTAPS(NTAPS), .COEF_W(COEF_W), .COEF_FRAC(COEF_FRAC))
  u_mac (.clk (clk), .rst_n (rst_n), .taps (win), .coef (coef),
         .ntaps (nt_eff), .result (mac_res));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < MAC_LAT; i++) begin
        sb_p[i]  <= '0;
        cen_p[i] <= '0;
      end
      sb_q       <= '0;
      cb_copy    <= '0;
      cb_int     <= '0;
      cr_int     <= '0;
      cb_out     <= '0;
      cr_out     <= '0;
      y_out      <= '0;
      vs_out     <= 1'b0;
      hs_out     <= 1'b0;
      dout_valid <= 1'b0;
    end else begin
      // Window centre (sample j) and its sideband, aligned with the MAC.
      sb_p[0]  <= sb[2*h];
      cen_p[0] <= bus[2*h];
      for (int i = 1; i < MAC_LAT; i++) begin
        sb_p[i]  <= sb_p[i-1];
        cen_p[i] <= cen_p[i-1];
      end
      sb_q <= sb_p[MAC_LAT-1];
      if (!sb_p[MAC_LAT-1].odd) begin
        // Cb_j: keep the copy and the interpolated value; the bus before
        // it carried Cr of the previous pair, now emitted as the odd pixel.
        cb_copy <= cen_p[MAC_LAT-1];
        cb_int  <= mac_res;
        cb_out  <= cb_int;
        cr_out  <= cr_int;
      end else begin
        // Cr_j: emit the even pixel, keep the interpolated Cr.
        cb_out <= cb_copy;
        cr_out <= cen_p[MAC_LAT-1];
        cr_int <= mac_res;
      end
      y_out      <= sb_q.y;
      vs_out     <= sb_q.vs;
      hs_out     <= sb_q.hs;
      dout_valid <= sb_q.valid;
    end
  end

endmodule
