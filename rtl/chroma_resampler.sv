// chroma_resampler: run-time configurable chroma resampling core.
//
// One core converts a YCbCr or YUV pixel stream between the 4:4:4, 4:2:2 and
// 4:2:0 chroma formats in any of the six directions, chosen by conv. Each
// direction is its own converter; all six are present and conv routes the
// input stream to one and selects its outputs, so the conversion, the
// filtering method (fixed power-of-two FIR, drop/replicate or programmable
// FIR) and the scan type (progressive or interlaced) can be changed without
// re-synthesis. Change them only while no line is active (vertical blanking).
//
// The programmable method (METHOD_PROG) routes the stream through four
// multiplier-based converters instead: chroma_444to422_prog,
// chroma_422to444_prog, chroma_422to420_prog and chroma_420to422_prog. The
// two 2-D conversions chain a horizontal and a vertical one (444 -> 420:
// horizontal then vertical decimation; 420 -> 444: vertical then horizontal
// interpolation), sharing them with the 1-D conversions. Coefficients live in
// five register banks written through coef_we/coef_bank/coef_addr/coef_data:
//   bank 0  horizontal decimation W0      (24 taps)
//   bank 1  horizontal interpolation W1   (24 taps, odd output pixels)
//   bank 2  vertical decimation           (8 taps)
//   bank 3  vertical interpolation, first output line  (8 taps)
//   bank 4  vertical interpolation, second output line (8 taps)
// Index 0 always weighs the newest sample or line. The tap counts come from
// ntaps_hdec, ntaps_hint, ntaps_vdec and ntaps_vint. Reset loads the
// document's default filters: [1/4 1/2 1/4], [1/2 1/2], [1/2 1/2],
// [1/4 3/4] and [3/4 1/4].
//
// Buses (one pixel per clock while din_valid is high):
//   y_in/y_out    luma, only delayed to stay aligned with the chroma,
//   cb_in, cr_in  Cb/U and Cr/V of a 4:4:4 input (cb_out, cr_out on output),
//   chr_in        interleaved Cb, Cr, Cb, Cr, ... of a 4:2:2 or 4:2:0 input
//                 (chr_out on output); 4:2:0 chroma is on the odd lines,
//   vs_in, hs_in  syncs, delayed to vs_out, hs_out,
//   dout_valid    din_valid delayed; chr_valid marks output pixels whose
//                 chroma bus carries data (every valid pixel, except 4:2:0
//                 output where only the odd lines do).
// YUV uses the same ports as YCbCr, with U on the Cb and V on the Cr side.
// Latency is fixed per conversion (chroma_pkg LAT_*). With METHOD_PROG it is
// LAT_V_PROG for the vertical filters and follows the tap count for the
// horizontal ones (lat_444to422_prog, lat_422to444_prog); a 2-D conversion
// adds its two stages. Lines hold an even number of pixels, at most
// MAX_WIDTH, and are separated by at least two blanking cycles; with
// METHOD_PROG on a conversion with a horizontal step, by at least
// PROG_NTAPS/2 + 1 (decimation) or PROG_NTAPS + 1 (interpolation).
//
// The six conversions, the three filter options, the tap limits and the port
// set follow the document; bringing everything behind one run-time selector
// is this design's choice for the document's "adjustable after programming",
// as is the coefficient register interface.
module chroma_resampler
  import chroma_pkg::*;
#(
  parameter int unsigned DATA_W    = 10,
  parameter int unsigned MAX_WIDTH = 1920
) (
  input  logic              clk,
  input  logic              rst_n,
  input  conv_e             conv,
  input  method_e           method,
  input  logic              interlaced,
  input  logic              coef_we,
  input  logic [2:0]        coef_bank,
  input  logic [$clog2(PROG_NTAPS)-1:0]     coef_addr,
  input  logic signed [PROG_COEF_W-1:0]     coef_data,
  input  logic [$clog2(PROG_NTAPS+1)-1:0]   ntaps_hdec,
  input  logic [$clog2(PROG_NTAPS+1)-1:0]   ntaps_hint,
  input  logic [$clog2(PROG_NTAPS_V+1)-1:0] ntaps_vdec,
  input  logic [$clog2(PROG_NTAPS_V+1)-1:0] ntaps_vint,
  input  logic              vs_in,
  input  logic              hs_in,
  input  logic              din_valid,
  input  logic [DATA_W-1:0] y_in,
  input  logic [DATA_W-1:0] cb_in,
  input  logic [DATA_W-1:0] cr_in,
  input  logic [DATA_W-1:0] chr_in,
  output logic              vs_out,
  output logic              hs_out,
  output logic              dout_valid,
  output logic              chr_valid,
  output logic [DATA_W-1:0] y_out,
  output logic [DATA_W-1:0] cb_out,
  output logic [DATA_W-1:0] cr_out,
  output logic [DATA_W-1:0] chr_out
);

  typedef logic [DATA_W-1:0] pix_t;

  // Per-converter outputs, indexed by conv_e.
  localparam int NCONV = 6;
  logic [NCONV-1:0] en;
  logic [NCONV-1:0] o_vs, o_hs, o_valid, o_cvalid;
  pix_t             o_y   [NCONV];
  pix_t             o_cb  [NCONV];
  pix_t             o_cr  [NCONV];
  pix_t             o_chr [NCONV];

  logic    use_prog;  // METHOD_PROG selected
  method_e m_fixed;   // method seen by the fixed converters

  for (genvar i = 0; i < NCONV; i++) begin : g_en
    assign en[i] = din_valid & (conv == conv_e'(i)) & ~use_prog;
  end

  // Programmable converters and their coefficient banks.
  assign use_prog = (method == METHOD_PROG);
  assign m_fixed  = (method == METHOD_DROP) ? METHOD_DROP : METHOD_FIR;

  typedef logic signed [PROG_COEF_W-1:0] coef_t;
  coef_t coef_hd [PROG_NTAPS];
  coef_t coef_hi [PROG_NTAPS];
  coef_t coef_vd [PROG_NTAPS_V];
  coef_t coef_v0 [PROG_NTAPS_V];
  coef_t coef_v1 [PROG_NTAPS_V];
  localparam coef_t QUARTER    = coef_t'(1 <<< (PROG_COEF_FRAC - 2));
  localparam coef_t HALF       = coef_t'(1 <<< (PROG_COEF_FRAC - 1));
  localparam coef_t THREE_QRTR = coef_t'(3 <<< (PROG_COEF_FRAC - 2));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < PROG_NTAPS; i++) begin
        coef_hd[i] <= '0;
        coef_hi[i] <= '0;
      end
      for (int i = 0; i < PROG_NTAPS_V; i++) begin
        coef_vd[i] <= '0;
        coef_v0[i] <= '0;
        coef_v1[i] <= '0;
      end
      coef_hd[0] <= QUARTER;
      coef_hd[1] <= HALF;
      coef_hd[2] <= QUARTER;
      coef_hi[0] <= HALF;
      coef_hi[1] <= HALF;
      coef_vd[0] <= HALF;
      coef_vd[1] <= HALF;
      coef_v0[0] <= QUARTER;
      coef_v0[1] <= THREE_QRTR;
      coef_v1[0] <= THREE_QRTR;
      coef_v1[1] <= QUARTER;
    end else if (coef_we) begin
      unique case (coef_bank)
        3'd0: if (int'(coef_addr) < PROG_NTAPS) coef_hd[coef_addr] <= coef_data;
        3'd1: if (int'(coef_addr) < PROG_NTAPS) coef_hi[coef_addr] <= coef_data;
        3'd2: if (int'(coef_addr) < PROG_NTAPS_V) coef_vd[coef_addr[2:0]] <= coef_data;
        3'd3: if (int'(coef_addr) < PROG_NTAPS_V) coef_v0[coef_addr[2:0]] <= coef_data;
        3'd4: if (int'(coef_addr) < PROG_NTAPS_V) coef_v1[coef_addr[2:0]] <= coef_data;
        default: ;
      endcase
    end
  end

  // Stream bundle between the programmable converters.
  typedef struct packed {
    logic vs;
    logic hs;
    logic valid;
    pix_t y;
    pix_t chr;
  } strm_t;

  strm_t hd_in, hd_out, vd_in, vd_out, vi_in, vi_out, hi_in;
  pix_t  hi_cb, hi_cr, hi_y;
  logic  hi_vs, hi_hs, hi_valid, vd_cvalid;
  logic  sel_hd, sel_vd, sel_vi, sel_hi;

  assign sel_hd = use_prog & ((conv == CONV_444_TO_422) | (conv == CONV_444_TO_420));
  assign sel_vd = use_prog & (conv == CONV_422_TO_420);
  assign sel_vi = use_prog & ((conv == CONV_420_TO_422) | (conv == CONV_420_TO_444));
  assign sel_hi = use_prog & (conv == CONV_422_TO_444);

  always_comb begin
    hd_in = '{vs: vs_in, hs: hs_in, valid: din_valid & sel_hd, y: y_in, chr: '0};
    vi_in = '{vs: vs_in, hs: hs_in, valid: din_valid & sel_vi, y: y_in, chr: chr_in};
    // 4:4:4 -> 4:2:0 feeds the vertical decimator from the horizontal one.
    if (use_prog && conv == CONV_444_TO_420) vd_in = hd_out;
    else vd_in = '{vs: vs_in, hs: hs_in, valid: din_valid & sel_vd, y: y_in, chr: chr_in};
    // 4:2:0 -> 4:4:4 feeds the horizontal interpolator from the vertical one.
    if (use_prog && conv == CONV_420_TO_444) hi_in = vi_out;
    else hi_in = '{vs: vs_in, hs: hs_in, valid: din_valid & sel_hi, y: y_in, chr: chr_in};
  end

  chroma_444to422_prog #(
    .DATA_W (DATA_W), .NTAPS (PROG_NTAPS), .COEF_W (PROG_COEF_W), .COEF_FRAC (PROG_COEF_FRAC)
  ) u_444_422_prog (
    .clk (clk), .rst_n (rst_n), .coef (coef_hd), .ntaps (ntaps_hdec),
    .vs_in (hd_in.vs), .hs_in (hd_in.hs), .din_valid (hd_in.valid),
    .y_in (hd_in.y), .cb_in (cb_in), .cr_in (cr_in),
    .y_out (hd_out.y), .chr_out (hd_out.chr),
    .vs_out (hd_out.vs), .hs_out (hd_out.hs), .dout_valid (hd_out.valid)
  );

  chroma_422to420_prog #(
    .DATA_W (DATA_W), .MAX_WIDTH (MAX_WIDTH), .NTAPS (PROG_NTAPS_V),
    .COEF_W (PROG_COEF_W), .COEF_FRAC (PROG_COEF_FRAC)
  ) u_422_420_prog (
    .clk (clk), .rst_n (rst_n), .coef (coef_vd), .ntaps (ntaps_vdec),
    .vs_in (vd_in.vs), .hs_in (vd_in.hs), .din_valid (vd_in.valid),
    .y_in (vd_in.y), .chr_in (vd_in.chr),
    .vs_out (vd_out.vs), .hs_out (vd_out.hs), .y_out (vd_out.y),
    .chr_out (vd_out.chr), .dout_valid (vd_out.valid), .chr_valid (vd_cvalid)
  );

  chroma_420to422_prog #(
    .DATA_W (DATA_W), .MAX_WIDTH (MAX_WIDTH), .NTAPS (PROG_NTAPS_V),
    .COEF_W (PROG_COEF_W), .COEF_FRAC (PROG_COEF_FRAC)
  ) u_420_422_prog (
    .clk (clk), .rst_n (rst_n), .coef0 (coef_v0), .coef1 (coef_v1), .ntaps (ntaps_vint),
    .vs_in (vi_in.vs), .hs_in (vi_in.hs), .din_valid (vi_in.valid),
    .y_in (vi_in.y), .chr_in (vi_in.chr),
    .vs_out (vi_out.vs), .hs_out (vi_out.hs), .y_out (vi_out.y),
    .chr_out (vi_out.chr), .dout_valid (vi_out.valid)
  );

  chroma_422to444_prog #(
    .DATA_W (DATA_W), .NTAPS (PROG_NTAPS), .COEF_W (PROG_COEF_W), .COEF_FRAC (PROG_COEF_FRAC)
  ) u_422_444_prog (
    .clk (clk), .rst_n (rst_n), .coef (coef_hi), .ntaps (ntaps_hint),
    .vs_in (hi_in.vs), .hs_in (hi_in.hs), .din_valid (hi_in.valid),
    .y_in (hi_in.y), .chr_in (hi_in.chr),
    .y_out (hi_y), .cb_out (hi_cb), .cr_out (hi_cr),
    .vs_out (hi_vs), .hs_out (hi_hs), .dout_valid (hi_valid)
  );

  // Syncs for the two converters that have no sync ports.
  logic vs_d3, hs_d3;
  delay_line #(.WIDTH(2), .DEPTH(LAT_444_TO_422)) u_sync_dly (
    .clk (clk), .rst_n (rst_n), .d ({vs_in, hs_in}), .q ({vs_d3, hs_d3})
  );

  // 4:4:4 -> 4:2:2
  chroma_444to422 #(.DATA_W(DATA_W)) u_444_422 (
    .clk (clk), .rst_n (rst_n), .method (m_fixed),
    .din_valid (en[CONV_444_TO_422]), .y_in (y_in), .cb_in (cb_in), .cr_in (cr_in),
    .y_out (o_y[CONV_444_TO_422]), .chr_out (o_chr[CONV_444_TO_422]),
    .dout_valid (o_valid[CONV_444_TO_422])
  );
  assign o_vs[CONV_444_TO_422]     = vs_d3;
  assign o_hs[CONV_444_TO_422]     = hs_d3;
  assign o_cvalid[CONV_444_TO_422] = o_valid[CONV_444_TO_422];
  assign o_cb[CONV_444_TO_422]     = '0;
  assign o_cr[CONV_444_TO_422]     = '0;

  // 4:4:4 -> 4:2:0
  chroma_444to420 #(.DATA_W(DATA_W), .MAX_WIDTH(MAX_WIDTH)) u_444_420 (
    .clk (clk), .rst_n (rst_n), .method (m_fixed), .interlaced (interlaced),
    .vs_in (vs_in), .hs_in (hs_in), .din_valid (en[CONV_444_TO_420]),
    .y_in (y_in), .cb_in (cb_in), .cr_in (cr_in),
    .vs_out (o_vs[CONV_444_TO_420]), .hs_out (o_hs[CONV_444_TO_420]),
    .y_out (o_y[CONV_444_TO_420]), .chr_out (o_chr[CONV_444_TO_420]),
    .dout_valid (o_valid[CONV_444_TO_420]), .chr_valid (o_cvalid[CONV_444_TO_420])
  );
  assign o_cb[CONV_444_TO_420] = '0;
  assign o_cr[CONV_444_TO_420] = '0;

  // 4:2:2 -> 4:4:4
  chroma_422to444 #(.DATA_W(DATA_W)) u_422_444 (
    .clk (clk), .rst_n (rst_n), .method (m_fixed),
    .din_valid (en[CONV_422_TO_444]), .y_in (y_in), .chr_in (chr_in),
    .y_out (o_y[CONV_422_TO_444]), .cb_out (o_cb[CONV_422_TO_444]),
    .cr_out (o_cr[CONV_422_TO_444]), .dout_valid (o_valid[CONV_422_TO_444])
  );
  assign o_vs[CONV_422_TO_444]     = vs_d3;
  assign o_hs[CONV_422_TO_444]     = hs_d3;
  assign o_cvalid[CONV_422_TO_444] = o_valid[CONV_422_TO_444];
  assign o_chr[CONV_422_TO_444]    = '0;

  // 4:2:2 -> 4:2:0
  chroma_422to420 #(.DATA_W(DATA_W), .MAX_WIDTH(MAX_WIDTH)) u_422_420 (
    .clk (clk), .rst_n (rst_n), .method (m_fixed), .interlaced (interlaced),
    .vs_in (vs_in), .hs_in (hs_in), .din_valid (en[CONV_422_TO_420]),
    .y_in (y_in), .chr_in (chr_in),
    .vs_out (o_vs[CONV_422_TO_420]), .hs_out (o_hs[CONV_422_TO_420]),
    .y_out (o_y[CONV_422_TO_420]), .chr_out (o_chr[CONV_422_TO_420]),
    .dout_valid (o_valid[CONV_422_TO_420]), .chr_valid (o_cvalid[CONV_422_TO_420])
  );
  assign o_cb[CONV_422_TO_420] = '0;
  assign o_cr[CONV_422_TO_420] = '0;

  // 4:2:0 -> 4:4:4
  chroma_420to444 #(.DATA_W(DATA_W), .MAX_WIDTH(MAX_WIDTH)) u_420_444 (
    .clk (clk), .rst_n (rst_n), .method (m_fixed), .interlaced (interlaced),
    .vs_in (vs_in), .hs_in (hs_in), .din_valid (en[CONV_420_TO_444]),
    .y_in (y_in), .chr_in (chr_in),
    .vs_out (o_vs[CONV_420_TO_444]), .hs_out (o_hs[CONV_420_TO_444]),
    .y_out (o_y[CONV_420_TO_444]), .cb_out (o_cb[CONV_420_TO_444]),
    .cr_out (o_cr[CONV_420_TO_444]), .dout_valid (o_valid[CONV_420_TO_444])
  );
  assign o_cvalid[CONV_420_TO_444] = o_valid[CONV_420_TO_444];
  assign o_chr[CONV_420_TO_444]    = '0;

  // 4:2:0 -> 4:2:2
  chroma_420to422 #(.DATA_W(DATA_W), .MAX_WIDTH(MAX_WIDTH)) u_420_422 (
    .clk (clk), .rst_n (rst_n), .method (m_fixed), .interlaced (interlaced),
    .vs_in (vs_in), .hs_in (hs_in), .din_valid (en[CONV_420_TO_422]),
    .y_in (y_in), .chr_in (chr_in),
    .vs_out (o_vs[CONV_420_TO_422]), .hs_out (o_hs[CONV_420_TO_422]),
    .y_out (o_y[CONV_420_TO_422]), .chr_out (o_chr[CONV_420_TO_422]),
    .dout_valid (o_valid[CONV_420_TO_422])
  );
  assign o_cvalid[CONV_420_TO_422] = o_valid[CONV_420_TO_422];
  assign o_cb[CONV_420_TO_422]     = '0;
  assign o_cr[CONV_420_TO_422]     = '0;

  // Output selection.
  logic [2:0] k;
  always_comb begin
    k = (int'(conv) < NCONV) ? conv : 3'd0;
    vs_out     = o_vs[k];
    hs_out     = o_hs[k];
    dout_valid = o_valid[k];
    chr_valid  = o_cvalid[k];
    y_out      = o_y[k];
    cb_out     = o_cb[k];
    cr_out     = o_cr[k];
    chr_out    = o_chr[k];
    if (use_prog) begin
      cb_out = '0;
      cr_out = '0;
      unique case (k)
        3'(CONV_444_TO_422): begin
          {vs_out, hs_out, dout_valid, y_out, chr_out} = hd_out;
          chr_valid = hd_out.valid;
        end
        3'(CONV_444_TO_420), 3'(CONV_422_TO_420): begin
          {vs_out, hs_out, dout_valid, y_out, chr_out} = vd_out;
          chr_valid = vd_cvalid;
        end
        3'(CONV_420_TO_422): begin
          {vs_out, hs_out, dout_valid, y_out, chr_out} = vi_out;
          chr_valid = vi_out.valid;
        end
        default: begin   // 4:2:2 or 4:2:0 -> 4:4:4
          {vs_out, hs_out, dout_valid, y_out} = {hi_vs, hi_hs, hi_valid, hi_y};
          chr_out   = '0;
          chr_valid = hi_valid;
          cb_out    = hi_cb;
          cr_out    = hi_cr;
        end
      endcase
    end
  end

endmodule
