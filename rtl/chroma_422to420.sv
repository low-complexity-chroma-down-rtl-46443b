// chroma_422to420: vertical 2:1 chroma decimation, 4:2:2 in, 4:2:0 out.
//
// Chroma lines arrive on the interleaved bus chr_in (Cb, Cr, Cb, Cr, ...).
// Each even line (0, 2, ...) of the frame is written into a line buffer; while
// the following odd line arrives, the buffer is read at the same column, so
// the even-line and odd-line samples of one column meet. Three shift/add
// branches then compute
//   branch 0: e/2 + o/2             weights [1/2 1/2]  (progressive)
//   branch 1: e/4 + o/2 + o/4       weights [1/4 3/4]  (interlaced, odd field)
//   branch 2: e/2 + e/4 + o/4       weights [3/4 1/4]  (interlaced, even field)
// (e = even line, o = odd line) and a multiplexer driven by the line/field
// state machine picks one according to the scan type and field. With
// method = METHOD_DROP the odd line is passed unchanged and the even line is
// discarded; the line buffer is then unused.
//
// Output: one 4:2:0 chroma line per two input lines, on chr_out during the odd
// input lines, flagged by chr_valid. Luma, syncs and dout_valid continue for
// every line. All outputs are delayed by LAT_422_TO_420 = 2 clocks (one for
// the synchronous line-buffer read, one for the registered adders); the
// chroma itself is one line behind the first line it depends on.
//
// The line buffer, the three branches with their shifts, and the selection
// rule (progressive -> branch 0, odd field -> branch 1, even field -> branch
// 2) follow the document's circuit diagram and text. This design's own
// choices: the 4:2:0 chroma rides on the odd lines, lines and fields are
// counted from din_valid and vs_in edges (see line_tracker), each term is
// truncated by its shift, and the drop option keeps the odd line.
module chroma_422to420
  import chroma_pkg::*;
#(
  parameter int unsigned DATA_W    = 10,
  parameter int unsigned MAX_WIDTH = 1920,
  localparam int unsigned AW = (MAX_WIDTH > 1) ? $clog2(MAX_WIDTH) : 1
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
  output logic [DATA_W-1:0] chr_out,
  output logic              dout_valid,
  output logic              chr_valid
);

  typedef logic [DATA_W-1:0] pix_t;
  typedef enum logic [1:0] {BR_AVG = 2'd0, BR_ODD = 2'd1, BR_EVEN = 2'd2} branch_e;

  logic [AW-1:0] col;
  logic          line_odd, field_odd;

  line_tracker #(.MAX_WIDTH(MAX_WIDTH)) u_track (
    .clk        (clk),
    .rst_n      (rst_n),
    .vs_in      (vs_in),
    .din_valid  (din_valid),
    .line_start (),
    .col        (col),
    .pix_odd    (),
    .line_odd   (line_odd),
    .pair_seen  (),
    .field_odd  (field_odd)
  );

  // Even lines go into the buffer, odd lines read it back.
  pix_t even_px;
  line_buffer #(.DATA_W(DATA_W), .DEPTH(MAX_WIDTH)) u_lb (
    .clk   (clk),
    .we    (din_valid & ~line_odd & (method == METHOD_FIR)),
    .waddr (col),
    .wdata (chr_in),
    .raddr (col),
    .rdata (even_px)
  );

  // Stage 1: odd-line sample aligned with the buffer read.
  pix_t    odd_px;
  logic    chr_v1;
  branch_e sel;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      odd_px <= '0;
      chr_v1 <= 1'b0;
      sel    <= BR_AVG;
    end else begin
      odd_px <= chr_in;
      chr_v1 <= din_valid & line_odd;
      if (!interlaced)    sel <= BR_AVG;
      else if (field_odd) sel <= BR_ODD;
      else                sel <= BR_EVEN;
    end
  end

  // Stage 2: the three shift/add branches, multiplexer, output register.
  pix_t br_avg, br_odd, br_even, br_sel;
  assign br_avg  = (even_px >> 1) + (odd_px >> 1);
  assign br_odd  = (even_px >> 2) + (odd_px >> 1) + (odd_px >> 2);
  assign br_even = (even_px >> 1) + (even_px >> 2) + (odd_px >> 2);

  always_comb begin
    unique case (sel)
      BR_ODD:  br_sel = br_odd;
      BR_EVEN: br_sel = br_even;
      default: br_sel = br_avg;
    endcase
    if (method == METHOD_DROP) br_sel = odd_px;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chr_out   <= '0;
      chr_valid <= 1'b0;
    end else begin
      chr_out   <= chr_v1 ? br_sel : '0;
      chr_valid <= chr_v1;
    end
  end

  delay_line #(.WIDTH(DATA_W + 3), .DEPTH(LAT_422_TO_420)) u_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({y_in, vs_in, hs_in, din_valid}),
    .q     ({y_out, vs_out, hs_out, dout_valid})
  );

endmodule
