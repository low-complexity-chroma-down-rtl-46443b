// chroma_420to422: vertical 1:2 chroma interpolation, 4:2:0 in, 4:2:2 out.
//
// The 4:2:0 chroma (interleaved Cb, Cr, ... on chr_in) is carried on the odd
// lines of the frame (1, 3, ...); luma, syncs and din_valid run on every line.
// Each incoming chroma line "cur" is combined with the previous chroma line
// "prev", read from line buffer A at the same column while cur overwrites it.
// Six shift/add branches form two interpolated lines with weights
// [prev cur]:
//                      first line        second line
//   progressive        [3/4 1/4]         [1/4 3/4]
//   interlaced, odd    [3/8 5/8]         [7/8 1/8]
//   interlaced, even   [1/8 7/8]         [5/8 3/8]
// and multiplexers driven by the scan type and field pick one pair. The first
// line leaves at once, on the odd line that brought cur; the second is written
// to line buffer B and read out on the next (even) line. With
// method = METHOD_DROP both lines are copies of cur (replication).
//
// Frame top: for the first chroma line of a frame prev is taken equal to cur,
// and line 0, which comes before any chroma of the frame, carries mid-scale
// chroma (2^(DATA_W-1), no colour). Outputs are delayed by LAT_420_TO_422 = 2
// clocks: one for the synchronous buffer read, one for the registered adders.
//
// The line buffer, the shift combinations of every branch and the
// type/field selection follow the document's circuit diagram and text. This
// design's own choices: chroma on odd lines, a second buffer that holds the
// second interpolated line, no line delay of luma (so the interpolated
// chroma trails the luma by one chroma line instead of being centred), the
// mid-scale line 0, and truncation of each term by its shift.
module chroma_420to422
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
  output logic              dout_valid
);

  typedef logic [DATA_W-1:0] pix_t;
  localparam pix_t GREY = pix_t'(1) << (DATA_W - 1);

  logic [AW-1:0] col;
  logic          line_odd, pair_seen, field_odd;

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
    .field_odd  (field_odd)
  );

  // Stage-1 registers.
  pix_t          cur;
  logic          v1, odd1, seen1, ilace1, fodd1;
  logic [AW-1:0] col1;

  // Line buffer A: previous chroma line, replaced while it is read.
  pix_t prev_rd;
  line_buffer #(.DATA_W(DATA_W), .DEPTH(MAX_WIDTH)) u_lb_prev (
    .clk   (clk),
    .we    (din_valid & line_odd),
    .waddr (col),
    .wdata (chr_in),
    .raddr (col),
    .rdata (prev_rd)
  );

  // Line buffer B: second interpolated line, written on odd lines and read
  // on the even line that follows.
  pix_t first_ln, second_ln, second_rd;
  line_buffer #(.DATA_W(DATA_W), .DEPTH(MAX_WIDTH)) u_lb_second (
    .clk   (clk),
    .we    (v1 & odd1),
    .waddr (col1),
    .wdata (second_ln),
    .raddr (col),
    .rdata (second_rd)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cur    <= '0;
      v1     <= 1'b0;
      odd1   <= 1'b0;
      seen1  <= 1'b0;
      ilace1 <= 1'b0;
      fodd1  <= 1'b0;
      col1   <= '0;
    end else begin
      cur    <= chr_in;
      v1     <= din_valid;
      odd1   <= line_odd;
      seen1  <= pair_seen;
      ilace1 <= interlaced;
      fodd1  <= field_odd;
      col1   <= col;
    end
  end

  // Six shift/add branches on prev (p) and cur (c).
  pix_t p;
  assign p = seen1 ? prev_rd : cur;   // top of frame: replicate

  pix_t prog_1st, prog_2nd, odd_1st, odd_2nd, even_1st, even_2nd;
  assign prog_1st = (p >> 1) + (p >> 2) + (cur >> 2);                       // 3/4 1/4
  assign prog_2nd = (p >> 2) + (cur >> 1) + (cur >> 2);                     // 1/4 3/4
  assign odd_1st  = (p >> 2) + (p >> 3) + (cur >> 1) + (cur >> 3);          // 3/8 5/8
  assign odd_2nd  = (p >> 1) + (p >> 2) + (p >> 3) + (cur >> 3);            // 7/8 1/8
  assign even_1st = (p >> 3) + (cur >> 1) + (cur >> 2) + (cur >> 3);        // 1/8 7/8
  assign even_2nd = (p >> 1) + (p >> 3) + (cur >> 2) + (cur >> 3);          // 5/8 3/8

  always_comb begin
    if (method == METHOD_DROP) begin
      first_ln  = cur;
      second_ln = cur;
    end else if (!ilace1) begin
      first_ln  = prog_1st;
      second_ln = prog_2nd;
    end else if (fodd1) begin
      first_ln  = odd_1st;
      second_ln = odd_2nd;
    end else begin
      first_ln  = even_1st;
      second_ln = even_2nd;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      chr_out <= '0;
    end else if (!v1) begin
      chr_out <= '0;
    end else if (odd1) begin
      chr_out <= first_ln;
    end else begin
      chr_out <= seen1 ? second_rd : GREY;
    end
  end

  delay_line #(.WIDTH(DATA_W + 3), .DEPTH(LAT_420_TO_422)) u_dly (
    .clk   (clk),
    .rst_n (rst_n),
    .d     ({y_in, vs_in, hs_in, din_valid}),
    .q     ({y_out, vs_out, hs_out, dout_valid})
  );

endmodule
