// line_window: vertical tap window over the last NV lines, for the
// programmable vertical filters.
//
// A chain of NV-1 line buffers holds the previous lines. For each sample
// pushed at column col, all buffers are read at that column; one clock later
// taps[0] is the sample itself and taps[k] the sample k pushed lines above
// it, in the same column. The taps are then written back one buffer further
// down the chain (the read-before-write buffers make this a shift by one
// line per pushed line). When fill is set with a sample, every tap and every
// buffer takes that sample instead, so at the top of a frame the lines above
// the first one repeat it.
//
// Interface: push marks a sample that belongs to a line entering the chain
// (lines that are not pushed leave it untouched); col is its column; fill
// marks the first pushed line of a frame. taps is valid one clock after the
// sample, combinational from the buffer outputs.
//
// The number of vertical taps (at most 8) follows the document; the shifted
// buffer chain and the top-edge replication are this design's own choices.
module line_window #(
  parameter int unsigned DATA_W    = 10,
  parameter int unsigned MAX_WIDTH = 1920,
  parameter int unsigned NV        = 8,
  localparam int unsigned AW = (MAX_WIDTH > 1) ? $clog2(MAX_WIDTH) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              push,
  input  logic              fill,
  input  logic [AW-1:0]     col,
  input  logic [DATA_W-1:0] din,
  output logic [DATA_W-1:0] taps [NV]
);

  logic [DATA_W-1:0] rd [NV-1];
  logic [DATA_W-1:0] din_q;
  logic [AW-1:0]     col_q;
  logic              push_q, fill_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      din_q  <= '0;
      col_q  <= '0;
      push_q <= 1'b0;
      fill_q <= 1'b0;
    end else begin
      din_q  <= din;
      col_q  <= col;
      push_q <= push;
      fill_q <= fill;
    end
  end

  always_comb begin
    taps[0] = din_q;
    for (int k = 1; k < NV; k++) taps[k] = fill_q ? din_q : rd[k-1];
  end

  for (genvar k = 0; k < NV - 1; k++) begin : g_lb
    line_buffer #(.DATA_W(DATA_W), .DEPTH(MAX_WIDTH)) u_lb (
      .clk   (clk),
      .we    (push_q),
      .waddr (col_q),
      .wdata (taps[k]),
      .raddr (col),
      .rdata (rd[k])
    );
  end

endmodule
