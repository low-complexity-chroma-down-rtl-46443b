// line_buffer: storage for one video line of chroma samples.
//
// Simple dual-port memory of DEPTH words of DATA_W bits: one write port and
// one read port, both addressed by the column counter. The read is
// synchronous, so rdata holds the word addressed in the previous cycle, which
// lets synthesis map the array onto block RAM. When the same address is read
// and written in one cycle, rdata returns the old word (read before write);
// the vertical interpolator relies on this to replace the stored line while
// reading it. The contents are not reset. DEPTH defaults to 1920, the line
// width the design was sized for; the converters count lines from up to 7680
// columns if DEPTH is raised.
module line_buffer #(
  parameter int unsigned DATA_W = 10,
  parameter int unsigned DEPTH  = 1920,
  localparam int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic              clk,
  input  logic              we,
  input  logic [AW-1:0]     waddr,
  input  logic [DATA_W-1:0] wdata,
  input  logic [AW-1:0]     raddr,
  output logic [DATA_W-1:0] rdata
);

  logic [DATA_W-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
    rdata <= mem[raddr];
  end

endmodule
