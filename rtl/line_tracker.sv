// line_tracker: pixel counter and line/field state machine of the converters.
//
// It follows the active-video flag din_valid and the vertical sync vs_in and
// derives, for the sample presented in the current cycle:
//   line_start  - first sample of a line (din_valid rises),
//   col         - column index of the sample, 0 at line start,
//   pix_odd     - odd column: a Cr/V sample on a 4:2:2 bus, Cb/U if even,
//   line_odd    - parity of the line within the frame (line 0 is even),
//   pair_seen   - at least one odd line has ended since vs_in (so a complete
//                 even/odd line pair has been seen in this frame),
//   field_odd   - field flag for interlaced video.
// A line ends when din_valid falls; lines are therefore separated by at least
// one blanking cycle. While vs_in is high the line parity and pair_seen are
// cleared. field_odd toggles on each rising edge of vs_in and is 0 after
// reset, so the first frame after reset is treated as the odd field.
//
// The pixel counter started by din_valid follows the document's state-machine
// description; deriving lines from din_valid edges, fields from vs_in edges
// and the reset values are this design's own choices.
module line_tracker #(
  parameter int unsigned MAX_WIDTH = 1920,
  localparam int unsigned AW = (MAX_WIDTH > 1) ? $clog2(MAX_WIDTH) : 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          vs_in,
  input  logic          din_valid,
  output logic          line_start,
  output logic [AW-1:0] col,
  output logic          pix_odd,
  output logic          line_odd,
  output logic          pair_seen,
  output logic          field_odd
);

  logic          valid_q;
  logic          vs_q;
  logic [AW-1:0] col_q;
  logic          line_end;

  assign line_start = din_valid & ~valid_q;
  assign line_end   = valid_q & ~din_valid;
  assign col        = line_start ? '0 : col_q + AW'(1);
  assign pix_odd    = col[0];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      valid_q   <= 1'b0;
      vs_q      <= 1'b0;
      col_q     <= '0;
      line_odd  <= 1'b0;
      pair_seen <= 1'b0;
      field_odd <= 1'b0;
    end else begin
      valid_q <= din_valid;
      vs_q    <= vs_in;
      if (din_valid) col_q <= col;
      if (vs_in & ~vs_q) field_odd <= ~field_odd;
      if (vs_in) begin
        line_odd  <= 1'b0;
        pair_seen <= 1'b0;
      end else if (line_end) begin
        line_odd <= ~line_odd;
        if (line_odd) pair_seen <= 1'b1;
      end
    end
  end

endmodule
