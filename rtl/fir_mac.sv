// fir_mac: pipelined multiply-accumulate of one programmable FIR window.
//
// Computes sum(taps[i] * coef[i]) for i < ntaps, the convolution of the
// document's programmable filter, with coef[0] applied to taps[0]. The
// callers put the most recent sample on taps[0], so coef[0] is W(0) of the
// filter equations. Taps from ntaps upwards contribute nothing, which is how
// the run-time number of taps is applied.
//
// Samples are unsigned DATA_W-bit values, coefficients are signed two's
// complement COEF_W-bit numbers with COEF_FRAC fraction bits (at the
// defaults 1.0 is 16384 and the range is -2.0 to just under 2.0). The sum is
// rounded to the nearest integer (ties upwards) and clamped to
// 0 .. 2^DATA_W - 1, because a filter with negative coefficients can
// overshoot at edges.
//
// Timing: three register stages. The products are registered (one
// multiplier per tap, the DSP-slice pattern), then the adder tree, then the
// rounding and clamping, so result belongs to the taps presented three
// clocks earlier. One window per clock, no stalls.
//
// The multiplier-per-tap structure and the tap limit follow the document's
// description of its programmable option; the number format, the rounding
// and the clamping are this design's own choices.
module fir_mac #(
  parameter int unsigned DATA_W    = 10,
  parameter int unsigned NTAPS     = 24,
  parameter int unsigned COEF_W    = 16,
  parameter int unsigned COEF_FRAC = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [DATA_W-1:0]        taps [NTAPS],
  input  logic signed [COEF_W-1:0] coef [NTAPS],
  input  logic [$clog2(NTAPS+1)-1:0] ntaps,
  output logic [DATA_W-1:0]        result
);

  localparam int unsigned PROD_W = DATA_W + COEF_W + 1;
  localparam int unsigned ACC_W  = PROD_W + $clog2(NTAPS) + 1;

  logic signed [PROD_W-1:0] prod [NTAPS];
  logic signed [ACC_W-1:0]  acc;
  logic signed [ACC_W-1:0]  acc_sum;
  logic signed [ACC_W-1:0]  rounded;
  localparam logic signed [ACC_W-1:0] PIX_MAX = ACC_W'((1 << DATA_W) - 1);

  always_comb begin
    acc_sum = '0;
    for (int i = 0; i < NTAPS; i++) acc_sum += ACC_W'(prod[i]);
    rounded = (acc + (ACC_W'(1) <<< (COEF_FRAC - 1))) >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NTAPS; i++) prod[i] <= '0;
      acc    <= '0;
      result <= '0;
    end else begin
      for (int i = 0; i < NTAPS; i++) begin
        if (i < int'(ntaps)) prod[i] <= $signed({1'b0, taps[i]}) * coef[i];
        else                 prod[i] <= '0;
      end
      acc <= acc_sum;
      if (rounded < 0)
        result <= '0;
      else if (rounded > PIX_MAX)
        result <= '1;
      else
        result <= rounded[DATA_W-1:0];
    end
  end

endmodule
