// tb_round_trip: the four resampling round trips of the design's evaluation.
//
// A synthetic 4:4:4 test frame (smooth colour gradients, a sharp-edged
// colour block and a little random noise, 10-bit) is sent through four chains
// of chroma_resampler cores, all with the FIR filters, progressive:
//   Exp.1  4:4:4 -> 4:2:2 -> 4:4:4
//   Exp.2  4:4:4 -> 4:2:0 -> 4:4:4
//   Exp.3  4:4:4 -> 4:2:2 -> 4:2:0 -> 4:4:4
//   Exp.4  4:4:4 -> 4:2:0 -> 4:2:2 -> 4:4:4
// Each chain's output frame is compared pixel by pixel with the composition
// of the line-based reference models, luma must come back unchanged, and the
// end-to-end latency must be the sum of the stage latencies. The colour peak
// signal-to-noise ratio over the two chroma channels, 10*log10((2^B-1)^2 /
// CMSE), is printed for each chain.
module tb_round_trip;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int W  = 64;
  localparam int H  = 32;
  localparam int BLANK = 6;
  localparam int NCH = 4;
  localparam int NST = 3;
  localparam int unsigned GREY = 1 << (DW - 1);

  typedef struct packed {
    logic vs, hs, v;
    logic [DW-1:0] y, cb, cr, chr;
  } bus_t;

  // Conversion of each stage; stages past a chain's length are unused.
  localparam conv_e CONVS [NCH][NST] = '{
    '{CONV_444_TO_422, CONV_422_TO_444, CONV_422_TO_444},
    '{CONV_444_TO_420, CONV_420_TO_444, CONV_420_TO_444},
    '{CONV_444_TO_422, CONV_422_TO_420, CONV_420_TO_444},
    '{CONV_444_TO_420, CONV_420_TO_422, CONV_422_TO_444}
  };
  localparam int NSTAGES [NCH] = '{2, 2, 3, 3};
  localparam int LATS [NCH] = '{LAT_444_TO_422 + LAT_422_TO_444,
                                LAT_444_TO_420 + LAT_420_TO_444,
                                LAT_444_TO_422 + LAT_422_TO_420 + LAT_420_TO_444,
                                LAT_444_TO_420 + LAT_420_TO_422 + LAT_422_TO_444};

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  bus_t src = '0;
  bus_t s [NCH][NST+1];

  always #5 clk = ~clk;

  for (genvar i = 0; i < NCH; i++) begin : g_chain
    assign s[i][0] = src;
    for (genvar j = 0; j < NSTAGES[i]; j++) begin : g_stage
      logic cv_unused;
      chroma_resampler u_core (
        .clk (clk), .rst_n (rst_n),
        .conv (CONVS[i][j]), .method (METHOD_FIR), .interlaced (1'b0),
        .coef_we (1'b0), .coef_bank ('0), .coef_addr ('0), .coef_data ('0),
        .ntaps_hdec (5'd3), .ntaps_hint (5'd2), .ntaps_vdec (4'd2), .ntaps_vint (4'd2),
        .vs_in (s[i][j].vs), .hs_in (s[i][j].hs), .din_valid (s[i][j].v),
        .y_in (s[i][j].y), .cb_in (s[i][j].cb), .cr_in (s[i][j].cr), .chr_in (s[i][j].chr),
        .vs_out (s[i][j+1].vs), .hs_out (s[i][j+1].hs), .dout_valid (s[i][j+1].v),
        .chr_valid (cv_unused),
        .y_out (s[i][j+1].y), .cb_out (s[i][j+1].cb), .cr_out (s[i][j+1].cr),
        .chr_out (s[i][j+1].chr)
      );
    end
    for (genvar j = NSTAGES[i]; j < NST; j++) begin : g_unused
      assign s[i][j+1] = '0;
    end
  end

  int checks = 0, failures = 0;
  int cyc = 0;
  int first_in = -1;
  int first_out [NCH] = '{-1, -1, -1, -1};
  int unsigned got_y [NCH][$], got_cb [NCH][$], got_cr [NCH][$];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && src.v && first_in < 0) first_in = cyc;
    for (int i = 0; i < NCH; i++) begin
      bus_t o;
      o = s[i][NSTAGES[i]];
      if (rst_n && o.v) begin
        if (first_out[i] < 0) first_out[i] = cyc;
        got_y[i].push_back(32'(o.y));
        got_cb[i].push_back(32'(o.cb));
        got_cr[i].push_back(32'(o.cr));
      end
    end
  end

  // Test frame.
  line_t img_y [H], img_cb [H], img_cr [H];

  function automatic int unsigned clip(int v);
    return (v < 0) ? 0 : (v > 1023) ? 1023 : v;
  endfunction

  initial begin
    line_t l422 [H], c420 [H], out_cb [NCH][H], out_cr [NCH][H];
    for (int y = 0; y < H; y++) begin
      for (int x = 0; x < W; x++) begin
        automatic bit blk = (x >= 20 && x < 37 && y >= 9 && y < 22);
        img_y[y].push_back(clip(64 + 12 * x + 4 * y));
        img_cb[y].push_back(clip((blk ? 800 : 200 + 6 * x + 3 * y) + int'($urandom % 9) - 4));
        img_cr[y].push_back(clip((blk ? 150 : 850 - 5 * x - 4 * y) + int'($urandom % 9) - 4));
      end
    end

    // Reference chains.
    for (int y = 0; y < H; y++) l422[y] = ref_444to422(img_cb[y], img_cr[y], 1'b0);
    for (int y = 1; y < H; y += 2) c420[y] = ref_422to420(l422[y-1], l422[y], 1'b0, 1'b0, 1'b1);
    for (int i = 0; i < NCH; i++) begin
      line_t first, second, v422;
      for (int y = 0; y < H; y++) begin
        if (i == 0) begin
          v422 = l422[y];
        end else if (y == 0) begin
          v422 = {};
          for (int x = 0; x < W; x++) v422.push_back(GREY);
        end else if (y % 2 == 1) begin
          ref_420to422((y == 1) ? c420[y] : c420[y-2], c420[y], 1'b0, 1'b0, 1'b1, first, second);
          v422 = first;
        end else begin
          v422 = second;
        end
        ref_422to444(v422, 1'b0, out_cb[i][y], out_cr[i][y]);
      end
    end

    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    src.vs = 1'b1;
    repeat (3) @(negedge clk);
    src.vs = 1'b0;
    repeat (3) @(negedge clk);
    for (int y = 0; y < H; y++) begin
      src.hs = 1'b1;
      repeat (2) @(negedge clk);
      src.hs = 1'b0;
      @(negedge clk);
      for (int x = 0; x < W; x++) begin
        src.v  = 1'b1;
        src.y  = DW'(img_y[y][x]);
        src.cb = DW'(img_cb[y][x]);
        src.cr = DW'(img_cr[y][x]);
        @(negedge clk);
      end
      src.v = 1'b0;
      repeat (BLANK - 3) @(negedge clk);
    end
    repeat (30) @(negedge clk);

    for (int i = 0; i < NCH; i++) begin
      real cmse, cpsnr;
      automatic int errs = 0;
      checks += 2;
      if (got_y[i].size() != W * H) begin
        failures++; $display("Exp.%0d: %0d pixels out, %0d expected", i + 1, got_y[i].size(), W * H);
        continue;
      end
      if (first_out[i] - first_in != LATS[i]) begin
        failures++; $display("Exp.%0d: latency %0d, expected %0d", i + 1, first_out[i] - first_in, LATS[i]);
      end
      cmse = 0.0;
      for (int y = 0; y < H; y++)
        for (int x = 0; x < W; x++) begin
          automatic int p = y * W + x;
          real eb, er;
          checks += 3;
          if (got_y[i][p] != img_y[y][x]) errs++;
          if (got_cb[i][p] != out_cb[i][y][x]) errs++;
          if (got_cr[i][p] != out_cr[i][y][x]) errs++;
          eb = real'(int'(got_cb[i][p]) - int'(img_cb[y][x]));
          er = real'(int'(got_cr[i][p]) - int'(img_cr[y][x]));
          cmse += eb * eb + er * er;
        end
      failures += errs;
      cmse = cmse / real'(2 * W * H);
      cpsnr = 10.0 * $log10(1023.0 * 1023.0 / cmse);
      $display("Exp.%0d: %0d stages, latency %0d clocks, mismatches %0d, chroma CPSNR %.2f dB",
               i + 1, NSTAGES[i], first_out[i] - first_in, errs, cpsnr);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
