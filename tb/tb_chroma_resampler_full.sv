// tb_chroma_resampler_full: one full-size frame each way through the
// chroma resampler at its default parameters.
//
// A 1920x1080 frame of random 10-bit 4:4:4 video is converted to 4:2:0 with
// the fixed FIR filters, then a 1920x1080 frame of 4:2:0 video is converted
// back to 4:4:4, the configuration used for the resource figures of the
// design (10-bit samples, 1920x1080 frame). The same two conversions then run
// with the programmable filters at their largest size: random coefficients
// are written through the coefficient port into all five banks and the tap
// counts are set to 24 horizontal and 8 vertical. Every output pixel, the
// sync delays and chr_valid are checked against the line-based reference
// model, as in the short end-to-end test. Lines are 6 clocks apart for the
// fixed filters and 28 for the programmable ones, which need the longer
// blanking to flush their windows.
module tb_chroma_resampler_full;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int W  = 1920;
  localparam int H  = 1080;
  localparam int BLANK = 6;
  localparam int MAXC = 9000000;
  localparam int unsigned GREY = 1 << (DW - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  conv_e conv = CONV_444_TO_422;
  method_e method = METHOD_FIR;
  logic interlaced = 1'b0;
  logic coef_we = 1'b0;                     // coefficient port idle
  logic [2:0] coef_bank = '0;
  logic [4:0] coef_addr = '0;
  logic signed [15:0] coef_data = '0;
  logic [4:0] ntaps_hdec = 5'd3, ntaps_hint = 5'd2;
  logic [3:0] ntaps_vdec = 4'd2, ntaps_vint = 4'd2;
  logic vs_in = 1'b0, hs_in = 1'b0, din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, cb_in = '0, cr_in = '0, chr_in = '0;
  logic vs_out, hs_out, dout_valid, chr_valid;
  logic [DW-1:0] y_out, cb_out, cr_out, chr_out;

  always #5 clk = ~clk;

  chroma_resampler dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int frame_idx = 0;
  int lat = 0;
  bit out444 = 1'b0;
  int unsigned exp_y[$], exp_cb[$], exp_cr[$], exp_chr[$];
  bit exp_cv[$];
  logic [2:0] hist [MAXC];

  // mechanism counters
  int n_conv_method [6][3];
  int n_coef_wr [5];
  // Model of the coefficient banks; all are written before the programmable
  // frames.
  coef_t cw0 = new [PROG_NTAPS];
  coef_t cw1 = new [PROG_NTAPS];
  coef_t cvd = new [PROG_NTAPS_V];
  coef_t cv0 = new [PROG_NTAPS_V];
  coef_t cv1 = new [PROG_NTAPS_V];
  int n_field [2];
  int n_grey_line = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc < MAXC) hist[cyc] = {vs_in, hs_in, din_valid};
    if (rst_n && cyc >= lat + 8 && cyc < MAXC) begin
      checks++;
      if ({vs_out, hs_out, dout_valid} !== hist[cyc - lat]) begin
        failures++; $display("sync/valid delay wrong at %0d", cyc);
      end
    end
    if (rst_n && dout_valid) begin
      int unsigned ey;
      bit ecv;
      checks += 2;
      if (exp_y.size() == 0) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        ey  = exp_y.pop_front();
        ecv = exp_cv.pop_front();
        if (y_out !== DW'(ey)) begin failures++; $display("y mismatch at %0d", cyc); end
        if (chr_valid !== ecv) begin failures++; $display("chr_valid wrong at %0d", cyc); end
        if (out444) begin
          int unsigned eb, er;
          eb = exp_cb.pop_front();
          er = exp_cr.pop_front();
          checks += 2;
          if (cb_out !== DW'(eb)) begin failures++; $display("cb mismatch at %0d: %0d vs %0d", cyc, cb_out, eb); end
          if (cr_out !== DW'(er)) begin failures++; $display("cr mismatch at %0d: %0d vs %0d", cyc, cr_out, er); end
        end else if (ecv) begin
          int unsigned ec;
          ec = exp_chr.pop_front();
          checks++;
          if (chr_out !== DW'(ec)) begin failures++; $display("chr mismatch at %0d: %0d vs %0d", cyc, chr_out, ec); end
        end
      end
    end
  end

  // Sends one frame in the given configuration and queues what must come out.
  task automatic run_frame(conv_e c, method_e m, bit ilace);
    bit drop = (m == METHOD_DROP);
    bit prog = (m == METHOD_PROG);
    int blank = prog ? PROG_NTAPS + 4 : BLANK;
    bit fodd = (frame_idx % 2 == 0);   // field flag toggles at every vs, odd first
    line_t prev422, prev420, second;
    frame_t vlines, clines;   // the last PROG_NTAPS_V lines entering a window
    conv = c; method = m; interlaced = ilace;
    unique case (c)
      CONV_444_TO_422: lat = LAT_444_TO_422;
      CONV_444_TO_420: lat = LAT_444_TO_420;
      CONV_422_TO_444: lat = LAT_422_TO_444;
      CONV_422_TO_420: lat = LAT_422_TO_420;
      CONV_420_TO_444: lat = LAT_420_TO_444;
      default:         lat = LAT_420_TO_422;
    endcase
    if (prog) begin
      unique case (c)
        CONV_444_TO_422: lat = int'(lat_444to422_prog(ntaps_hdec));
        CONV_444_TO_420: lat = int'(lat_444to422_prog(ntaps_hdec)) + LAT_V_PROG;
        CONV_422_TO_444: lat = int'(lat_422to444_prog(ntaps_hint));
        CONV_420_TO_444: lat = int'(lat_422to444_prog(ntaps_hint)) + LAT_V_PROG;
        default:         lat = LAT_V_PROG;
      endcase
    end
    out444 = (c == CONV_422_TO_444 || c == CONV_420_TO_444);
    n_conv_method[c][m]++;
    if (ilace) n_field[fodd]++;
    @(negedge clk); vs_in = 1'b1;
    repeat (3) @(negedge clk);
    vs_in = 1'b0;
    repeat (3) @(negedge clk);
    for (int l = 0; l < H; l++) begin
      line_t yl = rand_line(W, DW), cbl = rand_line(W, DW), crl = rand_line(W, DW);
      line_t chl = rand_line(W, DW);
      line_t l422, ocb, ocr, first, res;
      bit src444 = (c == CONV_444_TO_422 || c == CONV_444_TO_420);
      foreach (yl[i]) exp_y.push_back(yl[i]);
      unique case (c)
        CONV_444_TO_422: begin
          res = prog ? ref_444to422_prog(cbl, crl, cw0, ntaps_hdec, PROG_COEF_FRAC, DW)
                     : ref_444to422(cbl, crl, drop);
          foreach (res[i]) begin exp_chr.push_back(res[i]); exp_cv.push_back(1'b1); end
        end
        CONV_444_TO_420, CONV_422_TO_420: begin
          if (!src444)   l422 = chl;
          else if (prog) l422 = ref_444to422_prog(cbl, crl, cw0, ntaps_hdec, PROG_COEF_FRAC, DW);
          else           l422 = ref_444to422(cbl, crl, drop);
          vlines.push_back(l422);
          if (vlines.size() > PROG_NTAPS_V) void'(vlines.pop_front());
          if (l % 2 == 1) begin
            if (prog) res = ref_vfir_prog(vlines, vlines.size() - 1, cvd, ntaps_vdec, PROG_COEF_FRAC, DW);
            else      res = ref_422to420(prev422, l422, drop, ilace, fodd);
            foreach (res[i]) exp_chr.push_back(res[i]);
          end
          foreach (yl[i]) exp_cv.push_back(l % 2 == 1);
          prev422 = l422;
        end
        CONV_422_TO_444: begin
          if (prog) ref_422to444_prog(chl, cw1, ntaps_hint, PROG_COEF_FRAC, DW, ocb, ocr);
          else      ref_422to444(chl, drop, ocb, ocr);
          foreach (ocb[i]) begin exp_cb.push_back(ocb[i]); exp_cr.push_back(ocr[i]); exp_cv.push_back(1'b1); end
        end
        default: begin   // 4:2:0 input
          if (l == 0) begin
            l422 = {};
            foreach (yl[i]) l422.push_back(GREY);
            n_grey_line++;
          end else if (l % 2 == 1) begin
            if (prog) begin
              clines.push_back(chl);
              if (clines.size() > PROG_NTAPS_V) void'(clines.pop_front());
              first  = ref_vfir_prog(clines, clines.size() - 1, cv0, ntaps_vint, PROG_COEF_FRAC, DW);
              second = ref_vfir_prog(clines, clines.size() - 1, cv1, ntaps_vint, PROG_COEF_FRAC, DW);
            end else begin
              ref_420to422((l == 1) ? chl : prev420, chl, drop, ilace, fodd, first, second);
            end
            l422 = first;
            prev420 = chl;
          end else begin
            l422 = second;
          end
          if (c == CONV_420_TO_444) begin
            if (prog) ref_422to444_prog(l422, cw1, ntaps_hint, PROG_COEF_FRAC, DW, ocb, ocr);
            else      ref_422to444(l422, drop, ocb, ocr);
            foreach (ocb[i]) begin exp_cb.push_back(ocb[i]); exp_cr.push_back(ocr[i]); exp_cv.push_back(1'b1); end
          end else begin
            foreach (l422[i]) begin exp_chr.push_back(l422[i]); exp_cv.push_back(1'b1); end
          end
        end
      endcase
      hs_in = 1'b1;
      repeat (2) @(negedge clk);
      hs_in = 1'b0;
      @(negedge clk);
      for (int i = 0; i < W; i++) begin
        din_valid = 1'b1; y_in = DW'(yl[i]);
        cb_in = DW'(cbl[i]); cr_in = DW'(crl[i]); chr_in = DW'(chl[i]);
        @(negedge clk);
      end
      din_valid = 1'b0; y_in = '0; chr_in = DW'($urandom);
      repeat (blank - 3) @(negedge clk);
    end
    repeat (10) @(negedge clk);
    frame_idx++;
  endtask

  // Writes one coefficient through the register port and into the model.
  task automatic write_coef(int bank, int idx, int val);
    coef_we = 1'b1; coef_bank = 3'(bank); coef_addr = 5'(idx); coef_data = 16'(val);
    @(negedge clk);
    coef_we = 1'b0;
    unique case (bank)
      0: cw0[idx] = val;
      1: cw1[idx] = val;
      2: cvd[idx] = val;
      3: cv0[idx] = val;
      default: cv1[idx] = val;
    endcase
    n_coef_wr[bank]++;
  endtask

  initial begin
    foreach (n_coef_wr[b]) n_coef_wr[b] = 0;
    foreach (n_conv_method[c, m]) n_conv_method[c][m] = 0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    run_frame(CONV_444_TO_420, METHOD_FIR, 1'b0);
    run_frame(CONV_420_TO_444, METHOD_FIR, 1'b0);
    // Largest programmable filters: random weights that sum to roughly 1.0,
    // some of them negative, so bright or dark pixels can clamp.
    for (int i = 0; i < PROG_NTAPS; i++) begin
      write_coef(0, i, $urandom_range(0, 1600) - 200);
      write_coef(1, i, $urandom_range(0, 1600) - 200);
    end
    for (int i = 0; i < PROG_NTAPS_V; i++) begin
      write_coef(2, i, $urandom_range(0, 4400) - 150);
      write_coef(3, i, $urandom_range(0, 4400) - 150);
      write_coef(4, i, $urandom_range(0, 4400) - 150);
    end
    ntaps_hdec = 5'(PROG_NTAPS); ntaps_hint = 5'(PROG_NTAPS);
    ntaps_vdec = 4'(PROG_NTAPS_V); ntaps_vint = 4'(PROG_NTAPS_V);
    run_frame(CONV_444_TO_420, METHOD_PROG, 1'b0);
    run_frame(CONV_420_TO_444, METHOD_PROG, 1'b0);
    repeat (10) @(negedge clk);
    foreach (n_coef_wr[b]) begin
      checks++;
      if (n_coef_wr[b] == 0) begin failures++; $display("coefficient bank %0d never written", b); end
    end
    checks++;
    if (n_conv_method[CONV_444_TO_420][METHOD_PROG] == 0 ||
        n_conv_method[CONV_420_TO_444][METHOD_PROG] == 0) begin
      failures++; $display("programmable frames missing");
    end
    checks++;
    if (exp_y.size() != 0 || exp_chr.size() != 0 || exp_cb.size() != 0) begin
      failures++; $display("outputs missing");
    end
    $display("frames=%0d interlaced odd/even fields=%0d/%0d 4:2:0 top lines=%0d",
             frame_idx, n_field[1], n_field[0], n_grey_line);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (MAXC - 10) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
