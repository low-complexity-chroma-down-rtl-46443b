// tb_chroma_resampler: end-to-end test of the configurable chroma resampler.
//
// The core is used at its default parameters (10-bit samples, 1920-pixel line
// buffers) with short frames of random video so that every setting can be
// visited: each of the six conversions with the FIR filter and with
// drop/replicate, and each vertical conversion also in interlaced mode in an
// odd and in an even field. Settings change in vertical blanking. The
// expected output of every frame is built from the line-based reference
// model; every output pixel's luma and chroma (Cb/Cr for 4:4:4 outputs, the
// interleaved bus otherwise, only where chr_valid is set) is compared, the
// sync and valid outputs must be the inputs delayed by the conversion's
// latency, and chr_valid must be set exactly on the expected pixels. All six
// conversions also run with the programmable filters, first with the
// coefficients loaded at reset and then with coefficients and tap counts
// written through the coefficient port into all five banks. Each mechanism
// (conversion, method, field, the mid-scale first line of a 4:2:0 input,
// coefficient writes per bank) is counted and must have happened.
module tb_chroma_resampler;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int W  = 16;
  localparam int H  = 6;
  localparam int BLANK = 6;
  localparam int MAXC = 80000;
  localparam int unsigned GREY = 1 << (DW - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  conv_e conv = CONV_444_TO_422;
  method_e method = METHOD_FIR;
  logic interlaced = 1'b0;
  logic coef_we = 1'b0;
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
  // Model of the coefficient banks, as loaded at reset.
  coef_t cw0 = '{4096, 8192, 4096, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  coef_t cw1 = '{8192, 8192, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0,
                 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0, 0};
  coef_t cvd = '{8192, 8192, 0, 0, 0, 0, 0, 0};
  coef_t cv0 = '{4096, 12288, 0, 0, 0, 0, 0, 0};
  coef_t cv1 = '{12288, 4096, 0, 0, 0, 0, 0, 0};
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
    frame_t vlines, clines;
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
          if (l % 2 == 1) begin
            if (prog) res = ref_vfir_prog(vlines, l, cvd, ntaps_vdec, PROG_COEF_FRAC, DW);
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
    repeat (lat + 10) @(negedge clk);
    frame_idx++;
  endtask

  // Writes one coefficient through the register port and into the model.
  task automatic write_coef(int bank, int idx, int val);
    @(negedge clk);
    coef_we = 1'b1; coef_bank = 3'(bank); coef_addr = 5'(idx); coef_data = 16'(val);
    @(negedge clk);
    coef_we = 1'b0; coef_data = 16'($urandom);
    case (bank)
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
    for (int c = 0; c < 6; c++) begin
      run_frame(conv_e'(c), METHOD_FIR, 1'b0);
      run_frame(conv_e'(c), METHOD_DROP, 1'b0);
      if (c == CONV_444_TO_420 || c == CONV_422_TO_420 ||
          c == CONV_420_TO_444 || c == CONV_420_TO_422) begin
        run_frame(conv_e'(c), METHOD_FIR, 1'b1);
        run_frame(conv_e'(c), METHOD_FIR, 1'b1);
      end
    end
    // Programmable filters: reset coefficients, then written ones.
    for (int c = 0; c < 6; c++) run_frame(conv_e'(c), METHOD_PROG, 1'b0);
    for (int i = 0; i < 5; i++) write_coef(0, i, $urandom_range(0, 12000) - 2000);
    write_coef(0, 5, 7777);   // above the tap count, must be ignored
    ntaps_hdec = 5'd5;
    write_coef(1, 0, -1024);
    write_coef(1, 1, 9216);
    write_coef(1, 2, 9216);
    write_coef(1, 3, -1024);
    ntaps_hint = 5'd4;
    for (int i = 0; i < 4; i++) write_coef(2, i, $urandom_range(0, 8000) - 1000);
    ntaps_vdec = 4'd4;
    for (int i = 0; i < 3; i++) begin
      write_coef(3, i, $urandom_range(0, 12000) - 2000);
      write_coef(4, i, $urandom_range(0, 12000) - 2000);
    end
    ntaps_vint = 4'd3;
    for (int c = 0; c < 6; c++) run_frame(conv_e'(c), METHOD_PROG, 1'b0);
    repeat (10) @(negedge clk);
    checks++;
    if (exp_y.size() != 0 || exp_chr.size() != 0 || exp_cb.size() != 0) begin
      failures++; $display("outputs missing");
    end
    for (int c = 0; c < 6; c++)
      for (int m = 0; m < 2; m++) begin
        checks++;
        if (n_conv_method[c][m] == 0) begin failures++; $display("conversion %0d method %0d never ran", c, m); end
      end
    for (int c = 0; c < 6; c++) begin
      checks++;
      if (n_conv_method[c][METHOD_PROG] < 2) begin failures++; $display("conversion %0d not run programmable", c); end
    end
    for (int b = 0; b < 5; b++) begin
      checks++;
      if (n_coef_wr[b] == 0) begin failures++; $display("coefficient bank %0d never written", b); end
    end
    for (int f = 0; f < 2; f++) begin
      checks++;
      if (n_field[f] == 0) begin failures++; $display("interlaced field %0d never ran", f); end
    end
    checks++;
    if (n_grey_line == 0) begin failures++; $display("no 4:2:0 frame top seen"); end
    $display("frames=%0d interlaced odd/even fields=%0d/%0d 4:2:0 top lines=%0d",
             frame_idx, n_field[1], n_field[0], n_grey_line);
    $display("programmable frames=%0d coefficient writes per bank=%0d %0d %0d %0d %0d",
             n_conv_method[0][2] + n_conv_method[1][2] + n_conv_method[2][2] +
             n_conv_method[3][2] + n_conv_method[4][2] + n_conv_method[5][2],
             n_coef_wr[0], n_coef_wr[1], n_coef_wr[2], n_coef_wr[3], n_coef_wr[4]);
    $display("cycles=%0d", cyc);
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
