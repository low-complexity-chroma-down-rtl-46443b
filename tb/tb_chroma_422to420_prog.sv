// tb_chroma_422to420_prog: self-checking test of the programmable
// 4:2:2 -> 4:2:0 converter.
//
// Sends frames of random luma and interleaved chroma, 16 pixels by 10 lines,
// through five filter settings: the default [1/2 1/2], a single tap, all
// eight taps with random weights (so the window reaches above the top of the
// frame), three taps with a negative lobe, and six random taps strong enough
// to clip. Coefficients above the tap count are random and must have no
// effect. Every chroma output is compared with the line-based reference
// model; chr_valid must be set exactly on the odd lines, and luma, syncs and
// valid must be the inputs delayed by 4 clocks.
module tb_chroma_422to420_prog;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int NT = 8;
  localparam int CW = 16;
  localparam int FRAC = 14;
  localparam int W  = 16;
  localparam int H  = 10;
  localparam int BLANK = 6;
  localparam int LAT = 4;
  localparam int MAXC = 12000;
  localparam int NCFG = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [CW-1:0] coef [NT];
  logic [$clog2(NT+1)-1:0] ntaps = 4'd2;
  logic vs_in = 1'b0, hs_in = 1'b0, din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, chr_in = '0;
  logic vs_out, hs_out, dout_valid, chr_valid;
  logic [DW-1:0] y_out, chr_out;

  always #5 clk = ~clk;

  chroma_422to420_prog #(.DATA_W(DW), .MAX_WIDTH(64), .NTAPS(NT), .COEF_W(CW),
                         .COEF_FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int unsigned exp_y[$], exp_c[$];
  bit exp_cv[$];
  logic [2:0] hist [MAXC];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc < MAXC) hist[cyc] = {vs_in, hs_in, din_valid};
    if (rst_n && cyc >= LAT && cyc < MAXC) begin
      checks++;
      if ({vs_out, hs_out, dout_valid} !== hist[cyc - LAT]) begin
        failures++; $display("sync/valid delay wrong at %0d", cyc);
      end
    end
    if (rst_n && dout_valid) begin
      checks += 2;
      if (exp_y.size() == 0) begin
        failures++; $display("unexpected output at %0d", cyc);
      end else begin
        int unsigned ey;
        bit ecv;
        ey  = exp_y.pop_front();
        ecv = exp_cv.pop_front();
        if (y_out !== DW'(ey)) begin failures++; $display("y mismatch at %0d", cyc); end
        if (chr_valid !== ecv) begin failures++; $display("chr_valid wrong at %0d", cyc); end
        if (ecv) begin
          int unsigned ec;
          ec = exp_c.pop_front();
          checks++;
          if (chr_out !== DW'(ec)) begin failures++; $display("chr mismatch at %0d: %0d vs %0d", cyc, chr_out, ec); end
        end
      end
    end
  end

  task automatic set_cfg(int k, output coef_t c, output int n);
    c = new[NT];
    foreach (c[i]) c[i] = $urandom_range(0, 4000) - 2000;   // beyond n: ignored
    case (k)
      0: begin n = 2; c[0] = 8192; c[1] = 8192; end
      1: begin n = 1; c[0] = 16384; end
      2: begin n = 8; foreach (c[i]) c[i] = $urandom_range(0, 4000) - 500; end
      3: begin n = 3; c[0] = 10000; c[1] = 8000; c[2] = -1616; end
      default: begin n = 6; for (int i = 0; i < 6; i++) c[i] = $urandom_range(0, 32767) - 16384; end
    endcase
  endtask

  task automatic send_frame(coef_t c, int n);
    frame_t lines;
    @(negedge clk); vs_in = 1'b1;
    repeat (3) @(negedge clk);
    vs_in = 1'b0;
    repeat (3) @(negedge clk);
    for (int l = 0; l < H; l++) begin
      line_t yl = rand_line(W, DW), ch = rand_line(W, DW);
      lines.push_back(ch);
      foreach (yl[i]) begin exp_y.push_back(yl[i]); exp_cv.push_back(l % 2 == 1); end
      if (l % 2 == 1) begin
        line_t r = ref_vfir_prog(lines, l, c, n, FRAC, DW);
        foreach (r[i]) exp_c.push_back(r[i]);
      end
      hs_in = 1'b1;
      repeat (2) @(negedge clk);
      hs_in = 1'b0;
      @(negedge clk);
      for (int i = 0; i < W; i++) begin
        din_valid = 1'b1; y_in = DW'(yl[i]); chr_in = DW'(ch[i]);
        @(negedge clk);
      end
      din_valid = 1'b0; y_in = '0; chr_in = DW'($urandom);
      repeat (BLANK - 3) @(negedge clk);
    end
    repeat (8) @(negedge clk);
  endtask

  initial begin
    coef_t c;
    int n;
    foreach (coef[i]) coef[i] = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < NCFG; k++) begin
      set_cfg(k, c, n);
      foreach (coef[i]) coef[i] = CW'(c[i]);
      ntaps = 4'(n);
      send_frame(c, n);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (exp_y.size() != 0 || exp_c.size() != 0) begin failures++; $display("outputs missing"); end
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
