// tb_chroma_420to422_prog: self-checking test of the programmable
// 4:2:0 -> 4:2:2 converter.
//
// Sends frames of random luma and chroma, 16 pixels by 12 lines (chroma on
// the odd lines, random values on the even lines that must be ignored),
// through five settings of the two phase filters: the default
// [1/4 3/4] / [3/4 1/4], a single tap, all eight taps with random weights
// (reaching above the top of the frame), three taps with a negative lobe,
// and five random taps strong enough to clip. Coefficients above the tap
// count are random and must have no effect. Every output pixel is compared
// with the line-based reference model, including the mid-scale line 0, and
// luma, syncs and valid must be the inputs delayed by 4 clocks.
module tb_chroma_420to422_prog;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int NT = 8;
  localparam int CW = 16;
  localparam int FRAC = 14;
  localparam int W  = 16;
  localparam int H  = 12;
  localparam int BLANK = 6;
  localparam int LAT = 4;
  localparam int MAXC = 14000;
  localparam int NCFG = 5;
  localparam int unsigned GREY = 1 << (DW - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [CW-1:0] coef0 [NT];
  logic signed [CW-1:0] coef1 [NT];
  logic [$clog2(NT+1)-1:0] ntaps = 4'd2;
  logic vs_in = 1'b0, hs_in = 1'b0, din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, chr_in = '0;
  logic vs_out, hs_out, dout_valid;
  logic [DW-1:0] y_out, chr_out;

  always #5 clk = ~clk;

  chroma_420to422_prog #(.DATA_W(DW), .MAX_WIDTH(64), .NTAPS(NT), .COEF_W(CW),
                         .COEF_FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int n_grey = 0;
  int unsigned exp_y[$], exp_c[$];
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
        int unsigned ey, ec;
        ey = exp_y.pop_front();
        ec = exp_c.pop_front();
        if (y_out !== DW'(ey)) begin failures++; $display("y mismatch at %0d", cyc); end
        if (chr_out !== DW'(ec)) begin failures++; $display("chr mismatch at %0d: %0d vs %0d", cyc, chr_out, ec); end
      end
    end
  end

  task automatic set_cfg(int k, output coef_t c0, output coef_t c1, output int n);
    c0 = new[NT];
    c1 = new[NT];
    foreach (c0[i]) begin
      c0[i] = $urandom_range(0, 4000) - 2000;   // beyond n: ignored
      c1[i] = $urandom_range(0, 4000) - 2000;
    end
    case (k)
      0: begin n = 2; c0[0] = 4096; c0[1] = 12288; c1[0] = 12288; c1[1] = 4096; end
      1: begin n = 1; c0[0] = 16384; c1[0] = 16384; end
      2: begin
        n = 8;
        foreach (c0[i]) begin
          c0[i] = $urandom_range(0, 4000) - 500;
          c1[i] = $urandom_range(0, 4000) - 500;
        end
      end
      3: begin n = 3; c0[0] = 10000; c0[1] = 8000; c0[2] = -1616;
               c1[0] = -2000; c1[1] = 9000; c1[2] = 9384; end
      default: begin
        n = 5;
        for (int i = 0; i < 5; i++) begin
          c0[i] = $urandom_range(0, 32767) - 16384;
          c1[i] = $urandom_range(0, 32767) - 16384;
        end
      end
    endcase
  endtask

  task automatic send_frame(coef_t c0, coef_t c1, int n);
    frame_t chroma;
    @(negedge clk); vs_in = 1'b1;
    repeat (3) @(negedge clk);
    vs_in = 1'b0;
    repeat (3) @(negedge clk);
    for (int l = 0; l < H; l++) begin
      line_t yl = rand_line(W, DW), ch = rand_line(W, DW);
      line_t r;
      foreach (yl[i]) exp_y.push_back(yl[i]);
      if (l == 0) begin
        foreach (yl[i]) r.push_back(GREY);
        n_grey++;
      end else if (l % 2 == 1) begin
        chroma.push_back(ch);
        r = ref_vfir_prog(chroma, chroma.size() - 1, c0, n, FRAC, DW);
      end else begin
        r = ref_vfir_prog(chroma, chroma.size() - 1, c1, n, FRAC, DW);
      end
      foreach (r[i]) exp_c.push_back(r[i]);
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
    coef_t c0, c1;
    int n;
    foreach (coef0[i]) begin coef0[i] = '0; coef1[i] = '0; end
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int k = 0; k < NCFG; k++) begin
      set_cfg(k, c0, c1, n);
      foreach (coef0[i]) begin coef0[i] = CW'(c0[i]); coef1[i] = CW'(c1[i]); end
      ntaps = 4'(n);
      send_frame(c0, c1, n);
    end
    repeat (10) @(negedge clk);
    checks += 2;
    if (exp_y.size() != 0) begin failures++; $display("outputs missing"); end
    if (n_grey == 0) begin failures++; $display("no frame top seen"); end
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
