// tb_chroma_422to444_prog: self-checking test of the programmable
// 4:2:2 -> 4:4:4 converter.
//
// Runs lines of random 10-bit luma and interleaved chroma through six
// phase-1 filter settings: the standard [1/2 1/2], the four-tap filter with
// negative lobes of the [a b c d] example, all 24 taps with random weights,
// a single tap, a five-tap random filter strong enough to clip, and a tap
// count of 0 (taken as 1). Coefficients above the tap count are random and
// must have no effect. Y, Cb, Cr and the syncs of every output pixel are
// compared with the line-based reference model, and each pixel must leave
// exactly lat_422to444_prog(ntaps) clocks after its input sample.
module tb_chroma_422to444_prog;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW    = 10;
  localparam int NT    = 24;
  localparam int CW    = 16;
  localparam int FRAC  = 14;
  localparam int W     = 32;
  localparam int LINES = 4;
  localparam int BLANK = NT + 2;
  localparam int NCFG  = 6;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic signed [CW-1:0] coef [NT];
  logic [$clog2(NT+1)-1:0] ntaps = 5'd2;
  logic vs_in = 1'b0, hs_in = 1'b0, din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, chr_in = '0;
  logic [DW-1:0] y_out, cb_out, cr_out;
  logic vs_out, hs_out, dout_valid;

  always #5 clk = ~clk;

  chroma_422to444_prog #(.DATA_W(DW), .NTAPS(NT), .COEF_W(CW), .COEF_FRAC(FRAC)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int lat;
  int unsigned exp_y[$], exp_cb[$], exp_cr[$];
  int in_cyc[$];
  int n_in = 0, n_out = 0;

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (rst_n && din_valid) begin
      in_cyc.push_back(cyc);
      n_in++;
    end
    if (rst_n && dout_valid) begin
      n_out++;
      checks += 5;
      if (exp_y.size() == 0 || in_cyc.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        int unsigned ey, eb, er;
        int ic;
        ey = exp_y.pop_front();
        eb = exp_cb.pop_front();
        er = exp_cr.pop_front();
        ic = in_cyc.pop_front();
        if (y_out !== DW'(ey)) begin failures++; $display("y mismatch %0d vs %0d", y_out, ey); end
        if (cb_out !== DW'(eb)) begin failures++; $display("cb mismatch cyc %0d: %0d vs %0d", cyc, cb_out, eb); end
        if (cr_out !== DW'(er)) begin failures++; $display("cr mismatch cyc %0d: %0d vs %0d", cyc, cr_out, er); end
        if (cyc - ic != lat) begin failures++; $display("latency %0d, expected %0d", cyc - ic, lat); end
        if (!hs_out) begin failures++; $display("hs_out low on an active pixel"); end
      end
    end
  end

  task automatic set_cfg(int k, output coef_t c, output int n);
    c = new[NT];
    foreach (c[i]) c[i] = $urandom_range(0, 4000) - 2000;   // beyond n: ignored
    case (k)
      0: begin n = 2; c[0] = 8192; c[1] = 8192; end
      1: begin n = 4; c[0] = -1024; c[1] = 9216; c[2] = 9216; c[3] = -1024; end
      2: begin n = 24; foreach (c[i]) c[i] = $urandom_range(0, 2000) - 500; end
      3: begin n = 1; c[0] = 16384; end
      4: begin n = 5; for (int i = 0; i < 5; i++) c[i] = $urandom_range(0, 32767) - 16384; end
      default: begin n = 0; c[0] = 12000; end
    endcase
  endtask

  task automatic send_line(coef_t c, int n);
    line_t yl = rand_line(W, DW), chl = rand_line(W, DW);
    line_t cbl, crl;
    ref_422to444_prog(chl, c, (n == 0) ? 1 : n, FRAC, DW, cbl, crl);
    foreach (yl[i]) begin
      exp_y.push_back(yl[i]); exp_cb.push_back(cbl[i]); exp_cr.push_back(crl[i]);
    end
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      din_valid = 1'b1; hs_in = 1'b1; y_in = DW'(yl[i]); chr_in = DW'(chl[i]);
    end
    @(negedge clk);
    din_valid = 1'b0; hs_in = 1'b0; y_in = '0; chr_in = DW'($urandom);
    repeat (BLANK - 1) @(negedge clk);
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
      vs_in = 1'b1;
      foreach (coef[i]) coef[i] = CW'(c[i]);
      ntaps = 5'(n);
      lat = int'(lat_422to444_prog((n == 0) ? 1 : n));
      repeat (4) @(negedge clk);
      vs_in = 1'b0;
      for (int l = 0; l < LINES; l++) send_line(c, n);
      repeat (lat + 4) @(negedge clk);
    end
    checks++;
    if (n_in != n_out || exp_y.size() != 0) begin
      failures++;
      $display("count mismatch in=%0d out=%0d left=%0d", n_in, n_out, exp_y.size());
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
