// tb_chroma_444to420: self-checking test of the 4:4:4 -> 4:2:0 cascade.
//
// Sends four frames of random 10-bit Y, Cb and Cr: progressive
// FIR, interlaced FIR in an even and in an odd field (the field flag toggles
// at every vertical sync, odd first), and line dropping. Checks every output
// luma sample, every chroma sample flagged by chr_valid against the
// reference model (horizontal [1/4 1/2 1/4] decimation of each line, then
// the vertical filter of the even/odd line pair), that chroma comes on odd lines
// only, that the luma and syncs are delayed by exactly LAT_444_TO_420 clocks,
// and the output counts.
module tb_chroma_444to420;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int W  = 16;
  localparam int H  = 6;
  localparam int BLANK = 6;
  localparam int MAXC = 8000;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  method_e method = METHOD_FIR;
  logic interlaced = 1'b0;
  logic vs_in = 1'b0, hs_in = 1'b0, din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, cb_in = '0, cr_in = '0;
  logic vs_out, hs_out, dout_valid, chr_valid;
  logic [DW-1:0] y_out, chr_out;

  always #5 clk = ~clk;

  chroma_444to420 #(.DATA_W(DW), .MAX_WIDTH(64)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int unsigned exp_y[$], exp_c[$];
  int in_cyc[$];
  int n_in = 0, n_out = 0, n_chr = 0, exp_n_chr = 0;
  logic [2:0] hist [MAXC];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc < MAXC) hist[cyc] = {vs_in, hs_in, din_valid};
    if (rst_n && cyc >= int'(LAT_444_TO_420) && cyc < MAXC) begin
      checks++;
      if ({vs_out, hs_out, dout_valid} !== hist[cyc - int'(LAT_444_TO_420)]) begin
        failures++; $display("sync/valid delay wrong at %0d", cyc);
      end
    end
    if (rst_n && din_valid) begin in_cyc.push_back(cyc); n_in++; end
    if (rst_n && dout_valid) begin
      int unsigned ey;
      int ic;
      n_out++;
      checks += 2;
      ey = exp_y.pop_front();
      ic = in_cyc.pop_front();
      if (y_out !== DW'(ey)) begin failures++; $display("y mismatch %0d vs %0d", y_out, ey); end
      if (cyc - ic != int'(LAT_444_TO_420)) begin failures++; $display("latency %0d", cyc - ic); end
    end
    if (rst_n && chr_valid) begin
      int unsigned ec;
      n_chr++;
      checks++;
      if (exp_c.size() == 0) begin
        failures++; $display("unexpected chroma at %0d", cyc);
      end else begin
        ec = exp_c.pop_front();
        if (chr_out !== DW'(ec)) begin failures++; $display("chr mismatch cyc %0d: %0d vs %0d", cyc, chr_out, ec); end
      end
    end
  end

  task automatic send_frame(bit drop, bit ilace, bit fodd);
    line_t prev;
    // vertical sync
    @(negedge clk); vs_in = 1'b1;
    repeat (3) @(negedge clk);
    vs_in = 1'b0;
    repeat (3) @(negedge clk);
    for (int l = 0; l < H; l++) begin
      line_t yl = rand_line(W, DW), cbl = rand_line(W, DW), crl = rand_line(W, DW);
      line_t ch = ref_444to422(cbl, crl, drop);
      foreach (yl[i]) exp_y.push_back(yl[i]);
      if (l % 2 == 1) begin
        line_t r = ref_422to420(prev, ch, drop, ilace, fodd);
        foreach (r[i]) exp_c.push_back(r[i]);
        exp_n_chr += W;
      end
      prev = ch;
      hs_in = 1'b1;
      repeat (2) @(negedge clk);
      hs_in = 1'b0;
      @(negedge clk);
      for (int i = 0; i < W; i++) begin
        din_valid = 1'b1; y_in = DW'(yl[i]); cb_in = DW'(cbl[i]); cr_in = DW'(crl[i]);
        @(negedge clk);
      end
      din_valid = 1'b0; y_in = '0; cb_in = DW'($urandom); cr_in = DW'($urandom);
      repeat (BLANK - 3) @(negedge clk);
    end
    // Vertical blanking: let the pipeline drain before settings change.
    repeat (8) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    // Field flag: frame 0 after reset is odd, then alternates.
    method = METHOD_FIR;  interlaced = 1'b0; send_frame(1'b0, 1'b0, 1'b1);
    method = METHOD_FIR;  interlaced = 1'b1; send_frame(1'b0, 1'b1, 1'b0);
    method = METHOD_FIR;  interlaced = 1'b1; send_frame(1'b0, 1'b1, 1'b1);
    method = METHOD_DROP; interlaced = 1'b0; send_frame(1'b1, 1'b0, 1'b0);
    repeat (10) @(negedge clk);
    checks++;
    if (n_in != n_out || exp_y.size() != 0 || exp_c.size() != 0 || n_chr != exp_n_chr) begin
      failures++;
      $display("count mismatch in=%0d out=%0d chr=%0d/%0d", n_in, n_out, n_chr, exp_n_chr);
    end
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
