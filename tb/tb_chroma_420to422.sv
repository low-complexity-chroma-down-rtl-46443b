// tb_chroma_420to422: self-checking test of the 4:2:0 -> 4:2:2 converter.
//
// Sends four frames of random 10-bit luma on every line and interleaved
// chroma on the odd lines (random values on the even lines must be ignored):
// progressive interpolation, interlaced in an even and in an odd field (the
// field flag toggles at every vertical sync, odd first), and replication.
// Every output pixel is compared with the reference model: mid-scale chroma
// on line 0, the first interpolated line on each odd line, the second on the
// following even line, the top chroma line replicated as its own
// predecessor. Also checks the LAT_420_TO_422 delay of luma and syncs.
module tb_chroma_420to422;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int W  = 16;
  localparam int H  = 6;
  localparam int BLANK = 6;
  localparam int MAXC = 8000;
  localparam int unsigned GREY = 1 << (DW - 1);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  method_e method = METHOD_FIR;
  logic interlaced = 1'b0;
  logic vs_in = 1'b0, hs_in = 1'b0, din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, chr_in = '0;
  logic vs_out, hs_out, dout_valid;
  logic [DW-1:0] y_out, chr_out;

  always #5 clk = ~clk;

  chroma_420to422 #(.DATA_W(DW), .MAX_WIDTH(64)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int unsigned exp_y[$], exp_c[$];
  int in_cyc[$];
  int n_in = 0, n_out = 0;
  logic [2:0] hist [MAXC];

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (cyc < MAXC) hist[cyc] = {vs_in, hs_in, din_valid};
    if (rst_n && cyc >= int'(LAT_420_TO_422) && cyc < MAXC) begin
      checks++;
      if ({vs_out, hs_out, dout_valid} !== hist[cyc - int'(LAT_420_TO_422)]) begin
        failures++; $display("sync/valid delay wrong at %0d", cyc);
      end
    end
    if (rst_n && din_valid) begin in_cyc.push_back(cyc); n_in++; end
    if (rst_n && dout_valid) begin
      int unsigned ey, ec;
      int ic;
      n_out++;
      checks += 3;
      ey = exp_y.pop_front();
      ec = exp_c.pop_front();
      ic = in_cyc.pop_front();
      if (y_out !== DW'(ey)) begin failures++; $display("y mismatch %0d vs %0d", y_out, ey); end
      if (chr_out !== DW'(ec)) begin failures++; $display("chr mismatch cyc %0d: %0d vs %0d", cyc, chr_out, ec); end
      if (cyc - ic != int'(LAT_420_TO_422)) begin failures++; $display("latency %0d", cyc - ic); end
    end
  end

  task automatic send_frame(bit repl, bit ilace, bit fodd);
    line_t prev, second;
    @(negedge clk); vs_in = 1'b1;
    repeat (3) @(negedge clk);
    vs_in = 1'b0;
    repeat (3) @(negedge clk);
    for (int l = 0; l < H; l++) begin
      line_t yl = rand_line(W, DW), ch = rand_line(W, DW);
      line_t first;
      foreach (yl[i]) exp_y.push_back(yl[i]);
      if (l == 0) begin
        foreach (yl[i]) exp_c.push_back(GREY);
      end else if (l % 2 == 1) begin
        ref_420to422((l == 1) ? ch : prev, ch, repl, ilace, fodd, first, second);
        foreach (first[i]) exp_c.push_back(first[i]);
        prev = ch;
      end else begin
        foreach (second[i]) exp_c.push_back(second[i]);
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
    // Vertical blanking: let the pipeline drain before settings change.
    repeat (8) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    method = METHOD_FIR;  interlaced = 1'b0; send_frame(1'b0, 1'b0, 1'b1);
    method = METHOD_FIR;  interlaced = 1'b1; send_frame(1'b0, 1'b1, 1'b0);
    method = METHOD_FIR;  interlaced = 1'b1; send_frame(1'b0, 1'b1, 1'b1);
    method = METHOD_DROP; interlaced = 1'b0; send_frame(1'b1, 1'b0, 1'b0);
    repeat (10) @(negedge clk);
    checks++;
    if (n_in != n_out || exp_y.size() != 0 || exp_c.size() != 0) begin
      failures++;
      $display("count mismatch in=%0d out=%0d", n_in, n_out);
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
