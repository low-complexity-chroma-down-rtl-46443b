// tb_chroma_422to444: self-checking test of the 4:2:2 -> 4:4:4 converter.
//
// Drives lines of random 10-bit luma and interleaved chroma, first with the
// [1/2 1/2] interpolation and then with replication, and compares Y, Cb and
// Cr of every output pixel with the reference model, including the
// replicated right edge. Checks that each output pixel leaves exactly
// LAT_422_TO_444 clocks after its input sample and the output count.
module tb_chroma_422to444;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int W  = 16;
  localparam int LINES_PER_MODE = 6;
  localparam int BLANK = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  method_e method = METHOD_FIR;
  logic din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, chr_in = '0;
  logic [DW-1:0] y_out, cb_out, cr_out;
  logic dout_valid;

  always #5 clk = ~clk;

  chroma_422to444 #(.DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
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
      checks += 4;
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
        if (cyc - ic != int'(LAT_422_TO_444)) begin failures++; $display("latency %0d", cyc - ic); end
      end
    end
  end

  task automatic send_line(bit repl);
    line_t yl = rand_line(W, DW), ch = rand_line(W, DW);
    line_t cbl, crl;
    ref_422to444(ch, repl, cbl, crl);
    foreach (yl[i]) begin
      exp_y.push_back(yl[i]); exp_cb.push_back(cbl[i]); exp_cr.push_back(crl[i]);
    end
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      din_valid = 1'b1; y_in = DW'(yl[i]); chr_in = DW'(ch[i]);
    end
    @(negedge clk);
    din_valid = 1'b0; y_in = '0; chr_in = DW'($urandom);
    repeat (BLANK - 1) @(negedge clk);
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    repeat (2) @(negedge clk);
    for (int m = 0; m < 2; m++) begin
      method = (m == 0) ? METHOD_FIR : METHOD_DROP;
      for (int l = 0; l < LINES_PER_MODE; l++) send_line(m == 1);
    end
    repeat (10) @(negedge clk);
    checks++;
    if (n_in != n_out || exp_y.size() != 0) begin
      failures++;
      $display("count mismatch in=%0d out=%0d left=%0d", n_in, n_out, exp_y.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
