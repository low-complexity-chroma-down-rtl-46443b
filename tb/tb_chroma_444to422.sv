// tb_chroma_444to422: self-checking test of the 4:4:4 -> 4:2:2 converter.
//
// Drives lines of random 10-bit Y/Cb/Cr, first with the FIR filter and then
// with sample dropping, and compares every output pixel (luma and the
// interleaved chroma bus) with the line-based reference model. Also checks
// that each output pixel leaves exactly LAT_444_TO_422 clocks after its input
// pixel and that the output count matches the input count.
module tb_chroma_444to422;
  import chroma_pkg::*;
  import tb_chroma_ref_pkg::*;

  localparam int DW = 10;
  localparam int W  = 16;
  localparam int LINES_PER_MODE = 6;
  localparam int BLANK = 5;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  method_e method = METHOD_FIR;
  logic din_valid = 1'b0;
  logic [DW-1:0] y_in = '0, cb_in = '0, cr_in = '0;
  logic [DW-1:0] y_out, chr_out;
  logic dout_valid;

  always #5 clk = ~clk;

  chroma_444to422 #(.DATA_W(DW)) dut (.*);

  int checks = 0, failures = 0;
  int cyc = 0;
  int unsigned exp_y[$], exp_c[$];
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
      checks += 3;
      if (exp_y.size() == 0 || in_cyc.size() == 0) begin
        failures++;
        $display("unexpected output at cycle %0d", cyc);
      end else begin
        int unsigned ey, ec;
        int ic;
        ey = exp_y.pop_front();
        ec = exp_c.pop_front();
        ic = in_cyc.pop_front();
        if (y_out !== DW'(ey)) begin failures++; $display("y mismatch %0d vs %0d", y_out, ey); end
        if (chr_out !== DW'(ec)) begin failures++; $display("chr mismatch cyc %0d: %0d vs %0d", cyc, chr_out, ec); end
        if (cyc - ic != int'(LAT_444_TO_422)) begin failures++; $display("latency %0d", cyc - ic); end
      end
    end
  end

  task automatic send_line(bit drop);
    line_t yl = rand_line(W, DW), cbl = rand_line(W, DW), crl = rand_line(W, DW);
    line_t ch = ref_444to422(cbl, crl, drop);
    foreach (yl[i]) begin exp_y.push_back(yl[i]); exp_c.push_back(ch[i]); end
    for (int i = 0; i < W; i++) begin
      @(negedge clk);
      din_valid = 1'b1; y_in = DW'(yl[i]); cb_in = DW'(cbl[i]); cr_in = DW'(crl[i]);
    end
    @(negedge clk);
    din_valid = 1'b0; y_in = '0; cb_in = DW'($urandom); cr_in = DW'($urandom);
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
