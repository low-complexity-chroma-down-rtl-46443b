// tb_line_buffer: self-checking test of the one-line buffer.
//
// Fills a 48-word buffer with random words, reads them all back checking the
// one-clock read latency, then rewrites every address while reading it in the
// same clock and checks that the old word is returned (read before write)
// and that the new word is stored.
module tb_line_buffer;

  localparam int DW = 10;
  localparam int D  = 48;
  localparam int AW = $clog2(D);

  logic clk = 1'b0;
  logic we = 1'b0;
  logic [AW-1:0] waddr = '0, raddr = '0;
  logic [DW-1:0] wdata = '0, rdata;

  always #5 clk = ~clk;

  line_buffer #(.DATA_W(DW), .DEPTH(D)) dut (.*);

  int checks = 0, failures = 0;
  logic [DW-1:0] model [D];

  initial begin
    for (int i = 0; i < D; i++) begin
      @(negedge clk);
      we = 1'b1; waddr = AW'(i); wdata = DW'($urandom); model[i] = wdata;
    end
    @(negedge clk); we = 1'b0;
    for (int i = 0; i < D; i++) begin
      raddr = AW'(D - 1 - i);
      @(negedge clk);
      checks++;
      if (rdata !== model[D-1-i]) begin failures++; $display("read %0d wrong", D-1-i); end
    end
    for (int i = 0; i < D; i++) begin
      raddr = AW'(i); waddr = AW'(i); we = 1'b1; wdata = DW'($urandom);
      @(negedge clk);
      checks++;
      if (rdata !== model[i]) begin failures++; $display("read-before-write %0d wrong", i); end
      model[i] = wdata;
    end
    we = 1'b0;
    for (int i = 0; i < D; i++) begin
      raddr = AW'(i);
      @(negedge clk);
      checks++;
      if (rdata !== model[i]) begin failures++; $display("reread %0d wrong", i); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
