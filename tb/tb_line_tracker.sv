// tb_line_tracker: self-checking test of the line/field state machine.
//
// Sends three frames of lines with random widths and blanking. For every
// active sample it compares line_start, col, pix_odd, line_odd and pair_seen
// with counters kept by the testbench, and at every frame it checks that
// field_odd alternates starting with the odd field.
module tb_line_tracker;

  localparam int MW = 64;
  localparam int AW = $clog2(MW);

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic vs_in = 1'b0, din_valid = 1'b0;
  logic line_start, pix_odd, line_odd, pair_seen, field_odd;
  logic [AW-1:0] col;

  always #5 clk = ~clk;

  line_tracker #(.MAX_WIDTH(MW)) dut (.*);

  int checks = 0, failures = 0;
  int exp_col, exp_line;
  int frame = 0;

  task automatic chk(bit cond, string what);
    checks++;
    if (!cond) begin failures++; $display("%s wrong at %0t", what, $time); end
  endtask

  initial begin
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (frame = 0; frame < 3; frame++) begin
      @(negedge clk); vs_in = 1'b1;
      repeat (2) @(negedge clk);
      vs_in = 1'b0;
      repeat (2) @(negedge clk);
      chk(field_odd == (frame % 2 == 0), "field_odd");
      for (exp_line = 0; exp_line < 5; exp_line++) begin
        int w = 2 + 2 * ($urandom % 8);
        for (exp_col = 0; exp_col < w; exp_col++) begin
          din_valid = 1'b1;
          #1;
          chk(line_start == (exp_col == 0), "line_start");
          chk(col == AW'(exp_col), "col");
          chk(pix_odd == exp_col[0], "pix_odd");
          chk(line_odd == exp_line[0], "line_odd");
          chk(pair_seen == (exp_line >= 2), "pair_seen");
          @(negedge clk);
        end
        din_valid = 1'b0;
        repeat (1 + $urandom % 4) @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
