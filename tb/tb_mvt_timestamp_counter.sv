`timescale 1ns/1ps
// Self-checking testbench of mvt_timestamp_counter: counts from 0 after
// reset, one per clock, restarts on clear, and wraps (checked with a narrow
// instance).
module tb_mvt_timestamp_counter;
  logic clk = 1'b0, rst_n = 1'b0, clear = 1'b0;
  logic [31:0] count;
  logic [3:0]  count4;
  int checks = 0, failures = 0;

  mvt_timestamp_counter dut (.clk(clk), .rst_n(rst_n), .clear(clear), .count_o(count));
  mvt_timestamp_counter #(.W(4)) dut4 (.clk(clk), .rst_n(rst_n), .clear(1'b0), .count_o(count4));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 check(count == 0, "count held at 0 in reset");
    rst_n = 1'b1;
    for (int i = 1; i <= 40; i++) begin
      @(posedge clk); #1;
      check(count == 32'(i), $sformatf("count %0d after %0d edges", count, i));
      check(count4 == 4'(i), $sformatf("4-bit count %0d after %0d edges", count4, i));
    end
    clear = 1'b1;
    @(posedge clk); #1 clear = 1'b0;
    check(count == 0, "clear restarts at 0");
    repeat (5) @(posedge clk);
    #1 check(count == 5, "counts again after clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
