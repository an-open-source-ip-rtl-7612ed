`timescale 1ns/1ps
// Self-checking testbench of mvt_deserializer: an 800 MHz fast clock and an
// edge-aligned 100 MHz system clock come from one process; a random
// comparator level is driven before every fast edge and remembered. Each
// system-clock word must hold exactly the 8 samples of the previous system
// period, earliest in bit 0, one system cycle after that period ends.
module tb_mvt_deserializer;
  import mvt_pkg::*;
  localparam real HALF = 0.625;   // 800 MHz
  logic clk_fast, clk_sys, rst_n, din;
  logic [DES_RATIO-1:0] word;
  logic samp [int unsigned];
  int unsigned fe = 0;            // index of the next fast rising edge
  int checks = 0, failures = 0;

  mvt_deserializer dut (.clk_fast(clk_fast), .clk_sys(clk_sys), .rst_n(rst_n), .din(din), .word_o(word));

  initial begin
    clk_fast = 1'b0; clk_sys = 1'b0;
    forever begin
      din = (fe % 37 < 18) ? 1'($urandom_range(0, 1)) : 1'(fe % 5 == 0);
      samp[fe] = din;
      #HALF;
      clk_fast = 1'b1;
      if (fe % DES_RATIO == 0) clk_sys = 1'b1;
      else if (fe % DES_RATIO == DES_RATIO / 2) clk_sys = 1'b0;
      fe++;
      #HALF;
      clk_fast = 1'b0;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk_sys);
    rst_n = 1'b1;
  end

  // at a system edge with fast index cur, word (before this edge updates it)
  // holds the samples of fast edges cur-2R .. cur-R-1
  always @(posedge clk_sys) begin
    int unsigned cur;
    logic [DES_RATIO-1:0] expw;
    cur = fe - 1;
    if (rst_n && cur >= 5 * DES_RATIO) begin
      for (int i = 0; i < DES_RATIO; i++) expw[i] = samp[cur - 2 * DES_RATIO + i];
      checks++;
      if (word !== expw) begin
        failures++;
        if (failures < 10) $display("FAIL at fast edge %0d: word %b expected %b", cur, word, expw);
      end
    end
    if (checks == 2000) begin
      $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
      $finish;
    end
  end

  initial begin
    repeat (5000) @(posedge clk_sys);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
