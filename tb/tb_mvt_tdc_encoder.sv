`timescale 1ns/1ps
// Self-checking testbench of mvt_tdc_encoder: feeds directed and random
// sample words and compares the registered output with a reference that
// scans the sample stream sample by sample (including the boundary between
// words). Also checks the one-cycle latency.
module tb_mvt_tdc_encoder;
  import mvt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [DES_RATIO-1:0] word = '0;
  tdc_hit_t hit;
  int checks = 0, failures = 0;
  int n_both = 0, n_boundary = 0;

  mvt_tdc_encoder dut (.clk(clk), .rst_n(rst_n), .word_i(word), .hit_o(hit));

  always #5 clk = ~clk;

  // reference: positions of the first 0->1 and 1->0 in {word, previous sample}
  function automatic tdc_hit_t ref_hit(logic [DES_RATIO-1:0] w, logic prev);
    tdc_hit_t r = '0;
    logic [DES_RATIO:0] s = {w, prev};    // s[0] is the previous sample
    for (int i = DES_RATIO; i >= 1; i--) begin   // scan backwards, keep earliest
      if (s[i] && !s[i-1]) begin r.rise_valid = 1'b1; r.rise_pos = POS_W'(i-1); end
      if (!s[i] && s[i-1]) begin r.fall_valid = 1'b1; r.fall_pos = POS_W'(i-1); end
    end
    return r;
  endfunction

  logic [DES_RATIO-1:0] directed [8] = '{8'h00, 8'hFF, 8'h00, 8'h01, 8'h80, 8'h7E, 8'hF0, 8'h55};

  initial begin
    logic prev;
    tdc_hit_t exp_hit;
    repeat (2) @(posedge clk);
    #1 rst_n = 1'b1;
    prev = 1'b0;
    for (int n = 0; n < 3000; n++) begin
      if (n < 8) word = directed[n];
      else if (n % 3 == 0) word = DES_RATIO'($urandom);
      else word = {DES_RATIO{word[DES_RATIO-1]}} ^ (DES_RATIO'($urandom_range(0, 1)) << $urandom_range(0, DES_RATIO-1));
      exp_hit = ref_hit(word, prev);
      if (exp_hit.rise_valid && exp_hit.fall_valid) n_both++;
      if ((exp_hit.rise_valid && exp_hit.rise_pos == 0) || (exp_hit.fall_valid && exp_hit.fall_pos == 0)) n_boundary++;
      prev = word[DES_RATIO-1];
      @(posedge clk); #1;
      checks++;
      if (hit !== exp_hit) begin
        failures++;
        if (failures < 10) $display("FAIL: word %b prev %b: got %p expected %p", word, exp_hit, hit, exp_hit);
      end
    end
    checks++;
    if (n_both == 0 || n_boundary == 0) begin failures++; $display("FAIL: stimulus did not cover both-edge or boundary cases"); end
    $display("rise+fall in one period: %0d, transition at a period boundary: %0d", n_both, n_boundary);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
