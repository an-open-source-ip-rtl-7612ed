// mvt_tdc_encoder: turns one channel's sample word into transition times.
//
// Each system-clock cycle it receives the RATIO fast-clock samples of one
// period (bit 0 earliest) and reports the first rising and the first falling
// transition in that period, each as a valid flag and the index of the first
// sample at the new level. The last sample of the previous period is kept so
// that a transition exactly at a period boundary is reported at position 0.
// At most one rising and one falling transition per period are reported, as
// in the published stream format; further transitions in the same period
// (pulses shorter than a few fast-clock cycles) are not reported.
//
// Timing: hit_o is registered, one system-clock cycle after word_i.
// rst_n (synchronous) clears the output and takes the previous level as 0.
module mvt_tdc_encoder
  import mvt_pkg::*;
#(
  parameter int RATIO = DES_RATIO
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RATIO-1:0] word_i,
  output tdc_hit_t         hit_o
);

  logic     last_q;   // last sample of the previous period
  tdc_hit_t hit_d;

  always_comb begin
    logic prev;
    hit_d = '0;
    prev  = last_q;
    for (int i = 0; i < RATIO; i++) begin
      if (!prev && word_i[i] && !hit_d.rise_valid) begin
        hit_d.rise_valid = 1'b1;
        hit_d.rise_pos   = POS_W'(i);
      end
      if (prev && !word_i[i] && !hit_d.fall_valid) begin
        hit_d.fall_valid = 1'b1;
        hit_d.fall_pos   = POS_W'(i);
      end
      prev = word_i[i];
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      last_q <= 1'b0;
      hit_o  <= '0;
    end else begin
      last_q <= word_i[RATIO-1];
      hit_o  <= hit_d;
    end
  end

endmodule
