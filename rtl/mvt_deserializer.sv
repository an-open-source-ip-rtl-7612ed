// mvt_deserializer: 1:RATIO deserializer of one comparator output.
//
// The comparator output is sampled on every rising edge of the fast clock
// into a shift register (new samples enter at the top, so after RATIO edges
// the oldest sample sits in bit 0). On every rising edge of the system clock
// the shift register is copied into word_o, which therefore holds the RATIO
// samples taken on the fast edges from the previous system-clock edge
// (inclusive) up to the current one (exclusive), bit 0 the earliest.
//
// Clocking: clk_sys must be clk_fast divided by RATIO with rising edges
// aligned to rising edges of clk_fast (on the FPGA a divide-by buffer on the
// same clock tree); the copy is then an ordinary synchronous transfer.
// This is the function of the FPGA's input deserializer used as a TDC; its
// construction here (shift register plus parallel copy) is this design's.
// Timing: word_o is valid one system-clock cycle after the period it
// describes. rst_n is synchronous to clk_sys and clears word_o only.
module mvt_deserializer #(
  parameter int RATIO = mvt_pkg::DES_RATIO
) (
  input  logic             clk_fast,
  input  logic             clk_sys,
  input  logic             rst_n,
  input  logic             din,      // comparator output
  output logic [RATIO-1:0] word_o    // samples of the last system period
);

  logic [RATIO-1:0] shift_q;

  always_ff @(posedge clk_fast) begin
    shift_q <= {din, shift_q[RATIO-1:1]};
  end

  always_ff @(posedge clk_sys) begin
    if (!rst_n) word_o <= '0;
    else        word_o <= shift_q;
  end

endmodule
