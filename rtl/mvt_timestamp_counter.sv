// mvt_timestamp_counter: the system-clock counter register.
//
// A free-running binary counter that advances by one on every system-clock
// edge and wraps at 2**W. Its value is sent as the first word of every
// AXI-Stream transmission as a coarse time reference; the fine time inside
// a period comes from the TDC positions. clear (synchronous, from the
// configuration registers) and rst_n restart it at 0 on the next edge.
// The counter itself is named by the published core; width and clear input
// are this design's choices.
module mvt_timestamp_counter #(
  parameter int W = mvt_pkg::TS_W
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         clear,
  output logic [W-1:0] count_o
);

  always_ff @(posedge clk) begin
    if (!rst_n || clear) count_o <= '0;
    else                 count_o <= count_o + 1'b1;
  end

endmodule
