// mvt_axis_fifo: small first-word-fall-through FIFO with an AXI-Stream
// master output, used as the output buffer of the data packager.
//
// Words are written with push (the writer must check free_o; a push into a
// full FIFO is a design error and is flagged by an assertion). The head word
// is presented on m_axis_* and leaves when tvalid and tready are both high.
// free_o is the number of empty entries before this cycle's pop.
// Storage is a register array of DEPTH entries (DEPTH a power of two).
// Timing: a pushed word appears on the output one cycle after the push.
// The published core does not describe output buffering; this FIFO and its
// default depth of 4 are this design's choice.
module mvt_axis_fifo #(
  parameter int DEPTH = 4,
  parameter int W     = 32
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic                   push,
  input  logic [W-1:0]           push_data,
  input  logic                   push_last,
  output logic [$clog2(DEPTH):0] free_o,
  output logic [W-1:0]           m_axis_tdata,
  output logic                   m_axis_tlast,
  output logic                   m_axis_tvalid,
  input  logic                   m_axis_tready
);

  localparam int AW = $clog2(DEPTH);

  logic [W:0]    mem [DEPTH];
  logic [AW-1:0] wr_ptr, rd_ptr;
  logic [AW:0]   count;
  logic          pop;

  assign pop           = m_axis_tvalid && m_axis_tready;
  assign m_axis_tvalid = (count != '0);
  assign {m_axis_tlast, m_axis_tdata} = mem[rd_ptr];
  assign free_o        = (AW+1)'(DEPTH) - count;

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= {push_last, push_data};
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (push) wr_ptr <= wr_ptr + 1'b1;
      if (pop)  rd_ptr <= rd_ptr + 1'b1;
      count <= count + (AW+1)'(push) - (AW+1)'(pop);
    end
  end

  // the writer never pushes into a full FIFO
  assert property (@(posedge clk) disable iff (!rst_n) push |-> free_o != '0)
    else $error("mvt_axis_fifo: push into full FIFO");
  // AXI-Stream: a presented word stays until it is taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   m_axis_tvalid && !m_axis_tready |=> m_axis_tvalid && $stable(m_axis_tdata) && $stable(m_axis_tlast))
    else $error("mvt_axis_fifo: AXI-Stream word changed before it was taken");

endmodule
