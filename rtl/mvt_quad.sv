// mvt_quad: Multi-Voltage-Threshold acquisition core with four inputs.
//
// Four FPGA input comparators compare one analog pulse with four reference
// voltages; their digital outputs enter here as cmp_i. Each is sampled at
// the fast clock by a 1:DES_RATIO deserializer, and a TDC encoder turns each
// system-clock period's samples into the position of the first rising and
// the first falling transition. The data packager streams these out over an
// AXI-Stream master: a packet starts with the system-clock counter value
// when any comparator switches, continues with one 32-bit word per period
// (8 bits per comparator) and ends, with TLAST, at the first period without
// transitions. An AXI-Lite slave holds the configuration registers (enable,
// channel mask, timestamp clear, overflow status).
//
// Clocks: clk_fast samples the comparators (800 MHz for 800 MSPS);
// clk_sys = clk_fast / DES_RATIO (100 MHz) with aligned rising edges, as made
// by a divide-by clock buffer outside this module. Everything except the
// deserializers' shift registers runs on clk_sys; rst_n is synchronous to it.
// Latency: a period's samples reach the packager three clk_sys edges after
// the period starts (deserializer copy, encoder register); the timestamp
// word of a packet is the counter value while the packager sees the first
// period with a transition. Four inputs, the fast-clock sampling, the
// stream format and the two AXI interfaces follow the published core;
// widths of the timestamp, the register map and the output FIFO are this
// design's choices.
module mvt_quad
  import mvt_pkg::*;
#(
  parameter int FIFO_DEPTH = 4
) (
  input  logic               clk_fast,
  input  logic               clk_sys,
  input  logic               rst_n,
  input  logic [NUM_CH-1:0]  cmp_i,
  // AXI-Lite configuration slave
  input  logic [AXIL_AW-1:0] s_axil_awaddr,
  input  logic               s_axil_awvalid,
  output logic               s_axil_awready,
  input  logic [AXIL_DW-1:0] s_axil_wdata,
  input  logic [3:0]         s_axil_wstrb,
  input  logic               s_axil_wvalid,
  output logic               s_axil_wready,
  output logic [1:0]         s_axil_bresp,
  output logic               s_axil_bvalid,
  input  logic               s_axil_bready,
  input  logic [AXIL_AW-1:0] s_axil_araddr,
  input  logic               s_axil_arvalid,
  output logic               s_axil_arready,
  output logic [AXIL_DW-1:0] s_axil_rdata,
  output logic [1:0]         s_axil_rresp,
  output logic               s_axil_rvalid,
  input  logic               s_axil_rready,
  // AXI-Stream data master
  output logic [AXIS_W-1:0]  m_axis_tdata,
  output logic               m_axis_tlast,
  output logic               m_axis_tvalid,
  input  logic               m_axis_tready
);

  logic [DES_RATIO-1:0]  words [NUM_CH];
  tdc_hit_t [NUM_CH-1:0] hits;
  logic [TS_W-1:0]       timestamp;
  logic                  enable, ts_clear, drop, busy;
  logic [NUM_CH-1:0]     chan_mask;

  for (genvar c = 0; c < NUM_CH; c++) begin : g_ch
    mvt_deserializer #(.RATIO(DES_RATIO)) u_des (
      .clk_fast(clk_fast),
      .clk_sys (clk_sys),
      .rst_n   (rst_n),
      .din     (cmp_i[c]),
      .word_o  (words[c])
    );
    mvt_tdc_encoder #(.RATIO(DES_RATIO)) u_tdc (
      .clk   (clk_sys),
      .rst_n (rst_n),
      .word_i(words[c]),
      .hit_o (hits[c])
    );
  end

  mvt_timestamp_counter #(.W(TS_W)) u_ts (
    .clk    (clk_sys),
    .rst_n  (rst_n),
    .clear  (ts_clear),
    .count_o(timestamp)
  );

  mvt_data_packager #(.FIFO_DEPTH(FIFO_DEPTH)) u_pack (
    .clk          (clk_sys),
    .rst_n        (rst_n),
    .enable       (enable),
    .chan_mask    (chan_mask),
    .timestamp_i  (timestamp),
    .hits_i       (hits),
    .drop_o       (drop),
    .busy_o       (busy),
    .m_axis_tdata (m_axis_tdata),
    .m_axis_tlast (m_axis_tlast),
    .m_axis_tvalid(m_axis_tvalid),
    .m_axis_tready(m_axis_tready)
  );

  mvt_axil_regs u_regs (
    .clk           (clk_sys),
    .rst_n         (rst_n),
    .s_axil_awaddr (s_axil_awaddr),
    .s_axil_awvalid(s_axil_awvalid),
    .s_axil_awready(s_axil_awready),
    .s_axil_wdata  (s_axil_wdata),
    .s_axil_wstrb  (s_axil_wstrb),
    .s_axil_wvalid (s_axil_wvalid),
    .s_axil_wready (s_axil_wready),
    .s_axil_bresp  (s_axil_bresp),
    .s_axil_bvalid (s_axil_bvalid),
    .s_axil_bready (s_axil_bready),
    .s_axil_araddr (s_axil_araddr),
    .s_axil_arvalid(s_axil_arvalid),
    .s_axil_arready(s_axil_arready),
    .s_axil_rdata  (s_axil_rdata),
    .s_axil_rresp  (s_axil_rresp),
    .s_axil_rvalid (s_axil_rvalid),
    .s_axil_rready (s_axil_rready),
    .enable_o      (enable),
    .chan_mask_o   (chan_mask),
    .ts_clear_o    (ts_clear),
    .drop_i        (drop),
    .busy_i        (busy),
    .timestamp_i   (timestamp)
  );

endmodule
