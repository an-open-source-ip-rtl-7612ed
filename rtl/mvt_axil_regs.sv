// mvt_axil_regs: AXI-Lite slave with the configuration and status registers
// of the MVT-Quad core.
//
// The published core has an AXI-Lite port for its internal configuration
// registers but does not list them; this register map is this design's own:
//   0x00 CTRL      [0] ENABLE (reset 0), [1] TS_CLEAR: writing 1 restarts the
//                  system-clock counter (one-cycle pulse, reads as 0)
//   0x04 CHAN_MASK [NUM_CH-1:0] per-channel enable (reset all ones)
//   0x08 STATUS    [0] OVERFLOW, set when the packager lost a period;
//                  writing 1 clears it and the drop counter; [1] BUSY (RO)
//   0x0C DROPS     number of lost periods, saturating (RO)
//   0x10 TIMESTAMP current system-clock counter (RO)
//   0x14 INFO      [31:16] samples per system period, [15:0] channels (RO)
// Other addresses read 0 and answer SLVERR; writes to them are ignored.
//
// Handshake: a write is accepted in the cycle in which AWVALID and WVALID
// are both high and no response is pending (AWREADY = WREADY = 1 for that
// cycle); BVALID follows one cycle later and is held until BREADY. A read is
// accepted when ARVALID is high and no read data is pending; RVALID follows
// one cycle later and is held until RREADY. WSTRB is honoured per byte.
// All in the system clock domain, rst_n synchronous active low.
module mvt_axil_regs
  import mvt_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  // AXI-Lite slave
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
  // core side
  output logic               enable_o,
  output logic [NUM_CH-1:0]  chan_mask_o,
  output logic               ts_clear_o,
  input  logic               drop_i,
  input  logic               busy_i,
  input  logic [TS_W-1:0]    timestamp_i
);

  logic               overflow_q;
  logic [31:0]        drops_q;
  logic               wr_go, rd_go;
  logic [AXIL_DW-1:0] wmask;
  logic               ovf_clear;

  assign wr_go          = s_axil_awvalid && s_axil_wvalid && !s_axil_bvalid;
  assign rd_go          = s_axil_arvalid && !s_axil_rvalid;
  assign s_axil_awready = wr_go;
  assign s_axil_wready  = wr_go;
  assign s_axil_arready = rd_go;

  always_comb begin
    for (int b = 0; b < 4; b++) wmask[8*b +: 8] = {8{s_axil_wstrb[b]}};
  end

  assign ovf_clear = wr_go && (s_axil_awaddr == REG_STATUS) && s_axil_wstrb[0] && s_axil_wdata[0];

  // write side
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      enable_o      <= 1'b0;
      chan_mask_o   <= '1;
      ts_clear_o    <= 1'b0;
      s_axil_bvalid <= 1'b0;
      s_axil_bresp  <= RESP_OKAY;
    end else begin
      ts_clear_o <= 1'b0;
      if (s_axil_bvalid && s_axil_bready) s_axil_bvalid <= 1'b0;
      if (wr_go) begin
        s_axil_bvalid <= 1'b1;
        s_axil_bresp  <= RESP_OKAY;
        unique case (s_axil_awaddr)
          REG_CTRL: if (s_axil_wstrb[0]) begin
            enable_o   <= s_axil_wdata[0];
            ts_clear_o <= s_axil_wdata[1];
          end
          REG_CHAN_MASK:
            chan_mask_o <= (chan_mask_o & ~NUM_CH'(wmask)) | NUM_CH'(s_axil_wdata & wmask);
          REG_STATUS, REG_DROPS, REG_TIMESTAMP, REG_INFO: ;
          default: s_axil_bresp <= RESP_SLVERR;
        endcase
      end
    end
  end

  // status: overflow flag and drop counter
  always_ff @(posedge clk) begin
    if (!rst_n || ovf_clear) begin
      overflow_q <= 1'b0;
      drops_q    <= '0;
    end else if (drop_i) begin
      overflow_q <= 1'b1;
      if (drops_q != '1) drops_q <= drops_q + 1'b1;
    end
  end

  // read side
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      s_axil_rvalid <= 1'b0;
      s_axil_rdata  <= '0;
      s_axil_rresp  <= RESP_OKAY;
    end else begin
      if (s_axil_rvalid && s_axil_rready) s_axil_rvalid <= 1'b0;
      if (rd_go) begin
        s_axil_rvalid <= 1'b1;
        s_axil_rresp  <= RESP_OKAY;
        unique case (s_axil_araddr)
          REG_CTRL:      s_axil_rdata <= AXIL_DW'(enable_o);
          REG_CHAN_MASK: s_axil_rdata <= AXIL_DW'(chan_mask_o);
          REG_STATUS:    s_axil_rdata <= AXIL_DW'({busy_i, overflow_q});
          REG_DROPS:     s_axil_rdata <= drops_q;
          REG_TIMESTAMP: s_axil_rdata <= AXIL_DW'(timestamp_i);
          REG_INFO:      s_axil_rdata <= {16'(DES_RATIO), 16'(NUM_CH)};
          default: begin
            s_axil_rdata <= '0;
            s_axil_rresp <= RESP_SLVERR;
          end
        endcase
      end
    end
  end

  // AXI-Lite: responses stay valid, with stable content, until taken
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_bvalid && !s_axil_bready |=> s_axil_bvalid && $stable(s_axil_bresp))
    else $error("mvt_axil_regs: write response dropped before BREADY");
  assert property (@(posedge clk) disable iff (!rst_n)
                   s_axil_rvalid && !s_axil_rready |=> s_axil_rvalid && $stable(s_axil_rdata) && $stable(s_axil_rresp))
    else $error("mvt_axil_regs: read data changed before RREADY");

endmodule
