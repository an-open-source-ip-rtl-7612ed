`timescale 1ns/1ps
// Self-checking testbench of mvt_axil_regs: drives AXI-Lite reads and
// writes (address and data phases offset in time, responses held back by
// BREADY/RREADY) and checks reset values, read-back, byte strobes, the
// timestamp-clear pulse, the overflow flag and drop counter (write 1 to
// clear), the read-only registers and the SLVERR answer for unmapped
// addresses.
module tb_mvt_axil_regs;
  import mvt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [AXIL_AW-1:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [AXIL_DW-1:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  logic enable, ts_clear, drop = 0, busy = 0;
  logic [NUM_CH-1:0] chan_mask;
  logic [TS_W-1:0] ts = 32'h1234_5678;
  int checks = 0, failures = 0, clear_pulses = 0;

  mvt_axil_regs dut (
    .clk(clk), .rst_n(rst_n),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .enable_o(enable), .chan_mask_o(chan_mask), .ts_clear_o(ts_clear),
    .drop_i(drop), .busy_i(busy), .timestamp_i(ts));

  always #5 clk = ~clk;
  always @(posedge clk) if (rst_n && ts_clear) clear_pulses++;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // write with the data phase one cycle after the address phase and the
  // response accepted after a delay
  task automatic axil_write(input logic [AXIL_AW-1:0] a, input logic [31:0] d,
                            input logic [3:0] s, output logic [1:0] resp);
    @(posedge clk); #1 awaddr = a; awvalid = 1;
    @(posedge clk); #1 wdata = d; wstrb = s; wvalid = 1;
    do @(posedge clk); while (!(awready && wready));
    #1 awvalid = 0; wvalid = 0;
    check(bvalid, "BVALID one cycle after the write is accepted");
    repeat (2) @(posedge clk);
    #1 check(bvalid, "BVALID held until BREADY");
    bready = 1;
    @(posedge clk); resp = bresp; #1 bready = 0;
    check(!bvalid, "BVALID drops after BREADY");
  endtask

  task automatic axil_read(input logic [AXIL_AW-1:0] a, output logic [31:0] d, output logic [1:0] resp);
    @(posedge clk); #1 araddr = a; arvalid = 1;
    do @(posedge clk); while (!arready);
    #1 arvalid = 0;
    check(rvalid, "RVALID one cycle after the read is accepted");
    @(posedge clk); #1 check(rvalid, "RVALID held until RREADY");
    rready = 1;
    @(posedge clk); d = rdata; resp = rresp; #1 rready = 0;
  endtask

  initial begin
    logic [31:0] d; logic [1:0] r;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    check(!enable && chan_mask == '1, "reset values of enable and channel mask");
    axil_read(REG_CTRL, d, r);      check(d == 0 && r == RESP_OKAY, "CTRL reads 0 after reset");
    axil_read(REG_CHAN_MASK, d, r); check(d == 32'hF, "CHAN_MASK reads F after reset");
    axil_read(REG_INFO, d, r);      check(d == {16'(DES_RATIO), 16'(NUM_CH)}, $sformatf("INFO %h", d));
    axil_read(REG_TIMESTAMP, d, r); check(d == ts, "TIMESTAMP shows the counter");
    axil_write(REG_CTRL, 32'h1, 4'h1, r);
    check(enable && r == RESP_OKAY, "ENABLE set");
    axil_write(REG_CHAN_MASK, 32'h6, 4'h1, r);
    check(chan_mask == 4'h6, "CHAN_MASK written");
    axil_write(REG_CHAN_MASK, 32'h9, 4'h2, r);
    check(chan_mask == 4'h6, "CHAN_MASK untouched by a write without its byte strobe");
    axil_read(REG_CHAN_MASK, d, r); check(d == 32'h6, "CHAN_MASK read back");
    check(clear_pulses == 0, "no timestamp clear yet");
    axil_write(REG_CTRL, 32'h3, 4'h1, r);
    check(enable && clear_pulses == 1, "TS_CLEAR gives one pulse, ENABLE stays");
    axil_read(REG_CTRL, d, r); check(d == 32'h1, "TS_CLEAR reads as 0");
    axil_read(REG_STATUS, d, r); check(d == 0, "no overflow yet");
    for (int i = 0; i < 5; i++) begin @(posedge clk); #1 drop = 1; @(posedge clk); #1 drop = 0; end
    busy = 1;
    axil_read(REG_STATUS, d, r); check(d == 32'h3, $sformatf("STATUS overflow and busy, got %h", d));
    axil_read(REG_DROPS, d, r); check(d == 5, $sformatf("DROPS counts 5, got %0d", d));
    axil_write(REG_STATUS, 32'h0, 4'h1, r);
    axil_read(REG_STATUS, d, r); check(d[0] == 1, "writing 0 keeps OVERFLOW");
    axil_write(REG_STATUS, 32'h1, 4'h1, r);
    axil_read(REG_STATUS, d, r); check(d == 32'h2, "writing 1 clears OVERFLOW");
    axil_read(REG_DROPS, d, r); check(d == 0, "and the drop counter");
    axil_read(5'h1C, d, r); check(r == RESP_SLVERR && d == 0, "unmapped read answers SLVERR");
    axil_write(5'h18, 32'hFFFF_FFFF, 4'hF, r); check(r == RESP_SLVERR, "unmapped write answers SLVERR");
    check(enable && chan_mask == 4'h6, "unmapped write changes nothing");
    axil_write(REG_CTRL, 32'h0, 4'hF, r);
    check(!enable, "ENABLE cleared");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
