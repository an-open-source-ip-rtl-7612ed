`timescale 1ns/1ps
// End-to-end testbench of mvt_quad at its default parameters.
//
// An 800 MHz fast clock and an edge-aligned 100 MHz system clock come from
// one process, which also drives the four comparator levels before every
// fast edge (random pulses of random length, with quiet stretches) and
// remembers every sample. The core is configured over AXI-Lite and its
// AXI-Stream output is decoded: each packet must start with the timestamp
// T of the first period with a transition, and payload k must equal the
// transitions that the testbench computes itself from the remembered
// samples of the period T+k (as counted by the system-clock counter, which
// the testbench mirrors). TLAST must fall where the next period is quiet.
// Phases exercise: plain acquisition, a channel mask, a disabled core,
// back-pressure with lost periods (checked against the DROPS register and
// the OVERFLOW flag) and the timestamp clear. Each mechanism is counted and
// must occur at least once. With TREADY high the timestamp word must be
// taken 4 system cycles after the start of the period it marks.
module tb_mvt_quad;
  import mvt_pkg::*;
  localparam real HALF = 0.625;   // 800 MHz fast clock
  localparam int  R    = DES_RATIO;

  logic clk_fast, clk_sys, rst_n = 1'b0;
  logic [NUM_CH-1:0] cmp;
  logic [AXIL_AW-1:0] awaddr = '0, araddr = '0;
  logic awvalid = 0, wvalid = 0, bready = 0, arvalid = 0, rready = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [AXIL_DW-1:0] wdata = '0, rdata;
  logic [3:0] wstrb = '0;
  logic [1:0] bresp, rresp;
  logic [AXIS_W-1:0] tdata;
  logic tlast, tvalid, tready = 1'b1;

  mvt_quad dut (
    .clk_fast(clk_fast), .clk_sys(clk_sys), .rst_n(rst_n), .cmp_i(cmp),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(wstrb), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr(araddr), .s_axil_arvalid(arvalid), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(rready),
    .m_axis_tdata(tdata), .m_axis_tlast(tlast), .m_axis_tvalid(tvalid), .m_axis_tready(tready));

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (%0t): %s", $time, what);
    end
  endtask

  // ---------------- clocks and comparator stimulus ----------------
  int unsigned fe = 0;                    // index of the next fast rising edge
  logic [NUM_CH-1:0] samp [int unsigned]; // comparator levels per fast edge
  logic [NUM_CH-1:0] level = '0;
  bit active = 0;
  int toggle_pct = 8;

  initial begin
    clk_fast = 1'b0; clk_sys = 1'b0;
    forever begin
      for (int c = 0; c < NUM_CH; c++)
        if (!active) level[c] = 1'b0;
        else if ($urandom_range(0, 99) < toggle_pct) level[c] = ~level[c];
      cmp = level;
      samp[fe] = level;
      #HALF;
      clk_fast = 1'b1;
      if (fe % R == 0) clk_sys = 1'b1;
      else if (fe % R == R / 2) clk_sys = 1'b0;
      fe++;
      #HALF;
      clk_fast = 1'b0;
    end
  end

  // ---------------- reference model ----------------
  int unsigned m = 0;                      // mirror of the system-clock counter
  int unsigned start_fe [int unsigned];    // first fast edge of the period with counter value m
  logic        cfg_en   [int unsigned];
  logic [NUM_CH-1:0] cfg_mask [int unsigned];
  bit          in_bp    [int unsigned];    // period lies in the back-pressure phase
  bit          sent     [int unsigned];
  bit recording = 1, decode_on = 1, bp_phase = 0, cur_en = 0;
  logic [NUM_CH-1:0] cur_mask = '1;

  // expected payload word of the period whose counter value was k
  function automatic logic [AXIS_W-1:0] expect_word(int unsigned k);
    logic [AXIS_W-1:0] w = '0;
    int unsigned s0 = start_fe[k];
    for (int c = 0; c < NUM_CH; c++) begin
      logic prev = samp[s0 - 1][c];
      logic rv = 0, fv = 0;
      logic [POS_W-1:0] rp = '0, fp = '0;
      for (int i = 0; i < R; i++) begin
        logic cur = samp[s0 + i][c];
        if (!prev && cur && !rv) begin rv = 1; rp = POS_W'(i); end
        if (prev && !cur && !fv) begin fv = 1; fp = POS_W'(i); end
        prev = cur;
      end
      if (cfg_en[k] && cfg_mask[k][c]) w[8*c +: 8] = {fv, fp, rv, rp};
    end
    return w;
  endfunction

  // mechanism counters
  int n_packets = 0, n_multi = 0, n_both = 0, n_boundary = 0, n_long = 0, n_allch = 0;
  int n_masked = 0, n_disabled = 0, n_stall = 0, n_trunc = 0, n_overflow = 0, n_tsclear = 0;

  bit in_pkt = 0;
  int unsigned pkt_t = 0, pkt_k = 0;
  always @(posedge clk_sys) begin
    int unsigned key;
    logic [AXIS_W-1:0] exp_w;
    if (rst_n && tvalid && !tready) n_stall++;
    if (rst_n && tvalid && tready && decode_on) begin
      if (!in_pkt) begin
        in_pkt = 1; pkt_t = tdata; pkt_k = 0; n_packets++;
        key = pkt_t - 2;
        check(!tlast, "timestamp word carries TLAST");
        check(start_fe.exists(key) && expect_word(key) != 0, $sformatf("timestamp %0d marks a quiet period", pkt_t));
        if (!in_bp[key]) begin
          check(expect_word(key - 1) == 0, $sformatf("packet at %0d did not start at the first active period", pkt_t));
          check(m == pkt_t + 1, $sformatf("timestamp word taken at counter %0d, expected %0d", m, pkt_t + 1));
        end
      end else begin
        key = pkt_t - 2 + pkt_k;
        exp_w = expect_word(key);
        check(tdata == exp_w, $sformatf("period %0d: payload %h expected %h", key, tdata, exp_w));
        check(!sent.exists(key), $sformatf("period %0d sent twice", key));
        sent[key] = 1;
        for (int c = 0; c < NUM_CH; c++) begin
          if (tdata[8*c+3] && tdata[8*c+7]) n_both++;
          if ((tdata[8*c+3] && tdata[8*c +: 3] == 0) || (tdata[8*c+7] && tdata[8*c+4 +: 3] == 0)) n_boundary++;
        end
        if ((tdata[3] || tdata[7]) && (tdata[11] || tdata[15]) && (tdata[19] || tdata[23]) && (tdata[27] || tdata[31])) n_allch++;
        pkt_k++;
        if (pkt_k == 2) n_multi++;
        if (tlast) begin
          in_pkt = 0;
          if (expect_word(key + 1) != 0) begin
            check(in_bp[key + 1], "TLAST before an active period outside back-pressure");
            n_trunc++;
          end else if (samp[start_fe[key + 1]] != 0) n_long++;   // a comparator stays high past the packet
        end
      end
    end
    // mirror of the counter, and what the period starting now will be checked against
    if (!rst_n) m = 0; else m = m + 1;
    if (recording) begin
      start_fe[m] = fe - 1;
      cfg_en[m]   = cur_en;
      cfg_mask[m] = cur_mask;
      in_bp[m]    = bp_phase;
      for (int c = 0; c < NUM_CH; c++)
        if (active && !cur_en) n_disabled++;
        else if (active && !cur_mask[c]) n_masked++;
    end
  end

  // ---------------- AXI-Lite master ----------------
  task automatic axil_write(input logic [AXIL_AW-1:0] a, input logic [31:0] d);
    @(posedge clk_sys); #1 awaddr = a; awvalid = 1; wdata = d; wstrb = 4'hF; wvalid = 1; bready = 1;
    do @(posedge clk_sys); while (!(awready && wready));
    #1 awvalid = 0; wvalid = 0;
    do @(posedge clk_sys); while (!bvalid);
    check(bresp == RESP_OKAY, "write answered OKAY");
    #1 bready = 0;
  endtask

  task automatic axil_read(input logic [AXIL_AW-1:0] a, output logic [31:0] d);
    @(posedge clk_sys); #1 araddr = a; arvalid = 1; rready = 1;
    do @(posedge clk_sys); while (!arready);
    #1 arvalid = 0;
    do @(posedge clk_sys); while (!rvalid);
    d = rdata;
    #1 rready = 0;
  endtask

  task automatic periods(input int n);
    repeat (n) @(posedge clk_sys);
  endtask

  task automatic quiet();
    active = 0; periods(12);
  endtask

  // ---------------- test sequence ----------------
  initial begin
    logic [31:0] d;
    int unsigned first_key, last_key, bp_lost, other_lost;
    repeat (4) @(negedge clk_sys);
    rst_n = 1'b1;
    axil_read(REG_INFO, d);
    check(d == {16'(DES_RATIO), 16'(NUM_CH)}, "INFO register");
    axil_write(REG_CTRL, 32'h1);
    cur_en = 1;
    first_key = m + 2;
    periods(4);
    // plain acquisition: long and short pulses
    active = 1; toggle_pct = 6;  periods(300);
    toggle_pct = 30;             periods(150);
    quiet();
    // channel mask
    axil_write(REG_CHAN_MASK, 32'h9); cur_mask = 4'h9; periods(2);
    active = 1; toggle_pct = 10; periods(150);
    quiet();
    axil_write(REG_CHAN_MASK, 32'hF); cur_mask = 4'hF; periods(2);
    // disabled core: nothing may come out
    axil_write(REG_CTRL, 32'h0); cur_en = 0; periods(2);
    active = 1; periods(100);
    quiet();
    axil_write(REG_CTRL, 32'h1); cur_en = 1; periods(2);
    // back-pressure: the sink takes a word in a third of the cycles
    bp_phase = 1; active = 1; toggle_pct = 10;
    repeat (300) begin @(posedge clk_sys); #1 tready = ($urandom_range(0, 2) == 0); end
    active = 0;
    repeat (12) begin @(posedge clk_sys); #1 tready = ($urandom_range(0, 2) == 0); end
    bp_phase = 0; tready = 1;
    periods(20);
    last_key = m - 10;
    recording = 0;
    check(!in_pkt && !tvalid, "stream idle after the back-pressure phase");
    // every active period was sent, except those the core reports as lost
    bp_lost = 0; other_lost = 0;
    for (int unsigned k = first_key; k <= last_key; k++)
      if (expect_word(k) != 0 && !sent.exists(k)) begin
        if (in_bp[k]) bp_lost++; else other_lost++;
      end
    check(other_lost == 0, $sformatf("%0d active periods lost without back-pressure", other_lost));
    axil_read(REG_STATUS, d);
    check(d[0] == (bp_lost != 0), "OVERFLOW flag matches lost periods");
    if (d[0]) n_overflow++;
    axil_read(REG_DROPS, d);
    check(d == bp_lost, $sformatf("DROPS register %0d, periods missing from the stream %0d", d, bp_lost));
    axil_write(REG_STATUS, 32'h1);
    axil_read(REG_STATUS, d);
    check(d == 0, "OVERFLOW cleared");
    // timestamp clear: the counter restarts and new packets carry small timestamps
    decode_on = 0;
    axil_read(REG_TIMESTAMP, d);
    check(d > 1000, "counter has advanced");
    axil_write(REG_CTRL, 32'h3);
    axil_read(REG_TIMESTAMP, d);
    check(d < 10, $sformatf("counter restarted, reads %0d", d));
    if (d < 10) n_tsclear++;
    active = 1; toggle_pct = 10;
    while (!(tvalid && tready)) @(posedge clk_sys);
    check(tdata < 100, $sformatf("first timestamp after clear is %0d", tdata));
    active = 0;
    periods(20);

    $display("packets %0d, multi-word %0d, rise+fall in one period %0d, boundary transitions %0d, all four channels %0d",
             n_packets, n_multi, n_both, n_boundary, n_allch);
    $display("packets ended by a long pulse %0d, masked %0d, disabled %0d, stall cycles %0d, closed early %0d, lost %0d, overflow %0d, ts clear %0d",
             n_long, n_masked, n_disabled, n_stall, n_trunc, bp_lost, n_overflow, n_tsclear);
    check(n_packets > 0, "no packet");
    check(n_multi > 0, "no multi-word packet");
    check(n_both > 0, "no rise and fall in one period");
    check(n_boundary > 0, "no transition at a period boundary");
    check(n_allch > 0, "no word with all four comparators");
    check(n_long > 0, "no packet ended during a long pulse");
    check(n_masked > 0, "no masked channel activity");
    check(n_disabled > 0, "no activity while disabled");
    check(n_stall > 0, "no back-pressure stall");
    check(n_trunc > 0, "no packet closed early");
    check(bp_lost > 0, "no lost period");
    check(n_overflow > 0, "no overflow flag");
    check(n_tsclear > 0, "no timestamp clear");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk_sys);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
