`timescale 1ns/1ps
// Self-checking testbench of mvt_data_packager.
//
// Random bursts of TDC hits are driven with the cycle number as timestamp.
// The testbench keeps, for every cycle, the payload word it expects (masked
// channels and a disabled core give 0) and whether the DUT flagged a lost
// period. The stream is decoded: each packet must start with a timestamp T,
// payload k must equal the expected word of cycle T+k and be non-empty, and
// TLAST must come where the next cycle has no transitions, or where that
// next cycle was lost (early close under back-pressure). At the end every
// cycle with transitions must have been sent or flagged lost, exactly once.
// While TREADY stays high the timestamp word must leave one cycle after
// the first cycle with transitions, and nothing may be lost.
module tb_mvt_data_packager;
  import mvt_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  logic enable = 1'b0;
  logic [NUM_CH-1:0] chan_mask = '1;
  logic [TS_W-1:0] ts = '0;
  tdc_hit_t [NUM_CH-1:0] hits = '0;
  logic drop, busy;
  logic [AXIS_W-1:0] tdata;
  logic tlast, tvalid, tready = 1'b1;

  int checks = 0, failures = 0;
  int phase = 0;
  int unsigned cyc = 0;
  logic [AXIS_W-1:0] rec [int unsigned];
  bit lost [int unsigned];
  bit sent [int unsigned];
  // mechanism counters
  int n_packets = 0, n_multi = 0, n_trunc = 0, n_lost = 0, n_masked = 0, n_disabled = 0, n_stall = 0;

  mvt_data_packager dut (
    .clk(clk), .rst_n(rst_n), .enable(enable), .chan_mask(chan_mask), .timestamp_i(ts),
    .hits_i(hits), .drop_o(drop), .busy_o(busy), .m_axis_tdata(tdata), .m_axis_tlast(tlast),
    .m_axis_tvalid(tvalid), .m_axis_tready(tready));

  always #5 clk = ~clk;

  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL (cycle %0d): %s", cyc, what);
    end
  endtask

  function automatic logic [AXIS_W-1:0] expect_word();
    logic [AXIS_W-1:0] w = '0;
    for (int c = 0; c < NUM_CH; c++)
      if (enable && chan_mask[c])
        w[HW*c +: HW] = {hits[c].fall_valid, hits[c].fall_pos, hits[c].rise_valid, hits[c].rise_pos};
    return w;
  endfunction
  localparam int HW = 2 + 2 * POS_W;

  // record and decode, with the values before each clock edge
  bit in_pkt = 0;
  int unsigned pkt_t = 0, pkt_k = 0;
  always @(posedge clk) if (rst_n) begin
    rec[cyc]  = expect_word();
    lost[cyc] = drop;
    if (drop) n_lost++;
    for (int c = 0; c < NUM_CH; c++)
      if (hits[c].rise_valid || hits[c].fall_valid) begin
        if (!enable) n_disabled++;
        else if (!chan_mask[c]) n_masked++;
      end
    if (tvalid && !tready) n_stall++;
    if (tvalid && tready) begin
      if (!in_pkt) begin
        in_pkt = 1; pkt_t = tdata; pkt_k = 0; n_packets++;
        check(!tlast, "timestamp word carries TLAST");
        check(rec.exists(pkt_t) && rec[pkt_t] != 0, $sformatf("timestamp %0d does not point at a cycle with transitions", pkt_t));
        check(!rec.exists(pkt_t - 1) || rec[pkt_t - 1] == 0 || lost[pkt_t - 1] || sent[pkt_t - 1],
              "packet did not start at the first cycle with transitions");
        if (phase < 3) check(cyc == pkt_t + 1, $sformatf("timestamp word left after %0d cycles, expected 1", cyc - pkt_t));
      end else begin
        int unsigned t;
        t = pkt_t + pkt_k;
        check(tdata != 0, "empty payload word");
        check(rec.exists(t) && tdata == rec[t], $sformatf("payload for cycle %0d: got %h expected %h", t, tdata, rec[t]));
        check(!sent.exists(t), $sformatf("cycle %0d sent twice", t));
        sent[t] = 1;
        pkt_k++;
        if (pkt_k == 2) n_multi++;
        if (tlast) begin
          in_pkt = 0;
          check(rec.exists(t + 1) && (rec[t + 1] == 0 || lost[t + 1]), "TLAST while the next cycle has transitions");
          if (rec[t + 1] != 0) n_trunc++;
        end
      end
    end
    cyc++;
  end

  task automatic drive_cycle(input bit burst);
    @(posedge clk); #1;
    ts = cyc;
    for (int c = 0; c < NUM_CH; c++) begin
      hits[c] = '0;
      if (burst && $urandom_range(0, 99) < 45) begin
        hits[c] = tdc_hit_t'($urandom);
        if (!hits[c].rise_valid && !hits[c].fall_valid) hits[c].rise_valid = 1'b1;
      end
    end
    if (phase == 3) tready = ($urandom_range(0, 99) < 35);
  endtask

  task automatic run(input int cycles);
    int n = 0;
    while (n < cycles) begin
      int len = $urandom_range(1, 10);
      for (int i = 0; i < len; i++) drive_cycle(1);
      len = $urandom_range(1, 4);
      for (int i = 0; i < len; i++) drive_cycle(0);
      n += 20;
    end
  endtask

  initial begin
    repeat (3) @(posedge clk);
    #1 rst_n = 1'b1; enable = 1'b1;
    phase = 0; run(600);
    phase = 1; chan_mask = 4'b0101; run(300);
    phase = 2; enable = 1'b0; run(200);
    phase = 3; enable = 1'b1; chan_mask = '1; run(800);
    phase = 4; tready = 1'b1;
    repeat (20) drive_cycle(0);
    // completeness: every cycle with transitions was sent or lost, exactly once
    foreach (rec[t]) begin
      if (t + 20 > cyc) continue;
      if (rec[t] != 0) check(sent.exists(t) != lost[t], $sformatf("cycle %0d: sent=%0d lost=%0d", t, sent.exists(t), lost[t]));
      else             check(!sent.exists(t) && !lost[t], $sformatf("empty cycle %0d sent or lost", t));
    end
    check(!in_pkt && !tvalid, "stream idle at the end");
    $display("packets %0d, multi-word %0d, closed early %0d, lost periods %0d, masked hits %0d, hits while disabled %0d, stall cycles %0d",
             n_packets, n_multi, n_trunc, n_lost, n_masked, n_disabled, n_stall);
    check(n_packets > 0 && n_multi > 0 && n_trunc > 0 && n_lost > 0 && n_masked > 0 && n_disabled > 0 && n_stall > 0,
          "a mechanism was never exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
