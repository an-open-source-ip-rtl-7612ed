`timescale 1ns/1ps
// Comparator-bias calibration run through the complete mvt_quad core.
//
// Four comparator models with different input offsets see the same analog
// signal: a train of triangle pulses of known amplitude (A = 500 mV) and
// rise/fall time (Tr = 100 ns), each started at a random phase with respect
// to the 800 MHz sampling clock. Each comparator's reference is one of four
// thresholds. From the core's AXI-Stream the testbench rebuilds the absolute
// time of every rising and falling threshold crossing, compares it with the
// time an ideal comparator on the nominal threshold would have switched and
// converts the average shift into a voltage, separately for the rising edge (dV_re) and
// the falling edge (dV_fe). The estimates must match the models' offsets
// within 2 mV. Then the references are corrected by the estimated offsets
// (compensation pedestals) and the measurement is repeated: the residual
// offsets must be below 2 mV.
module tb_mvt_calibration;
  import mvt_pkg::*;
  localparam real HALF   = 0.625;            // 800 MHz fast clock
  localparam real TS     = 2.0 * HALF;       // sample period, ns
  localparam int  R      = DES_RATIO;
  localparam real AMP    = 500.0;            // pulse amplitude, mV
  localparam real TRISE  = 100.0;            // rise time = fall time, ns
  localparam real SLOPE  = AMP / TRISE;      // mV per ns
  localparam int  NPULSE = 48;
  localparam real PERIOD = 400.0;            // pulse spacing, ns
  localparam real VTH [NUM_CH] = '{100.0, 200.0, 300.0, 400.0};
  localparam real BIAS[NUM_CH] = '{28.0, -17.0, 9.5, -33.0};

  logic clk_fast, clk_sys, rst_n = 1'b0;
  logic [NUM_CH-1:0] cmp;
  logic [AXIL_AW-1:0] awaddr = '0;
  logic awvalid = 0, wvalid = 0, bready = 1;
  logic awready, wready, bvalid, arready, rvalid;
  logic [AXIL_DW-1:0] wdata = '0, rdata;
  logic [1:0] bresp, rresp;
  logic [AXIS_W-1:0] tdata;
  logic tlast, tvalid;

  mvt_quad dut (
    .clk_fast(clk_fast), .clk_sys(clk_sys), .rst_n(rst_n), .cmp_i(cmp),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(bready),
    .s_axil_araddr('0), .s_axil_arvalid(1'b0), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(1'b1),
    .m_axis_tdata(tdata), .m_axis_tlast(tlast), .m_axis_tvalid(tvalid), .m_axis_tready(1'b1));

  // ---------------- analog side ----------------
  real vin = 0.0;
  real vref [NUM_CH];
  for (genvar c = 0; c < NUM_CH; c++) begin : g_cmp
    lvds_comparator_model #(.OFFSET_MV(BIAS[c])) u_cmp (.vp_mv(vin), .vn_mv(vref[c]), .out(cmp[c]));
  end

  real pulse_t0 [$];           // start times of the pulses of the current pass
  // the analog input is re-evaluated every 20 ps; pulses do not overlap
  always begin
    real dt;
    #0.02;
    vin = 0.0;
    foreach (pulse_t0[i]) begin
      dt = $realtime - pulse_t0[i];
      if (dt >= 0.0 && dt < TRISE) vin = SLOPE * dt;
      else if (dt >= TRISE && dt < 2.0 * TRISE) vin = SLOPE * (2.0 * TRISE - dt);
    end
  end

  // ---------------- clocks ----------------
  int unsigned fe = 0;
  initial begin
    clk_fast = 1'b0; clk_sys = 1'b0;
    forever begin
      #HALF;
      clk_fast = 1'b1;
      if (fe % R == 0) clk_sys = 1'b1;
      else if (fe % R == R / 2) clk_sys = 1'b0;
      fe++;
      #HALF;
      clk_fast = 1'b0;
    end
  end

  int checks = 0, failures = 0;
  task automatic check(input logic ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", what); end
  endtask

  // ---------------- stream decoding into absolute times ----------------
  int unsigned m = 0;
  int unsigned start_fe [int unsigned];
  real rise_t [NUM_CH][$];
  real fall_t [NUM_CH][$];
  bit in_pkt = 0;
  int unsigned pkt_t = 0, pkt_k = 0;

  always @(posedge clk_sys) begin
    int unsigned key, f;
    if (rst_n && tvalid) begin
      if (!in_pkt) begin
        in_pkt = 1; pkt_t = tdata; pkt_k = 0;
      end else begin
        key = pkt_t - 2 + pkt_k;
        for (int c = 0; c < NUM_CH; c++) begin
          // fast edge f is at time (f + 0.5) * TS; the crossing lies, on
          // average, half a sample before the first sample at the new level,
          // so it is estimated at f * TS
          if (tdata[8*c+3]) begin
            f = start_fe[key] + 32'(tdata[8*c +: 3]);
            rise_t[c].push_back(TS * f);
          end
          if (tdata[8*c+7]) begin
            f = start_fe[key] + 32'(tdata[8*c+4 +: 3]);
            fall_t[c].push_back(TS * f);
          end
        end
        pkt_k++;
        if (tlast) in_pkt = 0;
      end
    end
    if (!rst_n) m = 0; else m = m + 1;
    start_fe[m] = fe - 1;
  end

  task automatic axil_write(input logic [AXIL_AW-1:0] a, input logic [31:0] d);
    @(posedge clk_sys); #1 awaddr = a; awvalid = 1; wdata = d; wvalid = 1;
    do @(posedge clk_sys); while (!(awready && wready));
    #1 awvalid = 0; wvalid = 0;
  endtask

  // one pass: NPULSE pulses, returns the average offset seen on each edge
  task automatic measure(output real dv_re [NUM_CH], output real dv_fe [NUM_CH]);
    real t_start = $realtime + 100.0;
    pulse_t0.delete();
    for (int c = 0; c < NUM_CH; c++) begin rise_t[c].delete(); fall_t[c].delete(); end
    for (int i = 0; i < NPULSE; i++)
      pulse_t0.push_back(t_start + i * PERIOD + $urandom_range(0, 1249) / 1000.0);
    #(NPULSE * PERIOD + 400.0);
    for (int c = 0; c < NUM_CH; c++) begin
      real sr = 0.0, sf = 0.0;
      check(rise_t[c].size() == NPULSE && fall_t[c].size() == NPULSE,
            $sformatf("channel %0d: %0d rising and %0d falling crossings for %0d pulses",
                      c, rise_t[c].size(), fall_t[c].size(), NPULSE));
      if (rise_t[c].size() != NPULSE || fall_t[c].size() != NPULSE) begin
        dv_re[c] = 999.0; dv_fe[c] = 999.0; continue;
      end
      for (int i = 0; i < NPULSE; i++) begin
        // time shifts with respect to an ideal comparator on the nominal threshold
        sr += rise_t[c][i] - (pulse_t0[i] + VTH[c] / SLOPE);
        sf += (pulse_t0[i] + 2.0 * TRISE - VTH[c] / SLOPE) - fall_t[c][i];
      end
      dv_re[c] = SLOPE * sr / NPULSE;
      dv_fe[c] = SLOPE * sf / NPULSE;
    end
  endtask

  function automatic real absr(real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    real dv_re [NUM_CH], dv_fe [NUM_CH], est [NUM_CH];
    for (int c = 0; c < NUM_CH; c++) vref[c] = VTH[c];
    repeat (4) @(negedge clk_sys);
    rst_n = 1'b1;
    axil_write(REG_CTRL, 32'h1);
    // pass 1: characterise the offsets
    measure(dv_re, dv_fe);
    for (int c = 0; c < NUM_CH; c++) begin
      est[c] = 0.5 * (dv_re[c] + dv_fe[c]);
      $display("channel %0d: offset %6.2f mV, measured dV_re %6.2f mV, dV_fe %6.2f mV", c, BIAS[c], dv_re[c], dv_fe[c]);
      check(absr(dv_re[c] - BIAS[c]) < 2.0, $sformatf("channel %0d rising-edge estimate", c));
      check(absr(dv_fe[c] - BIAS[c]) < 2.0, $sformatf("channel %0d falling-edge estimate", c));
    end
    // pass 2: references with compensation pedestals, offsets measured again
    for (int c = 0; c < NUM_CH; c++) vref[c] = VTH[c] - est[c];
    measure(dv_re, dv_fe);
    for (int c = 0; c < NUM_CH; c++) begin
      $display("channel %0d after compensation: dV_re %6.2f mV, dV_fe %6.2f mV", c, dv_re[c], dv_fe[c]);
      check(absr(dv_re[c]) < 2.0 && absr(dv_fe[c]) < 2.0, $sformatf("channel %0d residual offset", c));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
