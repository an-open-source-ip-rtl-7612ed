`timescale 1ns/1ps
// SiPM-like pulses at 800 MSPS through the complete mvt_quad core.
//
// The analog input is a train of pulses with a 5 ns linear rise and an
// exponential decay (time constant 30 ns), of random amplitude between 30
// and 700 mV, each at a random phase with respect to the sampling clock.
// Four ideal comparators (behavioural models with zero offset) compare it
// with thresholds of 50, 100, 200 and 400 mV. For every pulse the
// testbench works out analytically which thresholds are crossed and when
// (rise: 5 ns * V/A; fall: 5 ns + 30 ns * ln(A/V)), and checks against the
// decoded AXI-Stream that exactly those comparators report one rising and
// one falling transition, each on the first sample at or after the true
// crossing (0 <= sample time - crossing < one sample, 1.25 ns).
// Amplitudes within 12 % above a threshold are avoided so that every
// crossed threshold stays above it for more than one sample.
module tb_mvt_sipm_pulses;
  import mvt_pkg::*;
  localparam real HALF   = 0.625;
  localparam real TS     = 2.0 * HALF;       // sample period, ns
  localparam int  R      = DES_RATIO;
  localparam real TR     = 5.0;              // rise time, ns
  localparam real TAU    = 30.0;             // decay constant, ns
  localparam int  NPULSE = 60;
  localparam real PERIOD = 300.0;            // pulse spacing, ns
  localparam real STEP   = 0.01;             // analog time step, ns
  localparam real VTH [NUM_CH] = '{50.0, 100.0, 200.0, 400.0};

  logic clk_fast, clk_sys, rst_n = 1'b0;
  logic [NUM_CH-1:0] cmp;
  logic [AXIL_AW-1:0] awaddr = '0;
  logic awvalid = 0, wvalid = 0;
  logic awready, wready, bvalid, arready, rvalid;
  logic [AXIL_DW-1:0] wdata = '0, rdata;
  logic [1:0] bresp, rresp;
  logic [AXIS_W-1:0] tdata;
  logic tlast, tvalid;

  mvt_quad dut (
    .clk_fast(clk_fast), .clk_sys(clk_sys), .rst_n(rst_n), .cmp_i(cmp),
    .s_axil_awaddr(awaddr), .s_axil_awvalid(awvalid), .s_axil_awready(awready),
    .s_axil_wdata(wdata), .s_axil_wstrb(4'hF), .s_axil_wvalid(wvalid), .s_axil_wready(wready),
    .s_axil_bresp(bresp), .s_axil_bvalid(bvalid), .s_axil_bready(1'b1),
    .s_axil_araddr('0), .s_axil_arvalid(1'b0), .s_axil_arready(arready),
    .s_axil_rdata(rdata), .s_axil_rresp(rresp), .s_axil_rvalid(rvalid), .s_axil_rready(1'b1),
    .m_axis_tdata(tdata), .m_axis_tlast(tlast), .m_axis_tvalid(tvalid), .m_axis_tready(1'b1));

  // ---------------- analog side ----------------
  real vin = 0.0;
  real vref [NUM_CH] = VTH;
  for (genvar c = 0; c < NUM_CH; c++) begin : g_cmp
    lvds_comparator_model #(.OFFSET_MV(0.0)) u_cmp (.vp_mv(vin), .vn_mv(vref[c]), .out(cmp[c]));
  end

  real pulse_t0 [NPULSE];
  real pulse_a  [NPULSE];
  int  cur = 0;                 // pulse currently being generated
  bit  running = 0;
  always begin
    real dt;
    #STEP;
    vin = 0.0;
    if (running) begin
      if (cur + 1 < NPULSE && $realtime >= pulse_t0[cur + 1]) cur++;
      dt = $realtime - pulse_t0[cur];
      if (dt >= 0.0 && dt < TR) vin = pulse_a[cur] * dt / TR;
      else if (dt >= TR)        vin = pulse_a[cur] * $exp(-(dt - TR) / TAU);
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
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- stream decoding into sample times ----------------
  int unsigned m = 0;
  int unsigned start_fe [int unsigned];
  real rise_t [NUM_CH][$];
  real fall_t [NUM_CH][$];
  bit in_pkt = 0;
  int unsigned pkt_t = 0, pkt_k = 0, n_packets = 0;

  always @(posedge clk_sys) begin
    int unsigned key, f;
    if (rst_n && tvalid) begin
      if (!in_pkt) begin
        in_pkt = 1; pkt_t = tdata; pkt_k = 0; n_packets++;
      end else begin
        key = pkt_t - 2 + pkt_k;
        for (int c = 0; c < NUM_CH; c++) begin
          // fast edge f samples at time (f + 0.5) * TS
          if (tdata[8*c+3]) begin
            f = start_fe[key] + 32'(tdata[8*c +: 3]);
            rise_t[c].push_back(TS * f + HALF);
          end
          if (tdata[8*c+7]) begin
            f = start_fe[key] + 32'(tdata[8*c+4 +: 3]);
            fall_t[c].push_back(TS * f + HALF);
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

  function automatic bit near_threshold(real a);
    foreach (VTH[c]) if (a > VTH[c] && a < 1.12 * VTH[c]) return 1;
    return 0;
  endfunction

  initial begin
    int ri [NUM_CH], fi [NUM_CH];
    int n_cross [NUM_CH + 1];
    real t_start;
    repeat (4) @(negedge clk_sys);
    rst_n = 1'b1;
    axil_write(REG_CTRL, 32'h1);
    t_start = $realtime + 100.0;
    for (int i = 0; i < NPULSE; i++) begin
      do pulse_a[i] = 30.0 + $urandom_range(0, 6700) / 10.0; while (near_threshold(pulse_a[i]));
      pulse_t0[i] = t_start + i * PERIOD + $urandom_range(0, 1249) / 1000.0;
    end
    running = 1;
    #(NPULSE * PERIOD + 400.0);
    foreach (ri[c]) begin ri[c] = 0; fi[c] = 0; end
    foreach (n_cross[j]) n_cross[j] = 0;
    for (int i = 0; i < NPULSE; i++) begin
      int crossed = 0;
      for (int c = 0; c < NUM_CH; c++) begin
        real tr, tf;
        if (pulse_a[i] <= VTH[c]) continue;
        crossed++;
        tr = pulse_t0[i] + TR * VTH[c] / pulse_a[i];
        tf = pulse_t0[i] + TR + TAU * $ln(pulse_a[i] / VTH[c]);
        check(ri[c] < rise_t[c].size() && fi[c] < fall_t[c].size(),
              $sformatf("pulse %0d (%0.1f mV): no transitions on threshold %0.0f mV", i, pulse_a[i], VTH[c]));
        if (ri[c] < rise_t[c].size() && fi[c] < fall_t[c].size()) begin
          check(rise_t[c][ri[c]] - tr >= -STEP && rise_t[c][ri[c]] - tr < TS + STEP,
                $sformatf("pulse %0d threshold %0.0f: rise sampled at %0.3f, crossing at %0.3f", i, VTH[c], rise_t[c][ri[c]], tr));
          check(fall_t[c][fi[c]] - tf >= -STEP && fall_t[c][fi[c]] - tf < TS + STEP,
                $sformatf("pulse %0d threshold %0.0f: fall sampled at %0.3f, crossing at %0.3f", i, VTH[c], fall_t[c][fi[c]], tf));
          ri[c]++; fi[c]++;
        end
      end
      n_cross[crossed]++;
    end
    for (int c = 0; c < NUM_CH; c++)
      check(ri[c] == rise_t[c].size() && fi[c] == fall_t[c].size(),
            $sformatf("threshold %0.0f mV: %0d rising / %0d falling transitions reported, %0d pulses crossed it",
                      VTH[c], rise_t[c].size(), fall_t[c].size(), ri[c]));
    $display("pulses %0d, packets %0d; pulses crossing 0/1/2/3/4 thresholds: %0d/%0d/%0d/%0d/%0d",
             NPULSE, n_packets, n_cross[0], n_cross[1], n_cross[2], n_cross[3], n_cross[4]);
    check(n_cross[0] > 0 && n_cross[1] > 0 && n_cross[4] > 0, "amplitude range not covered");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #50000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
