`timescale 1ns/1ps
// lvds_comparator_model: behavioural model (not synthesizable) of an FPGA
// LVDS input receiver used as a voltage comparator in an MVT front end.
//
// The positive leg carries the analog signal and the negative leg the
// reference voltage from a DAC. The output is 1 while vp - vn exceeds the
// receiver's own input offset OFFSET_MV; real receivers show offsets of up
// to about +-35 mV, which is what the calibration procedure measures and
// cancels. Voltages are in millivolts; the model has no delay, noise or
// hysteresis. The output follows its inputs at whatever time step the
// testbench updates them.
module lvds_comparator_model #(
  parameter real OFFSET_MV = 0.0
) (
  input  real  vp_mv,   // analog input
  input  real  vn_mv,   // reference voltage
  output logic out
);
  always_comb out = (vp_mv - vn_mv) > OFFSET_MV;
endmodule
