// dcde: behavioural model of the digitally controlled delay element (DCDE).
//
// Kind: behavioural model. The real element is a transistor-level buffer (two
// inverters) whose first pulldown is current-starved: a transistor in series with
// the first inverter's output node discharges through a bank of parallel
// transistors, one always on and four switched by the control code S4..S1. Only
// that pulldown is variable, so only the output's RISING edge (input rising, inner
// node discharging) depends on the code; the falling edge goes through the fixed
// pull-up and has a fixed delay.
//
// Code: S4..S1 is meant to be a thermometer code (0000, 0001, 0011, 0111, 1111).
// Each extra '1' turns on one more pulldown and shortens the rising delay by one
// step, so successive thermometer codes are monotonic and evenly spaced:
//   rise delay = MIN_PS + STEP_PS * (4 - number of ones in sel)
//   fall delay = FALL_PS
// 1111 gives the shortest delay, 0000 the longest. A non-thermometer code is
// modelled by its number of ones and reported by an assertion when the input
// rises, since the source
// uses thermometer codes precisely to rule out monotonicity errors.
//
// Ports: in (signal), sel (S4..S1, sel[0] = S1), out (delayed in).
// Timing: continuous; no clock. Pulses shorter than the delays are not modelled
// faithfully. The delay values are parameters; the step size follows the
// source's simulated averages, the minimum and fall delays are this model's choice.
module dcde
  import sram_timing_pkg::*;
#(
  parameter real MIN_PS  = DCDE_MIN_TT_PS,
  parameter real STEP_PS = 22.6,
  parameter real FALL_PS = DCDE_MIN_TT_PS
) (
  input  logic       in,
  input  fine_code_t sel,
  output logic       out
);
  timeunit 1ps;
  timeprecision 100fs;

  realtime rise_dly;
  logic    d_rise;   // input delayed by the rising delay
  logic    d_fall;   // input delayed by the falling delay

  always_comb rise_dly = MIN_PS + STEP_PS * real'(FINE_BITS - $countones(sel));

  assign #(rise_dly) d_rise = in;
  assign #(FALL_PS)  d_fall = in;

  // Rising edge from the rise copy, falling edge from the fall copy.
  assign out = (rise_dly >= FALL_PS) ? (d_rise & d_fall) : (d_rise | d_fall);

  // Checked when the element is used, not while a new code is being shifted in.
  always @(posedge in) begin
    assert (is_thermometer(sel))
      else $warning("dcde: control code %b is not a thermometer code", sel);
  end
endmodule
