// pulse_gen: behavioural model of one pulse-generator output of the delay line.
//
// Kind: behavioural model. Two taps of the static delay line are each passed
// through a programmable delay element and ANDed: OUT = A AND B.
//   A = element_A(a_tap)            rises t_IN-A after the input's rising edge
//   B = NOT element_B(b_tap)        falls t_IN-B after the input's rising edge
// so OUT rises after t_D = t_IN-A and stays high for t_PW = t_IN-B - t_IN-A.
// Code a_code moves the rising edge, b_code the falling edge.
//
// B must be an inverted copy of A; the source separates the two taps by an odd
// number of inverters. Here both taps are non-inverted and the odd inversion is
// one inverter (INV_PS) placed after element B. That choice lets the element's
// programmable edge, its rising edge, become B's falling edge, which is the edge
// that ends the pulse.
//
// Each element is an extended-range element (6 control bits) when its *_EXT
// parameter is 1 and a plain DCDE (code.fine only; code.coarse ignored)
// otherwise.
//
// Ports: a_tap, b_tap (delay-line taps, same polarity as the input clock),
// a_code, b_code, out. Timing: one pulse per input rising edge provided the
// input stays high until the pulse has ended and low long enough for B to
// recover; the model does not retime a shorter input phase.
module pulse_gen
  import sram_timing_pkg::*;
#(
  parameter bit  A_EXT     = 1'b0,
  parameter bit  B_EXT     = 1'b0,
  parameter real A_STEP_PS = 22.6,
  parameter real B_STEP_PS = 22.6,
  parameter real MIN_PS    = DCDE_MIN_TT_PS,
  parameter real INV_PS    = INV_TT_PS
) (
  input  logic      a_tap,
  input  logic      b_tap,
  input  ext_code_t a_code,
  input  ext_code_t b_code,
  output logic      out
);
  timeunit 1ps;
  timeprecision 100fs;

  logic a_sig;     // node A
  logic b_dly;     // element B output, before the inverting stage
  logic b_sig;     // node B

  if (A_EXT) begin : g_a_ext
    ext_range_delay #(.MIN_PS(MIN_PS), .STEP_PS(A_STEP_PS), .FALL_PS(MIN_PS))
      u_a (.in(a_tap), .code(a_code), .out(a_sig));
  end else begin : g_a_fine
    dcde #(.MIN_PS(MIN_PS), .STEP_PS(A_STEP_PS), .FALL_PS(MIN_PS))
      u_a (.in(a_tap), .sel(a_code.fine), .out(a_sig));
  end

  if (B_EXT) begin : g_b_ext
    ext_range_delay #(.MIN_PS(MIN_PS), .STEP_PS(B_STEP_PS), .FALL_PS(MIN_PS))
      u_b (.in(b_tap), .code(b_code), .out(b_dly));
  end else begin : g_b_fine
    dcde #(.MIN_PS(MIN_PS), .STEP_PS(B_STEP_PS), .FALL_PS(MIN_PS))
      u_b (.in(b_tap), .sel(b_code.fine), .out(b_dly));
  end

  assign #(INV_PS) b_sig = ~b_dly;

  assign out = a_sig & b_sig;
endmodule
