// sram_timing_pkg: shared types and constants of the programmable SRAM timing block.
//
// The timing block builds four SRAM control signals (PRE, WLE, SAE, WE) from one
// rising clock edge. Each signal is the AND of two taps of a static inverter chain,
// each tap passed through a digitally controlled delay element, so both edges of
// every signal are programmable. Two edges matter most and get extended-range
// elements with six control bits: the falling edge of WLE (wordline access time)
// and the rising edge of SAE (sense amplifier enable). The other six edges use a
// plain four-bit delay element.
//
// Codes: a fine code is a four-bit thermometer code (0000, 0001, 0011, 0111, 1111);
// more ones means less delay. An extended code adds a two-bit binary coarse select
// in its two most significant bits; a higher coarse value bypasses more static
// buffers and so gives less delay. Together that is 4 x 5 = 20 codes per element.
//
// All delays are in picoseconds. The step sizes per element and process corner are
// the averages printed in the source's corner table (TT 25C, SS 85C, FF 0C). The
// absolute minimum element delay, the inverter delay and the fixed falling delay
// are this model's own choices; delays that are not given per corner are scaled by
// the ratio of the SAE step sizes.
//
// The control word is 42 bits long as on the test chip. The field layout is this
// design's choice: the 36 bits that program the eight edges sit in the low bits and
// the top six bits are spare.
package sram_timing_pkg;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned FINE_BITS   = 4;   // thermometer control S4..S1
  localparam int unsigned COARSE_BITS = 2;   // binary coarse select
  localparam int unsigned COARSE_BUFS = 3;   // static buffers ahead of the mux
  localparam int unsigned EXT_CODES   = (COARSE_BUFS + 1) * (FINE_BITS + 1);  // 20
  localparam int unsigned SR_LEN      = 42;  // serial control register length

  typedef logic [FINE_BITS-1:0] fine_code_t;

  typedef struct packed {
    logic [COARSE_BITS-1:0] coarse;
    fine_code_t             fine;
  } ext_code_t;

  // Control word of one timing block, most significant field first.
  typedef struct packed {
    fine_code_t pre_rise;
    fine_code_t pre_fall;
    fine_code_t wle_rise;
    ext_code_t  wle_fall;
    ext_code_t  sae_rise;
    fine_code_t sae_fall;
    fine_code_t we_rise;
    fine_code_t we_fall;
  } timing_ctrl_t;

  localparam int unsigned CTRL_BITS  = $bits(timing_ctrl_t);   // 36
  localparam int unsigned SPARE_BITS = SR_LEN - CTRL_BITS;     // 6

  typedef enum logic [1:0] {
    CORNER_TT = 2'd0,
    CORNER_SS = 2'd1,
    CORNER_FF = 2'd2
  } corner_t;

  // Typical-corner model constants (this design's choice).
  localparam real DCDE_MIN_TT_PS = 140.0;  // DCDE delay with code 1111
  localparam real INV_TT_PS      = 50.0;   // one static-line inverter

  // Average step between successive codes of the SAE element, per corner.
  function automatic real sae_step_ps(corner_t c);
    case (c)
      CORNER_SS: return 30.2;
      CORNER_FF: return 18.0;
      default:   return 22.6;
    endcase
  endfunction

  // Average step between successive codes of the WLE element, per corner.
  function automatic real wle_step_ps(corner_t c);
    case (c)
      CORNER_SS: return 29.1;
      CORNER_FF: return 17.2;
      default:   return 21.9;
    endcase
  endfunction

  // Scale for delays that are not tabulated per corner.
  function automatic real corner_scale(corner_t c);
    return sae_step_ps(c) / sae_step_ps(CORNER_TT);
  endfunction

  // True for the five legal thermometer codes.
  function automatic logic is_thermometer(fine_code_t f);
    return ((f & (f + 1'b1)) == '0);
  endfunction

  // Position 0..19 of an extended code in order of decreasing delay, assuming
  // legal thermometer fine bits.
  function automatic int unsigned ext_code_index(ext_code_t c);
    return int'(c.coarse) * (FINE_BITS + 1) + $countones(c.fine);
  endfunction

  // Extended code at position 0..19 (0 = longest delay).
  function automatic ext_code_t ext_code_at(int unsigned idx);
    ext_code_t c;
    int unsigned n;
    c.coarse = COARSE_BITS'(idx / (FINE_BITS + 1));
    n        = idx % (FINE_BITS + 1);
    c.fine   = fine_code_t'((1 << n) - 1);
    return c;
  endfunction
endpackage
