// ext_range_delay: behavioural model of the extended range delay element.
//
// Kind: behavioural model. A chain of COARSE_BUFS (3) static buffers delays the
// input; a multiplexer driven by the two-bit binary COARSE SELECT picks the input
// itself or the output of one of the buffers; the chosen signal then goes through
// a DCDE whose four-bit thermometer FINE SELECT sets the fine delay. 4 coarse x 5
// fine settings give 20 codes per element.
//
// Coarse order: as in the source, raising the coarse code lowers the delay:
//   coarse 00 -> 3 buffers, 01 -> 2, 10 -> 1, 11 -> input directly.
// The buffer delay is BUF_PS = (FINE_BITS + 1) * STEP_PS, chosen here so that the
// 20 codes, taken in the order coarse-then-fine, form one evenly spaced ladder:
// the step from (c, 1111) to (c+1, 0000) equals a fine step. The total range is
// then 19 steps, which with the source's 22.6 ps SAE step is 429 ps against the
// quoted 430 ps.
//
// Ports: in, code (coarse in code.coarse, thermometer fine in code.fine), out.
// Timing: continuous, no clock. Rising edges see the coarse and the fine delay,
// falling edges the coarse delay and the DCDE's fixed falling delay.
module ext_range_delay
  import sram_timing_pkg::*;
#(
  parameter real MIN_PS  = DCDE_MIN_TT_PS,
  parameter real STEP_PS = 22.6,
  parameter real FALL_PS = DCDE_MIN_TT_PS,
  parameter real BUF_PS  = real'(FINE_BITS + 1) * STEP_PS
) (
  input  logic      in,
  input  ext_code_t code,
  output logic      out
);
  timeunit 1ps;
  timeprecision 100fs;

  logic [COARSE_BUFS:0] stage;   // stage[k]: input after k static buffers
  logic                 muxed;

  assign stage[0] = in;
  for (genvar k = 1; k <= COARSE_BUFS; k++) begin : g_buf
    assign #(BUF_PS) stage[k] = stage[k-1];
  end

  // Binary coarse select: a larger code bypasses more buffers.
  always_comb muxed = stage[COARSE_BUFS - int'(code.coarse)];

  dcde #(
    .MIN_PS (MIN_PS),
    .STEP_PS(STEP_PS),
    .FALL_PS(FALL_PS)
  ) u_fine (
    .in (muxed),
    .sel(code.fine),
    .out(out)
  );
endmodule
