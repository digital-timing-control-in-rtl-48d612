// ctrl_shift_reg: serial-in control-code register of the SRAM timing block.
//
// The timing block's delay codes are loaded serially to save pins. On each rising
// edge of sclk with shift_en high the register moves one place toward bit 0 and
// takes sdin into its top bit, so a word sent least significant bit first sits in
// q after LEN shifts. sdout (bit 0) lets the contents be read back or chained.
// q drives the delay elements directly; it changes while shifting, so codes are
// loaded before the SRAM is clocked.
//
// LEN defaults to the 42 bits of the test chip. Shift direction, serial-out,
// shift enable and the asynchronous active-low reset (to all zeros, which selects
// the longest, most relaxed delay everywhere) are this design's choices.
module ctrl_shift_reg
  import sram_timing_pkg::*;
#(
  parameter int unsigned LEN = SR_LEN
) (
  input  logic           sclk,
  input  logic           rst_n,
  input  logic           shift_en,
  input  logic           sdin,
  output logic           sdout,
  output logic [LEN-1:0] q
);
  timeunit 1ps;
  timeprecision 100fs;

  always_ff @(posedge sclk or negedge rst_n) begin
    if (!rst_n)        q <= '0;
    else if (shift_en) q <= {sdin, q[LEN-1:1]};
  end

  assign sdout = q[0];
endmodule
