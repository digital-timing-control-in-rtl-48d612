// sram_timing_top: programmable SRAM timing block with its serial code register.
//
// This is the content of the timing experiment on the test chip: a 42-bit
// serial-in register holds the delay codes of all eight programmable edges and
// drives the delay-line timing block, which turns each rising edge of clk_in into
// one PRE / WLE / SAE (read) or WE (write) sequence.
//
// Control word (ctrl_shift_reg q, LSB shifted in first), this design's layout:
//   [3:0]   WE fall    fine       [7:4]   WE rise    fine
//   [11:8]  SAE fall   fine       [17:12] SAE rise   coarse[17:16], fine[15:12]
//   [23:18] WLE fall   coarse[23:22], fine[21:18]
//   [27:24] WLE rise   fine       [31:28] PRE fall   fine
//   [35:32] PRE rise   fine       [41:36] spare
// Fine fields are thermometer codes (more ones = earlier edge); coarse fields are
// binary (larger = earlier edge).
//
// Ports: sclk/rst_n/shift_en/sdin/sdout load and read back the codes; clk_in and
// rw (1 = read) start a cycle; pre, wle, sae, we go to the SRAM's precharge,
// row decoder, sense amplifiers and write drivers. The structure is wiring only;
// the timing block and its delay elements are behavioural models.
module sram_timing_top
  import sram_timing_pkg::*;
#(
  parameter corner_t CORNER = CORNER_TT
) (
  input  logic sclk,
  input  logic rst_n,
  input  logic shift_en,
  input  logic sdin,
  output logic sdout,
  input  logic clk_in,
  input  logic rw,
  output logic pre,
  output logic wle,
  output logic sae,
  output logic we
);
  timeunit 1ps;
  timeprecision 100fs;

  logic [SR_LEN-1:0] code_q;
  timing_ctrl_t      ctrl;

  ctrl_shift_reg #(.LEN(SR_LEN)) u_sreg (
    .sclk    (sclk),
    .rst_n   (rst_n),
    .shift_en(shift_en),
    .sdin    (sdin),
    .sdout   (sdout),
    .q       (code_q)
  );

  // The upper SPARE_BITS of the register are shifted through but unused.
  assign ctrl = timing_ctrl_t'(code_q[CTRL_BITS-1:0]);

  timing_block #(.CORNER(CORNER)) u_timing (
    .clk_in(clk_in),
    .rw    (rw),
    .ctrl  (ctrl),
    .pre   (pre),
    .wle   (wle),
    .sae   (sae),
    .we    (we)
  );
endmodule
