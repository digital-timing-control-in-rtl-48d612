// static_delay_line: behavioural model of the static (unprogrammable) delay line.
//
// Kind: behavioural model. A chain of N_STAGES identical inverters, each of delay
// INV_PS, driven by the common input clock. Every node is brought out so that each
// output signal of the timing block can tap it at two places. tap[0] is the input
// itself, tap[k] is the input after k inverters: even taps are delayed copies of
// the input, odd taps delayed inverted copies.
//
// Ports: in, tap[N_STAGES:0]. Timing: tap[k] follows in after k * INV_PS.
// The inverter count and delay are this model's choice; the source gives the
// structure but no sizes.
module static_delay_line
  import sram_timing_pkg::*;
#(
  parameter int unsigned N_STAGES = 30,
  parameter real         INV_PS   = INV_TT_PS
) (
  input  logic              in,
  output logic [N_STAGES:0] tap
);
  timeunit 1ps;
  timeprecision 100fs;

  assign tap[0] = in;
  for (genvar k = 1; k <= N_STAGES; k++) begin : g_inv
    assign #(INV_PS) tap[k] = ~tap[k-1];
  end
endmodule
