// timing_block: behavioural model of the programmable delay-line SRAM timing block.
//
// Kind: behavioural model (delay line and delay elements are transistor-level
// circuits). One rising edge of the input clock `clk_in` starts a static inverter
// chain; four pulse generators each AND two programmably delayed taps of it to
// produce the SRAM control signals:
//   PRE  precharge / evaluate: high = evaluation phase (bitlines floating)
//   WLE  wordline enable to the row decoder; its falling edge sets the wordline
//        access time and has an extended-range (20-code) element
//   SAE  sense amplifier enable, read cycles only (rw = 1); its rising edge has
//        an extended-range element
//   WE   write driver enable, write cycles only (rw = 0)
// The other six edges use a plain four-bit DCDE. SAE and WE are the shared pulse
// gated by rw, as the block diagram shows rw entering the SAE gate; rw must be
// steady from before the clock edge until the pulses end (no latch is modelled).
//
// Tap positions (parameters, in inverters from the input) are this design's
// choice. With TT delays and every code at its middle setting (fine 0011, coarse
// 01) the edges fall at, in ps after the clock edge:
//   PRE^ 185  WLE^ 285  WE^ 385  WLEv 653  SAE^ 711  WEv 1535  SAEv 1635  PREv 1735
// so WL lies inside PRE's evaluation phase, SAE rises after WL falls, SAE and WE
// fall before PRE, and the whole sequence fits a 2 ns (500 MHz) cycle.
// The source requires the input period to exceed the output period; in this model
// the input must stay high until PRE has fallen and low about as long again.
//
// CORNER selects the TT, SS or FF step sizes of the source's corner table.
// Assertions check that WLE, SAE and WE rise only while PRE is high and are low
// again when PRE falls; with the default taps this holds at TT for every code.
module timing_block
  import sram_timing_pkg::*;
#(
  parameter corner_t     CORNER     = CORNER_TT,
  parameter int unsigned N_STAGES   = 30,
  parameter int unsigned PRE_A_TAP  = 0,
  parameter int unsigned PRE_B_TAP  = 30,
  parameter int unsigned WLE_A_TAP  = 2,
  parameter int unsigned WLE_B_TAP  = 4,
  parameter int unsigned SAE_A_TAP  = 6,
  parameter int unsigned SAE_B_TAP  = 28,
  parameter int unsigned WE_A_TAP   = 4,
  parameter int unsigned WE_B_TAP   = 26
) (
  input  logic         clk_in,
  input  logic         rw,       // 1 = read, 0 = write
  input  timing_ctrl_t ctrl,
  output logic         pre,
  output logic         wle,
  output logic         sae,
  output logic         we
);
  timeunit 1ps;
  timeprecision 100fs;

  localparam real SCALE    = corner_scale(CORNER);
  localparam real MIN_PS   = DCDE_MIN_TT_PS * SCALE;
  localparam real INV_PS   = INV_TT_PS * SCALE;
  localparam real SAE_STEP = sae_step_ps(CORNER);
  localparam real WLE_STEP = wle_step_ps(CORNER);

  // Taps feed pulse generators by polarity: all taps used are even.
  initial begin
    assert (PRE_A_TAP % 2 == 0 && PRE_B_TAP % 2 == 0 && WLE_A_TAP % 2 == 0 &&
            WLE_B_TAP % 2 == 0 && SAE_A_TAP % 2 == 0 && SAE_B_TAP % 2 == 0 &&
            WE_A_TAP % 2 == 0 && WE_B_TAP % 2 == 0)
      else $error("timing_block: tap positions must be even");
  end

  logic [N_STAGES:0] tap;
  logic              sae_pulse;
  logic              we_pulse;

  static_delay_line #(.N_STAGES(N_STAGES), .INV_PS(INV_PS)) u_line (
    .in (clk_in),
    .tap(tap)
  );

  pulse_gen #(
    .A_EXT(1'b0), .B_EXT(1'b0), .A_STEP_PS(SAE_STEP), .B_STEP_PS(SAE_STEP),
    .MIN_PS(MIN_PS), .INV_PS(INV_PS)
  ) u_pre (
    .a_tap (tap[PRE_A_TAP]),
    .b_tap (tap[PRE_B_TAP]),
    .a_code('{coarse: '0, fine: ctrl.pre_rise}),
    .b_code('{coarse: '0, fine: ctrl.pre_fall}),
    .out   (pre)
  );

  pulse_gen #(
    .A_EXT(1'b0), .B_EXT(1'b1), .A_STEP_PS(WLE_STEP), .B_STEP_PS(WLE_STEP),
    .MIN_PS(MIN_PS), .INV_PS(INV_PS)
  ) u_wle (
    .a_tap (tap[WLE_A_TAP]),
    .b_tap (tap[WLE_B_TAP]),
    .a_code('{coarse: '0, fine: ctrl.wle_rise}),
    .b_code(ctrl.wle_fall),
    .out   (wle)
  );

  pulse_gen #(
    .A_EXT(1'b1), .B_EXT(1'b0), .A_STEP_PS(SAE_STEP), .B_STEP_PS(SAE_STEP),
    .MIN_PS(MIN_PS), .INV_PS(INV_PS)
  ) u_sae (
    .a_tap (tap[SAE_A_TAP]),
    .b_tap (tap[SAE_B_TAP]),
    .a_code(ctrl.sae_rise),
    .b_code('{coarse: '0, fine: ctrl.sae_fall}),
    .out   (sae_pulse)
  );

  pulse_gen #(
    .A_EXT(1'b0), .B_EXT(1'b0), .A_STEP_PS(SAE_STEP), .B_STEP_PS(SAE_STEP),
    .MIN_PS(MIN_PS), .INV_PS(INV_PS)
  ) u_we (
    .a_tap (tap[WE_A_TAP]),
    .b_tap (tap[WE_B_TAP]),
    .a_code('{coarse: '0, fine: ctrl.we_rise}),
    .b_code('{coarse: '0, fine: ctrl.we_fall}),
    .out   (we_pulse)
  );

  assign sae = sae_pulse & rw;
  assign we  = we_pulse & ~rw;

  // Sequencing rules: the wordline, sense and write enables open only inside
  // PRE's evaluation phase and are closed again before precharge resumes. At TT
  // the tap positions guarantee this for every code. Checked from the first
  // clock edge on, after the delay line has settled from power-up.
  logic armed;
  initial begin
    armed = 1'b0;
    @(posedge clk_in);
    armed = 1'b1;
  end

  always @(posedge wle) if (armed) assert (pre) else $error("timing_block: WLE rose outside PRE");
  always @(posedge sae) if (armed) assert (pre) else $error("timing_block: SAE rose outside PRE");
  always @(posedge we)  if (armed) assert (pre) else $error("timing_block: WE rose outside PRE");
  always @(negedge pre)
    if (armed) assert (!wle && !sae && !we)
      else $error("timing_block: PRE fell with WLE/SAE/WE still high");
endmodule
