// tb_pulse_gen: self-checking testbench of one pulse-generator output.
//
// The generator is configured like the WLE output (plain DCDE on A, extended
// element on B). Tap B is the input delayed by TAP_B ps, tap A the input itself.
// For random legal codes it checks, per input rising edge, exactly one output
// pulse with
//   t_D  = t_IN-A = MIN + (4 - onesA) * STEP_A                   (Eq. 5.1)
//   t_IN-B        = TAP_B + MIN + (19 - idxB) * STEP_B + INV
//   t_PW = t_IN-B - t_IN-A                                       (Eq. 5.2)
// and no pulse on the input's falling edge.
module tb_pulse_gen;
  import sram_timing_pkg::*;
  timeunit 1ps;
  timeprecision 100fs;

  localparam real MIN    = 140.0;
  localparam real STEP_A = 22.6;
  localparam real STEP_B = 21.9;
  localparam real INV    = 50.0;
  localparam real TAP_B  = 200.0;
  localparam real TOL    = 0.25;

  int checks = 0;
  int failures = 0;

  logic      in = 1'b0;
  logic      b_tap;
  ext_code_t a_code = '0, b_code = '0;
  logic      out;
  realtime   t_rise = -1.0, t_fall = -1.0, t0;
  int        n_pulses = 0;

  assign #(TAP_B) b_tap = in;

  pulse_gen #(
    .A_EXT(1'b0), .B_EXT(1'b1), .A_STEP_PS(STEP_A), .B_STEP_PS(STEP_B),
    .MIN_PS(MIN), .INV_PS(INV)
  ) dut (.a_tap(in), .b_tap(b_tap), .a_code(a_code), .b_code(b_code), .out(out));

  always @(posedge out) begin t_rise = $realtime; n_pulses++; end
  always @(negedge out) t_fall = $realtime;

  task automatic check_near(input string what, input real got, input real exp);
    checks++;
    if (got < exp - TOL || got > exp + TOL) begin
      failures++;
      $display("FAIL %s: got %0.2f ps, expected %0.2f ps", what, got, exp);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #3000;
    for (int i = 0; i < 40; i++) begin
      int unsigned na, ib;
      real exp_d, exp_b;
      na = (i < 5) ? i : $urandom_range(0, 4);
      ib = (i < 20) ? i : $urandom_range(0, EXT_CODES - 1);
      a_code = ext_code_at(na);        // coarse 0, na ones
      b_code = ext_code_at(ib);
      exp_d = MIN + real'(4 - na) * STEP_A;
      exp_b = TAP_B + MIN + real'(19 - ib) * STEP_B + INV;
      #3000;
      n_pulses = 0;
      t0 = $realtime; in = 1'b1;
      #3000;
      check_near($sformatf("t_D  a=%0d b=%0d", na, ib), t_rise - t0, exp_d);
      check_near($sformatf("t_PW a=%0d b=%0d", na, ib), t_fall - t_rise, exp_b - exp_d);
      in = 1'b0;
      #3000;
      checks++;
      if (n_pulses != 1) begin
        failures++;
        $display("FAIL %0d output pulses for one input cycle", n_pulses);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
