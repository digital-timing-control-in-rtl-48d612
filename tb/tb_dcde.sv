// tb_dcde: self-checking testbench of the DCDE behavioural model.
//
// For every thermometer code the rising delay must be MIN + STEP * (4 - ones) and
// the falling delay FALL; successive thermometer codes must shorten the rising
// delay by exactly one step (monotonic, uniform). A binary sweep of all 16 codes
// is measured too: since the model weighs every pulldown equally, binary codes
// with the same number of ones give the same delay, which the test also checks.
module tb_dcde;
  import sram_timing_pkg::*;
  timeunit 1ps;
  timeprecision 100fs;

  localparam real MIN  = 140.0;
  localparam real STEP = 22.6;
  localparam real FALL = 130.0;
  localparam real TOL  = 0.15;

  int checks = 0;
  int failures = 0;

  logic       in = 1'b0;
  fine_code_t sel = '0;
  logic       out;
  realtime    t_rise = -1.0, t_fall = -1.0, t0;
  real        rise_d, fall_d, prev_d;

  dcde #(.MIN_PS(MIN), .STEP_PS(STEP), .FALL_PS(FALL)) dut (.in(in), .sel(sel), .out(out));

  always @(posedge out) t_rise = $realtime;
  always @(negedge out) t_fall = $realtime;

  task automatic check_near(input string what, input real got, input real exp);
    checks++;
    if (got < exp - TOL || got > exp + TOL) begin
      failures++;
      $display("FAIL %s: got %0.2f ps, expected %0.2f ps", what, got, exp);
    end
  endtask

  task automatic measure(input fine_code_t code, output real r, output real f);
    sel = code;
    #1000;
    t0 = $realtime; in = 1'b1; #1000; r = t_rise - t0;
    t0 = $realtime; in = 1'b0; #1000; f = t_fall - t0;
  endtask

  initial begin
    #5_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000;
    prev_d = 1.0e9;
    for (int n = 0; n <= FINE_BITS; n++) begin
      measure(fine_code_t'((1 << n) - 1), rise_d, fall_d);
      check_near($sformatf("therm %0d ones rise", n), rise_d, MIN + STEP * real'(FINE_BITS - n));
      check_near($sformatf("therm %0d ones fall", n), fall_d, FALL);
      if (n > 0) check_near($sformatf("therm step %0d", n), prev_d - rise_d, STEP);
      prev_d = rise_d;
    end
    for (int b = 0; b < 16; b++) begin
      measure(fine_code_t'(b), rise_d, fall_d);
      check_near($sformatf("binary %b rise", fine_code_t'(b)), rise_d,
                 MIN + STEP * real'(FINE_BITS - $countones(b)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
