// tb_ext_range_delay: self-checking testbench of the extended range delay element.
//
// Sweeps all 20 codes in order (coarse 00..11, fine 0000..1111 within each) and
// checks the rising delay MIN + (3 - coarse) * 5 * STEP + (4 - ones) * STEP, i.e.
// an evenly spaced, strictly decreasing ladder of 19 steps, the falling delay
// (3 - coarse) * BUF + FALL, and the total range of 19 * STEP.
module tb_ext_range_delay;
  import sram_timing_pkg::*;
  timeunit 1ps;
  timeprecision 100fs;

  localparam real MIN  = 140.0;
  localparam real STEP = 22.6;
  localparam real FALL = 140.0;
  localparam real BUF  = 5.0 * STEP;
  localparam real TOL  = 0.25;

  int checks = 0;
  int failures = 0;

  logic      in = 1'b0;
  ext_code_t code = '0;
  logic      out;
  realtime   t_rise = -1.0, t_fall = -1.0, t0;
  real       rise_d, fall_d, first_d, prev_d;

  ext_range_delay #(.MIN_PS(MIN), .STEP_PS(STEP), .FALL_PS(FALL)) dut (
    .in(in), .code(code), .out(out));

  always @(posedge out) t_rise = $realtime;
  always @(negedge out) t_fall = $realtime;

  task automatic check_near(input string what, input real got, input real exp);
    checks++;
    if (got < exp - TOL || got > exp + TOL) begin
      failures++;
      $display("FAIL %s: got %0.2f ps, expected %0.2f ps", what, got, exp);
    end
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
    prev_d = 0.0;
    first_d = 0.0;
    for (int unsigned idx = 0; idx < EXT_CODES; idx++) begin
      int unsigned c, n;
      c = idx / 5;
      n = idx % 5;
      code = ext_code_at(idx);
      checks++;
      if (code.coarse != 2'(c) || $countones(code.fine) != n || !is_thermometer(code.fine)) begin
        failures++;
        $display("FAIL code %0d encodes as %b_%b", idx, code.coarse, code.fine);
      end
      #2000;
      t0 = $realtime; in = 1'b1; #2000; rise_d = t_rise - t0;
      t0 = $realtime; in = 1'b0; #2000; fall_d = t_fall - t0;
      check_near($sformatf("code %0d rise", idx), rise_d,
                 MIN + real'(3 - c) * 5.0 * STEP + real'(4 - n) * STEP);
      check_near($sformatf("code %0d fall", idx), fall_d, real'(3 - c) * BUF + FALL);
      if (idx == 0) first_d = rise_d;
      else check_near($sformatf("step to code %0d", idx), prev_d - rise_d, STEP);
      prev_d = rise_d;
    end
    check_near("range over 20 codes", first_d - prev_d, 19.0 * STEP);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
