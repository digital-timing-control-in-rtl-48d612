// tb_timing_block: self-checking testbench of the delay-line SRAM timing block.
//
// Three copies of the block, at the TT, SS and FF corners, share clock, rw and
// control word. Edge times are measured from the clock's rising edge and compared
// with values worked out here from the tap positions and element formulas:
//   * all eight edges of a read (SAE pulses, WE stays low) and of a write (WE
//     pulses, SAE stays low) at middle codes;
//   * at TT: PRE rises before WLE, WLE falls before SAE rises, SAE and WE fall
//     before PRE, and PRE falls within 2 ns (a 500 MHz cycle);
//   * identical edges for three clock periods / duty cycles (rising edge only);
//   * a sweep of the SAE rising-edge code and of the WLE falling-edge code over
//     all 20 codes: strictly monotonic, and the range and average step at every
//     corner within 1.5 ps / 0.1 ps of the source's corner table
//     (SAE 430.4/22.6, 574.8/30.2, 342.3/18.0; WLE 416.3/21.9, 553.9/29.1,
//     328.0/17.2 ps).
module tb_timing_block;
  import sram_timing_pkg::*;
  timeunit 1ps;
  timeprecision 100fs;

  localparam real TOL   = 1.0;   // each of up to 31 stage delays rounds to 0.1 ps
  localparam real HALF  = 4000.0;   // clock phase
  localparam int  NC    = 3;
  // corner table (TT, SS, FF)
  localparam real SAE_RANGE [NC] = '{430.4, 574.8, 342.3};
  localparam real SAE_STEP  [NC] = '{22.6, 30.2, 18.0};
  localparam real WLE_RANGE [NC] = '{416.3, 553.9, 328.0};
  localparam real WLE_STEP  [NC] = '{21.9, 29.1, 17.2};
  localparam string NM [4] = '{"PRE", "WLE", "SAE", "WE"};
  // clock high / low phases for the clock-independence check
  localparam real HI_LO [3][2] = '{'{4000.0, 4000.0}, '{2500.0, 9000.0}, '{12000.0, 3000.0}};

  int checks = 0;
  int failures = 0;

  logic         clk_in = 1'b0;
  logic         rw = 1'b1;
  timing_ctrl_t ctrl;
  logic [3:0]   sig [NC];            // {pre, wle, sae, we}
  realtime      t_up [NC][4];
  realtime      t_dn [NC][4];
  int           n_up [NC][4];
  realtime      t0;

  timing_block #(.CORNER(CORNER_TT)) dut_tt (
    .clk_in(clk_in), .rw(rw), .ctrl(ctrl),
    .pre(sig[0][3]), .wle(sig[0][2]), .sae(sig[0][1]), .we(sig[0][0]));
  timing_block #(.CORNER(CORNER_SS)) dut_ss (
    .clk_in(clk_in), .rw(rw), .ctrl(ctrl),
    .pre(sig[1][3]), .wle(sig[1][2]), .sae(sig[1][1]), .we(sig[1][0]));
  timing_block #(.CORNER(CORNER_FF)) dut_ff (
    .clk_in(clk_in), .rw(rw), .ctrl(ctrl),
    .pre(sig[2][3]), .wle(sig[2][2]), .sae(sig[2][1]), .we(sig[2][0]));

  for (genvar c = 0; c < NC; c++) begin : g_mon
    for (genvar s = 0; s < 4; s++) begin : g_sig
      always @(posedge sig[c][3-s]) begin t_up[c][s] = $realtime - t0; n_up[c][s]++; end
      always @(negedge sig[c][3-s]) t_dn[c][s] = $realtime - t0;
    end
  end

  task automatic check_near(input string what, input real got, input real exp, input real tol);
    checks++;
    if (got < exp - tol || got > exp + tol) begin
      failures++;
      $display("FAIL %s: got %0.2f ps, expected %0.2f ps", what, got, exp);
    end
  endtask

  task automatic check_true(input string what, input bit ok);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // One clock cycle with the current rw and ctrl.
  task automatic run_cycle(input real hi = HALF, input real lo = HALF);
    for (int c = 0; c < NC; c++)
      for (int s = 0; s < 4; s++) begin
        n_up[c][s] = 0; t_up[c][s] = -1.0; t_dn[c][s] = -1.0;
      end
    t0 = $realtime;
    clk_in = 1'b1;
    #(hi);
    clk_in = 1'b0;
    #(lo);
  endtask

  function automatic real scale(int c);
    return SAE_STEP[c] / SAE_STEP[0];
  endfunction

  // delay of a plain element with n ones, and of an extended element at code idx
  function automatic real fine_d(int c, real step, int n);
    return 140.0 * scale(c) + real'(4 - n) * step;
  endfunction
  function automatic real ext_d(int c, real step, int idx);
    return 140.0 * scale(c) + real'(19 - idx) * step;
  endfunction

  initial begin
    #20_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real inv, exp_up[4], exp_dn[4];
    real first_d, prev_d, d;

    ctrl.pre_rise = 4'b0011; ctrl.pre_fall = 4'b0011;
    ctrl.wle_rise = 4'b0011; ctrl.wle_fall = ext_code_at(7);
    ctrl.sae_rise = ext_code_at(7); ctrl.sae_fall = 4'b0011;
    ctrl.we_rise  = 4'b0011; ctrl.we_fall  = 4'b0011;
    #(2 * HALF);

    // ---- nominal read and write cycles at every corner
    for (int op = 0; op < 2; op++) begin
      rw = (op == 0);
      run_cycle();
      for (int c = 0; c < NC; c++) begin
        inv = 50.0 * scale(c);
        exp_up[0] = 0.0 * inv + fine_d(c, SAE_STEP[c], 2);
        exp_dn[0] = 30.0 * inv + fine_d(c, SAE_STEP[c], 2) + inv;
        exp_up[1] = 2.0 * inv + fine_d(c, WLE_STEP[c], 2);
        exp_dn[1] = 4.0 * inv + ext_d(c, WLE_STEP[c], 7) + inv;
        exp_up[2] = 6.0 * inv + ext_d(c, SAE_STEP[c], 7);
        exp_dn[2] = 28.0 * inv + fine_d(c, SAE_STEP[c], 2) + inv;
        exp_up[3] = 4.0 * inv + fine_d(c, SAE_STEP[c], 2);
        exp_dn[3] = 26.0 * inv + fine_d(c, SAE_STEP[c], 2) + inv;
        for (int s = 0; s < 4; s++) begin
          bit active;
          active = (s < 2) || (s == 2 && rw) || (s == 3 && !rw);
          check_true($sformatf("corner %0d op %0d %s pulses %0d", c, op, NM[s], n_up[c][s]),
                     n_up[c][s] == (active ? 1 : 0));
          if (active) begin
            check_near($sformatf("corner %0d %s rise", c, NM[s]), t_up[c][s], exp_up[s], TOL);
            check_near($sformatf("corner %0d %s fall", c, NM[s]), t_dn[c][s], exp_dn[s], TOL);
          end
        end
      end
      // sequencing at TT
      if (rw) begin
        check_true("PRE rises before WLE", t_up[0][0] < t_up[0][1]);
        check_true("WLE falls before SAE rises", t_dn[0][1] < t_up[0][2]);
        check_true("SAE falls before PRE", t_dn[0][2] < t_dn[0][0]);
      end else begin
        check_true("WE inside PRE", t_up[0][3] > t_up[0][0] && t_dn[0][3] < t_dn[0][0]);
      end
      check_true("cycle fits 2 ns", t_dn[0][0] < 2000.0);
    end

    // ---- the outputs depend only on the rising clock edge: same edges for
    //      other clock periods and duty cycles
    begin
      realtime ref_up [4], ref_dn [4];
      rw = 1'b1;
      for (int k = 0; k < 3; k++) begin
        run_cycle(HI_LO[k][0], HI_LO[k][1]);
        for (int s = 0; s < 3; s++) begin
          if (k == 0) begin ref_up[s] = t_up[0][s]; ref_dn[s] = t_dn[0][s]; end
          else begin
            check_near($sformatf("clock %0d %s rise independent of clock", k, NM[s]),
                       t_up[0][s], ref_up[s], 0.05);
            check_near($sformatf("clock %0d %s fall independent of clock", k, NM[s]),
                       t_dn[0][s], ref_dn[s], 0.05);
          end
        end
      end
    end

    // ---- SAE rising-edge sweep (read) and WLE falling-edge sweep
    rw = 1'b1;
    for (int which = 0; which < 2; which++) begin
      for (int c = 0; c < NC; c++) begin
        first_d = 0.0; prev_d = 0.0;
      end
      begin
        real first_c [NC], prev_c [NC];
        for (int idx = 0; idx < int'(EXT_CODES); idx++) begin
          if (which == 0) ctrl.sae_rise = ext_code_at(idx);
          else            ctrl.wle_fall = ext_code_at(idx);
          #(2 * HALF);
          run_cycle();
          for (int c = 0; c < NC; c++) begin
            d = (which == 0) ? t_up[c][2] : t_dn[c][1];
            if (idx == 0) first_c[c] = d;
            else check_true($sformatf("sweep %0d corner %0d code %0d monotonic", which, c, idx),
                            d < prev_c[c]);
            prev_c[c] = d;
          end
        end
        for (int c = 0; c < NC; c++) begin
          real rng;
          rng = first_c[c] - prev_c[c];
          if (which == 0) begin
            check_near($sformatf("SAE range corner %0d", c), rng, SAE_RANGE[c], 1.5);
            check_near($sformatf("SAE step corner %0d", c), rng / 19.0, SAE_STEP[c], 0.1);
          end else begin
            check_near($sformatf("WLE range corner %0d", c), rng, WLE_RANGE[c], 1.5);
            check_near($sformatf("WLE step corner %0d", c), rng / 19.0, WLE_STEP[c], 0.1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
