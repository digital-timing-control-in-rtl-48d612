// tb_sram_timing_top: end-to-end testbench of the timing block with its serial
// code register, at the top's default parameters (typical corner, 42-bit word).
//
// Mechanisms exercised and counted (each must occur at least once):
//   load      a control word shifted in serially (42 sclk cycles)
//   readback  the previous word returned on sdout while loading
//   read      a clock edge with rw = 1: PRE, WLE, SAE pulse, WE stays low
//   write     a clock edge with rw = 0: PRE, WLE, WE pulse, SAE stays low
//   wle_sweep the WLE falling edge stepped through all 20 codes (access time)
//   sae_sweep the SAE rising edge stepped through all 20 codes
//   calib     the power-on calibration flow: start from the most aggressive
//             wordline code and relax one code at a time until the wordline
//             access time covers a required value, or report failure after the
//             last code; run for 240, 310 and 450 ps (0, 3 and 6 sigma at 1 V)
//             and for an unreachable 700 ps
//   relax     one relaxation step of that flow
//   calib_fail the flow running out of codes
// All edges are checked against times computed here from the tap positions and
// the element formulas; every sequence is run from a 100 MHz clock and must end
// within 2 ns (500 MHz operation from a low-speed clock).
module tb_sram_timing_top;
  import sram_timing_pkg::*;
  timeunit 1ps;
  timeprecision 100fs;

  localparam real HALF   = 5000.0;     // 100 MHz test clock
  localparam real SCLK_H = 5000.0;
  localparam real TOL    = 1.0;
  localparam real INV    = 50.0;
  localparam real MINP   = 140.0;
  localparam real ST_S   = 22.6;       // SAE, PRE, WE element step
  localparam real ST_W   = 21.9;       // WLE element step
  // required wordline access times for the calibration runs
  localparam real NEED [4] = '{240.0, 310.0, 450.0, 700.0};

  typedef enum int {M_LOAD, M_READBACK, M_READ, M_WRITE, M_WLE_SWEEP, M_SAE_SWEEP,
                    M_CALIB, M_RELAX, M_CALIB_FAIL, M_N} mech_t;
  int mech [M_N];
  string mech_name [M_N] = '{"load", "readback", "read", "write", "wle_sweep",
                             "sae_sweep", "calib", "relax", "calib_fail"};

  int checks = 0;
  int failures = 0;

  logic sclk = 1'b0, rst_n = 1'b1, shift_en = 1'b0, sdin = 1'b0, sdout;
  logic clk_in = 1'b0, rw = 1'b1;
  logic pre, wle, sae, we;

  sram_timing_top dut (
    .sclk(sclk), .rst_n(rst_n), .shift_en(shift_en), .sdin(sdin), .sdout(sdout),
    .clk_in(clk_in), .rw(rw), .pre(pre), .wle(wle), .sae(sae), .we(we));

  logic [3:0] sig;
  assign sig = {pre, wle, sae, we};
  realtime t0, t_up[4], t_dn[4];
  int      n_up[4];
  for (genvar s = 0; s < 4; s++) begin : g_mon
    always @(posedge sig[3-s]) begin t_up[s] = $realtime - t0; n_up[s]++; end
    always @(negedge sig[3-s]) t_dn[s] = $realtime - t0;
  end

  logic [SR_LEN-1:0] loaded = '0;    // word the register should hold

  initial begin
    #200_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_near(input string what, input real got, input real exp);
    checks++;
    if (got < exp - TOL || got > exp + TOL) begin
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

  function automatic real fine_d(real step, fine_code_t f);
    return MINP + real'(4 - $countones(f)) * step;
  endfunction
  function automatic real ext_d(real step, ext_code_t e);
    return MINP + real'(19 - (int'(e.coarse) * 5 + $countones(e.fine))) * step;
  endfunction

  // Shift a word in LSB first; the old word must come out on sdout.
  task automatic load_word(input timing_ctrl_t c);
    logic [SR_LEN-1:0] w, back;
    w = {SPARE_BITS'($urandom()), c};
    for (int unsigned i = 0; i < SR_LEN; i++) begin
      back[i] = sdout;
      sdin = w[i];
      shift_en = 1'b1;
      #(SCLK_H) sclk = 1'b1;
      #(SCLK_H) sclk = 1'b0;
    end
    shift_en = 1'b0;
    check_true("readback of previous word", back == loaded);
    if (loaded != '0) mech[M_READBACK]++;
    loaded = w;
    mech[M_LOAD]++;
  endtask

  // One clock cycle; checks every edge against the loaded control word.
  task automatic run_cycle(input logic is_read, input timing_ctrl_t c);
    real eu[4], ed[4];
    string nm [4] = '{"PRE", "WLE", "SAE", "WE"};
    rw = is_read;
    #(HALF);
    for (int s = 0; s < 4; s++) begin n_up[s] = 0; t_up[s] = -1.0; t_dn[s] = -1.0; end
    t0 = $realtime;
    clk_in = 1'b1;
    #(HALF);
    clk_in = 1'b0;
    #(HALF);
    eu[0] = fine_d(ST_S, c.pre_rise);
    ed[0] = 30.0 * INV + fine_d(ST_S, c.pre_fall) + INV;
    eu[1] = 2.0 * INV + fine_d(ST_W, c.wle_rise);
    ed[1] = 4.0 * INV + ext_d(ST_W, c.wle_fall) + INV;
    eu[2] = 6.0 * INV + ext_d(ST_S, c.sae_rise);
    ed[2] = 28.0 * INV + fine_d(ST_S, c.sae_fall) + INV;
    eu[3] = 4.0 * INV + fine_d(ST_S, c.we_rise);
    ed[3] = 26.0 * INV + fine_d(ST_S, c.we_fall) + INV;
    for (int s = 0; s < 4; s++) begin
      bit active;
      active = (s < 2) || (s == 2 && is_read) || (s == 3 && !is_read);
      check_true($sformatf("%s pulse count %0d", nm[s], n_up[s]), n_up[s] == (active ? 1 : 0));
      if (active) begin
        check_near($sformatf("%s rise", nm[s]), t_up[s], eu[s]);
        check_near($sformatf("%s fall", nm[s]), t_dn[s], ed[s]);
      end
    end
    check_true("sequence inside 2 ns", t_dn[0] < 2000.0);
    mech[is_read ? M_READ : M_WRITE]++;
  endtask

  function automatic timing_ctrl_t random_ctrl();
    timing_ctrl_t c;
    c.pre_rise = fine_code_t'((1 << $urandom_range(0, 4)) - 1);
    c.pre_fall = fine_code_t'((1 << $urandom_range(0, 4)) - 1);
    c.wle_rise = fine_code_t'((1 << $urandom_range(0, 4)) - 1);
    c.wle_fall = ext_code_at($urandom_range(0, 19));
    c.sae_rise = ext_code_at($urandom_range(0, 19));
    c.sae_fall = fine_code_t'((1 << $urandom_range(0, 4)) - 1);
    c.we_rise  = fine_code_t'((1 << $urandom_range(0, 4)) - 1);
    c.we_fall  = fine_code_t'((1 << $urandom_range(0, 4)) - 1);
    return c;
  endfunction

  // Calibration: most aggressive wordline code first, relax until the access
  // time (WLE pulse width) covers `need`; returns the code index or -1.
  task automatic calibrate(input timing_ctrl_t base, input real need, output int found);
    timing_ctrl_t c;
    real width;
    c = base;
    found = -1;
    for (int idx = 19; idx >= 0; idx--) begin
      c.wle_fall = ext_code_at(idx);
      load_word(c);
      run_cycle(1'b1, c);
      width = t_dn[1] - t_up[1];
      if (width >= need) begin
        found = idx;
        break;
      end
      if (idx > 0) mech[M_RELAX]++;
    end
    if (found < 0) mech[M_CALIB_FAIL]++;
    mech[M_CALIB]++;
  endtask

  initial begin
    timing_ctrl_t c, mid;
    real prev, d, first;
    int  got;

    #1000;
    rst_n = 1'b0;      // asynchronous reset edge
    #20000;
    rst_n = 1'b1;
    #20000;

    mid.pre_rise = 4'b0011; mid.pre_fall = 4'b0011; mid.wle_rise = 4'b0011;
    mid.wle_fall = ext_code_at(7); mid.sae_rise = ext_code_at(7);
    mid.sae_fall = 4'b0011; mid.we_rise = 4'b0011; mid.we_fall = 4'b0011;

    // nominal read and write
    load_word(mid);
    run_cycle(1'b1, mid);
    check_true("WLE inside PRE evaluation", t_up[1] > t_up[0] && t_dn[1] < t_dn[0]);
    check_true("SAE after wordline closes", t_up[2] > t_dn[1]);
    run_cycle(1'b0, mid);

    // random words, alternating read and write
    for (int i = 0; i < 12; i++) begin
      c = random_ctrl();
      load_word(c);
      run_cycle(i[0], c);
    end

    // access-time and sense-enable sweeps over all 20 codes
    for (int which = 0; which < 2; which++) begin
      c = mid;
      for (int idx = 0; idx < 20; idx++) begin
        if (which == 0) c.wle_fall = ext_code_at(idx);
        else            c.sae_rise = ext_code_at(idx);
        load_word(c);
        run_cycle(1'b1, c);
        d = (which == 0) ? t_dn[1] : t_up[2];
        if (idx == 0) first = d;
        else check_true($sformatf("sweep %0d code %0d monotonic", which, idx), d < prev);
        prev = d;
      end
      check_near(which == 0 ? "WLE fall range" : "SAE rise range", first - prev,
                 which == 0 ? 416.3 : 430.4);
      mech[which == 0 ? M_WLE_SWEEP : M_SAE_SWEEP]++;
    end

    // calibration flow for several required access times
    for (int k = 0; k < 4; k++) begin
      real w_exp;
      calibrate(mid, NEED[k], got);
      if (got >= 0) begin
        // expected: least relaxed code whose width covers the need
        int idx_exp;
        idx_exp = -1;
        for (int idx = 19; idx >= 0; idx--) begin
          w_exp = 4.0 * INV + MINP + real'(19 - idx) * ST_W + INV - (2.0 * INV + fine_d(ST_W, mid.wle_rise));
          if (w_exp >= NEED[k]) begin idx_exp = idx; break; end
        end
        check_true($sformatf("calibration for %0.0f ps picks code %0d, expected %0d",
                             NEED[k], got, idx_exp), got == idx_exp);
      end else begin
        check_true($sformatf("calibration for %0.0f ps fails only when out of range", NEED[k]),
                   NEED[k] > 4.0 * INV + MINP + 19.0 * ST_W + INV - (2.0 * INV + fine_d(ST_W, mid.wle_rise)));
      end
      $display("calibration: need %0.0f ps -> WLE fall code %0d", NEED[k], got);
    end

    for (int m = 0; m < M_N; m++) begin
      $display("mechanism %-10s happened %0d times", mech_name[m], mech[m]);
      check_true($sformatf("mechanism %s never happened", mech_name[m]), mech[m] > 0);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
