// tb_static_delay_line: self-checking testbench of the static inverter chain.
//
// After each input edge, tap k must take the value in XOR (k odd) exactly k
// inverter delays later, and not before.
module tb_static_delay_line;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned N  = 7;
  localparam real         TI = 37.5;

  int checks = 0;
  int failures = 0;

  logic         in = 1'b0;
  logic [N:0]   tap;
  realtime      t0;

  static_delay_line #(.N_STAGES(N), .INV_PS(TI)) dut (.in(in), .tap(tap));

  initial begin
    #1_000_000;
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    for (int e = 0; e < 4; e++) begin
      logic v;
      v = ~in;
      t0 = $realtime;
      in = v;
      for (int unsigned k = 0; k <= N; k++) begin
        // just before its delay the tap still shows the old value, just after the new one
        if (k > 0) begin
          #(t0 + real'(k) * TI - 0.2 - $realtime);
          checks++;
          if (tap[k] !== (~v ^ k[0])) begin
            failures++;
            $display("FAIL tap %0d changed early", k);
          end
        end
        #(t0 + real'(k) * TI + 0.2 - $realtime);
        checks++;
        if (tap[k] !== (v ^ k[0])) begin
          failures++;
          $display("FAIL tap %0d = %b after %0d inverter delays, edge %0d", k, tap[k], k, e);
        end
      end
      #500;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
