// tb_ctrl_shift_reg: self-checking testbench of the serial control-code register.
//
// Checks reset to zero, that a random 42-bit word sent LSB first appears in q
// after exactly 42 enabled sclk edges (and not after 41), that shift_en low holds
// the contents, and that sdout returns the stored word bit by bit while the next
// word is shifted in.
module tb_ctrl_shift_reg;
  import sram_timing_pkg::*;
  timeunit 1ps;
  timeprecision 100fs;

  localparam int unsigned LEN = SR_LEN;

  int checks = 0;
  int failures = 0;
  int cycles = 0;
  int shifts = 0;

  logic           sclk = 1'b0;
  logic           rst_n = 1'b1;
  logic           shift_en = 1'b0;
  logic           sdin = 1'b0;
  logic           sdout;
  logic [LEN-1:0] q;

  ctrl_shift_reg dut (.sclk(sclk), .rst_n(rst_n), .shift_en(shift_en), .sdin(sdin),
                      .sdout(sdout), .q(q));

  always #500 sclk = ~sclk;
  always @(posedge sclk) begin
    cycles++;
    if (shift_en) shifts++;
  end

  initial begin
    wait (cycles == 2000);
    failures++;
    $display("FAIL watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_eq(input string what, input logic [LEN-1:0] got, input logic [LEN-1:0] exp);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    logic [LEN-1:0] word, prev, readback;
    int start;
    #10 rst_n = 1'b0;   // asynchronous reset edge
    #1200;
    check_eq("reset value", q, '0);
    @(negedge sclk) rst_n = 1'b1;
    prev = '0;
    for (int w = 0; w < 8; w++) begin
      word = LEN'({$urandom(), $urandom()});
      readback = '0;
      start = shifts;
      for (int unsigned i = 0; i < LEN; i++) begin
        @(negedge sclk);
        readback[i] = sdout;
        sdin = word[i];
        shift_en = 1'b1;
      end
      @(negedge sclk);
      shift_en = 1'b0;
      check_eq($sformatf("word %0d loaded", w), q, word);
      check_eq($sformatf("word %0d read back", w), readback, prev);
      checks++;
      if (shifts - start != int'(LEN)) begin
        failures++;
        $display("FAIL load took %0d sclk cycles, expected %0d", shifts - start, LEN);
      end
      sdin = ~sdin;
      repeat (5) @(negedge sclk);
      check_eq($sformatf("word %0d held", w), q, word);
      prev = word;
    end
    // one shift short of a full word: not yet in place
    word = LEN'({$urandom(), $urandom()}) | 1;
    for (int unsigned i = 0; i < LEN - 1; i++) begin
      @(negedge sclk);
      sdin = word[i];
      shift_en = 1'b1;
    end
    @(negedge sclk);
    shift_en = 1'b0;
    check_eq("41 shifts", q, {word[LEN-2:0], prev[LEN-1]});
    @(negedge sclk) rst_n = 1'b0;
    #1;
    check_eq("async reset", q, '0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
