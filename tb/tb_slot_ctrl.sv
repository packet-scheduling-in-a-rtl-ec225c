// tb_slot_ctrl: runs the sequencer with N=3, S=4 and with N=2, S=2 and
// checks against cycle numbers worked out by hand: a slot is 1 + S*(N+1)
// cycles, slot_start on its first cycle, phase_start at 1 + p*(N+1) with
// the phase index p, and the slot counter advancing once per slot.
module tb_slot_ctrl;
  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic ss_a, ps_a, ss_b, ps_b;
  logic [1:0]  ph_a;
  logic [0:0]  ph_b;
  logic [23:0] sl_a, sl_b;

  slot_ctrl #(.N(3), .S(4)) dut_a (.clk, .rst_n, .slot_start(ss_a), .phase_start(ps_a), .phase(ph_a), .slot(sl_a));
  slot_ctrl #(.N(2), .S(2)) dut_b (.clk, .rst_n, .slot_start(ss_b), .phase_start(ps_b), .phase(ph_b), .slot(sl_b));

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(posedge clk);
    @(negedge clk);
    rst_n = 1;
    for (int c = 0; c < 17 * 10; c++) begin
      int ca, cb;
      ca = c % 17;   // N=3, S=4: 17 cycles per slot
      cb = c % 7;    // N=2, S=2: 7 cycles per slot
      check(ss_a == (ca == 0), $sformatf("slot_start a c=%0d", c));
      check(ps_a == (ca != 0 && (ca - 1) % 4 == 0), $sformatf("phase_start a c=%0d", c));
      if (ps_a) check(int'(ph_a) == (ca - 1) / 4, "phase index a");
      check(int'(sl_a) == c / 17, "slot counter a");
      check(ss_b == (cb == 0), "slot_start b");
      check(ps_b == (cb != 0 && (cb - 1) % 3 == 0), "phase_start b");
      if (ps_b) check(int'(ph_b) == (cb - 1) / 3, "phase index b");
      check(int'(sl_b) == c / 7, "slot counter b");
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
