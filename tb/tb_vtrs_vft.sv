// tb_vtrs_vft: checks nu = omega + L/r + delta on hand-worked cases
// (r = C/2 gives L/r = 2 cell times; r = C/4 gives 4) and on random cell
// states against 64-bit integer arithmetic, including wrap-around of the
// time stamp and the saturated L/r of a zero rate.
module tb_vtrs_vft;
  import cioq_pkg::*;

  cell_t cell_in;
  ts_t   vdelay, vft;

  vtrs_vft dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(logic [15:0] rate, ts_t omega, ts_t delta);
    cell_in       = '0;
    cell_in.rate  = rate;
    cell_in.omega = omega;
    cell_in.delta = delta;
    cell_in.data  = 16'hABCD;
    #1;
  endtask

  initial begin
    // r = C/2: one cell takes 2 cell times = 512 units
    apply(16'h8000, 32'd1000, 32'd10);
    check(vdelay == 32'd522 && vft == 32'd1522, "r=C/2");
    // r = C/4, delta 0: 4 cell times
    apply(16'h4000, 32'd256, 32'd0);
    check(vdelay == 32'd1024 && vft == 32'd1280, "r=C/4");
    // nearly the full line rate: L/r = 256 units (one cell time)
    apply(16'hFFFF, 32'd0, 32'd0);
    check(vdelay == 32'd256, "r~C");
    // zero rate saturates
    apply(16'h0000, 32'd5, 32'd0);
    check(vdelay == 32'hFFFF_FFFF, "r=0 saturates");
    // wrap-around of the stamp
    apply(16'h8000, 32'hFFFF_FF00, 32'd0);
    check(vft == 32'h0000_0100, "wrap");
    for (int n = 0; n < 5000; n++) begin
      logic [15:0] r;
      ts_t o, d;
      longint unsigned lr, expd, expv;
      r = 16'($urandom_range(1, 65535));
      o = $urandom;
      d = ts_t'($urandom_range(0, 100000));
      apply(r, o, d);
      lr   = (64'd1 << 24) / longint'(r);
      expd = (lr + d) & 64'hFFFF_FFFF;
      expv = (lr + d + o) & 64'hFFFF_FFFF;
      check(vdelay == ts_t'(expd) && vft == ts_t'(expv),
            $sformatf("random r=%0d omega=%0d delta=%0d", r, o, d));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
