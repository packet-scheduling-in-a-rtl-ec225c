// tb_vtrs_update: checks omega_next = nu + Psi + pi with the default
// Psi of one cell time and with an overridden Psi, and that every other
// field of the cell passes unchanged.
module tb_vtrs_update;
  import cioq_pkg::*;

  cell_t cell_in, out_a, out_b;
  ts_t   vft, link_delay;

  vtrs_update               dut_a (.cell_in, .vft, .link_delay, .cell_out(out_a));
  vtrs_update #(.PSI(32'd7)) dut_b (.cell_in, .vft, .link_delay, .cell_out(out_b));

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

  initial begin
    cell_in = '0; cell_in.omega = 32'd50; cell_in.rate = 16'h1234;
    vft = 32'd1000; link_delay = 32'd30;
    #1;
    check(out_a.omega == 32'd1286, "nu + 256 + 30");
    check(out_b.omega == 32'd1037, "nu + 7 + 30");
    for (int n = 0; n < 3000; n++) begin
      cell_in = cell_t'({$urandom, $urandom, $urandom, $urandom});
      vft = $urandom;
      link_delay = ts_t'($urandom_range(0, 4096));
      #1;
      check(out_a.omega == ts_t'(64'(vft) + 64'd256 + 64'(link_delay)), "omega default psi");
      check(out_b.omega == vft + 32'd7 + link_delay, "omega psi 7");
      check(out_a.dest == cell_in.dest && out_a.flow == cell_in.flow &&
            out_a.rate == cell_in.rate && out_a.delta == cell_in.delta &&
            out_a.data == cell_in.data, "other fields unchanged");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
