// tb_crossbar: random matchings (random permutations with random unmatched
// outputs) on a 4x4 crossbar; checks that each connected output receives
// its input's cell, unconnected outputs receive nothing, and the
// input-side view (in_conn/in_out) is the inverse of the configuration.
module tb_crossbar;
  localparam int N = 4, PW = 12, IW = 2;

  logic [N-1:0]  sel_valid, in_conn, out_valid;
  logic [IW-1:0] sel [N], in_out [N];
  logic [PW-1:0] in_data [N], out_data [N];

  crossbar #(.N(N), .PW(PW)) dut (.*);

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
    for (int n = 0; n < 2000; n++) begin
      int perm [N];
      for (int k = 0; k < N; k++) perm[k] = k;
      perm.shuffle();
      for (int j = 0; j < N; j++) begin
        sel_valid[j] = ($urandom_range(0, 3) != 0);
        sel[j]       = IW'(perm[j]);
        in_data[j]   = PW'($urandom);
      end
      #1;
      for (int j = 0; j < N; j++) begin
        check(out_valid[j] == sel_valid[j], "out_valid");
        if (sel_valid[j]) check(out_data[j] == in_data[perm[j]], "routed data");
      end
      for (int i = 0; i < N; i++) begin
        automatic int o = -1;
        for (int j = 0; j < N; j++) if (sel_valid[j] && perm[j] == i) o = j;
        check(in_conn[i] == (o >= 0), "in_conn");
        if (o >= 0) check(int'(in_out[i]) == o, "in_out");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
