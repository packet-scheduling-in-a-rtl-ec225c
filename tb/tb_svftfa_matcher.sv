// tb_svftfa_matcher: random request patterns and keys (from a narrow range,
// so that ties occur) for a 4x4 matcher. A behavioural model of the
// smallest virtual finish time first iterations computes the expected
// matching and the number of matching iterations; the testbench checks the
// matching, the iteration count, and that 'done' comes exactly that many
// cycles after 'start' (one cycle if nothing is requested), never more than
// N+1 cycles.
module tb_svftfa_matcher;
  import cioq_pkg::*;

  localparam int N  = 4;
  localparam int IW = 2;

  logic clk = 0, rst_n = 0;
  logic start, busy, done;
  logic [N-1:0]  req_valid [N];
  ts_t           key [N][N];
  logic [N-1:0]  match_valid;
  logic [IW-1:0] match_in [N];
  logic [$clog2(N+1)-1:0] iters;

  svftfa_matcher #(.N(N)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int max_iters_seen = 0, ties = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // expected result
  int exp_in [N];    // -1: unmatched
  int exp_k;

  function automatic void model();
    bit in_m [N];
    bit out_m [N];
    bit any;
    int rq_i [N];
    for (int x = 0; x < N; x++) begin
      in_m[x] = 0; out_m[x] = 0; exp_in[x] = -1;
    end
    exp_k = 0;
    do begin
      any = 0;
      for (int j = 0; j < N; j++) begin
        rq_i[j] = -1;
        if (!out_m[j])
          for (int i = 0; i < N; i++)
            if (req_valid[j][i] && !in_m[i])
              if (rq_i[j] < 0 || signed'(key[j][i] - key[j][rq_i[j]]) < 0) rq_i[j] = i;
        if (rq_i[j] >= 0) any = 1;
      end
      if (any) begin
        exp_k++;
        for (int i = 0; i < N; i++) begin
          int w = -1;
          for (int j = 0; j < N; j++)
            if (rq_i[j] == i)
              if (w < 0 || signed'(key[j][i] - key[w][i]) < 0) w = j;
          if (w >= 0) begin
            out_m[w] = 1; in_m[i] = 1; exp_in[w] = i;
          end
        end
      end
    end while (any);
  endfunction

  initial begin
    start = 0;
    for (int j = 0; j < N; j++) begin
      req_valid[j] = '0;
      for (int i = 0; i < N; i++) key[j][i] = '0;
    end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      int density, cyc;
      density = $urandom_range(10, 100);
      @(negedge clk);
      for (int j = 0; j < N; j++)
        for (int i = 0; i < N; i++) begin
          req_valid[j][i] = ($urandom_range(0, 99) < density);
          key[j][i] = ts_t'(32'hFFFF_FFF0 + $urandom_range(0, 24));
        end
      for (int j = 0; j < N; j++)
        for (int a = 0; a < N; a++)
          for (int b = a + 1; b < N; b++)
            if (req_valid[j][a] && req_valid[j][b] && key[j][a] == key[j][b]) ties++;
      model();
      start = 1;
      @(negedge clk);
      start = 0;
      cyc = 1;
      #1;
      while (!done && cyc < 3 * N) begin
        @(negedge clk);
        #1;
        cyc++;
      end
      check(done, "done seen");
      check(cyc == ((exp_k > 0) ? exp_k : 1), $sformatf("done after %0d cycles, expected %0d", cyc, exp_k));
      check(cyc <= N + 1, "at most N+1 cycles");
      check(int'(iters) == exp_k, "iteration count");
      if (exp_k > max_iters_seen) max_iters_seen = exp_k;
      for (int j = 0; j < N; j++) begin
        check(match_valid[j] == (exp_in[j] >= 0), $sformatf("match_valid[%0d]", j));
        if (exp_in[j] >= 0) check(int'(match_in[j]) == exp_in[j], $sformatf("match_in[%0d]", j));
      end
      @(negedge clk);
      check(!busy, "idle after done");
    end
    check(max_iters_seen >= 3, "multi-iteration matchings exercised");
    check(ties > 0, "ties exercised");
    $display("max iterations %0d, ties %0d", max_iters_seen, ties);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
