// tb_cioq_fig1: the worked 3x3 example with a speedup of 2 (S = 2).
//
// Same traffic as tb_cioq_switch: a conformance part (uniform, then a hot
// spot) with a shadow core stateless virtual clock output queued switch,
// then an overload part. Exact emulation of the output queued switch is guaranteed
// only for a speedup of at least 4. At S = 2 the testbench therefore only
// counts the slots in which an output sends a different cell from the shadow
// switch, or none, and reports that count. It still checks:
//   - the 9-cycle slot period (1 + S*(N+1));
//   - the stamps for the next hop;
//   - that drops happen only at a full VOQ;
//   - that every accepted cell leaves exactly once, on its own port.
module tb_cioq_fig1;
  import cioq_pkg::*;

  localparam int N = 3, S = 2, VOQ_DEPTH = 8, OQ_DEPTH = 16;
  localparam int SLOT_CYCLES = 1 + S * (N + 1);

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0] in_valid, in_drop, out_valid, oq_full;
  cell_t        in_cell [N], out_cell [N];
  ts_t          link_delay [N];
  logic         in_ready, phase_done;
  logic [2:0]   match_iters;
  logic [23:0]  slot;

  cioq_switch #(.S(S)) dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (slot %0d)", what, slot);
    end
  endtask

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // ------------------------------------------------------------ reference
  typedef struct { ts_t nu; int id; } sh_t;
  sh_t shadow [N][$];            // shadow OQ switch, sorted by nu
  int  exp_dep_id [N];           // expected departure this slot (-1 none)
  ts_t exp_omega [int];          // per accepted cell: omega at the next hop
  int  exp_port  [int];          // per accepted cell: output
  int  pair_in_switch [N][N];    // accepted, not yet departed, per (i, j)
  int  pair_of [int];            // per accepted cell: input

  // mechanism counters
  int n_multi_iter = 0, n_pushin = 0, n_wrap = 0, n_backpressure = 0;
  int n_voq_drop = 0, n_bad_port = 0, n_depart = 0, n_deviation = 0;

  function automatic ts_t ref_vft(cell_t c);
    longint unsigned lr;
    lr = (c.rate == 0) ? 64'hFFFF_FFFF : (64'd1 << 24) / longint'(c.rate);
    return ts_t'(64'(c.omega) + lr + 64'(c.delta));
  endfunction

  function automatic bit nu_taken(int j, ts_t nu);
    foreach (shadow[j][k]) if (shadow[j][k].nu == nu) return 1;
    return 0;
  endfunction

  int next_id = 0;
  bit part_b = 0;
  int last_ready_cycle = -1, cycle = 0;
  int match_cycles = 0;
  bit matching = 0;

  // slot period, departure latency and matching length
  always @(posedge clk) if (rst_n) begin
    cycle++;
    if (in_ready) begin
      if (last_ready_cycle >= 0)
        check(cycle - last_ready_cycle == SLOT_CYCLES, "slot period");
      last_ready_cycle = cycle;
    end
  end

  // mechanism counters, sampled away from the clock edge
  always @(negedge clk) if (rst_n) begin
    if (phase_done) begin
      if (match_iters >= 2) n_multi_iter++;
      check(int'(match_iters) <= N, "iterations <= N");
    end
    if (oq_full != '0) n_backpressure++;
  end

  // check departures: out_valid comes one cycle after in_ready
  task automatic check_departures();
    for (int j = 0; j < N; j++) begin
      if (!part_b) begin
        if (out_valid[j] != (exp_dep_id[j] >= 0)) n_deviation++;
      end
      if (out_valid[j]) begin
        int id;
        id = int'(out_cell[j].data);
        n_depart++;
        if (!part_b && id != exp_dep_id[j] && exp_dep_id[j] >= 0) n_deviation++;
        check(exp_port.exists(id), "departing cell was accepted once");
        if (exp_port.exists(id)) begin
          check(exp_port[id] == j, "departs on its own port");
          check(out_cell[j].omega == exp_omega[id], "next-hop time stamp");
          pair_in_switch[pair_of[id]][j]--;
          exp_port.delete(id);
          exp_omega.delete(id);
          pair_of.delete(id);
        end
      end
    end
  endtask

  task automatic do_slot(int load_pct);
    // this is the arrival cycle (in_ready high): departures of the last
    // slot happen at this clock edge, so update the shadow first
    for (int j = 0; j < N; j++) begin
      exp_dep_id[j] = -1;
      if (shadow[j].size() != 0) exp_dep_id[j] = shadow[j].pop_front().id;
    end
    for (int i = 0; i < N; i++) begin
      cell_t c;
      int j;
      c = '0;
      in_valid[i] = 0;
      if (!part_b) begin
        // uniform destinations first, then a hot spot on output 0
        if (slot < 1200 || $urandom_range(0, 99) < 40) j = $urandom_range(0, N - 1);
        else j = 0;
        if ($urandom_range(0, 99) < load_pct && shadow[j].size() < VOQ_DEPTH) begin
          c.dest  = PORT_W'(j);
          c.rate  = rate_t'($urandom_range(16'h0800, 16'hFFFF));
          c.omega = ts_t'(32'hFFFF_8000 + slot * 256 + $urandom_range(0, 600));
          c.delta = ts_t'($urandom_range(0, 2000));
          while (nu_taken(j, ref_vft(c))) c.delta = c.delta + 1;
          in_valid[i] = 1;
        end
      end else begin
        case ($urandom_range(0, 9))
          0:       j = N;        // no such port
          1, 2, 3: j = 1;
          default: j = 0;
        endcase
        c.dest  = PORT_W'(j);
        c.rate  = rate_t'($urandom_range(16'h0800, 16'hFFFF));
        c.omega = ts_t'(slot * 256);
        c.delta = ts_t'($urandom_range(0, 2000));
        in_valid[i] = load_pct > 0;
      end
      c.flow = FLOW_W'(i * 16 + j);
      c.data = DATA_W'(next_id);
      in_cell[i] = c;
      next_id++;
    end
    #1;
    for (int i = 0; i < N; i++) begin
      if (in_valid[i]) begin
        int j, id;
        ts_t nu;
        j  = int'(in_cell[i].dest);
        id = int'(in_cell[i].data);
        nu = ref_vft(in_cell[i]);
        if (j >= N) begin
          check(in_drop[i], "invalid port dropped");
          n_bad_port++;
        end else if (in_drop[i]) begin
          n_voq_drop++;
          check(pair_in_switch[i][j] >= VOQ_DEPTH, "drop only when the VOQ is full");
        end else begin
          if (!part_b) begin
            int p;
            sh_t e;
            p = 0;
            while (p < shadow[j].size() && ts_lt(shadow[j][p].nu, nu)) p++;
            if (p < shadow[j].size()) n_pushin++;
            e.nu = nu; e.id = id;
            shadow[j].insert(p, e);
            if (in_cell[i].omega < 32'h0001_0000 && in_cell[i].omega > nu - 32'h0001_0000) n_wrap++;
          end
          exp_port[id]  = j;
          exp_omega[id] = nu + CELL_TIME + link_delay[j];
          pair_of[id]   = i;
          pair_in_switch[i][j]++;
        end
      end
    end
  endtask

  initial begin
    in_valid = '0;
    for (int i = 0; i < N; i++) begin
      in_cell[i] = '0;
      link_delay[i] = ts_t'(100 * (i + 1));
      for (int j = 0; j < N; j++) pair_in_switch[i][j] = 0;
      exp_dep_id[i] = -1;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    // Part A: conformance with the shadow OQ switch
    for (int t = 0; t < 2500; t++) begin
      while (!in_ready) @(negedge clk);
      do_slot((t < 1200) ? 70 : (t < 2300) ? 95 : 0);
      @(negedge clk);
      in_valid = '0;
      check_departures();
    end
    for (int j = 0; j < N; j++) check(shadow[j].size() == 0, "shadow drained");

    // Part B: overload of output 0
    part_b = 1;
    for (int t = 0; t < 600; t++) begin
      while (!in_ready) @(negedge clk);
      do_slot((t < 200) ? 100 : 0);
      @(negedge clk);
      in_valid = '0;
      check_departures();
    end
    check(exp_port.size() == 0, "every accepted cell departed");

    $display("departures=%0d multi_iter=%0d pushin=%0d wrap=%0d backpressure=%0d voq_drop=%0d bad_port=%0d",
             n_depart, n_multi_iter, n_pushin, n_wrap, n_backpressure, n_voq_drop, n_bad_port);
    $display("slots x outputs differing from the shadow OQ switch at S=%0d: %0d", S, n_deviation);
    check(n_multi_iter > 0, "multi-iteration matching occurred");
    check(n_pushin > 0, "push-in ahead of waiting cells occurred");
    check(n_wrap > 0, "time stamp wrap occurred");
    check(n_backpressure > 0, "output queue backpressure occurred");
    check(n_voq_drop > 0, "VOQ overflow occurred");
    check(n_bad_port > 0, "invalid port occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
