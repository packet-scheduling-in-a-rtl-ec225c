// tb_vtrs_cioq_top: end-to-end test of a VTRS domain at default sizes:
// three edge conditioners and a 3x3 CIOQ switch with speedup 4.
//
// Phase 1 (guaranteed service). Three flows, one per edge conditioner,
// all go to switch output 0 with reserved rates of 0.31C each (together
// 0.94C <= C, the schedulability condition). Packets of 1 to 3 cell times
// are offered in bursts; the conditioners shape them and stamp them. The
// testbench plays the link from each conditioner to switch input e: it
// holds the released packet and hands it to the switch as a cell at the
// next slot start. The conditioners' clock 'now' runs one slot ahead of
// the switch's slot counter, so the stamp omega is never earlier than the
// cell's arrival at the switch (the reality check). For every cell the
// testbench computes nu = omega + L/r + delta itself and checks
//   - the departure time (end of the slot it leaves in) <= nu + L*max/C,
//     the per-hop delay guarantee of a core stateless virtual clock;
//   - the stamp for the next hop, nu + Psi + pi;
//   - that no cell is lost or delivered twice.
// Phase 2 (overload). Random cells are sent straight to the switch inputs,
// mostly to outputs 0 and 1 and some to a port that does not exist, so the
// output queues fill (backpressure), the VOQs overflow (drops) and
// outputs lose input contention and retry (multi-iteration matching).
// Each such mechanism, and the shaping delay, a non-zero delta, and a cell
// pushed into an output queue ahead of waiting cells, is counted and must
// have occurred.
module tb_vtrs_cioq_top;
  import cioq_pkg::*;

  localparam int N = 3, NE = 3, VOQ_DEPTH = 8;
  localparam int SLOT_CYCLES = 17;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic [N-1:0]  sw_in_valid, sw_in_drop, sw_out_valid, sw_oq_full;
  cell_t         sw_in_cell [N], sw_out_cell [N];
  ts_t           sw_link_delay [N];
  logic          sw_in_ready, sw_phase_done;
  logic [1:0]    sw_match_iters;
  logic [23:0]   sw_slot;
  ts_t           edge_now;
  rate_t         edge_rate [NE];
  logic [3:0]    edge_hops [NE];
  logic [NE-1:0] edge_in_valid, edge_in_ready, edge_out_valid;
  cell_t         edge_in_cell [NE], edge_out_cell [NE];
  logic [7:0]    edge_in_len [NE], edge_out_len [NE];

  vtrs_cioq_top dut (.*);

  int checks = 0, failures = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s (slot %0d)", what, sw_slot);
    end
  endtask

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_shaped = 0, n_nonzero_delta = 0, n_pushin = 0, n_multi_iter = 0;
  int n_backpressure = 0, n_voq_drop = 0, n_bad_port = 0, n_dep = 0;

  // cycle within the slot; the edge clock runs one slot ahead
  int cis = 0;
  always @(posedge clk) cis <= sw_in_ready ? 1 : cis + 1;
  assign edge_now = ts_t'((sw_slot + 1) * 256 + cis * 8);

  always @(negedge clk) if (rst_n) begin
    if (sw_phase_done && sw_match_iters >= 2) n_multi_iter++;
    if (sw_oq_full != '0) n_backpressure++;
  end

  function automatic ts_t ref_vft(cell_t c);
    return ts_t'(64'(c.omega) + (64'd1 << 24) / 64'(c.rate) + 64'(c.delta));
  endfunction

  // accepted cells waiting in the switch
  ts_t exp_nu   [int];
  int  exp_port [int];
  int  pair_cnt [N][N];
  int  pair_of  [int];
  bit  phase2 = 0;

  // ---------------------------------------------------------------- edges
  int  push_cyc [NE][$];        // push time of packets inside each edge
  cell_t hold [NE];             // link: released packet waiting for a slot
  bit  hold_v [NE];
  int  cyc = 0;
  int  offered [NE];
  always @(posedge clk) cyc <= cyc + 1;

  always @(negedge clk) if (rst_n) begin
    for (int e = 0; e < NE; e++) if (edge_out_valid[e]) begin
      int pc;
      pc = push_cyc[e].pop_front();
      if (cyc - 1 > pc + 1) n_shaped++;
      if (edge_out_cell[e].delta != 0) n_nonzero_delta++;
      check(!hold_v[e], "link holds one packet at most");
      hold[e]   = edge_out_cell[e];
      hold_v[e] = 1;
    end
  end

  // ---------------------------------------------------------------- switch
  task automatic slot_cycle(bit direct, int load);
    // called at the negedge of the in_ready cycle
    for (int i = 0; i < N; i++) begin
      sw_in_valid[i] = 0;
      if (!direct) begin
        if (hold_v[i]) begin
          sw_in_valid[i] = 1;
          sw_in_cell[i]  = hold[i];
          hold_v[i]      = 0;
        end
      end else if ($urandom_range(0, 99) < load) begin
        cell_t c;
        int j;
        case ($urandom_range(0, 9))
          0:       j = N;
          1, 2, 3: j = 1;
          default: j = 0;
        endcase
        c = '0;
        c.dest  = PORT_W'(j);
        c.rate  = rate_t'($urandom_range(16'h1000, 16'hFFFF));
        c.omega = ts_t'(sw_slot * 256);
        c.delta = ts_t'($urandom_range(0, 500));
        c.flow  = FLOW_W'(8 + i);
        c.data  = DATA_W'(20000 + sw_slot * 4 + i);
        sw_in_cell[i]  = c;
        sw_in_valid[i] = 1;
      end
    end
    #1;
    for (int i = 0; i < N; i++) if (sw_in_valid[i]) begin
      int id, j;
      ts_t nu;
      id = int'(sw_in_cell[i].data);
      j  = int'(sw_in_cell[i].dest);
      nu = ref_vft(sw_in_cell[i]);
      if (j >= N) begin
        check(sw_in_drop[i], "invalid port dropped");
        n_bad_port++;
      end else if (sw_in_drop[i]) begin
        check(direct, "no drop under guaranteed service");
        check(pair_cnt[i][j] >= VOQ_DEPTH, "drop only when the VOQ is full");
        n_voq_drop++;
      end else begin
        if (!direct) begin
          check(!ts_lt(sw_in_cell[i].omega, ts_t'(sw_slot * 256)), "reality check omega >= arrival");
          foreach (exp_nu[k]) if (exp_port[k] == j && ts_lt(nu, exp_nu[k])) begin
            n_pushin++;
            break;
          end
        end
        exp_nu[id]   = nu;
        exp_port[id] = j;
        pair_of[id]  = i;
        pair_cnt[i][j]++;
      end
    end
    @(negedge clk);
    sw_in_valid = '0;
    // departures of the slot that just ended
    for (int j = 0; j < N; j++) if (sw_out_valid[j]) begin
      int id;
      id = int'(sw_out_cell[j].data);
      n_dep++;
      check(exp_port.exists(id), "departing cell accepted once");
      if (exp_port.exists(id)) begin
        check(exp_port[id] == j, "own port");
        check(sw_out_cell[j].omega == exp_nu[id] + CELL_TIME + sw_link_delay[j], "next-hop stamp");
        if (id < 20000)
          check(!ts_lt(exp_nu[id] + CELL_TIME, ts_t'(sw_slot * 256)),
                $sformatf("delay bound: left at %0d, nu + L/C = %0d", sw_slot * 256, exp_nu[id] + CELL_TIME));
        pair_cnt[pair_of[id]][j]--;
        exp_nu.delete(id);
        exp_port.delete(id);
        pair_of.delete(id);
      end
    end
  endtask

  initial begin
    sw_in_valid = '0;
    edge_in_valid = '0;
    for (int i = 0; i < N; i++) begin
      sw_in_cell[i] = '0;
      sw_link_delay[i] = ts_t'(40 * i + 10);
      for (int j = 0; j < N; j++) pair_cnt[i][j] = 0;
    end
    for (int e = 0; e < NE; e++) begin
      edge_rate[e]    = 16'h5000;     // 0.3125 C
      edge_hops[e]    = 4'(2 + e);
      edge_in_cell[e] = '0;
      edge_in_len[e]  = 8'd1;
      hold_v[e]       = 0;
      offered[e]      = 0;
    end
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1;

    fork
      // offer packets to the edges in bursts
      begin
        for (int c = 0; c < 1200 * SLOT_CYCLES; c++) begin
          for (int e = 0; e < NE; e++) begin
            edge_in_valid[e] = 0;
            if ($urandom_range(0, 999) < (((c / 500) % 2 == 0) ? 60 : 2)) begin
              edge_in_valid[e] = 1;
              edge_in_cell[e] = '0;
              edge_in_cell[e].dest = '0;
              edge_in_cell[e].flow = FLOW_W'(e);
              edge_in_cell[e].data = DATA_W'(offered[e] * 4 + e);
              edge_in_len[e] = 8'($urandom_range(1, 3));
            end
          end
          #1;
          for (int e = 0; e < NE; e++)
            if (edge_in_valid[e] && edge_in_ready[e]) begin
              push_cyc[e].push_back(cyc);
              offered[e]++;
            end
          @(negedge clk);
        end
        edge_in_valid = '0;
      end
      // the switch side
      begin
        for (int t = 0; t < 1300; t++) begin
          while (!sw_in_ready) @(negedge clk);
          slot_cycle(0, 0);
        end
      end
    join
    check(exp_port.size() == 0, "phase 1: every cell delivered");
    for (int e = 0; e < NE; e++) check(push_cyc[e].size() == 0 && !hold_v[e], "phase 1: edges drained");

    phase2 = 1;
    for (int t = 0; t < 700; t++) begin
      while (!sw_in_ready) @(negedge clk);
      slot_cycle(1, (t < 250) ? 100 : 0);
    end
    check(exp_port.size() == 0, "phase 2: every accepted cell delivered");

    $display("departures=%0d shaped=%0d nonzero_delta=%0d pushin=%0d multi_iter=%0d backpressure=%0d voq_drop=%0d bad_port=%0d",
             n_dep, n_shaped, n_nonzero_delta, n_pushin, n_multi_iter, n_backpressure, n_voq_drop, n_bad_port);
    check(n_shaped > 0, "edge shaping delayed a packet");
    check(n_nonzero_delta > 0, "non-zero delta occurred");
    check(n_pushin > 0, "push-in ahead of waiting cells occurred");
    check(n_multi_iter > 0, "multi-iteration matching occurred");
    check(n_backpressure > 0, "backpressure occurred");
    check(n_voq_drop > 0, "VOQ overflow occurred");
    check(n_bad_port > 0, "invalid port occurred");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
