// tb_vtrs_edge: drives one flow of packets of random lengths (1 to 4 cell
// times) with random gaps, including back-to-back bursts, into the edge
// conditioner. Real time advances 32 units (1/8 cell time) per clock.
// A reference model computes, from the push cycle of every packet, the
// cycle in which it must be released (the first cycle in which it is at
// the head and now >= a(k-1) + L(k)/r), its time stamp omega = a(k), and
// delta = Delta(k)/h from the recursion of the ideal per-flow system, all
// in 64-bit integer arithmetic. Checks every released packet, the release
// cycle, the spacing rule, that a non-zero delta occurred, and that the
// FIFO filled (in_ready low) at least once. Two configurations are run
// (r = C/2, h = 3 and r = 0.3C, h = 5).
module tb_vtrs_edge;
  import cioq_pkg::*;

  localparam int DEPTH = 8;
  localparam int TICK  = 32;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  ts_t         now;
  rate_t       cfg_rate;
  logic [3:0]  cfg_hops;
  logic        in_valid, in_ready, out_valid;
  cell_t       in_cell, out_cell;
  logic [7:0]  in_len, out_len;

  vtrs_edge #(.FIFO_DEPTH(DEPTH)) dut (.*);

  int checks = 0, failures = 0;
  int n_nonzero_delta = 0, n_full = 0, n_out = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;
  assign now = ts_t'(cyc * TICK + 64'hFFFF_F000);   // wraps during the run

  // reference state
  longint push_cyc [$];
  int     push_len [$];
  int     push_id  [$];
  bit     first;
  longint a_prev_cyc, tq_prev, dlt_prev, last_rel_cyc;

  function automatic longint ref_tq(int len);
    return (longint'(len) << 24) / longint'(cfg_rate);
  endfunction

  // compare releases with the model
  always @(negedge clk) if (rst_n && out_valid) begin
    longint pc, tq, rel, dsum, dlt, a_rel;
    int len, id, h;
    n_out++;
    check(push_cyc.size() != 0, "release without packet");
    if (push_cyc.size() != 0) begin
      pc  = push_cyc.pop_front();
      len = push_len.pop_front();
      id  = push_id.pop_front();
      h   = int'(cfg_hops);
      tq  = ref_tq(len);
      // earliest cycle: after the push, after the previous release, and
      // with now >= a(k-1) + L(k)/r
      rel = pc + 1;
      if (!first) begin
        if (rel < last_rel_cyc + 1) rel = last_rel_cyc + 1;
        while (rel * TICK < a_prev_cyc * TICK + tq) rel++;
      end
      // out_valid is registered: released in cycle cyc-1
      check(cyc - 1 == rel, $sformatf("release cycle %0d expected %0d", cyc - 1, rel));
      a_rel = cyc - 1;
      if (first) dlt = 0;
      else begin
        dsum = dlt_prev + longint'(h) * (tq_prev - tq) + (a_prev_cyc - a_rel) * TICK + tq;
        dlt  = (dsum < 0) ? 0 : dsum;
      end
      check(out_cell.omega == ts_t'(a_rel * TICK + 64'hFFFF_F000), "omega = release time");
      check(out_cell.delta == ts_t'(dlt / h), $sformatf("delta %0d expected %0d", out_cell.delta, dlt / h));
      check(out_cell.rate == cfg_rate, "rate");
      check(int'(out_cell.data) == id && int'(out_len) == len, "packet order");
      if (!first) check((a_rel - a_prev_cyc) * TICK >= tq, "spacing a(k)-a(k-1) >= L/r");
      if (dlt / h != 0) n_nonzero_delta++;
      first = 0;
      a_prev_cyc = a_rel;
      tq_prev = tq;
      dlt_prev = dlt;
      last_rel_cyc = a_rel;
    end
  end

  task automatic run_flow(rate_t r, int hops, int npk);
    int id;
    // reset between flows
    rst_n = 0;
    cfg_rate = r;
    cfg_hops = 4'(hops);
    in_valid = 0;
    first = 1;
    push_cyc.delete(); push_len.delete(); push_id.delete();
    repeat (2) @(negedge clk);
    rst_n = 1;
    id = 0;
    while (id < npk) begin
      @(negedge clk);
      in_valid = 0;
      if ($urandom_range(0, 99) < ((id % 40 < 20) ? 90 : 10)) begin
        in_valid = 1;
        in_len   = 8'($urandom_range(1, 4));
        in_cell  = '0;
        in_cell.data = DATA_W'(id);
        in_cell.dest = 4'd2;
        #1;
        if (!in_ready) n_full++;
        else begin
          push_cyc.push_back(cyc);
          push_len.push_back(int'(in_len));
          push_id.push_back(id);
          id++;
        end
      end
    end
    @(negedge clk);
    in_valid = 0;
    while (push_cyc.size() != 0) @(negedge clk);
    repeat (4) @(negedge clk);
  endtask

  initial begin
    in_valid = 0; in_len = '0; in_cell = '0;
    cfg_rate = 16'h8000; cfg_hops = 4'd3;
    repeat (2) @(negedge clk);
    run_flow(16'h8000, 3, 300);
    run_flow(16'h4CCD, 5, 300);
    check(n_out == 600, "all packets released");
    check(n_nonzero_delta > 0, "non-zero delta occurred");
    check(n_full > 0, "FIFO full occurred");
    $display("released=%0d nonzero_delta=%0d full=%0d", n_out, n_nonzero_delta, n_full);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
