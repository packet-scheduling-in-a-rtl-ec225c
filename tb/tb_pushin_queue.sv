// tb_pushin_queue: random pushes and pops on a small push-in queue,
// compared with a reference model (a SystemVerilog queue kept sorted by
// key, equal keys in arrival order). Checks the head, the count, the full
// flag and that a push into a full queue is dropped and flagged.
module tb_pushin_queue;
  import cioq_pkg::*;

  localparam int DEPTH = 4;
  localparam int PW    = 8;

  logic clk = 0, rst_n = 0;
  logic push, pop, head_valid, full, overflow;
  ts_t push_key, head_key;
  logic [PW-1:0] push_data, head_data;
  logic [$clog2(DEPTH+1)-1:0] count;

  pushin_queue #(.DEPTH(DEPTH), .PW(PW)) dut (.*);

  always #5 clk = ~clk;

  typedef struct { ts_t k; logic [PW-1:0] d; } ent_t;
  ent_t model[$];
  int checks = 0, failures = 0;
  int overflows = 0, both = 0;

  task automatic check(bit cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s (t=%0t)", what, $time);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    push = 0; pop = 0; push_key = '0; push_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      // compare the visible state with the model
      check(head_valid == (model.size() != 0), "head_valid");
      check(int'(count) == model.size(), "count");
      check(full == (model.size() == DEPTH), "full");
      if (model.size() != 0) begin
        check(head_key == model[0].k && head_data == model[0].d, "head entry");
      end
      push = ($urandom_range(0, 99) < 55);
      pop  = ($urandom_range(0, 99) < 40);
      // keys spread around a moving base, so wrap-around is crossed too
      push_key  = ts_t'(32'hFFFF_FF00 + n * 3 + $urandom_range(0, 40));
      push_data = PW'(n);
      #1;
      check(overflow == (push && model.size() == DEPTH && !(pop && model.size() != 0)),
            "overflow flag");
      @(posedge clk);
      #1;
      // update the model
      begin
        automatic bit did_pop;
        did_pop = pop && model.size() != 0;
        if (did_pop) void'(model.pop_front());
        if (push && (model.size() < DEPTH)) begin
          automatic int p = 0;
          while (p < model.size() && !ts_lt(push_key, model[p].k)) p++;
          model.insert(p, '{push_key, push_data});
          if (did_pop) both++;
        end else if (push) begin
          overflows++;
        end
      end
    end
    check(overflows > 0, "overflow exercised");
    check(both > 0, "push and pop in one cycle exercised");
    $display("overflows=%0d push+pop=%0d", overflows, both);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
