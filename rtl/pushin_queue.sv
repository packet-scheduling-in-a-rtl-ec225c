// pushin_queue: sorted "push-in" queue of cells.
//
// An arriving entry is pushed into the place given by its key (its virtual
// finish time) and entries leave only from the head, so the head is always
// the entry with the smallest key. A push never changes the relative order
// of the entries already queued, which is what makes the output scheduling
// monotone. Entries with equal keys leave in arrival order (this design's
// choice; the document does not say how ties are ordered).
//
// The same block serves as a virtual output queue at an input (the matcher
// needs the smallest-key cell of each queue) and as an output queue (cells
// leave in virtual finish time order, as under a core stateless virtual
// clock scheduler).
//
// Structure: DEPTH registers kept in sorted order. The insert position is
// the number of queued keys that are not later than the new key; every
// register then loads from itself, its upper neighbour or the new entry.
// The document assumes queues of unlimited size; here DEPTH is finite, a
// push into a full queue (with no pop in the same cycle) is dropped and
// flagged on 'overflow'.
//
// Interface: push/push_key/push_data, pop; head_valid/head_key/head_data
// show the head combinationally from the registers. A pop and a push may
// happen in the same cycle: the old head leaves and the new entry is
// inserted among the rest. Timing: one cycle per operation.
module pushin_queue
  import cioq_pkg::*;
#(
  parameter int DEPTH = 8,
  parameter int PW    = 8   // payload width
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     push,
  input  ts_t                      push_key,
  input  logic [PW-1:0]            push_data,
  input  logic                     pop,
  output logic                     head_valid,
  output ts_t                      head_key,
  output logic [PW-1:0]            head_data,
  output logic [$clog2(DEPTH+1)-1:0] count,
  output logic                     full,
  output logic                     overflow   // a push was dropped this cycle
);

  localparam int CW = $clog2(DEPTH+1);

  ts_t           key_q  [DEPTH];
  logic [PW-1:0] data_q [DEPTH];
  logic [CW-1:0] cnt_q;

  logic          do_pop, do_push;
  logic [CW-1:0] pos;     // insert position before the pop
  logic [CW-1:0] pos_a;   // insert position after the pop

  assign head_valid = (cnt_q != '0);
  assign head_key   = key_q[0];
  assign head_data  = data_q[0];
  assign count      = cnt_q;
  assign full       = (cnt_q == CW'(DEPTH));

  always_comb begin
    do_pop   = pop && head_valid;
    do_push  = push && (!full || do_pop);
    overflow = push && full && !do_pop;
    pos      = '0;
    for (int k = 0; k < DEPTH; k++)
      if (CW'(k) < cnt_q && !ts_lt(push_key, key_q[k])) pos = pos + 1'b1;
    pos_a = (do_pop && pos != '0) ? pos - 1'b1 : pos;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt_q <= '0;
      for (int k = 0; k < DEPTH; k++) begin
        key_q[k]  <= '0;
        data_q[k] <= '0;
      end
    end else begin
      for (int k = 0; k < DEPTH; k++) begin
        // k-th entry after the pop, before the insertion
        automatic int src = k + (do_pop ? 1 : 0);
        if (do_push && CW'(k) == pos_a) begin
          key_q[k]  <= push_key;
          data_q[k] <= push_data;
        end else if (do_push && CW'(k) > pos_a) begin
          // shifted up by the insertion: take entry k-1 (after the pop)
          if (src - 1 < DEPTH) begin
            key_q[k]  <= key_q[src-1];
            data_q[k] <= data_q[src-1];
          end
        end else if (do_pop) begin
          if (src < DEPTH) begin
            key_q[k]  <= key_q[src];
            data_q[k] <= data_q[src];
          end
        end
      end
      cnt_q <= cnt_q + CW'(do_push) - CW'(do_pop);
    end
  end

  // A queue never holds more than DEPTH entries.
  assert property (@(posedge clk) disable iff (!rst_n) cnt_q <= CW'(DEPTH));

endmodule
