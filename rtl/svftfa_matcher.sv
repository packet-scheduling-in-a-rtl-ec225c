// svftfa_matcher: input-output matching for one phase of the CIOQ switch,
// by the smallest virtual finish time first algorithm (SVFTFA).
//
// Every (input i, output j) pair with a waiting cell presents the virtual
// finish time of the earliest cell of its virtual output queue. The
// algorithm runs in iterations:
//   1. each unmatched output requests, among the unmatched inputs, the one
//      holding its cell with the smallest virtual finish time;
//   2. an input requested by several outputs grants the request with the
//      smallest virtual finish time, the lowest-numbered output on a tie;
//   3. outputs that lost try again in the next iteration, among the inputs
//      still unmatched;
//   4. when no unmatched output can request any more, the matching is final.
// Steps 2 to 4 are the document's. Step 1 breaks a tie between inputs in
// favour of the lowest-numbered input, which the document leaves open.
// Every iteration that issues a request matches at least one pair, so at
// most N iterations match pairs; one more finds that nothing is left.
//
// The same circuit performs the earlier algorithms the document builds on
// (most urgent cell first, smallest departure time first); only the key
// presented on 'key' differs.
//
// Interface and timing: 'start' is a one-cycle pulse. The cycle of 'start'
// is the first iteration (with every port unmatched); each further cycle is
// one more iteration. 'done' is high for one cycle, in the first cycle after
// 'start' that finds no request left; the matching (match_valid/match_in,
// registered) is valid in that cycle and stays until the next 'start'.
// 'done' comes at most N cycles after 'start' (one cycle if nothing is
// requested), so a phase needs at most N+1 cycles. 'req_valid' and 'key'
// must be stable from 'start' to 'done'. 'iters' counts the iterations that matched.
module svftfa_matcher
  import cioq_pkg::*;
#(
  parameter int N = 3,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              start,
  input  logic [N-1:0]      req_valid [N],  // [output j][input i]: cell waiting
  input  ts_t               key       [N][N], // [output j][input i]: its vft
  output logic              busy,
  output logic              done,
  output logic [N-1:0]      match_valid,    // per output
  output logic [IW-1:0]     match_in [N],   // per output: matched input
  output logic [$clog2(N+1)-1:0] iters
);

  logic            run_q;
  logic [N-1:0]    in_m_q, out_m_q;          // matched flags
  logic [IW-1:0]   match_in_q [N];
  logic [$clog2(N+1)-1:0] iters_q;

  // flags seen by this cycle's iteration
  logic [N-1:0]    in_m, out_m;
  logic            active;

  // step 1: requests
  logic [N-1:0]    rq;           // output j requests
  logic [IW-1:0]   rq_in [N];    // ... this input
  ts_t             rq_key [N];   // ... with this key
  // step 2: grants
  logic [N-1:0]    gnt;          // output j granted
  logic            any_rq;

  always_comb begin
    active = start || run_q;
    in_m   = start ? '0 : in_m_q;
    out_m  = start ? '0 : out_m_q;

    for (int j = 0; j < N; j++) begin
      rq[j]     = 1'b0;
      rq_in[j]  = '0;
      rq_key[j] = '0;
      if (!out_m[j]) begin
        for (int i = 0; i < N; i++) begin
          if (req_valid[j][i] && !in_m[i] &&
              (!rq[j] || ts_lt(key[j][i], rq_key[j]))) begin
            rq[j]     = 1'b1;
            rq_in[j]  = IW'(i);
            rq_key[j] = key[j][i];
          end
        end
      end
    end
    any_rq = active && (rq != '0);

    gnt = '0;
    for (int i = 0; i < N; i++) begin
      logic           found;
      logic [IW-1:0]  best_j;
      ts_t            best_k;
      found  = 1'b0;
      best_j = '0;
      best_k = '0;
      for (int j = 0; j < N; j++) begin
        if (rq[j] && rq_in[j] == IW'(i) && (!found || ts_lt(rq_key[j], best_k))) begin
          found  = 1'b1;
          best_j = IW'(j);
          best_k = rq_key[j];
        end
      end
      if (found && active) gnt[best_j] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      run_q   <= 1'b0;
      in_m_q  <= '0;
      out_m_q <= '0;
      iters_q <= '0;
      for (int j = 0; j < N; j++) match_in_q[j] <= '0;
    end else if (active) begin
      run_q   <= start || any_rq;
      in_m_q  <= in_m;
      out_m_q <= out_m | gnt;
      iters_q <= (start ? '0 : iters_q) + $bits(iters_q)'(any_rq);
      for (int j = 0; j < N; j++)
        if (gnt[j]) begin
          match_in_q[j]           <= rq_in[j];
          in_m_q[rq_in[j]]        <= 1'b1;
        end
    end
  end

  assign busy        = active;
  assign done        = run_q && !start && !any_rq;
  assign match_valid = out_m_q;
  assign match_in    = match_in_q;
  assign iters       = iters_q;

  // An input is never matched to two outputs.
  always_comb begin
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        assert (!(rst_n && done && match_valid[a] && match_valid[b] && match_in[a] == match_in[b]))
          else $error("svftfa_matcher: input %0d matched twice", match_in[a]);
  end

endmodule
