// vtrs_edge: edge traffic conditioner of the virtual time reference system,
// for one flow.
//
// Before a flow's packets enter the network core they are shaped to the
// flow's reserved rate r: packet k is released no earlier than
// a(k-1) + L(k)/r, where a(k-1) is the release time of the previous packet
// and L(k) the length of this one. At release the conditioner writes the
// packet state the core switches work from:
//   omega = a(k), the release time (the virtual time stamp at the first hop);
//   rate  = r;
//   delta = Delta(k) / h, the virtual time adjustment term, where h is the
//           number of hops of the flow's path and Delta(k) the cumulative
//           queueing delay the packet would see in an ideal chain of h
//           servers of rate r, computed by the recursion
//           Delta(1) = 0,
//           Delta(k) = max(0, Delta(k-1) + h*(L(k-1) - L(k))/r
//                               + a(k-1) - a(k) + L(k)/r).
// The shaping rule, the packet state and the recursion are the document's.
// With all packets of one length, the shaping makes Delta(k) zero; it is
// non-zero only when a long packet is followed by a shorter one.
//
// Structure: a FIFO of FIFO_DEPTH packets waiting for release, one divider
// for L(k)/r of the packet at the head, a register for L(k-1)/r, a(k-1)
// and Delta(k-1), and a divider by h. Real time 'now' comes from outside in
// time stamp units; lengths are in cell times (LEN_W bits). Both, the FIFO
// depth and the hop count width are this design's choices.
//
// Interface: in_valid/in_ready push a packet (cell header fields dest,
// flow and data are carried through; rate, omega and delta are written
// here). A packet is released at most one per cycle, in the first cycle in
// which it is at the head of the FIFO and 'now' has reached its release
// time; out_valid/out_cell/out_len are registered and appear in the next
// cycle. The output is never stalled. Changing cfg_rate or cfg_hops while
// the flow has packets in flight is not supported.
module vtrs_edge
  import cioq_pkg::*;
#(
  parameter int FIFO_DEPTH = 8,
  parameter int HOP_W      = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  ts_t              now,        // real time
  input  rate_t            cfg_rate,   // reserved rate r of the flow
  input  logic [HOP_W-1:0] cfg_hops,   // h, hops on the path (0 read as 1)
  input  logic             in_valid,
  output logic             in_ready,
  input  cell_t            in_cell,
  input  logic [LEN_W-1:0] in_len,
  output logic             out_valid,
  output cell_t            out_cell,
  output logic [LEN_W-1:0] out_len
);

  localparam int AW = (FIFO_DEPTH > 1) ? $clog2(FIFO_DEPTH) : 1;
  localparam int SW = TS_W + HOP_W + 2;   // signed width for Delta

  // ---------------------------------------------------------------- FIFO
  cell_t            f_cell [FIFO_DEPTH];
  logic [LEN_W-1:0] f_len  [FIFO_DEPTH];
  logic [AW-1:0]    rd_q, wr_q;
  logic [AW:0]      cnt_q;

  logic push, release_now;

  assign in_ready = (cnt_q != (AW+1)'(FIFO_DEPTH));
  assign push     = in_valid && in_ready;

  // ---------------------------------------------------------------- state
  logic  first_q;        // no packet released yet
  ts_t   a_prev_q;       // a(k-1)
  ts_t   tq_prev_q;      // L(k-1)/r
  ts_t   dlt_prev_q;     // Delta(k-1), never negative

  // ---------------------------------------------------------------- release
  ts_t                   tq;         // L(k)/r of the head packet
  logic [HOP_W-1:0]      h;
  logic signed [SW-1:0]  dsum;
  ts_t                   dlt;        // Delta(k)
  ts_t                   small_delta;

  always_comb begin
    h  = (cfg_hops == '0) ? HOP_W'(1) : cfg_hops;
    tq = len_over_rate(f_len[rd_q], cfg_rate);
    release_now = (cnt_q != '0) && (first_q || !ts_lt(now, a_prev_q + tq));
    // Delta(k-1) + h*(L(k-1)/r - L(k)/r) + a(k-1) - a(k) + L(k)/r
    dsum = SW'(signed'({1'b0, dlt_prev_q}))
         + SW'(signed'({1'b0, h})) * (SW'(signed'({1'b0, tq_prev_q})) - SW'(signed'({1'b0, tq})))
         + SW'(signed'(a_prev_q - now))
         + SW'(signed'({1'b0, tq}));
    if (first_q || dsum < 0) dlt = '0;
    else if (dsum > SW'(signed'({1'b0, {TS_W{1'b1}}}))) dlt = '1;
    else dlt = ts_t'(dsum);
    small_delta = dlt / ts_t'(h);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_q       <= '0;
      wr_q       <= '0;
      cnt_q      <= '0;
      first_q    <= 1'b1;
      a_prev_q   <= '0;
      tq_prev_q  <= '0;
      dlt_prev_q <= '0;
      out_valid  <= 1'b0;
      out_cell   <= '0;
      out_len    <= '0;
      for (int k = 0; k < FIFO_DEPTH; k++) begin
        f_cell[k] <= '0;
        f_len[k]  <= '0;
      end
    end else begin
      if (push) begin
        f_cell[wr_q] <= in_cell;
        f_len[wr_q]  <= in_len;
        wr_q <= (wr_q == AW'(FIFO_DEPTH - 1)) ? '0 : wr_q + 1'b1;
      end
      out_valid <= release_now;
      if (release_now) begin
        out_cell       <= f_cell[rd_q];
        out_cell.rate  <= cfg_rate;
        out_cell.omega <= now;
        out_cell.delta <= small_delta;
        out_len        <= f_len[rd_q];
        first_q        <= 1'b0;
        a_prev_q       <= now;
        tq_prev_q      <= tq;
        dlt_prev_q     <= dlt;
        rd_q <= (rd_q == AW'(FIFO_DEPTH - 1)) ? '0 : rd_q + 1'b1;
      end
      cnt_q <= cnt_q + (AW+1)'(push) - (AW+1)'(release_now);
    end
  end

endmodule
