// cioq_switch: N x N combined input and output queued (CIOQ) cell switch
// scheduled with packet virtual time stamps (smallest virtual finish time
// first, SVFTFA), so that it behaves as an output queued switch with a core
// stateless virtual clock scheduler, without keeping any per-flow state.
//
// Data path of one cell:
//   1. arrival: at the start of a time slot an input accepts at most one
//      cell. vtrs_vft computes its virtual finish time nu = omega + L/r +
//      delta from the state the cell carries, and the cell is pushed, keyed
//      by nu, into the virtual output queue (VOQ) of its input for its
//      destination output. A VOQ is a sorted push-in queue.
//   2. transfer: a slot has S phases. In each phase svftfa_matcher matches
//      inputs and outputs on the nu of the VOQ heads, the crossbar moves the
//      matched head cells, and each output pushes its cell, again keyed by
//      nu, into its output queue (also a push-in queue).
//   3. departure: at the end of the slot every non-empty output sends the
//      cell with the smallest nu, after vtrs_update has rewritten its
//      virtual time stamp for the next hop (omega = nu + Psi + pi).
// The switch follows the document in all of this. Its own choices: the
// cycle timing of a slot (see slot_ctrl: SLOT_CYCLES = 1 + S*(N+1)),
// finite queue sizes, and what happens when they fill. An arriving cell
// that finds its VOQ full, or that names an output >= N, is dropped and
// flagged on in_drop. An output whose output queue is full takes part in
// no matching until a departure frees a place (backpressure); its cells
// wait in the VOQs.
//
// Interface: in_valid/in_cell per input are sampled when in_ready is high
// (one cycle per slot; a source holds its cell until then). out_valid is a
// one-cycle pulse per slot, registered, the cycle after in_ready, with the
// departing cell on out_cell. link_delay[j] is the propagation delay pi of
// output j's link in time stamp units. slot counts time slots.
module cioq_switch
  import cioq_pkg::*;
#(
  parameter int  N         = 3,          // ports (Fig. 1 example)
  parameter int  S         = 4,          // speedup (Theorems 1, 3-6)
  parameter int  VOQ_DEPTH = 8,          // cells per VOQ
  parameter int  OQ_DEPTH  = 16,         // cells per output queue
  parameter ts_t PSI       = CELL_TIME,  // error term L*max/C = one cell time
  localparam int IW = (N > 1) ? $clog2(N) : 1,
  localparam int CW = $bits(cell_t)
) (
  input  logic            clk,
  input  logic            rst_n,
  // inputs
  input  logic [N-1:0]    in_valid,
  input  cell_t           in_cell   [N],
  output logic            in_ready,
  output logic [N-1:0]    in_drop,      // arriving cell dropped
  // outputs
  output logic [N-1:0]    out_valid,
  output cell_t           out_cell  [N],
  input  ts_t             link_delay [N],
  // status
  output logic [N-1:0]    oq_full,      // output queue full (backpressure)
  output logic            phase_done,   // a matching has been completed
  output logic [$clog2(N+1)-1:0] match_iters, // its iterations
  output logic [23:0]     slot
);

  // ---------------------------------------------------------------- timing
  logic slot_start, phase_start;
  logic [((S > 1) ? $clog2(S) : 1)-1:0] phase;

  slot_ctrl #(.N(N), .S(S), .SLOT_W(24)) u_slot (
    .clk, .rst_n,
    .slot_start, .phase_start, .phase, .slot
  );

  assign in_ready = slot_start;

  // ---------------------------------------------------------------- arrival
  ts_t in_vft [N];
  ts_t in_vdelay [N];

  for (genvar i = 0; i < N; i++) begin : g_vft
    vtrs_vft u_vft (.cell_in(in_cell[i]), .vdelay(in_vdelay[i]), .vft(in_vft[i]));
  end

  // ---------------------------------------------------------------- VOQs
  logic [N-1:0]  voq_push  [N];           // [input][output]
  logic [N-1:0]  voq_pop   [N];
  logic [N-1:0]  voq_hv    [N];
  ts_t           voq_hkey  [N][N];
  logic [CW-1:0] voq_hdata [N][N];
  logic [N-1:0]  voq_full  [N];
  logic [N-1:0]  voq_ovf   [N];

  for (genvar i = 0; i < N; i++) begin : g_in
    for (genvar j = 0; j < N; j++) begin : g_voq
      logic [$clog2(VOQ_DEPTH+1)-1:0] cnt;
      pushin_queue #(.DEPTH(VOQ_DEPTH), .PW(CW)) u_voq (
        .clk, .rst_n,
        .push(voq_push[i][j]), .push_key(in_vft[i]), .push_data(in_cell[i]),
        .pop(voq_pop[i][j]),
        .head_valid(voq_hv[i][j]), .head_key(voq_hkey[i][j]),
        .head_data(voq_hdata[i][j]),
        .count(cnt), .full(voq_full[i][j]), .overflow(voq_ovf[i][j])
      );
    end
  end

  always_comb begin
    for (int i = 0; i < N; i++) begin
      voq_push[i] = '0;
      in_drop[i]  = 1'b0;
      if (slot_start && in_valid[i]) begin
        if (int'(in_cell[i].dest) >= N) in_drop[i] = 1'b1;
        else if (voq_full[i][in_cell[i].dest[IW-1:0]]) in_drop[i] = 1'b1;
        else voq_push[i][in_cell[i].dest[IW-1:0]] = 1'b1;
      end
    end
  end

  // ---------------------------------------------------------------- matching
  logic [N-1:0]  m_req [N];               // [output][input]
  ts_t           m_key [N][N];            // [output][input]
  logic          m_done;
  logic [N-1:0]  m_valid;
  logic [IW-1:0] m_in [N];

  always_comb begin
    for (int j = 0; j < N; j++)
      for (int i = 0; i < N; i++) begin
        m_req[j][i] = voq_hv[i][j] && !oq_full[j];
        m_key[j][i] = voq_hkey[i][j];
      end
  end

  svftfa_matcher #(.N(N)) u_match (
    .clk, .rst_n,
    .start(phase_start), .req_valid(m_req), .key(m_key),
    .busy(), .done(m_done), .match_valid(m_valid), .match_in(m_in),
    .iters(match_iters)
  );

  assign phase_done = m_done;

  // ---------------------------------------------------------------- fabric
  localparam int EW = $bits(qentry_t);
  logic [N-1:0]  xb_in_conn;
  logic [IW-1:0] xb_in_out [N];
  logic [EW-1:0] xb_in_data [N];
  logic [N-1:0]  xb_out_valid;
  logic [EW-1:0] xb_out_data [N];

  crossbar #(.N(N), .PW(EW)) u_xbar (
    .sel_valid(m_done ? m_valid : '0), .sel(m_in),
    .in_conn(xb_in_conn), .in_out(xb_in_out),
    .in_data(xb_in_data),
    .out_valid(xb_out_valid), .out_data(xb_out_data)
  );

  always_comb begin
    for (int i = 0; i < N; i++) begin
      qentry_t e;
      e.vft = voq_hkey[i][xb_in_out[i]];
      e.hdr = voq_hdata[i][xb_in_out[i]];
      xb_in_data[i] = e;
      voq_pop[i] = '0;
      if (xb_in_conn[i]) voq_pop[i][xb_in_out[i]] = 1'b1;
    end
  end

  // ---------------------------------------------------------------- outputs
  logic [N-1:0]  oq_hv;
  ts_t           oq_hkey  [N];
  logic [CW-1:0] oq_hdata [N];
  logic [N-1:0]  oq_ovf;
  cell_t         dep_cell [N];

  for (genvar j = 0; j < N; j++) begin : g_out
    qentry_t xe;
    logic [$clog2(OQ_DEPTH+1)-1:0] cnt;
    assign xe = qentry_t'(xb_out_data[j]);

    pushin_queue #(.DEPTH(OQ_DEPTH), .PW(CW)) u_oq (
      .clk, .rst_n,
      .push(xb_out_valid[j]), .push_key(xe.vft), .push_data(xe.hdr),
      .pop(slot_start),
      .head_valid(oq_hv[j]), .head_key(oq_hkey[j]), .head_data(oq_hdata[j]),
      .count(cnt), .full(oq_full[j]), .overflow(oq_ovf[j])
    );

    vtrs_update #(.PSI(PSI)) u_upd (
      .cell_in(cell_t'(oq_hdata[j])), .vft(oq_hkey[j]),
      .link_delay(link_delay[j]), .cell_out(dep_cell[j])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        out_valid[j] <= 1'b0;
        out_cell[j]  <= '0;
      end else begin
        out_valid[j] <= slot_start && oq_hv[j];
        if (slot_start && oq_hv[j]) out_cell[j] <= dep_cell[j];
      end
    end

    // Backpressure keeps a full output queue out of the matching.
    assert property (@(posedge clk) disable iff (!rst_n) !oq_ovf[j])
      else $error("cioq_switch: output queue %0d overflow", j);
  end

endmodule
