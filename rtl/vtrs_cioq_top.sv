// vtrs_cioq_top: a virtual time reference system domain in one module:
// the traffic conditioners of the domain's edge next to one core switch.
//
// The virtual time reference system has two places where hardware acts:
// the network edge, where each flow is shaped to its reserved rate and its
// packets get their state (reserved rate, virtual time stamp, adjustment
// term), and the core switches, which schedule on that state alone and
// rewrite the time stamp for the next hop. This module holds both kinds:
// N_EDGE single-flow edge conditioners (vtrs_edge) and an N x N CIOQ core
// switch (cioq_switch). They belong to different nodes of a network, so
// they are not wired to each other here: the link between an edge node and
// a core switch is outside this module, and every port of both is brought
// out. A conditioner's released packet can be handed to a switch input as
// a cell once the link has carried it.
//
// Timing: see cioq_switch (one slot every 1 + S*(N+1) cycles) and
// vtrs_edge (one release per cycle at most).
module vtrs_cioq_top
  import cioq_pkg::*;
#(
  parameter int N         = 3,
  parameter int S         = 4,
  parameter int VOQ_DEPTH = 8,
  parameter int OQ_DEPTH  = 16,
  parameter int N_EDGE    = 3,
  parameter int EDGE_FIFO = 8
) (
  input  logic             clk,
  input  logic             rst_n,
  // core switch
  input  logic [N-1:0]     sw_in_valid,
  input  cell_t            sw_in_cell   [N],
  output logic             sw_in_ready,
  output logic [N-1:0]     sw_in_drop,
  output logic [N-1:0]     sw_out_valid,
  output cell_t            sw_out_cell  [N],
  input  ts_t              sw_link_delay [N],
  output logic [N-1:0]     sw_oq_full,
  output logic             sw_phase_done,
  output logic [$clog2(N+1)-1:0] sw_match_iters,
  output logic [23:0]      sw_slot,
  // edge conditioners
  input  ts_t              edge_now,
  input  rate_t            edge_rate    [N_EDGE],
  input  logic [3:0]       edge_hops    [N_EDGE],
  input  logic [N_EDGE-1:0] edge_in_valid,
  output logic [N_EDGE-1:0] edge_in_ready,
  input  cell_t            edge_in_cell [N_EDGE],
  input  logic [LEN_W-1:0] edge_in_len  [N_EDGE],
  output logic [N_EDGE-1:0] edge_out_valid,
  output cell_t            edge_out_cell [N_EDGE],
  output logic [LEN_W-1:0] edge_out_len [N_EDGE]
);

  cioq_switch #(.N(N), .S(S), .VOQ_DEPTH(VOQ_DEPTH), .OQ_DEPTH(OQ_DEPTH)) u_switch (
    .clk, .rst_n,
    .in_valid(sw_in_valid), .in_cell(sw_in_cell), .in_ready(sw_in_ready),
    .in_drop(sw_in_drop),
    .out_valid(sw_out_valid), .out_cell(sw_out_cell), .link_delay(sw_link_delay),
    .oq_full(sw_oq_full), .phase_done(sw_phase_done), .match_iters(sw_match_iters),
    .slot(sw_slot)
  );

  for (genvar e = 0; e < N_EDGE; e++) begin : g_edge
    vtrs_edge #(.FIFO_DEPTH(EDGE_FIFO), .HOP_W(4)) u_edge (
      .clk, .rst_n,
      .now(edge_now), .cfg_rate(edge_rate[e]), .cfg_hops(edge_hops[e]),
      .in_valid(edge_in_valid[e]), .in_ready(edge_in_ready[e]),
      .in_cell(edge_in_cell[e]), .in_len(edge_in_len[e]),
      .out_valid(edge_out_valid[e]), .out_cell(edge_out_cell[e]),
      .out_len(edge_out_len[e])
    );
  end

endmodule
