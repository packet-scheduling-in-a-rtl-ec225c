// vtrs_update: per-hop virtual time stamp update at a switch output.
//
// When a cell leaves a core switch its virtual time stamp is rewritten for
// the next hop as omega_next = nu + Psi + pi, where nu is the cell's virtual
// finish time at this switch, Psi the error term of this switch's scheduler
// and pi the propagation delay of the outgoing link. This keeps the reality
// check (the virtual arrival time at the next hop is never earlier than the
// real one) and the virtual spacing of a flow's cells at every hop.
//
// PSI defaults to one cell time: the error term of a core stateless virtual
// clock scheduler is L*max/C, and with fixed-length cells L*max/C is one
// cell time. The link delay is a run-time input per output port, in time
// stamp units (this design's choice). The reserved rate and delta are
// passed on unchanged, as the document prescribes.
//
// Timing: purely combinational.
module vtrs_update
  import cioq_pkg::*;
#(
  parameter ts_t PSI = CELL_TIME
) (
  input  cell_t cell_in,     // cell as stored in the switch
  input  ts_t   vft,         // its virtual finish time at this switch
  input  ts_t   link_delay,  // pi of the outgoing link
  output cell_t cell_out     // cell with omega for the next hop
);

  always_comb begin
    cell_out       = cell_in;
    cell_out.omega = vft + PSI + link_delay;
  end

endmodule
