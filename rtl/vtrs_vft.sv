// vtrs_vft: virtual finish time of a cell entering a core switch.
//
// Under the virtual time reference system a rate-based scheduler assigns
// every packet the virtual delay d = L/r + delta and the virtual finish time
// nu = omega + d, where omega is the virtual time stamp and r the reserved
// rate carried in the packet, and delta the virtual time adjustment term
// also carried in the packet. Nothing per flow is stored in the switch: the
// result depends only on the cell's own state.
//
// Cells have a fixed length of one cell time (the document's choice), so
// L/r = 1/r cell times, computed here by division as 2**(RATE_W+FRAC_W)/rate
// in time stamp units. A rate of 0 saturates L/r to the largest value, an
// assumption of this design.
//
// Interface: cell in, nu and the virtual delay out. Timing: purely
// combinational.
module vtrs_vft
  import cioq_pkg::*;
(
  input  cell_t cell_in,
  output ts_t   vdelay,  // virtual delay d = L/r + delta
  output ts_t   vft      // virtual finish time nu = omega + d
);

  ts_t l_over_r;

  always_comb begin
    l_over_r = len_over_rate(LEN_W'(1), cell_in.rate);
    vdelay   = l_over_r + cell_in.delta;
    vft      = cell_in.omega + vdelay;
  end

endmodule
