// cioq_pkg: types and constants shared by the CIOQ switch and the VTRS
// edge conditioner.
//
// Time is kept as an unsigned fixed-point number of cell times (one cell
// time = one time slot = the time to send one fixed-length cell at the line
// rate C). TS_W bits in total, FRAC_W of them fractional. Time stamps are
// allowed to wrap: they are compared through the sign of their difference
// (ts_lt), which is correct while the stamps being compared lie within half
// the range of each other.
//
// A reserved rate r is carried as an unsigned fraction of the line rate:
// r = rate / 2**RATE_W, so a cell of one cell time occupies 1/r cell times
// of the flow's reserved bandwidth.
//
// The cell state (cell_t) holds what the virtual time reference system puts
// in a packet: the reserved rate, the virtual time stamp omega and the
// virtual time adjustment term delta, plus the destination output port, a
// flow number and a payload word. Field widths are this design's choice.
package cioq_pkg;

  localparam int TS_W   = 32;  // time stamp width
  localparam int FRAC_W = 8;   // fractional bits of a time stamp
  localparam int RATE_W = 16;  // reserved rate, fraction of the line rate
  localparam int PORT_W = 4;   // output port number (switches up to 16x16)
  localparam int FLOW_W = 8;   // flow number (carried, not used for scheduling)
  localparam int DATA_W = 16;  // payload word of a cell
  localparam int LEN_W  = 8;   // packet length at the edge, in cell times

  typedef logic [TS_W-1:0]   ts_t;
  typedef logic [RATE_W-1:0] rate_t;

  // One cell time in time stamp units.
  localparam ts_t CELL_TIME = ts_t'(1) << FRAC_W;

  typedef struct packed {
    logic [PORT_W-1:0] dest;   // output port
    logic [FLOW_W-1:0] flow;   // flow number
    rate_t             rate;   // reserved rate r of the flow
    ts_t               omega;  // virtual time stamp at this hop
    ts_t               delta;  // virtual time adjustment term
    logic [DATA_W-1:0] data;   // payload word
  } cell_t;

  // A cell inside the switch, with the virtual finish time computed at
  // the input it arrived on.
  typedef struct packed {
    ts_t   vft;
    cell_t hdr;  // the cell itself
  } qentry_t;


  // Wrap-safe "a earlier than b".
  function automatic logic ts_lt(ts_t a, ts_t b);
    ts_t d;
    d = a - b;
    return d[TS_W-1];
  endfunction

  // L/r in time stamp units for a packet of len cell times at rate r.
  // rate 0 (no reservation) gives the largest representable value.
  function automatic ts_t len_over_rate(logic [LEN_W-1:0] len, rate_t rate);
    logic [LEN_W+RATE_W+FRAC_W-1:0] num;
    logic [LEN_W+RATE_W+FRAC_W-1:0] den;
    logic [LEN_W+RATE_W+FRAC_W-1:0] q;
    num = {len, {(RATE_W + FRAC_W){1'b0}}};
    if (rate == '0) return '1;
    den = {{(LEN_W+FRAC_W){1'b0}}, rate};
    q = num / den;
    return ((q >> TS_W) != '0) ? '1 : ts_t'(q);
  endfunction

endpackage
