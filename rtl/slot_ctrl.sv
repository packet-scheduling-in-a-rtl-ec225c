// slot_ctrl: time slot sequencer of the CIOQ switch.
//
// A time slot is the time between cell arrivals at an input. With a speedup
// of S it is divided into S phases; in each phase the switch computes one
// matching and moves at most one cell out of each input and into each
// output. Cells arrive at the start of the first phase and leave the
// outputs at the end of the last one. This block gives each slot a fixed
// length of SLOT_CYCLES = 1 + S*(N+1) clock cycles (the cycle counts are
// this design's choice):
//   cycle 0                 'slot_start': departures of the previous slot
//                           and arrivals of this one;
//   cycle 1 + p*(N+1)       'phase_start' of phase p (0..S-1); the matcher
//                           needs at most N+1 cycles, so each phase is
//                           N+1 cycles long.
// 'slot' counts time slots since reset (the switch's real time, in slots);
// 'phase' is the index of the phase in progress.
module slot_ctrl #(
  parameter int N = 3,
  parameter int S = 4,
  parameter int SLOT_W = 24,
  localparam int SLOT_CYCLES = 1 + S * (N + 1),
  localparam int CYC_W = $clog2(SLOT_CYCLES),
  localparam int PH_W  = (S > 1) ? $clog2(S) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              slot_start,
  output logic              phase_start,
  output logic [PH_W-1:0]   phase,
  output logic [SLOT_W-1:0] slot
);

  logic [CYC_W-1:0]  cyc_q;
  logic [CYC_W-1:0]  in_phase_q;   // cycle within the phase
  logic [PH_W-1:0]   phase_q;
  logic [SLOT_W-1:0] slot_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cyc_q      <= '0;
      in_phase_q <= '0;
      phase_q    <= '0;
      slot_q     <= '0;
    end else begin
      if (cyc_q == CYC_W'(SLOT_CYCLES - 1)) begin
        cyc_q  <= '0;
        slot_q <= slot_q + 1'b1;
      end else begin
        cyc_q <= cyc_q + 1'b1;
      end
      if (cyc_q == '0) begin
        in_phase_q <= '0;
        phase_q    <= '0;
      end else if (in_phase_q == CYC_W'(N)) begin
        in_phase_q <= '0;
        phase_q    <= phase_q + 1'b1;
      end else begin
        in_phase_q <= in_phase_q + 1'b1;
      end
    end
  end

  assign slot_start  = (cyc_q == '0);
  assign phase_start = (cyc_q != '0) && (in_phase_q == '0);
  assign phase       = phase_q;
  assign slot        = slot_q;

endmodule
