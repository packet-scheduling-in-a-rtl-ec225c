// crossbar: the N x N switch fabric of the CIOQ switch.
//
// The matching computed for a phase configures the crossbar: output j is
// connected to input sel[j] when sel_valid[j] is set. In one phase each
// input sends at most one cell and each output receives at most one cell;
// with a speedup of S the switch performs S such transfers per time slot.
// Besides routing the cells to the outputs, the crossbar returns the
// configuration as seen from the inputs: in_conn[i] is set when input i is
// connected, and in_out[i] names its output, so the input can present the
// cell from the right virtual output queue.
//
// Timing: purely combinational. The rule that no input is connected to two
// outputs is checked by an assertion.
module crossbar #(
  parameter int N  = 3,
  parameter int PW = 8,
  localparam int IW = (N > 1) ? $clog2(N) : 1
) (
  input  logic [N-1:0]  sel_valid,       // per output
  input  logic [IW-1:0] sel [N],         // per output: connected input
  output logic [N-1:0]  in_conn,         // per input
  output logic [IW-1:0] in_out [N],      // per input: connected output
  input  logic [PW-1:0] in_data [N],     // per input: cell it sends
  output logic [N-1:0]  out_valid,       // per output
  output logic [PW-1:0] out_data [N]     // per output: cell it receives
);

  always_comb begin
    in_conn = '0;
    for (int i = 0; i < N; i++) in_out[i] = '0;
    for (int j = 0; j < N; j++) begin
      out_valid[j] = sel_valid[j];
      out_data[j]  = sel_valid[j] ? in_data[sel[j]] : '0;
      if (sel_valid[j]) begin
        in_conn[sel[j]] = 1'b1;
        in_out[sel[j]]  = IW'(j);
      end
    end
  end

  always_comb begin
    for (int a = 0; a < N; a++)
      for (int b = a + 1; b < N; b++)
        assert (!(sel_valid[a] && sel_valid[b] && sel[a] == sel[b]))
          else $error("crossbar: input %0d connected to two outputs", sel[a]);
  end

endmodule
