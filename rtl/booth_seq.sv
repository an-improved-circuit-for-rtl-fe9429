// booth_seq: sequencer of one multiplication.
//
// The multiplier's datapath is combinational except for three kinds of
// register: the multiplier register, the shift-left register of every
// partial product generator with its registered shift decision, and the
// product register. The sequencer orders them:
//   IDLE     start=1: load=1, operands enter the multiplier register and the
//            shift-left registers on this edge.
//   DECODE   the shift-selector flip-flops sample the Booth windows.
//   SHIFT    shift_en=1: rows whose digit is +/-2 double their multiplicand.
//   CAPTURE  capture=1: the adder chain has settled, the product register
//            loads on this edge and done is 1 in the following cycle.
// A new operation can start in the cycle in which done is 1. busy is 1 from
// the cycle after start to the capture edge. start is ignored while busy.
// Latency: done rises four clock edges after the edge that accepted start.
//
// The document shows only the enable and clock inputs of the generators;
// this step sequence is this design's choice.
module booth_seq
  import booth_pkg::*;
(
  input  logic clk,
  input  logic rst_n,
  input  logic start,
  output logic load,
  output logic shift_en,
  output logic capture,
  output logic busy,
  output logic done
);

  seq_state_t state, state_d;

  always_comb begin
    state_d = state;
    unique case (state)
      S_IDLE:    if (start) state_d = S_DECODE;
      S_DECODE:  state_d = S_SHIFT;
      S_SHIFT:   state_d = S_CAPTURE;
      S_CAPTURE: state_d = S_IDLE;
      default:   state_d = S_IDLE;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
    end else begin
      state <= state_d;
      done  <= (state == S_CAPTURE);
    end
  end

  assign load     = (state == S_IDLE) && start;
  assign shift_en = (state == S_SHIFT);
  assign capture  = (state == S_CAPTURE);
  assign busy     = (state != S_IDLE);

endmodule
