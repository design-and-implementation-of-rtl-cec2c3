// ahd_control: control unit of the AHD-2494.
//
// Two states. In T0 the three pipeline stages all advance every processor
// cycle and the bus fetches one instruction per cycle. When the execute
// stage holds a LOAD, STORE, IN or OUT (ex_mem), its effective address is
// computed in that T0 cycle and the unit moves to TM for one cycle: the bus
// then carries the data transfer instead of a fetch, and the PC and the
// fetch and decode pipeline registers hold (freeze). After TM it returns to
// T0. Such instructions take four clocks instead of three.
//
// A taken JUMP, CALL, RET, SYS or SRET in the execute stage (ex_redirect)
// sets flush: the two younger instructions already fetched are discarded,
// so a taken transfer costs two cycles.
//
// Timing: all state changes on the rising clock edge that ends a processor
// cycle (ce). Outputs are decoded from the state and the inputs, without
// delay.
//
// The T0 state, the extra state for the four memory instructions and their
// detection in the pipeline follow the published design; the single TM
// state and the flush on a taken transfer are this design's choices.
module ahd_control (
  input  logic clk,
  input  logic rst_n,
  input  logic ce,
  input  logic ex_mem,       // execute stage holds LOAD/STORE/IN/OUT
  input  logic ex_redirect,  // execute stage holds a taken transfer
  output logic in_tm,        // bus carries a data transfer this cycle
  output logic advance,      // pipeline registers and PC may load
  output logic flush         // discard the instructions in stages 1 and 2
);

  typedef enum logic { S_T0, S_TM } state_e;
  state_e state, state_nxt;

  always_comb begin
    state_nxt = state;
    unique case (state)
      S_T0: if (ex_mem) state_nxt = S_TM;
      S_TM: state_nxt = S_T0;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  state <= S_T0;
    else if (ce) state <= state_nxt;
  end

  assign in_tm   = (state == S_TM);
  assign advance = (state == S_T0);
  assign flush   = (state == S_T0) && ex_redirect;

  // A memory instruction never redirects the PC
  a_excl: assert property (@(posedge clk) disable iff (!rst_n) !(ex_mem && ex_redirect));

endmodule
