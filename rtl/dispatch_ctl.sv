// dispatch_ctl: dispatch disabling for mutual exclusion among tasks.
//
// The global dispatch register holds a flag and the id of the task that asked
// for dispatching to be disabled. While the flag is set, every object except
// the recorded one is stalled; while it is clear the stall signals pass
// unchanged. As in the published structure, a decoder turns the recorded id
// into a one-hot vector and one multiplexer per object, selected by the flag,
// chooses between the original stall and the decoder-derived one.
//
// Own choices: the owner keeps its original stall while the flag is set (so it
// still stops if it suspends itself); objects whose bit in AFFECT is 0
// (interrupt handlers) are never stalled by this block. Purely combinational.
module dispatch_ctl #(
  parameter int          N     = 11,
  parameter int          ID_W  = 8,
  parameter logic [N-1:0] AFFECT = '1
) (
  input  logic [N-1:0]    stall_in,   // stall_i from the task status
  input  logic            dis,        // dispatch disabled flag
  input  logic [ID_W-1:0] owner,      // id that disabled dispatch
  output logic [N-1:0]    stall_out   // stall'_i to the object modules
);
  logic [N-1:0] dec;

  always_comb begin
    for (int i = 0; i < N; i++) begin
      dec[i] = (owner == ID_W'(i));
      if (dis && AFFECT[i])
        stall_out[i] = dec[i] ? stall_in[i] : 1'b1;
      else
        stall_out[i] = stall_in[i];
    end
  end
endmodule
