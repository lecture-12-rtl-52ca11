// toy_phase_counter: the 1-bit counter that paces the TOY machine.
//
// The machine takes two clock periods per instruction, fetch then execute,
// because both phases use the memory and change the PC.  A single
// flip-flop toggles at every rising clock edge; its output is 'execute' and
// its inverse is 'fetch'.  This follows the design.  Choices of this
// implementation: the synchronous active-low reset puts the machine in the
// fetch phase, and 'run' = 0 freezes the counter (used to stop the machine
// after a halt).
//
// Interface: clk, rst_n, run; fetch, execute.
module toy_phase_counter (
  input  logic clk,
  input  logic rst_n,
  input  logic run,
  output logic fetch,
  output logic execute
);

  always_ff @(posedge clk) begin
    if (!rst_n)
      execute <= 1'b0;
    else if (run)
      execute <= !execute;
  end

  assign fetch = !execute;

endmodule
