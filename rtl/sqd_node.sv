// sqd_node: one node automaton of the square-area detector.
//
// Each node is a pixel while the image is read in and an automaton after
// that; a multiplexer in front of the state flip-flop chooses between the
// two modes, as in the published node circuit.
//  * load mode (mode_load=1, en=1): the state takes ser_in, the value of the
//    next node of the serial load chain, so the image is shifted in serially.
//  * transition mode (mode_load=0, en=1): the next state is the AND of the
//    node's own state and the states of its eight neighbours (an erosion by a
//    3x3 square), so every object shrinks by one node on each side per step.
// A second flip-flop keeps the state before the last transition, S^(n-1).
// The eliminating flag f follows Eq. (1): the node went from 1 to 0 in the
// last step and none of its eight neighbours is 1 after that step, so the
// node is (part of) the last remnant of an object. f is combinational from
// registered values and stays valid until the next en.
//
// Interface: nbr[7:0] are the current states of the eight neighbours
// (nodes outside the array are tied to 0 by the array); s is the state,
// distributed to the neighbours; f is the eliminating flag.
// Timing: one clock per serial load shift and one clock per transition.
// Including the node's own state in the AND and treating outside nodes as 0
// are this design's choices; the node circuit is otherwise the published one.
module sqd_node (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       en,         // advance: shift (load mode) or transition
  input  logic       mode_load,  // 1: pixel/load mode, 0: automaton mode
  input  logic       ser_in,     // serial chain input (load mode)
  input  logic [7:0] nbr,        // states of the eight neighbours
  output logic       s,          // current state S^n
  output logic       f           // eliminating flag, Eq. (1)
);

  logic s_prev;  // S^(n-1)
  logic s_next;

  // Input multiplexer of the state flip-flop.
  always_comb s_next = mode_load ? ser_in : (s & (&nbr));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s      <= 1'b0;
      s_prev <= 1'b0;
    end else if (en) begin
      s      <= s_next;
      // In load mode both copies take the pixel, so no flag is raised
      // before the first transition.
      s_prev <= mode_load ? ser_in : s;
    end
  end

  always_comb f = s_prev & ~s & ~(|nbr);

endmodule
