// maj3: three-input majority gate, the basic logic element of quantum-dot
// cellular automata (QCA).
//
// The output takes the value held by at least two of the three inputs:
// y = a&b | b&c | c&a. Tying one input to 0 turns the gate into a two-input
// AND, tying it to 1 turns it into a two-input OR; the adder block builds its
// AND and OR terms this way. Purely combinational, no timing of its own.
module maj3 (
  input  logic a,
  input  logic b,
  input  logic c,
  output logic y
);
  assign y = (a & b) | (b & c) | (c & a);
endmodule
