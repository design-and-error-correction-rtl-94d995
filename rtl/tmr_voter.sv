// Bitwise two-out-of-three majority voter for triple modular redundancy.
//
// The three copies a, b and c of a W-bit signal are voted bit by bit, so any
// single faulty copy is outvoted. mismatch is high when the copies disagree in
// any bit (the disagreement detector of a TMR arrangement), and is meant for
// reporting only. Purely combinational.
//
// The protected FFT array uses it, as the document describes, to triplicate the
// error detection and correction logic and the adders that form the inputs of
// the parity FFT and of the checks. The mismatch output is this design's own
// addition.
module tmr_voter #(
  parameter int W = 8
) (
  input  logic [W-1:0] a,
  input  logic [W-1:0] b,
  input  logic [W-1:0] c,
  output logic [W-1:0] y,
  output logic         mismatch
);
  assign y        = (a & b) | (a & c) | (b & c);
  assign mismatch = (a != b) || (a != c);
endmodule
