// full_adder: one-bit full adder, the arithmetic unit of the serial adder.
//
// Forms (co, s) = a + b + ci combinationally within the current clock cycle:
// s is the xor of the three inputs, co their majority. In the processor a and
// b are the LSBs of registers A and B and ci is the stored carry; s is shifted
// into A and co is stored in the carry register. The function is the source
// design's; the gate-level form is the standard one.
module full_adder (
  input  logic a,
  input  logic b,
  input  logic ci,
  output logic s,
  output logic co
);

  always_comb begin
    s  = a ^ b ^ ci;
    co = (a & b) | (a & ci) | (b & ci);
  end

endmodule
