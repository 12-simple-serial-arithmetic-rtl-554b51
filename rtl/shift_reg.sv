// shift_reg: n-bit register with parallel load and shift right.
//
// Used twice in the serial adder. As register A its serial input is the sum
// bit from the full adder, so after n shifts A holds the sum. As register B
// its serial input is its own LSB, so the shift is a rotation and B is back to
// its loaded value after n steps. Bit q[0] is the bit being added in the
// current step, which removes the need for an n-to-1 bit selector.
//
// Interface: op = OP_INIT loads d, op = OP_STEP shifts right with sin entering
// q[N-1]. Both take effect at the rising clock edge; q is registered.
// The load/shift operation set follows the source design; the width default
// N = 8 and the absence of a reset (the register is loaded before every use)
// are choices of this implementation.
module shift_reg
  import serial_adder_pkg::*;
#(
  parameter int unsigned N = 8
) (
  input  logic         clk,
  input  opcode_t      op,
  input  logic [N-1:0] d,
  input  logic         sin,
  output logic [N-1:0] q
);

  always_ff @(posedge clk) begin
    unique case (op)
      OP_INIT: q <= d;
      OP_STEP: q <= {sin, q[N-1:1]};
    endcase
  end

endmodule
