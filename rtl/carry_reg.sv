// carry_reg: one-bit carry register C of the serial adder.
//
// Holds the carry between successive bit steps. op = OP_INIT clears it (the
// c = 0 of the algorithm, done while the controller waits in STA), op =
// OP_STEP stores the adder's carry out d (c = d, once per bit in STB).
// Registered: the stored value appears after the rising clock edge.
// Clear/load operations follow the source design.
module carry_reg
  import serial_adder_pkg::*;
(
  input  logic    clk,
  input  opcode_t op,
  input  logic    d,
  output logic    q
);

  always_ff @(posedge clk) begin
    unique case (op)
      OP_INIT: q <= 1'b0;
      OP_STEP: q <= d;
    endcase
  end

endmodule
