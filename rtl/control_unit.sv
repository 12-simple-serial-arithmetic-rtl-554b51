// control_unit: algorithmic state machine of the serial adder.
//
// Two states held in a one-bit state register STT. In STA the machine waits
// for st = 1 while the datapath is (re)initialised every clock; on st it moves
// to STB, where one bit is added per clock until the step counter raises zk,
// and then returns to STA. Next state: nxtSt = ~STT & st | STT & ~zk.
// Each datapath block does one thing per state, so the opcode logic is just
// op = STT. Status output rdy = ~STT tells the outside world the unit is idle.
//
// rst is synchronous and active high. The states, the next-state equation and
// op = STT follow the source design; the synchronous reset and the rdy output
// are this implementation's choices.
module control_unit
  import serial_adder_pkg::*;
(
  input  logic    clk,
  input  logic    rst,
  input  logic    st,
  input  logic    zk,
  output opcode_t op,
  output logic    rdy
);

  state_t stt, nxt_st;

  // Next-state logic (excitation table)
  always_comb begin
    unique case (stt)
      STA: nxt_st = st ? STB : STA;
      STB: nxt_st = zk ? STA : STB;
    endcase
  end

  // State register
  always_ff @(posedge clk) begin
    if (rst) stt <= STA;
    else     stt <= nxt_st;
  end

  // Opcode logic: every opcode equals the state bit
  assign op  = opcode_t'(stt);
  assign rdy = (stt == STA);

endmodule
