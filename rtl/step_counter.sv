// step_counter: loop counter of the serial adder.
//
// op = OP_INIT loads the internal count k, op = OP_STEP decrements it; zk is
// high while k is zero and tells the controller that the current step is the
// last one. Because the registers shift in every STB cycle, including the one
// in which zk is high, the counter is loaded with N-1 so that exactly N bit
// steps are made (k runs N-1 .. 0). The decrement in the last step wraps k
// to all ones; that value is never used, as the controller is then back in
// STA and reloads the counter.
//
// The load/count-down/zk scheme is the source design's. Loading N-1 rather
// than N, so that registers shift N times, is this implementation's reading;
// so is the counter width $clog2(N)+1.
module step_counter
  import serial_adder_pkg::*;
#(
  parameter int unsigned N = 8,
  parameter int unsigned W = $clog2(N) + 1
) (
  input  logic         clk,
  input  opcode_t      op,
  output logic         zk
);

  logic [W-1:0] k;  // remaining steps after the current one

  localparam logic [W-1:0] LOAD_VAL = W'(N - 1);

  always_ff @(posedge clk) begin
    unique case (op)
      OP_INIT: k <= LOAD_VAL;
      OP_STEP: k <= k - 1'b1;
    endcase
  end

  assign zk = (k == '0);

endmodule
