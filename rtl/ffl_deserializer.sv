// ffl_deserializer -- serial-to-parallel front end of the FF-LYNX receiver.
//
// Shifts the incoming line into a 3*SPEED-bit register, one bit per fast
// clock, so the last three TDM words (at every possible bit phase) are
// visible at once, and runs a free bit-phase counter 0..SPEED-1. Which phase
// is the word boundary is decided by the synchronizer; at that phase
// sr[SPEED-1:0] is the word just received, sr[2*SPEED-1:SPEED] the one
// before, and so on.
module ffl_deserializer #(
  parameter int unsigned SPEED = 8,
  localparam int unsigned PW = (SPEED > 1) ? $clog2(SPEED) : 1
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               din,
  output logic [3*SPEED-1:0] sr,
  output logic [PW-1:0]      phase
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sr    <= '0;
      phase <= '0;
    end else begin
      sr    <= {sr[3*SPEED-2:0], din};
      phase <= (32'(phase) == SPEED - 1) ? '0 : phase + 1'b1;
    end
  end

endmodule
