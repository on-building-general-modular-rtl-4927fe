// delta register: holds the (N-1)-bit constant delta = d_{N-2}..d_0 that
// selects the modulus m = 2^N - delta of the adder.
//
// Keeping delta in a writable register is what makes one adder circuit
// serve any modulus 2^N - delta with 0 <= delta < 2^(N-1): writing a new
// value reconfigures the channel, for instance to move it to a spare
// modulus after a fault. That the register is writable is the design's;
// the port names, the asynchronous active-low reset and the reset value
// DELTA_RESET are this implementation's choices.
//
// Timing: wdata is taken at the rising clk edge where we is high and
// appears on delta right after that edge. Reset loads DELTA_RESET.
module delta_reg
  import mod_adder_pkg::*;
#(
  parameter int unsigned N           = N_DEFAULT,
  parameter int unsigned DELTA_RESET = DELTA_RESET_DEFAULT
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         we,
  input  logic [N-2:0] wdata,
  output logic [N-2:0] delta
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  delta <= (N-1)'(DELTA_RESET);
    else if (we) delta <= wdata;
  end

endmodule
