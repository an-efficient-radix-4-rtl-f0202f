// piso: parallel-in serial-out shift register feeding the DA multiplier.
//
// On a load cycle the register takes the operand x; on every cycle with shift
// high it moves one place to the right, filling with 0 at the top. The serial
// output is always bit 0 of the register, so the operand leaves least
// significant digit first, one digit per shifted cycle.
// Asynchronous active-high reset clears the register, as in the published
// step description; the separate shift enable (so the register can hold
// between operations) is this implementation's addition. load wins over shift.
//
// Ports: clk, rst, load, shift, x (N digits in), sout (current digit).
module piso #(
  parameter int unsigned N = cbns_pkg::CBNS_N
) (
  input  logic         clk,
  input  logic         rst,
  input  logic         load,
  input  logic         shift,
  input  logic [N-1:0] x,
  output logic         sout
);

  logic [N-1:0] sr;

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      sr <= '0;
    end else if (load) begin
      sr <= x;
    end else if (shift) begin
      sr <= sr >> 1;
    end
  end

  assign sout = sr[0];

endmodule
