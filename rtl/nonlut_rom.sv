// nonlut_rom: the "non-LUT ROM" of the DA-CBNS multiplier.
//
// A conventional DA unit stores precomputed partial products in a ROM
// addressed by the serial input bits. With a single constant coefficient v
// that table has only two entries, 0 and v, so here it is realised as gates:
// each output digit is the current serial digit of x AND-ed with the
// matching digit of v. No memory is used. Combinational.
//
// Ports: xbit (serial digit of x), v (N-digit constant), pp (partial product).
module nonlut_rom #(
  parameter int unsigned N = cbns_pkg::CBNS_N
) (
  input  logic         xbit,
  input  logic [N-1:0] v,
  output logic [N-1:0] pp
);

  always_comb begin
    for (int i = 0; i < N; i++) begin
      pp[i] = xbit & v[i];
    end
  end

endmodule
