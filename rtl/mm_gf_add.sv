// mm_gf_add: addition in GF(2^K), K two-input XOR gates.
// Combines the outputs of the two systolic arrays, P = A + B. Purely
// combinational.
module mm_gf_add #(
  parameter int unsigned K = 233
) (
  input  logic [K-1:0] a,
  input  logic [K-1:0] b,
  output logic [K-1:0] p
);

  always_comb p = a ^ b;

endmodule
