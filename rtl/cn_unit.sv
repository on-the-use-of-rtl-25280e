// cn_unit: check node of the bit-flipping decoder.
//
// Computes the parity of its DC neighbouring variable node values,
// c = v[0] ^ ... ^ v[DC-1]; c = 1 means the check is unsatisfied. Purely
// combinational, evaluated in the same clock as the VN update.
module cn_unit #(
  parameter int unsigned DC = 12
) (
  input  logic [DC-1:0] v,
  output logic          c
);
  always_comb c = ^v;
endmodule
