// max_finder: maximum of N small unsigned energy values.
//
// The energies of a bit-flipping decoder take only a few values (0..DV+1), so
// instead of a comparator tree every level L gets a 'present' flag, the OR over
// all N inputs of (e[n] == L); the result is the highest level whose flag is
// set. This is this design's own choice of structure. Purely combinational.
//   e      N packed energies, EW bits each
//   e_max  largest of them (0 when all are 0)
module max_finder #(
  parameter int unsigned N  = 1296,
  parameter int unsigned EW = 3
) (
  input  logic [N-1:0][EW-1:0] e,
  output logic [EW-1:0]        e_max
);
  localparam int unsigned LEVELS = 1 << EW;

  logic [LEVELS-1:0] present;

  always_comb begin
    present = '0;
    for (int unsigned l = 0; l < LEVELS; l++)
      for (int unsigned n = 0; n < N; n++)
        present[l] = present[l] | (e[n] == EW'(l));
    e_max = '0;
    for (int unsigned l = 0; l < LEVELS; l++)
      if (present[l]) e_max = EW'(l);
  end
endmodule
