// rel_unit: reliability of the two bits read from one 2-bit MLC cell.
//
// With Gray-coded states ordered by stored charge 11 < 10 < 00 < 01, retention
// charge loss only moves a cell one state down. A read value therefore proves
// some of its bits correct: 01 cannot be produced by charge loss (both bits
// reliable), 00 can only come from 01 (MSB reliable), 10 only from 00 (LSB
// reliable) and 11 only from 10 (MSB reliable). This gives
//   i_msb = ~(msb & ~lsb)      i_lsb = msb ^ lsb
// (1 = reliable). Purely combinational. The truth table follows from the
// one-way leakage of charge; the two-gate form is this design's.
module rel_unit (
  input  logic msb,
  input  logic lsb,
  output logic i_msb,
  output logic i_lsb
);
  always_comb begin
    i_msb = ~(msb & ~lsb);
    i_lsb = msb ^ lsb;
  end
endmodule
