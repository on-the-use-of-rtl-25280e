// vn_unit: variable node processing unit of the adapted bit-flipping decoder.
//
// Holds the current hard value v of one codeword bit, the bit y read from the
// flash and its reliability flag I (1 = proven correct by the retention-error
// rule). Each clock it outputs the energy
//   E = (v ^ y) + sum of its DV neighbouring check values,
// and, when upd is high, flips v if all of these hold:
//   - the bit is not reliable (I = 0), the adaptation for MLC flash;
//   - E equals the maximum energy e_max over the whole codeword;
//   - in probabilistic mode (prob_mode = 1, PGDBF) its random bit rnd is 1;
//     in deterministic mode (GDBF) rnd is ignored.
// load (priority over upd) sets v = y and latches y and I. The energy is
// combinational from the registers and the check inputs; the flip takes
// effect at the next clock edge. Energy encoding and widths are this design's.
module vn_unit #(
  parameter int unsigned DV = 3,
  localparam int unsigned EW = $clog2(DV + 2)
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  logic          y_in,
  input  logic          rel_in,
  input  logic          upd,
  input  logic [DV-1:0] c,
  input  logic [EW-1:0] e_max,
  input  logic          rnd,
  input  logic          prob_mode,
  output logic [EW-1:0] energy,
  output logic          v
);
  logic y_q, rel_q;
  logic flip;

  always_comb begin
    energy = EW'(v ^ y_q);
    for (int unsigned e = 0; e < DV; e++) energy += EW'(c[e]);
    flip = upd && !rel_q && (energy == e_max) && (!prob_mode || rnd);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v     <= 1'b0;
      y_q   <= 1'b0;
      rel_q <= 1'b0;
    end else if (load) begin
      v     <= y_in;
      y_q   <= y_in;
      rel_q <= rel_in;
    end else if (flip) begin
      v     <= ~v;
    end
  end
endmodule
