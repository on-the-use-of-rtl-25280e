// preproc: pre-processing module between the MLC NAND flash and the decoder.
//
// Cell reads arrive CELLS_PER_BEAT cells per beat (valid/ready). Every lane
// has its own rel_unit, so CELLS_PER_BEAT reliability computations run in
// parallel; the results are shifted into an N-bit codeword buffer y and an
// N-bit reliability buffer rel (1 = bit proven correct). Two page layouts:
//   cfg_shared = 0  MSB and LSB of a cell belong to different codewords. A
//                   codeword takes N cells = N/CELLS_PER_BEAT beats; bit i of
//                   the codeword is the LSB (cfg_sel_msb = 0) or the MSB
//                   (cfg_sel_msb = 1) of cell i, with its reliability.
//   cfg_shared = 1  both bits of a cell belong to the same codeword. A
//                   codeword takes N/2 cells; cell i gives bit 2i (MSB) and
//                   bit 2i+1 (LSB).
// The layout is sampled with the first beat of each codeword. When the last
// beat is taken, out_valid rises and y/rel hold until out_ack; in_ready is low
// meanwhile. The choice of lane count, the handshake and the bit order of the
// shared layout are this design's own.
module preproc #(
  parameter int unsigned N              = 1296,
  parameter int unsigned CELLS_PER_BEAT = 8,
  localparam int unsigned P             = CELLS_PER_BEAT,
  localparam int unsigned BEATS         = N / P,
  localparam int unsigned BW            = $clog2(BEATS + 1)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         cfg_shared,
  input  logic         cfg_sel_msb,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [P-1:0] msb,
  input  logic [P-1:0] lsb,
  output logic         out_valid,
  input  logic         out_ack,
  output logic [N-1:0] y,
  output logic [N-1:0] rel
);
  if (N % (2 * P) != 0) begin : g_bad_size
    $error("preproc: N must be a multiple of 2*CELLS_PER_BEAT");
  end

  logic [P-1:0]  i_msb, i_lsb;
  logic [BW-1:0] beat;
  logic          shared_q, sel_q;
  logic          shared_now, sel_now, last_beat;

  for (genvar j = 0; j < P; j++) begin : g_lane
    rel_unit u_rel (.msb(msb[j]), .lsb(lsb[j]), .i_msb(i_msb[j]), .i_lsb(i_lsb[j]));
  end

  assign in_ready   = !out_valid;
  // Configuration is taken from the ports on the first beat, then held.
  assign shared_now = (beat == '0) ? cfg_shared  : shared_q;
  assign sel_now    = (beat == '0) ? cfg_sel_msb : sel_q;
  assign last_beat  = shared_now ? (beat == BW'(BEATS / 2 - 1)) : (beat == BW'(BEATS - 1));

  // New cells enter at the top of the buffers, which shift down by one
  // beat's worth of bits; after the last beat cell 0 sits at bit 0.
  logic [2*P-1:0] pair_y, pair_rel;
  always_comb begin
    for (int unsigned j = 0; j < P; j++) begin
      pair_y  [2 * j]     = msb[j];
      pair_y  [2 * j + 1] = lsb[j];
      pair_rel[2 * j]     = i_msb[j];
      pair_rel[2 * j + 1] = i_lsb[j];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      beat      <= '0;
      shared_q  <= 1'b0;
      sel_q     <= 1'b0;
      out_valid <= 1'b0;
      y         <= '0;
      rel       <= '0;
    end else begin
      if (out_valid && out_ack) out_valid <= 1'b0;
      if (in_valid && in_ready) begin
        shared_q <= shared_now;
        sel_q    <= sel_now;
        if (shared_now) begin
          y   <= {pair_y,   y[N-1:2*P]};
          rel <= {pair_rel, rel[N-1:2*P]};
        end else begin
          y   <= {sel_now ? msb   : lsb,   y[N-1:P]};
          rel <= {sel_now ? i_msb : i_lsb, rel[N-1:P]};
        end
        if (last_beat) begin
          beat      <= '0;
          out_valid <= 1'b1;
        end else begin
          beat <= beat + 1'b1;
        end
      end
    end
  end

  a_hold: assert property (@(posedge clk) disable iff (!rst_n)
                           out_valid && !out_ack |=> out_valid && $stable(y) && $stable(rel));
endmodule
