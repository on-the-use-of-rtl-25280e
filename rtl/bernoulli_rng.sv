// bernoulli_rng: N independent-looking random bits per clock, each 1 with
// probability p = p_thr / 2^PW, for the probabilistic flip rule (PGDBF).
//
// Each output has its own 16-bit xorshift generator (shifts 7, 9, 8; period
// 2^16-1). seed_load sets generator n to (seed[15:0] ^ seed[31:16] ^ K(n)),
// where K(n) is a fixed per-index constant from an integer hash computed at
// elaboration (a zero state is replaced by 1). step advances every generator
// by one; r[n] = (low PW bits of state n) < p_thr, combinational from the
// state, so r is valid in the clock after seed_load and changes after each
// step. The generator type is this design's choice: only the Bernoulli(p)
// behaviour of the outputs is prescribed.
module bernoulli_rng #(
  parameter int unsigned N  = 1296,
  parameter int unsigned PW = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          seed_load,
  input  logic [31:0]   seed,
  input  logic          step,
  input  logic [PW-1:0] p_thr,
  output logic [N-1:0]  r
);
  function automatic logic [15:0] index_const(int unsigned n);
    logic [31:0] x;
    x = 32'(n) * 32'h9E37_79B1 + 32'h7F4A_7C15;
    x = x ^ (x >> 16);
    x = x * 32'h85EB_CA6B;
    x = x ^ (x >> 13);
    return x[15:0];
  endfunction

  function automatic logic [15:0] xs16(logic [15:0] s);
    logic [15:0] t;
    t = s ^ (s << 7);
    t = t ^ (t >> 9);
    t = t ^ (t << 8);
    return t;
  endfunction

  for (genvar n = 0; n < N; n++) begin : g_gen
    localparam logic [15:0] K = index_const(n);
    logic [15:0] state, seeded;
    always_comb begin
      seeded = seed[15:0] ^ seed[31:16] ^ K;
      if (seeded == 16'h0) seeded = 16'h1;
    end
    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n)         state <= (K == 16'h0) ? 16'h1 : K;
      else if (seed_load) state <= seeded;
      else if (step)      state <= xs16(state);
    end
    assign r[n] = (state[PW-1:0] < p_thr);
  end
endmodule
