// mlc_flash_model: behavioural model (not synthesizable) of a 2-bit-per-cell
// MLC NAND flash array, for testbenches only.
//
// Each cell stores one of four Gray-coded states, ordered by stored charge
// 11 < 10 < 00 < 01 and read back as (MSB, LSB). prog writes the two pages
// prog_msb / prog_lsb into the cells. age applies retention loss: every cell
// above the lowest state independently drops to the next lower state with
// probability age_thr / 65536 (single-step loss only). rd_start streams the
// first rd_cells cells, P cells per beat, on a valid/ready interface. The
// current cell contents are visible on st_msb / st_lsb.
module mlc_flash_model #(
  parameter int N_CELLS = 1296,
  parameter int P       = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               prog,
  input  logic [N_CELLS-1:0] prog_msb,
  input  logic [N_CELLS-1:0] prog_lsb,
  input  logic               age,
  input  logic [15:0]        age_thr,
  input  logic               rd_start,
  input  int                 rd_cells,
  output logic               rd_valid,
  input  logic               rd_ready,
  output logic [P-1:0]       rd_msb,
  output logic [P-1:0]       rd_lsb,
  output logic               rd_busy,
  output logic [N_CELLS-1:0] st_msb,
  output logic [N_CELLS-1:0] st_lsb
);
  int pos, last;

  function automatic logic [1:0] lower(logic [1:0] s);
    case (s)
      2'b01:   return 2'b00;
      2'b00:   return 2'b10;
      2'b10:   return 2'b11;
      default: return 2'b11;
    endcase
  endfunction

  always_comb begin
    for (int j = 0; j < P; j++) begin
      rd_msb[j] = (pos + j < N_CELLS) ? st_msb[pos + j] : 1'b0;
      rd_lsb[j] = (pos + j < N_CELLS) ? st_lsb[pos + j] : 1'b0;
    end
  end

  assign rd_valid = rd_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st_msb  <= '1;
      st_lsb  <= '1;
      rd_busy <= 1'b0;
      pos     <= 0;
      last    <= 0;
    end else begin
      if (prog) begin
        st_msb <= prog_msb;
        st_lsb <= prog_lsb;
      end else if (age) begin
        for (int i = 0; i < N_CELLS; i++)
          if ($urandom_range(65535, 0) < int'(age_thr))
            {st_msb[i], st_lsb[i]} <= lower({st_msb[i], st_lsb[i]});
      end
      if (rd_start && !rd_busy) begin
        rd_busy <= 1'b1;
        pos     <= 0;
        last    <= rd_cells;
      end else if (rd_busy && rd_ready) begin
        if (pos + P >= last) rd_busy <= 1'b0;
        pos <= pos + P;
      end
    end
  end
endmodule
