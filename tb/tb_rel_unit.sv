// tb_rel_unit: exhaustive check of the per-cell reliability unit.
// For each of the four read values the expected flags are derived from the
// retention model (states ordered by charge 11 < 10 < 00 < 01, charge loss
// moves a cell one state down): a bit is reliable if every state that can
// decay into the read state has the same value of that bit.
module tb_rel_unit;
  logic msb, lsb, i_msb, i_lsb;
  int checks = 0, failures = 0;

  rel_unit dut (.*);

  // state code by charge level 0..3
  function automatic logic [1:0] state_of(int lvl);
    case (lvl)
      0: return 2'b11;
      1: return 2'b10;
      2: return 2'b00;
      default: return 2'b01;
    endcase
  endfunction

  initial begin
    for (int lvl = 0; lvl < 4; lvl++) begin
      logic [1:0] rd, src;
      logic exp_m, exp_l;
      rd = state_of(lvl);
      exp_m = 1'b1; exp_l = 1'b1;
      // possible sources: the read state itself, or the state one level up
      if (lvl < 3) begin
        src = state_of(lvl + 1);
        if (src[1] != rd[1]) exp_m = 1'b0;
        if (src[0] != rd[0]) exp_l = 1'b0;
      end
      {msb, lsb} = rd;
      #1;
      checks += 2;
      if (i_msb !== exp_m) begin failures++; $display("FAIL read %b: i_msb=%b exp %b", rd, i_msb, exp_m); end
      if (i_lsb !== exp_l) begin failures++; $display("FAIL read %b: i_lsb=%b exp %b", rd, i_lsb, exp_l); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
