// tb_cn_unit: random and corner vectors for the check node parity.
module tb_cn_unit;
  localparam int DC = 12;
  logic [DC-1:0] v;
  logic c;
  int checks = 0, failures = 0;

  cn_unit #(.DC(DC)) dut (.v, .c);

  initial begin
    for (int t = 0; t < 2000; t++) begin
      int ones;
      v = (t == 0) ? '0 : (t == 1) ? '1 : DC'($urandom);
      #1;
      ones = 0;
      for (int k = 0; k < DC; k++) if (v[k]) ones++;
      checks++;
      if (c !== logic'(ones % 2)) begin
        failures++;
        $display("FAIL v=%b c=%b", v, c);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
