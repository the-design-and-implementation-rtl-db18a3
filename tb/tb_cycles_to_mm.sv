// Checks the cycle-to-millimetre shift on random and corner counts.
module tb_cycles_to_mm;
  logic [11:0] delta0, delta1, delta2;
  logic [8:0]  d0, d1, d2;
  int checks = 0, failures = 0;

  cycles_to_mm dut (.*);

  initial begin
    for (int i = 0; i < 2000; i++) begin
      if (i < 3) begin delta0 = (i == 0) ? 0 : (i == 1) ? 7 : 4095; delta1 = 8; delta2 = 4088; end
      else begin delta0 = 12'($urandom); delta1 = 12'($urandom); delta2 = 12'($urandom); end
      #1;
      checks++;
      if (d0 != delta0 / 8 || d1 != delta1 / 8 || d2 != delta2 / 8) begin
        failures++; $display("mismatch %0d %0d %0d -> %0d %0d %0d", delta0, delta1, delta2, d0, d1, d2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
