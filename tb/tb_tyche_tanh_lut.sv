// Testbench for tyche_tanh_lut: every entry k is compared with
// round(tanh(k/256) * (2^31 - 1)) computed with the simulator's real $tanh,
// allowing one LSB of rounding difference; also checks monotonicity.
module tb_tyche_tanh_lut;
  logic [9:0] addr;
  logic [31:0] data, prev;
  int checks = 0, failures = 0;

  tyche_tanh_lut dut (.*);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    prev = '0;
    for (int k = 0; k < 1024; k++) begin
      longint e, diff;
      addr = 10'(k);
      #1;
      e = longint'($rtoi($tanh(real'(k) / 256.0) * (2.0 ** 31 - 1.0) + 0.5));
      diff = longint'(data) - e;
      checks++;
      if (diff > 1 || diff < -1) begin
        failures++;
        if (failures < 10) $display("FAIL k=%0d got %0d exp %0d", k, data, e);
      end
      if (k > 0) begin
        checks++;
        if (data < prev) begin failures++; $display("FAIL not monotonic at %0d", k); end
      end
      prev = data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
