// Testbench for tyche_m_reg: random single-bit writes and clears against a
// model register; also checks reset to all -1 (zeros) and clear priority.
module tb_tyche_m_reg;
  localparam int NM = 64, R = 6;
  logic clk = 0, rst_n = 0, clr = 0, we = 0, d = 0;
  logic [R-1:0] idx = '0;
  logic [NM-1:0] m, model;
  int checks = 0, failures = 0;

  tyche_m_reg #(.NM_MAX(NM)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #12 rst_n = 1;
    model = '0;
    checks++; if (m !== '0) begin failures++; $display("FAIL reset"); end
    for (int n = 0; n < 5000; n++) begin
      @(negedge clk);
      clr = ($urandom_range(99) == 0); we = $urandom_range(1); idx = R'($urandom); d = $urandom_range(1);
      if (clr) model = '0; else if (we) model[idx] = d;
      @(posedge clk); #1;
      checks++;
      if (m !== model) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d got %h exp %h", n, m, model);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
