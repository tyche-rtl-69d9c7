// Testbench for tyche_j_mem: writes J(i,j) through one-hot bank enables (bank =
// column j, word = row i) and checks that one read of address i returns the
// whole row i in the next cycle.
module tb_tyche_j_mem;
  localparam int NM = 64, D = 24, R = 6;
  logic clk = 0;
  logic [NM-1:0] bank_we = '0;
  logic [R-1:0] addr = '0;
  logic [D-1:0] wdata = '0;
  logic [D-1:0] row [NM];
  logic [D-1:0] model [NM][NM];
  int checks = 0, failures = 0;

  tyche_j_mem #(.NM_MAX(NM)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < NM; i++)
      for (int j = 0; j < NM; j++) begin
        @(negedge clk);
        bank_we = '0; bank_we[j] = 1'b1; addr = R'(i); wdata = D'($urandom);
        model[i][j] = wdata;
      end
    @(negedge clk); bank_we = '0;
    for (int n = 0; n < 3; n++)
      for (int i = 0; i < NM; i++) begin
        int ii;
        ii = (n == 0) ? i : $urandom_range(NM-1);
        @(negedge clk); addr = R'(ii);
        @(negedge clk);
        for (int j = 0; j < NM; j++) begin
          checks++;
          if (row[j] !== model[ii][j]) begin
            failures++;
            if (failures < 10) $display("FAIL J(%0d,%0d) got %h exp %h", ii, j, row[j], model[ii][j]);
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
