// Testbench for tyche_seq_reg: loads random permutations, steps the register
// and compares it with P^n computed in the testbench; checks every order is a
// permutation and that the order changes from sample to sample.
module tb_tyche_seq_reg;
  localparam int NM = 8, R = 3;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [NM-1:0][R-1:0] pattern, seq;
  int model [NM];
  int checks = 0, failures = 0, changes = 0;

  tyche_seq_reg #(.NM_MAX(NM)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    int p [NM];
    #12 rst_n = 1;
    for (int k = 0; k < NM; k++) chk(seq[k] == R'(k), "reset order is identity");
    for (int trial = 0; trial < 20; trial++) begin
      // random permutation by Fisher-Yates
      for (int k = 0; k < NM; k++) p[k] = k;
      for (int k = NM - 1; k > 0; k--) begin
        int r, t;
        r = $urandom_range(k); t = p[k]; p[k] = p[r]; p[r] = t;
      end
      @(negedge clk);
      for (int k = 0; k < NM; k++) pattern[k] = R'(p[k]);
      load = 1;
      @(negedge clk); load = 0;
      for (int k = 0; k < NM; k++) model[k] = p[k];
      for (int s = 0; s < 12; s++) begin
        logic [NM-1:0] seen;
        logic [NM-1:0][R-1:0] prev_seq;
        seen = '0;
        for (int k = 0; k < NM; k++) begin
          chk(seq[k] == R'(model[k]), $sformatf("trial %0d sample %0d entry %0d", trial, s, k));
          seen[seq[k]] = 1'b1;
        end
        chk(seen == '1, "order is a permutation");
        prev_seq = seq;
        step = 1; @(negedge clk); step = 0;
        for (int k = 0; k < NM; k++) model[k] = p[model[k]];
        if (seq != prev_seq) changes++;
      end
    end
    chk(changes > 0, "order changes between samples");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
