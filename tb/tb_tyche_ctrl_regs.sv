// Testbench for tyche_ctrl_regs: checks that N_m and N_s are latched only on
// launch, that p_idx returns entry i_idx of the pattern after launch and of
// P^2 after one next_seq.
module tb_tyche_ctrl_regs;
  localparam int NM = 8, R = 3, NSW = 32;
  logic clk = 0, rst_n = 0, launch = 0, next_seq = 0;
  logic [R:0] nm_in = '0, nm;
  logic [NSW-1:0] ns_in = '0, ns;
  logic [NM-1:0][R-1:0] pattern;
  logic [R-1:0] i_idx = '0, p_idx;
  int checks = 0, failures = 0;

  tyche_ctrl_regs #(.NM_MAX(NM)) dut (.*);

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
    for (int trial = 0; trial < 50; trial++) begin
      int nmv, nsv;
      for (int k = 0; k < NM; k++) p[k] = (k * 3 + trial) % NM;   // 3 is coprime with 8
      nmv = $urandom_range(NM, 1); nsv = $urandom_range(10000);
      @(negedge clk);
      for (int k = 0; k < NM; k++) pattern[k] = R'(p[k]);
      nm_in = (R+1)'(nmv); ns_in = NSW'(nsv); launch = 1;
      @(negedge clk); launch = 0;
      nm_in = '0; ns_in = '1;   // inputs may change during a run
      @(negedge clk);
      chk(nm == (R+1)'(nmv), "nm latched");
      chk(ns == NSW'(nsv), "ns latched");
      for (int k = 0; k < NM; k++) begin
        i_idx = R'(k); #1;
        chk(p_idx == R'(p[k]), "p_idx sample 1");
      end
      @(negedge clk); next_seq = 1; @(negedge clk); next_seq = 0;
      for (int k = 0; k < NM; k++) begin
        i_idx = R'(k); #1;
        chk(p_idx == R'(p[p[k]]), "p_idx sample 2");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
