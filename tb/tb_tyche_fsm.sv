// Testbench for tyche_fsm: for random N_m and N_s it follows the state trace
// cycle by cycle against the expected order (S1 S2 S3 repeated N_m times, then
// S4, all N_s times, then S5), checks i_idx in each update, the number of
// next_seq pulses, the run length N_s*(3*N_m + 1) cycles and the return to S0
// when start falls.
module tb_tyche_fsm;
  import tyche_pkg::*;
  localparam int NM = 8, R = 3, NSW = 32;
  logic clk = 0, rst_n = 0, start = 0;
  logic [R:0] nm = '0;
  logic [NSW-1:0] ns = '0;
  state_t state;
  logic [R-1:0] i_idx;
  logic launch, next_seq, done;
  int checks = 0, failures = 0;

  tyche_fsm #(.NM_MAX(NM)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    #12 rst_n = 1;
    for (int trial = 0; trial < 40; trial++) begin
      int nmv, nsv, nrun, cycles, seqs;
      nmv = $urandom_range(NM, 1);
      nsv = (trial == 0) ? 0 : $urandom_range(6, 1);
      nrun = (nsv == 0) ? 1 : nsv;
      @(negedge clk);
      chk(state == S0_CONFIG, "idle in S0");
      chk(!done, "done low in S0");
      nm = (R+1)'(nmv); ns = NSW'(nsv);   // the control registers would latch these
      start = 1;
      #1 chk(launch, "launch while S0 and start");
      cycles = 0; seqs = 0;
      for (int s = 0; s < nrun; s++) begin
        for (int i = 0; i < nmv; i++) begin
          @(negedge clk); cycles++;
          chk(state == S1_GETSEQ, $sformatf("S1 s=%0d i=%0d got %s", s, i, state.name()));
          chk(i_idx == R'(i), "i_idx");
          @(negedge clk); cycles++;
          chk(state == S2_WEIGHT, "S2");
          @(negedge clk); cycles++;
          chk(state == S3_UPDATE, "S3");
          chk(i_idx == R'(i), "i_idx in S3");
        end
        @(negedge clk); cycles++;
        chk(state == S4_SAMPLE, "S4");
        if (next_seq) seqs++;
      end
      @(negedge clk);
      chk(state == S5_DONE && done, "S5 and done");
      chk(cycles == nrun * (3 * nmv + 1), $sformatf("run length %0d", cycles));
      chk(seqs == nrun, "one next_seq per sample");
      repeat (2) @(negedge clk);
      chk(done, "done held while start high");
      start = 0;
      @(negedge clk);
      chk(state == S0_CONFIG && !done, "back to S0 when start falls");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
