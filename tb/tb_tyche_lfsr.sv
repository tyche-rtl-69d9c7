// Testbench for tyche_lfsr: checks that every step advances the register by 32
// shifts of the recurrence of x^32 + x^22 + x^2 + x + 1 on the output bit stream
// (each new bit is the XOR of the bits 32, 22, 2 and 1 places back), the seed load, zero-seed replacement,
// hold without step, that no state repeats within 200000 steps, and that the
// signed output is balanced around zero.
module tb_tyche_lfsr;
  logic clk = 0, rst_n = 0, load = 0, step = 0;
  logic [31:0] seed = '0, q;
  int checks = 0, failures = 0;

  tyche_lfsr dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (300000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  bit stream [$];
  initial begin
    logic [31:0] first, held;
    int neg;
    #12 rst_n = 1;
    @(negedge clk); load = 1; seed = 32'h0;
    @(negedge clk); load = 0;
    chk(q == 32'h1, "zero seed replaced by 1");
    @(negedge clk); load = 1; seed = 32'hACE1_2345;
    @(negedge clk); load = 0;
    chk(q == 32'hACE1_2345, "seed load");
    held = q;
    repeat (3) @(negedge clk);
    chk(q == held, "hold without step");
    // bit stream of the register, oldest bit first
    first = q;
    for (int i = 31; i >= 0; i--) stream.push_back(q[i]);
    neg = 0;
    step = 1;
    for (int n = 0; n < 200000; n++) begin
      @(negedge clk);
      if (n < 5000) begin
        logic [31:0] exp_q;
        // 32 new bits of the recurrence per step
        for (int b = 0; b < 32; b++) begin
          bit fb;
          fb = stream[stream.size()-32] ^ stream[stream.size()-22] ^ stream[stream.size()-2] ^ stream[stream.size()-1];
          stream.push_back(fb);
        end
        for (int b = 0; b < 32; b++) exp_q[b] = stream[stream.size()-1-b];
        chk(q == exp_q, $sformatf("step %0d: got %h expected %h", n, q, exp_q));
      end
      if (q[31]) neg++;
      if (q == first) chk(0, "period shorter than 200000");
    end
    chk(q != '0, "never locks at zero");
    chk(neg > 98000 && neg < 102000, $sformatf("sign balance %0d", neg));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
