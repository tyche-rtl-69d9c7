// Testbench for tyche_sp_ram: writes random words, reads them back and checks
// the one-cycle read latency and read-first behaviour against a model array.
module tb_tyche_sp_ram;
  localparam int W = 24, DEP = 64, AW = 6;
  logic clk = 0, we = 0;
  logic [AW-1:0] addr = '0;
  logic [W-1:0] wdata = '0, rdata;
  logic [W-1:0] model [DEP];
  int checks = 0, failures = 0;

  tyche_sp_ram #(.WIDTH(W), .DEPTH(DEP)) dut (.*);

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(logic [W-1:0] got, logic [W-1:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    // fill every word
    for (int a = 0; a < DEP; a++) begin
      @(negedge clk); we = 1; addr = AW'(a); wdata = W'($urandom); model[a] = wdata;
    end
    @(negedge clk); we = 0;
    // read back every word, data appears after one edge
    for (int a = 0; a < DEP; a++) begin
      @(negedge clk); addr = AW'(a);
      @(negedge clk); check(rdata, model[a], $sformatf("read %0d", a));
    end
    // random mix of reads and writes; a write returns the old word
    for (int n = 0; n < 2000; n++) begin
      logic [W-1:0] old;
      @(negedge clk);
      addr = AW'($urandom_range(DEP-1)); we = $urandom_range(1); wdata = W'($urandom);
      old = model[addr];
      if (we) model[addr] = wdata;
      @(negedge clk); check(rdata, old, "mixed");
      we = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
