// Testbench for tyche_input_config: drives random configuration and run-time
// inputs and compares bank enables, addresses and h write enable with a model
// of the decoding rules (column -> bank, row -> word, p-bit index while running).
module tb_tyche_input_config;
  localparam int NM = 64, D = 24, R = 6;
  logic cfg_en, j_wr_en, h_wr_en;
  logic [R-1:0] j_row_addr, j_col_addr, h_addr, p_idx;
  logic [D-1:0] j_val, h_val;
  logic [NM-1:0] j_bank_we;
  logic [R-1:0] j_ram_addr, h_ram_addr;
  logic [D-1:0] j_ram_wdata, h_ram_wdata;
  logic h_we;
  int checks = 0, failures = 0;

  tyche_input_config #(.NM_MAX(NM)) dut (.*);

  task automatic chk(logic [127:0] got, logic [127:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 5000; n++) begin
      logic [NM-1:0] exp_we;
      cfg_en = $urandom_range(1); j_wr_en = $urandom_range(1); h_wr_en = $urandom_range(1);
      j_row_addr = R'($urandom); j_col_addr = R'($urandom); h_addr = R'($urandom);
      p_idx = R'($urandom); j_val = D'($urandom); h_val = D'($urandom);
      #1;
      exp_we = '0;
      if (cfg_en && j_wr_en) exp_we = NM'(1) << j_col_addr;
      chk(128'(j_bank_we), 128'(exp_we), "j_bank_we");
      chk(128'(j_ram_addr), 128'(cfg_en ? j_row_addr : p_idx), "j_ram_addr");
      chk(128'(h_ram_addr), 128'(cfg_en ? h_addr : p_idx), "h_ram_addr");
      chk(128'(h_we), 128'(cfg_en && h_wr_en), "h_we");
      chk(128'(j_ram_wdata), 128'(j_val), "j wdata");
      chk(128'(h_ram_wdata), 128'(h_val), "h wdata");
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
