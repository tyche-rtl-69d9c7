// Testbench for tyche_addsub_tree: random J rows, p-bit vectors and column
// enables at NM_MAX = 64 and at a non-power-of-two NM_MAX = 5; the expected sum
// is computed with integer arithmetic (add J where m = +1, subtract where m = -1)
// and wrapped to D bits.
module tb_tyche_addsub_tree;
  localparam int D = 24;
  localparam int NA = 64, NB = 5;
  logic [D-1:0] ja [NA];
  logic [NA-1:0] ma, ena;
  logic [D-1:0] suma;
  logic [D-1:0] jb [NB];
  logic [NB-1:0] mb, enb;
  logic [D-1:0] sumb;
  int checks = 0, failures = 0;

  tyche_addsub_tree #(.NM_MAX(NA)) dut_a (.j_row(ja), .m(ma), .en(ena), .sum(suma));
  tyche_addsub_tree #(.NM_MAX(NB)) dut_b (.j_row(jb), .m(mb), .en(enb), .sum(sumb));

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [D-1:0] rand_j(int mode);
    // small values most of the time, full-range values to exercise wrap-around
    if (mode == 0) return D'($urandom_range(16383) - 8192);
    return D'($urandom);
  endfunction

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint ea, eb;
      int mode;
      mode = (n % 5 == 4) ? 1 : 0;
      ea = 0; eb = 0;
      for (int j = 0; j < NA; j++) begin
        ja[j] = rand_j(mode); ma[j] = $urandom_range(1);
        ena[j] = (n < 1000) ? 1'b1 : 1'($urandom_range(1));
        if (ena[j]) ea += ma[j] ? longint'(signed'(ja[j])) : -longint'(signed'(ja[j]));
      end
      for (int j = 0; j < NB; j++) begin
        jb[j] = rand_j(mode); mb[j] = $urandom_range(1);
        enb[j] = (n < 1000) ? 1'b1 : 1'($urandom_range(1));
        if (enb[j]) eb += mb[j] ? longint'(signed'(jb[j])) : -longint'(signed'(jb[j]));
      end
      #1;
      checks += 2;
      if (suma !== D'(ea)) begin failures++; if (failures < 10) $display("FAIL A n=%0d got %h exp %h", n, suma, D'(ea)); end
      if (sumb !== D'(eb)) begin failures++; if (failures < 10) $display("FAIL B n=%0d got %h exp %h", n, sumb, D'(eb)); end
      #1;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
