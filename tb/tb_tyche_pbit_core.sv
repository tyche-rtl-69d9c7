// Testbench for tyche_pbit_core (NM_MAX = 8).
//   * Weight logic: random J rows, h, p-bit vectors and N_m; I_i after load_i
//     must equal clamp(I0 * (h + sum_{j<N_m} +-J), -4, +4), computed here with
//     integers, for I0 = 1 and for a second core built with I0 = 2.
//   * Activation and stochasticity: m_new must equal (tanh(I_i) > LFSR word),
//     with tanh taken from the simulator's $tanh at the table's 1/256 steps
//     (forced to +-1 for |I_i| >= 4) and the LFSR word from a model register.
//   * Statistics: for fixed I_i, the fraction of +1 results over many updates
//     must be close to (1 + tanh I_i) / 2.
module tb_tyche_pbit_core;
  import tyche_pkg::*;
  localparam int NM = 8, R = 3;
  logic clk = 0, rst_n = 0;
  logic [D-1:0] j_row [NM];
  logic [D-1:0] h_i;
  logic [NM-1:0] m;
  logic [R:0] nm;
  logic load_i = 0, seed_load = 0, lfsr_step = 0;
  logic [31:0] seed = 32'h1234_5678;
  logic m_new, m_new2;
  logic [D-1:0] i_val, i_val2;
  logic [31:0] lfsr_model;
  int checks = 0, failures = 0, n_sat = 0, n_clamp = 0;

  tyche_pbit_core #(.NM_MAX(NM)) dut (.*);
  tyche_pbit_core #(.NM_MAX(NM), .I0(24'sd8192)) dut2 (
    .clk, .rst_n, .j_row, .h_i, .m, .nm, .load_i, .seed_load, .seed, .lfsr_step,
    .m_new(m_new2), .i_val(i_val2));

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic longint clamp4(longint v);
    if (v <= -16384) return -16384;
    if (v >= 16384) return 16384;
    return v;
  endfunction

  function automatic longint tanh_ref(longint iv);
    longint a;
    a = (iv < 0) ? -iv : iv;
    if (a >= 16384) return (iv < 0) ? -longint'(32'h7FFF_FFFF) : longint'(32'h7FFF_FFFF);
    a = longint'($rtoi($tanh(real'(a >>> 4) / 256.0) * (2.0 ** 31 - 1.0) + 0.5));
    return (iv < 0) ? -a : a;
  endfunction

  function automatic logic [31:0] lfsr_next(logic [31:0] q);
    for (int n = 0; n < 32; n++) q = {q[30:0], q[31] ^ q[21] ^ q[1] ^ q[0]};
    return q;
  endfunction

  // one update: S2 (load_i) then S3 (lfsr_step); returns m_new seen in S3
  task automatic update(output logic bit_out);
    @(negedge clk); load_i = 1;
    @(negedge clk); load_i = 0; lfsr_step = 1;
    #1 bit_out = m_new;
    chk(m_new == (tanh_ref(longint'(signed'(i_val))) > longint'(signed'(lfsr_model))),
        $sformatf("m_new for I=%0d rnd=%h", signed'(i_val), lfsr_model));
    @(negedge clk); lfsr_step = 0;
    lfsr_model = lfsr_next(lfsr_model);
  endtask

  initial begin
    logic b;
    for (int j = 0; j < NM; j++) j_row[j] = '0;
    h_i = '0; m = '0; nm = 4'd1;
    #12 rst_n = 1;
    @(negedge clk); seed_load = 1; @(negedge clk); seed_load = 0;
    lfsr_model = seed;
    // random weight-logic checks
    for (int n = 0; n < 4000; n++) begin
      longint s, e1, e2;
      int nmv;
      nmv = $urandom_range(NM, 1);
      nm = (R+1)'(nmv);
      s = 0;
      for (int j = 0; j < NM; j++) begin
        j_row[j] = D'($urandom_range(12288) - 6144);   // +-1.5
        m[j] = $urandom_range(1);
        if (j < nmv) s += m[j] ? longint'(signed'(j_row[j])) : -longint'(signed'(j_row[j]));
      end
      h_i = D'($urandom_range(16384) - 8192);
      s += longint'(signed'(h_i));
      e1 = clamp4(s);
      e2 = clamp4(2 * s);
      update(b);
      chk(longint'(signed'(i_val)) == e1, $sformatf("I_i n=%0d got %0d exp %0d", n, signed'(i_val), e1));
      chk(longint'(signed'(i_val2)) == e2, $sformatf("I_i (I0=2) got %0d exp %0d", signed'(i_val2), e2));
      if (e1 == 16384 || e1 == -16384) n_clamp++;
      if (s >= 16384 || s <= -16384) n_sat++;
    end
    chk(n_clamp > 50, "clamp to +-4 exercised");
    // statistics at fixed I: only h, nm = 1 with J = 0
    for (int j = 0; j < NM; j++) j_row[j] = '0;
    nm = 4'd1;
    for (int t = 0; t < 5; t++) begin
      int ones;
      real iv, p;
      longint hv;
      hv = (t == 0) ? 0 : (t == 1) ? 2048 : (t == 2) ? -4096 : (t == 3) ? 6000 : -20000;
      h_i = D'(hv);
      ones = 0;
      for (int n = 0; n < 4000; n++) begin
        update(b);
        ones += b;
      end
      iv = real'(clamp4(hv)) / 4096.0;
      p = (1.0 + ((clamp4(hv) == -16384) ? -1.0 : $tanh(iv))) / 2.0;
      chk((real'(ones) / 4000.0 - p) < 0.03 && (p - real'(ones) / 4000.0) < 0.03,
          $sformatf("P(+1) at I=%f: %f expected %f", iv, real'(ones) / 4000.0, p));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
