// End-to-end testbench for tyche_top at its default size (NM_MAX = 64).
//
// Runs, one after the other on the same hardware:
//   1. a 1-p-bit tunable RNG (J = 0, h = 0): P(+1) must be close to 1/2;
//   2. a 2-p-bit NOT gate, 3. a 3-p-bit AND gate and 4. a 5-p-bit full adder,
//      with the coupling matrices published for these invertible gates: the
//      histogram of states seen at the end of each sample must be close (total
//      variation distance) to the Boltzmann distribution
//      P(m) ~ exp(sum_i h_i m_i + sum_{i<j} J_ij m_i m_j) computed here, and the
//      states allowed by the gate's truth table must dominate;
//   5. a 64-p-bit run using every p-bit: a random tree of strong couplings
//      (|J| = 8) plus tiny random couplings everywhere, rooted at a p-bit with a
//      strong bias; every |I_i| reaches the +-4 clamp, so the final state is
//      deterministic and is compared with a model.
// Each run checks its length, N_s*(3*N_m + 1) cycles from launch to done. The
// testbench counts how often each mechanism occurs (clamp of I_i, |I_i| >= 4
// saturation, tanh table path for positive and negative I_i, a new update order
// per sample, the S4 -> S1 sample loop, done, a write attempted during a run
// and ignored, runs with N_m < NM_MAX and N_m = NM_MAX) and fails if any never
// occurs.
module tb_tyche_top;
  import tyche_pkg::*;
  localparam int NM = 64, R = 6, NSW = 32;

  logic clk = 0, rst_n = 0;
  logic [R:0] nm = '0;
  logic [NSW-1:0] ns = '0;
  logic [31:0] seed = '0;
  logic [NM-1:0][R-1:0] pattern;
  logic j_wr_en = 0, h_wr_en = 0, start = 0;
  logic [R-1:0] j_row_addr = '0, j_col_addr = '0, h_addr = '0;
  logic [D-1:0] j_val = '0, h_val = '0;
  logic [NM-1:0] m_final;
  logic done;

  tyche_top dut (.*);

  int checks = 0, failures = 0;
  int n_clamp = 0, n_sat = 0, n_lut_pos = 0, n_lut_neg = 0, n_seq_change = 0;
  int n_loop = 0, n_done = 0, n_blocked = 0, n_partial = 0, n_full = 0;

  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (3000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 20) $display("FAIL %s", what); end
  endtask

  // ---------------- mechanism monitors ----------------
  always @(posedge clk) if (rst_n) begin
    if (dut.state == S2_WEIGHT &&
        (dut.u_core.scaled > 48'(I_LIMIT) || dut.u_core.scaled < -48'(I_LIMIT))) n_clamp++;
    if (dut.state == S3_UPDATE) begin
      if (dut.u_core.i_sat) n_sat++;
      else if (dut.u_core.i_neg) n_lut_neg++;
      else if (dut.u_core.i_val != '0) n_lut_pos++;
    end
    if (dut.state == S4_SAMPLE && dut.u_fsm.state_d == S1_GETSEQ) n_loop++;
  end

  // ---------------- host tasks ----------------
  real jm [NM][NM];   // couplings and biases of the current p-circuit, real units
  real hv [NM];

  function automatic logic [D-1:0] to_q(real v);
    return D'($rtoi(v * 4096.0 + ((v < 0) ? -0.5 : 0.5)));
  endfunction

  task automatic write_circuit(int n);
    for (int i = 0; i < n; i++) begin
      for (int j = 0; j < n; j++) begin
        @(negedge clk);
        j_wr_en = 1; j_row_addr = R'(i); j_col_addr = R'(j); j_val = to_q(jm[i][j]);
      end
      @(negedge clk);
      j_wr_en = 0; h_wr_en = 1; h_addr = R'(i); h_val = to_q(hv[i]);
    end
    @(negedge clk); h_wr_en = 0;
  endtask

  int hist [];             // states seen at the end of each sample

  // run N_s samples of an n-p-bit circuit; fills hist and checks the run length
  task automatic run(int n, int nsv, logic [31:0] sd, bit poke_write);
    int a, b, cycles, samples;
    logic [R-1:0] order [NM], prev_order [NM];
    logic [D-1:0] saved_j, saved_h;
    logic [NM-1:0] hmask;
    hmask = NM'((64'd1 << ((n > 12) ? 12 : n)) - 64'd1);
    hist = new[1 << ((n > 12) ? 12 : n)];
    foreach (hist[k]) hist[k] = 0;
    // pattern: k -> (a*k + b) mod n, a odd and coprime with n
    a = 1;
    for (int c = 3; c < 64; c += 2) if ((n % c) != 0 && c < n) begin a = c; break; end
    b = $urandom_range(n - 1);
    for (int k = 0; k < NM; k++) pattern[k] = (k < n) ? R'((a * k + b) % n) : R'(k);
    @(negedge clk);
    nm = (R+1)'(n); ns = NSW'(nsv); seed = sd; start = 1;
    if (n < NM) n_partial++; else n_full++;
    cycles = 0; samples = 0;
    saved_j = dut.u_jmem.g_bank[0].u_bank.mem[0];
    saved_h = dut.u_hmem.mem[0];
    @(posedge clk);   // launch edge
    #1;
    while (!done) begin
      @(negedge clk);
      // a write attempted during the run must be ignored
      if (poke_write && cycles == 5) begin
        j_wr_en = 1; j_row_addr = '0; j_col_addr = '0; j_val = ~saved_j;
        h_wr_en = 1; h_addr = '0; h_val = ~saved_h;
      end else begin
        j_wr_en = 0; h_wr_en = 0;
      end
      if (dut.state == S1_GETSEQ) order[dut.i_idx] = dut.p_idx;
      if (dut.state == S4_SAMPLE) begin
        begin
          int hidx;
          hidx = int'(m_final & hmask);
          hist[hidx] = hist[hidx] + 1;
        end
        if (samples > 0) begin
          bit diff;
          diff = 0;
          for (int k = 0; k < n; k++) if (order[k] != prev_order[k]) diff = 1;
          if (diff) n_seq_change++;
        end
        prev_order = order;
        samples++;
      end
      @(posedge clk);
      #1;
      cycles++;
    end
    j_wr_en = 0; h_wr_en = 0;
    n_done++;
    chk(cycles == nsv * (3 * n + 1), $sformatf("run length %0d for N_m=%0d N_s=%0d, expected %0d",
                                               cycles, n, nsv, nsv * (3 * n + 1)));
    chk(samples == nsv, "sample count");
    if (poke_write) begin
      chk(dut.u_jmem.g_bank[0].u_bank.mem[0] == saved_j && dut.u_hmem.mem[0] == saved_h,
          "write during a run ignored");
      n_blocked++;
    end
    @(negedge clk); start = 0;
    @(negedge clk);
    chk(!done, "done falls after start");
  endtask

  // compare hist with the Boltzmann distribution of the current circuit
  task automatic check_boltzmann(int n, int nsv, string name, real tv_max,
                                 int valid_mask [], real valid_min);
    real z, tv, pv, p [];
    int total;
    p = new[1 << n];
    z = 0.0;
    for (int s = 0; s < (1 << n); s++) begin
      real g;
      g = 0.0;
      for (int i = 0; i < n; i++) begin
        real mi;
        mi = s[i] ? 1.0 : -1.0;
        g += hv[i] * mi;
        for (int j = i + 1; j < n; j++) g += jm[i][j] * mi * (s[j] ? 1.0 : -1.0);
      end
      p[s] = $exp(g);
      z += p[s];
    end
    tv = 0.0; pv = 0.0; total = 0;
    for (int s = 0; s < (1 << n); s++) begin
      real e;
      e = p[s] / z;
      tv += ((real'(hist[s]) / nsv > e) ? real'(hist[s]) / nsv - e : e - real'(hist[s]) / nsv) / 2.0;
      total += hist[s];
    end
    foreach (valid_mask[k]) pv += real'(hist[valid_mask[k]]) / nsv;
    $display("%s: N_s=%0d total variation %f, valid states %f", name, nsv, tv, pv);
    chk(total == nsv, {name, " histogram total"});
    chk(tv < tv_max, $sformatf("%s distribution off: TV %f", name, tv));
    chk(pv > valid_min, $sformatf("%s valid fraction %f", name, pv));
  endtask

  task automatic clear_circuit(int n);
    for (int i = 0; i < n; i++) begin
      hv[i] = 0.0;
      for (int j = 0; j < n; j++) jm[i][j] = 0.0;
    end
  endtask

  initial begin
    int valid [];
    #12 rst_n = 1;
    for (int k = 0; k < NM; k++) pattern[k] = R'(k);

    // ---- 1. tunable RNG, 1 p-bit ----
    clear_circuit(1);
    write_circuit(1);
    run(1, 20000, 32'h1F2E_3D4C, 0);
    $display("RNG: P(+1) = %f", real'(hist[1]) / 20000.0);
    chk(hist[1] > 9600 && hist[1] < 10400, "RNG balanced");

    // ---- 2. NOT gate, 2 p-bits ----
    clear_circuit(2);
    jm[0][1] = -1; jm[1][0] = -1;
    write_circuit(2);
    run(2, 20000, 32'hDEAD_BEEF, 0);
    valid = '{1, 2};
    check_boltzmann(2, 20000, "NOT", 0.02, valid, 0.80);

    // ---- 3. AND gate, 3 p-bits (A, B, C = A AND B) ----
    clear_circuit(3);
    jm[0][1] = -1; jm[0][2] = 2;
    jm[1][0] = -1; jm[1][2] = 2; jm[2][0] = 2; jm[2][1] = 2;
    hv[0] = 1; hv[1] = 1; hv[2] = -2;
    write_circuit(3);
    run(3, 20000, 32'h0BAD_F00D, 1);
    valid = '{0, 2, 1, 7};   // (A,B,C) = 000, 010, 100, 111 with A in bit 0
    check_boltzmann(3, 20000, "AND", 0.02, valid, 0.90);

    // ---- 4. full adder, 5 p-bits (A, B, Cin, S, Cout) ----
    clear_circuit(5);
    begin
      int jf [5][5] = '{'{0, -1, -1, 1, 2}, '{-1, 0, -1, 1, 2}, '{-1, -1, 0, 1, 2},
                        '{1, 1, 1, 0, -2}, '{2, 2, 2, -2, 0}};
      for (int i = 0; i < 5; i++) for (int j = 0; j < 5; j++) jm[i][j] = real'(jf[i][j]);
    end
    write_circuit(5);
    run(5, 40000, 32'h7777_1234, 0);
    valid = new[8];
    for (int v = 0; v < 8; v++) begin
      int aa, bb, cc, ss, co;
      aa = v & 1; bb = (v >> 1) & 1; cc = (v >> 2) & 1;
      ss = aa ^ bb ^ cc; co = (aa + bb + cc) >= 2;
      valid[v] = aa | (bb << 1) | (cc << 2) | (ss << 3) | (co << 4);
    end
    check_boltzmann(5, 40000, "FA", 0.035, valid, 0.70);

    // ---- 5. all 64 p-bits: deterministic strong-coupling tree ----
    begin
      int ord [NM], par [NM], sg [NM];
      logic [NM-1:0] expect_m;
      for (int k = 0; k < NM; k++) ord[k] = k;
      for (int k = NM - 1; k > 0; k--) begin
        int r, t;
        r = $urandom_range(k); t = ord[k]; ord[k] = ord[r]; ord[r] = t;
      end
      clear_circuit(NM);
      for (int i = 0; i < NM; i++)
        for (int j = 0; j < NM; j++)
          if (i != j) jm[i][j] = real'(int'($urandom_range(80)) - 40) / 4096.0;   // about +-0.01
      sg[ord[0]] = $urandom_range(1) ? 1 : -1;
      hv[ord[0]] = 8.0 * sg[ord[0]];
      expect_m[ord[0]] = (sg[ord[0]] > 0);
      for (int k = 1; k < NM; k++) begin
        int p, s;
        p = ord[$urandom_range(k - 1)];
        s = $urandom_range(1) ? 1 : -1;
        jm[ord[k]][p] = 8.0 * s;
        expect_m[ord[k]] = (s > 0) ? expect_m[p] : !expect_m[p];
      end
      write_circuit(NM);
      run(NM, 80, 32'hC0FF_EE11, 0);
      chk(m_final == expect_m, $sformatf("64-p-bit tree final state %h expected %h", m_final, expect_m));
    end

    // ---- every mechanism must have occurred ----
    $display("mechanisms: clamp=%0d sat=%0d lut+=%0d lut-=%0d new_order=%0d loop=%0d done=%0d blocked_write=%0d partial=%0d full=%0d",
             n_clamp, n_sat, n_lut_pos, n_lut_neg, n_seq_change, n_loop, n_done, n_blocked, n_partial, n_full);
    chk(n_clamp > 0, "clamp of I_i never happened");
    chk(n_sat > 0, "|I_i| >= 4 saturation never happened");
    chk(n_lut_pos > 0, "tanh table path (I_i > 0) never used");
    chk(n_lut_neg > 0, "tanh table path (I_i < 0) never used");
    chk(n_seq_change > 0, "update order never changed");
    chk(n_loop > 0, "sample loop never taken");
    chk(n_done == 5, "done count");
    chk(n_blocked > 0, "write during run never tried");
    chk(n_partial > 0 && n_full > 0, "N_m < NM_MAX and N_m = NM_MAX runs");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
