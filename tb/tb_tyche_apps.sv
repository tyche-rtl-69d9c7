// Application testbench: 8-bit integer factorization, 6-node max-cut and
// 4-city travelling salesman on tyche_top at its default size (NM_MAX = 64).
//
// Factorization runs a 4-bit x 4-bit array multiplier backwards. The p-circuit
// is built here by adding up gate p-circuits that share p-bits: 16 AND gates
// form the partial products and 12 full adders (4 of them half adders, made from
// a full adder whose carry-in p-bit is pinned to 0) sum them. p-bits 0..3 hold
// the first factor A, 4..7 the second factor B, 8..43 the 36 internal p-bits
// and 44..51 the product P; 52 p-bits in all. The product is pinned to 143 with
// strong biases (h = +-16), and the histogram of (A, B) seen at the end of each
// sample must peak at 11 x 13 and 13 x 11. The gate couplings are scaled by
// 1.25 (the same as running with I0 = 1.25): at 1.0 the sampler spends about as
// much time in near-solutions with one violated adder (such as 9 x 15 = 135)
// as in the two factorizations, at 2.0 it freezes in such a near-solution.
//
// Max-cut runs a weighted 6-node graph with J = -w (opposite p-bits on a heavy
// edge are favoured); the most frequent state must be a maximum cut, found here
// by trying all 2^6 partitions.
//
// The travelling salesman problem uses 16 p-bits x(c,t) = "city c is visited
// at step t" and the usual penalty form
//   H = A sum_c (1 - sum_t x(c,t))^2 + A sum_t (1 - sum_c x(c,t))^2
//       + B sum_{c != c'} d(c,c') sum_t x(c,t) x(c',t+1 mod 4),
// turned into J and h through x = (1 + m)/2 and P ~ exp(-H). Four cities on a
// square (sides 1, diagonals 2) have one shortest tour, length 4; the most
// frequent state must be one of its 8 encodings, and the shortest tour must be
// sampled more often than the two longer ones together.
module tb_tyche_apps;
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
  always #5 clk = ~clk;
  initial begin : watchdog
    repeat (20000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  real jm [NM][NM];
  real hv [NM];

  task automatic clear_circuit();
    for (int i = 0; i < NM; i++) begin
      hv[i] = 0.0;
      for (int j = 0; j < NM; j++) jm[i][j] = 0.0;
    end
  endtask

  real gain = 1.0;   // scale applied to the gate p-circuits

  task automatic couple(int a, int b, real w);
    jm[a][b] += gain * w;
    jm[b][a] += gain * w;
  endtask

  // AND gate p-circuit on p-bits (a, b, c = a AND b)
  task automatic add_and(int a, int b, int c);
    couple(a, b, -1); couple(a, c, 2); couple(b, c, 2);
    hv[a] += gain; hv[b] += gain; hv[c] += -2.0 * gain;
  endtask

  // full adder p-circuit on p-bits (a, b, cin, s, cout)
  task automatic add_fa(int a, int b, int ci, int s, int co);
    couple(a, b, -1); couple(a, ci, -1); couple(b, ci, -1);
    couple(a, s, 1); couple(b, s, 1); couple(ci, s, 1);
    couple(a, co, 2); couple(b, co, 2); couple(ci, co, 2);
    couple(s, co, -2);
  endtask

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

  // run and histogram the low `bits` bits of a mapped state at each sample end
  int hist [];
  task automatic run(int n, int nsv, logic [31:0] sd, int a_mul, int bits);
    int cycles;
    hist = new[1 << bits];
    foreach (hist[k]) hist[k] = 0;
    for (int k = 0; k < NM; k++) pattern[k] = (k < n) ? R'((a_mul * k + 1) % n) : R'(k);
    @(negedge clk);
    nm = (R+1)'(n); ns = NSW'(nsv); seed = sd; start = 1;
    @(posedge clk); #1;
    cycles = 0;
    while (!done) begin
      if (dut.state == S4_SAMPLE) begin
        int key;
        key = int'(m_final & ((64'd1 << bits) - 64'd1));
        hist[key] = hist[key] + 1;
      end
      @(posedge clk); #1;
      cycles++;
    end
    chk(cycles == nsv * (3 * n + 1), $sformatf("run length %0d, expected %0d", cycles, nsv * (3 * n + 1)));
    @(negedge clk); start = 0;
    @(negedge clk);
  endtask

  // is state s (bit 4*c+t = city c at step t) a tour, and how long is it
  task automatic tour_len(int s, real dmat [4][4], output bit ok, output int len);
    int city_at [4];
    real l;
    ok = 1;
    for (int t = 0; t < 4; t++) begin
      int cnt;
      cnt = 0;
      for (int c = 0; c < 4; c++) if (s[4*c+t]) begin cnt++; city_at[t] = c; end
      if (cnt != 1) ok = 0;
    end
    for (int c = 0; c < 4; c++) if (((s >> (4*c)) & 15) == 0 || $countones((s >> (4*c)) & 15) != 1) ok = 0;
    l = 0.0;
    if (ok) for (int t = 0; t < 4; t++) l += dmat[city_at[t]][city_at[(t + 1) % 4]];
    len = $rtoi(l);
  endtask

  initial begin
    #12 rst_n = 1;

    // ================= 8-bit factorization of 143 =================
    begin
      int pp [4][4];     // pp[i][j] = a[j] AND b[i]
      int nxt, prod [8], x [4], best, second, bestv, secondv;
      localparam int TARGET = 143;
      clear_circuit();
      gain = 1.25;
      nxt = 8;
      for (int i = 0; i < 4; i++)
        for (int j = 0; j < 4; j++)
          if (i == 0 && j == 0) pp[i][j] = 44;           // P0 itself
          else begin pp[i][j] = nxt; nxt++; end
      for (int k = 0; k < 8; k++) prod[k] = 44 + k;
      for (int i = 0; i < 4; i++) for (int j = 0; j < 4; j++) add_and(j, 4 + i, pp[i][j]);
      // running sum bits above the finished product bits; -1 = constant 0
      x[0] = pp[0][1]; x[1] = pp[0][2]; x[2] = pp[0][3]; x[3] = -1;
      for (int i = 1; i < 4; i++) begin
        int carry, s [4], co, zero;
        for (int k = 0; k < 4; k++) begin
          int cin, xin;
          // carry-in: pinned-zero p-bit for the lowest position (half adder)
          if (k == 0) begin zero = nxt; nxt++; hv[zero] = -16; cin = zero; end
          else cin = carry;
          if (x[k] < 0) begin      // no running-sum bit: half adder of y and carry
            zero = nxt; nxt++; hv[zero] = -16; xin = zero;
          end else xin = x[k];
          s[k] = (k == 0) ? prod[i] : (i == 3) ? prod[i + k] : nxt;
          if (!(k == 0) && !(i == 3)) nxt++;
          co = (k == 3) ? ((i == 3) ? prod[7] : nxt) : nxt;
          if (!(k == 3 && i == 3)) nxt++;
          add_fa(xin, pp[i][k], cin, s[k], co);
          carry = co;
        end
        x[0] = s[1]; x[1] = s[2]; x[2] = s[3]; x[3] = carry;
      end
      $display("factorization p-circuit: %0d internal p-bits (8..%0d)", nxt - 8, nxt - 1);
      chk(nxt == 44, "36 internal p-bits, 52 in all");
      for (int k = 0; k < 8; k++) hv[prod[k]] += ((TARGET >> k) & 1) ? 16.0 : -16.0;
      write_circuit(52);
      run(52, 20000, 32'h5EED_1234, 3, 8);
      best = 0; second = 0; bestv = -1; secondv = -1;
      for (int k = 0; k < 256; k++)
        if (hist[k] > bestv) begin second = best; secondv = bestv; best = k; bestv = hist[k]; end
        else if (hist[k] > secondv) begin second = k; secondv = hist[k]; end
      for (int r = 0; r < 6; r++) begin
        int bk, bv;
        bk = 0; bv = -1;
        for (int k = 0; k < 256; k++) if (hist[k] > bv) begin bk = k; bv = hist[k]; end
        $display("  rank %0d: A=%0d B=%0d count %0d", r, bk & 15, bk >> 4, bv);
        hist[bk] = -hist[bk] - 1;
      end
      for (int k = 0; k < 256; k++) if (hist[k] < 0) hist[k] = -hist[k] - 1;
      $display("factor 143: most frequent A=%0d B=%0d (%0d), next A=%0d B=%0d (%0d) of 20000",
               best & 15, best >> 4, bestv, second & 15, second >> 4, secondv);
      chk(((best & 15) * (best >> 4)) == TARGET, "most frequent (A,B) multiplies to 143");
      chk(((second & 15) * (second >> 4)) == TARGET, "second most frequent (A,B) multiplies to 143");
    end

    // ================= 6-node weighted max-cut =================
    begin
      int w [6][6];
      int best_cut, top, topv, cut;
      for (int i = 0; i < 6; i++) for (int j = 0; j < 6; j++) w[i][j] = 0;
      w[0][1] = 3; w[0][2] = 1; w[1][2] = 2; w[1][3] = 1; w[2][4] = 3;
      w[3][4] = 2; w[3][5] = 3; w[4][5] = 1; w[0][5] = 2;
      clear_circuit();
      for (int i = 0; i < 6; i++) for (int j = i + 1; j < 6; j++) if (w[i][j] != 0) couple(i, j, -real'(w[i][j]));
      write_circuit(6);
      run(6, 20000, 32'hA5A5_0101, 5, 6);
      best_cut = 0;
      for (int s = 0; s < 64; s++) begin
        cut = 0;
        for (int i = 0; i < 6; i++) for (int j = i + 1; j < 6; j++) if (s[i] != s[j]) cut += w[i][j];
        if (cut > best_cut) best_cut = cut;
      end
      top = 0; topv = -1;
      for (int s = 0; s < 64; s++) if (hist[s] > topv) begin top = s; topv = hist[s]; end
      cut = 0;
      for (int i = 0; i < 6; i++) for (int j = i + 1; j < 6; j++) if (top[i] != top[j]) cut += w[i][j];
      $display("max-cut: most frequent partition %b cuts %0d, maximum %0d", 6'(top), cut, best_cut);
      chk(cut == best_cut, "most frequent partition is a maximum cut");
    end


    // ================= 4-city travelling salesman =================
    begin
      real dmat [4][4], q [16][16], lin [16];
      real pen, wgt;
      int top, topv, opt_cnt, other_cnt, topvalid, toplen;
      pen = 3.0; wgt = 1.0;
      for (int a = 0; a < 4; a++) for (int b = 0; b < 4; b++)
        dmat[a][b] = (a == b) ? 0.0 : (((a - b + 4) % 2) == 1) ? 1.0 : 2.0;
      for (int i = 0; i < 16; i++) begin
        lin[i] = 0.0;
        for (int j = 0; j < 16; j++) q[i][j] = 0.0;
      end
      // QUBO: H = sum_{i<j} q[i][j] x_i x_j + sum_i lin[i] x_i (+ const); index = 4*c + t
      for (int c = 0; c < 4; c++)
        for (int t = 0; t < 4; t++) begin
          // (1 - sum x)^2 = 1 - sum x + 2 sum_{pairs} x x, as x^2 = x; each x is in two constraints
          lin[4*c+t] += -2.0 * pen;
          for (int u = t + 1; u < 4; u++) q[4*c+t][4*c+u] += 2.0 * pen;   // same city, two steps
          for (int d = c + 1; d < 4; d++) q[4*c+t][4*d+t] += 2.0 * pen;   // same step, two cities
          for (int d = 0; d < 4; d++) if (d != c) begin
            int i, j;
            i = 4*c + t; j = 4*d + ((t + 1) % 4);
            if (i < j) q[i][j] += wgt * dmat[c][d]; else q[j][i] += wgt * dmat[c][d];
          end
        end
      // Ising form with P ~ exp(-H): J_ij = -q_ij/4, h_i = -(lin_i/2 + sum_j q_ij/4)
      clear_circuit();
      for (int i = 0; i < 16; i++) begin
        real f;
        f = lin[i] / 2.0;
        for (int j = 0; j < 16; j++) begin
          real qq;
          qq = (i < j) ? q[i][j] : q[j][i];
          if (i != j) begin
            f += qq / 4.0;
            jm[i][j] = -qq / 4.0;
          end
        end
        hv[i] = -f;
      end
      write_circuit(16);
      run(16, 20000, 32'h0D15_7A9C, 5, 16);
      top = 0; topv = -1; opt_cnt = 0; other_cnt = 0;
      for (int s = 0; s < 65536; s++) begin
        int len;
        bit ok;
        tour_len(s, dmat, ok, len);
        if (ok && len == 4) opt_cnt += hist[s];
        if (ok && len != 4) other_cnt += hist[s];
        if (hist[s] > topv) begin top = s; topv = hist[s]; end
      end
      tour_len(top, dmat, topvalid, toplen);
      $display("TSP: most frequent state %h (valid %0d, length %0d); shortest tour %0d, longer tours %0d of 20000",
               16'(top), topvalid, toplen, opt_cnt, other_cnt);
      chk(topvalid && toplen == 4, "most frequent TSP state is the shortest tour");
      chk(opt_cnt > other_cnt, "shortest tour sampled more than the longer ones");
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
