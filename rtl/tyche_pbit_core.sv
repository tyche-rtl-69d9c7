// The single p-bit core: computes the new state of one p-bit per update.
//
// For the p-bit i being updated it evaluates
//     I_i = I0 * (h_i + sum_j J(i,j) * m_j)
//     m_i = sgn(rand(-1,+1) + tanh(I_i))
// in two clock cycles, matching states S2 and S3 of the controller:
//   S2 (load_i = 1): the logarithmic adder-subtractor tree forms sum_j J(i,j)m_j
//     from the J row and the p-bit vector, a D-bit adder adds h_i, the result is
//     multiplied by the constant I0, clamped to [-4, +4] and stored in the I_i
//     register.
//   S3 (combinational, lfsr_step = 1): |I_i| addresses the 1024-entry tanh
//     table; if |I_i| >= 4 the value is forced to +1 (or -1); for negative I_i
//     the table value is negated; the 32-bit result is compared with the LFSR
//     word and m_new = 1 (p-bit +1) when tanh(I_i) exceeds it. The LFSR then
//     steps once.
// Since the LFSR word is uniform over [-1, +1), P(m_new = +1) = (1 + tanh I_i)/2,
// which is the distribution of sgn(rand + tanh I_i).
//
// The structure (tree, h adder, I0 multiplier, clamp, I_i register, tanh LUT,
// threshold and sign multiplexers, 32-bit LFSR, comparator) is the original
// design's. This design's own choices: columns j >= nm are masked out of the sum;
// the I0 product keeps its full 2D bits until after the clamp; the Q0.31 tanh
// format; the comparator's sense.
module tyche_pbit_core
  import tyche_pkg::*;
#(
  parameter int unsigned       NM_MAX = 64,
  parameter logic signed [D-1:0] I0   = ONE_Q,
  parameter int unsigned       R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [D-1:0]         j_row [NM_MAX],
  input  logic [D-1:0]         h_i,
  input  logic [NM_MAX-1:0]    m,
  input  logic [R:0]           nm,
  input  logic                 load_i,
  input  logic                 seed_load,
  input  logic [TANH_W-1:0]    seed,
  input  logic                 lfsr_step,
  output logic                 m_new,
  output logic [D-1:0]         i_val
);

  // ---------------- weight logic (S2) ----------------
  logic [NM_MAX-1:0] col_en;
  always_comb
    for (int j = 0; j < NM_MAX; j++) col_en[j] = (32'(j) < 32'(nm));

  logic [D-1:0] jm_sum;
  tyche_addsub_tree #(.NM_MAX(NM_MAX), .D(D)) u_tree (
    .j_row (j_row),
    .m     (m),
    .en    (col_en),
    .sum   (jm_sum)
  );

  logic signed [D-1:0]   w_sum;     // h_i + sum_j J m
  logic signed [2*D-1:0] scaled;    // I0 * w_sum, Q11.12 after the shift
  logic signed [D-1:0]   i_clamped;

  always_comb begin
    w_sum  = signed'(jm_sum + h_i);
    scaled = (2*D)'((w_sum * I0) >>> FRAC);
    if (scaled <= -(2*D)'(I_LIMIT))      i_clamped = -I_LIMIT;
    else if (scaled >= (2*D)'(I_LIMIT))  i_clamped = I_LIMIT;
    else                                 i_clamped = scaled[D-1:0];
  end

  logic signed [D-1:0] i_reg;
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      i_reg <= '0;
    else if (load_i) i_reg <= i_clamped;
  end
  assign i_val = i_reg;

  // ---------------- activation and stochasticity (S3) ----------------
  logic              i_neg;
  logic [D-1:0]      i_abs;
  logic              i_sat;   // |I_i| >= 4
  logic [TANH_W-1:0] lut_q;
  logic signed [TANH_W-1:0] pos_v, neg_v, tanh_v;
  logic [TANH_W-1:0] rnd;

  assign i_neg = i_reg[D-1];
  assign i_abs = i_neg ? D'(-i_reg) : i_reg;
  assign i_sat = (i_abs >= I_LIMIT);

  tyche_tanh_lut u_lut (
    .addr (i_abs[LUT_STEP +: LUT_AW]),
    .data (lut_q)
  );

  always_comb begin
    pos_v  = i_sat ? TANH_POS_ONE : signed'(lut_q);
    neg_v  = i_sat ? TANH_NEG_ONE : -signed'(lut_q);
    tanh_v = i_neg ? neg_v : pos_v;
  end

  tyche_lfsr u_lfsr (
    .clk   (clk),
    .rst_n (rst_n),
    .load  (seed_load),
    .seed  (seed),
    .step  (lfsr_step),
    .q     (rnd)
  );

  assign m_new = (tanh_v > signed'(rnd));

endmodule
