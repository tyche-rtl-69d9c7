// J x m "multiply" by a logarithmic tree of adder-subtractors.
//
// Because every p-bit m_j is -1 or +1, the sum  sum_j J(i,j) * m_j  needs no
// multiplier: J(i,j) is added where m_j = +1 (stored 1) and subtracted where
// m_j = -1 (stored 0). The terms are combined pairwise in a balanced tree of
// ceil(log2 NM_MAX) levels, so the delay grows with log2 NM_MAX instead of
// linearly as in a chain of adders. Every adder is D bits wide and wraps on
// overflow, like the 24-bit adder-subtractors of the original design.
//
// This design puts the add/subtract choice at the leaves (each leaf is +J, -J
// or 0) and uses plain adders above them. A column is included only when its en
// bit is set, so columns beyond the configured number of p-bits N_m contribute
// nothing; that masking is this design's choice. NM_MAX that is not a power of
// two is padded with zero leaves.
//
// Purely combinational (single cycle).
module tyche_addsub_tree #(
  parameter int unsigned NM_MAX = 64,
  parameter int unsigned D      = tyche_pkg::D
) (
  input  logic [D-1:0]        j_row [NM_MAX],
  input  logic [NM_MAX-1:0]   m,
  input  logic [NM_MAX-1:0]   en,
  output logic [D-1:0]        sum
);

  localparam int unsigned LEVELS = (NM_MAX > 1) ? $clog2(NM_MAX) : 0;
  localparam int unsigned LEAVES = 1 << LEVELS;

  for (genvar l = 0; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned N = LEAVES >> l;
    logic [D-1:0] s [N];
    if (l == 0) begin : g_leaf
      for (genvar k = 0; k < N; k++) begin : g_k
        if (k < NM_MAX) begin : g_used
          assign s[k] = !en[k] ? '0 : (m[k] ? j_row[k] : D'(-j_row[k]));
        end else begin : g_pad
          assign s[k] = '0;
        end
      end
    end else begin : g_add
      for (genvar k = 0; k < N; k++) begin : g_k
        assign s[k] = g_lvl[l-1].s[2*k] + g_lvl[l-1].s[2*k+1];
      end
    end
  end

  assign sum = g_lvl[LEVELS].s[0];

endmodule
