// Sequence register: the order in which the p-bits are updated in a sample.
//
// Holds NM_MAX entries of R = ceil(log2 NM_MAX) bits, entry k being the index of
// the p-bit updated k-th. Consecutive samples must use different orders so that
// consecutive states do not correlate. The register is loaded with the external
// pattern P (a permutation of the p-bit indices) when a run starts, and after
// every sample each entry s is replaced by P[s]; sample n therefore uses the
// order P^n. The width (NM_MAX*R bits) and the externally configured pattern
// follow the original design; the rule P^n is this design's choice. For a run
// with N_m < NM_MAX, P must map 0..N_m-1 onto itself.
//
// Timing: load (priority) and step act on the rising edge of clk.
module tyche_seq_reg #(
  parameter int unsigned NM_MAX = 64,
  parameter int unsigned R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      load,
  input  logic                      step,
  input  logic [NM_MAX-1:0][R-1:0]  pattern,
  output logic [NM_MAX-1:0][R-1:0]  seq
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int k = 0; k < NM_MAX; k++) seq[k] <= R'(k);
    end else if (load) begin
      seq <= pattern;
    end else if (step) begin
      for (int k = 0; k < NM_MAX; k++) seq[k] <= pattern[seq[k]];
    end
  end

endmodule
