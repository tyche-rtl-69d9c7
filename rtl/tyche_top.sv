// Tyche: a configurable p-circuit accelerator with a single p-bit core.
//
// A p-circuit is a network of N_m stochastic binary units (p-bits) m_i in
// {-1,+1} coupled by a matrix J and biased by a vector h. The accelerator
// performs Gibbs-style sequential updates: each p-bit in turn takes the value
// sgn(rand(-1,+1) + tanh(I0 * (h_i + sum_j J(i,j) m_j))). One pass over all
// N_m p-bits is a sample; a run takes N_s samples. Any N_m up to the build-time
// maximum NM_MAX runs on the same hardware, because all p-bits share one
// compute core and J/h live in memories.
//
// Blocks (all as in the original architecture):
//   tyche_input_config  decodes the external J/h write addresses
//   tyche_j_mem         NM_MAX banks x NM_MAX words x D bits; bank j holds column j
//   tyche_sp_ram        h_Mem, NM_MAX words x D bits
//   tyche_m_reg         p-bit states
//   tyche_ctrl_regs     latched N_m, N_s and the update-order sequence register
//   tyche_fsm           six-state controller S0..S5
//   tyche_pbit_core     adder tree, +h, x I0, clamp, tanh LUT, LFSR, comparator
//
// Using it: while done is high or before the first start, write J with
// j_wr_en/j_row_addr/j_col_addr/j_val (one element per cycle) and h with
// h_wr_en/h_addr/h_val. Drive nm (1..NM_MAX), ns, seed and pattern (a
// permutation of 0..nm-1 in its first nm entries), then raise start. m_final
// shows the p-bit states at all times (bit j = 1 means m_j = +1); done rises
// after N_s samples and stays high until start falls.
//
// Timing: each p-bit update takes 3 cycles (S1 read J row / h, S2 weight logic
// into I_i, S3 write m_Reg), each sample adds one S4 cycle, so a run lasts
// N_s*(3*N_m + 1) cycles from the cycle after start is accepted until done.
// The extra S4 cycle per sample, the write strobes, the active-low reset and
// clearing m_Reg to all -1 at start are this design's choices.
module tyche_top
  import tyche_pkg::*;
#(
  parameter int unsigned         NM_MAX = 64,
  parameter int unsigned         NS_W   = 32,
  parameter logic signed [D-1:0] I0     = ONE_Q,
  parameter int unsigned         R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // run configuration
  input  logic [R:0]                nm,
  input  logic [NS_W-1:0]           ns,
  input  logic [TANH_W-1:0]         seed,
  input  logic [NM_MAX-1:0][R-1:0]  pattern,
  // J matrix write port
  input  logic                      j_wr_en,
  input  logic [R-1:0]              j_row_addr,
  input  logic [R-1:0]              j_col_addr,
  input  logic [D-1:0]              j_val,
  // h vector write port
  input  logic                      h_wr_en,
  input  logic [R-1:0]              h_addr,
  input  logic [D-1:0]              h_val,
  // control and results
  input  logic                      start,
  output logic [NM_MAX-1:0]         m_final,
  output logic                      done
);

  state_t            state;
  logic [R-1:0]      i_idx, p_idx;
  logic              launch, next_seq;
  logic [R:0]        nm_q;
  logic [NS_W-1:0]   ns_q;
  logic              cfg_en;

  assign cfg_en = (state == S0_CONFIG) || (state == S5_DONE);

  tyche_fsm #(.NM_MAX(NM_MAX), .NS_W(NS_W), .R(R)) u_fsm (
    .clk      (clk),
    .rst_n    (rst_n),
    .start    (start),
    .nm       (nm_q),
    .ns       (ns_q),
    .state    (state),
    .i_idx    (i_idx),
    .launch   (launch),
    .next_seq (next_seq),
    .done     (done)
  );

  tyche_ctrl_regs #(.NM_MAX(NM_MAX), .NS_W(NS_W), .R(R)) u_ctrl (
    .clk      (clk),
    .rst_n    (rst_n),
    .launch   (launch),
    .next_seq (next_seq),
    .nm_in    (nm),
    .ns_in    (ns),
    .pattern  (pattern),
    .i_idx    (i_idx),
    .nm       (nm_q),
    .ns       (ns_q),
    .p_idx    (p_idx)
  );

  // ---------------- memories ----------------
  logic [NM_MAX-1:0] j_bank_we;
  logic [R-1:0]      j_ram_addr, h_ram_addr;
  logic [D-1:0]      j_ram_wdata, h_ram_wdata, h_rdata;
  logic              h_we;
  logic [D-1:0]      j_row [NM_MAX];

  tyche_input_config #(.NM_MAX(NM_MAX), .D(D), .R(R)) u_cfg (
    .cfg_en      (cfg_en),
    .j_wr_en     (j_wr_en),
    .j_row_addr  (j_row_addr),
    .j_col_addr  (j_col_addr),
    .j_val       (j_val),
    .h_wr_en     (h_wr_en),
    .h_addr      (h_addr),
    .h_val       (h_val),
    .p_idx       (p_idx),
    .j_bank_we   (j_bank_we),
    .j_ram_addr  (j_ram_addr),
    .j_ram_wdata (j_ram_wdata),
    .h_we        (h_we),
    .h_ram_addr  (h_ram_addr),
    .h_ram_wdata (h_ram_wdata)
  );

  tyche_j_mem #(.NM_MAX(NM_MAX), .D(D), .R(R)) u_jmem (
    .clk     (clk),
    .bank_we (j_bank_we),
    .addr    (j_ram_addr),
    .wdata   (j_ram_wdata),
    .row     (j_row)
  );

  tyche_sp_ram #(.WIDTH(D), .DEPTH(NM_MAX), .AW(R)) u_hmem (
    .clk   (clk),
    .we    (h_we),
    .addr  (h_ram_addr),
    .wdata (h_ram_wdata),
    .rdata (h_rdata)
  );

  // ---------------- p-bit state and core ----------------
  logic [NM_MAX-1:0] m;
  logic              m_new;
  logic [D-1:0]      i_val;

  tyche_m_reg #(.NM_MAX(NM_MAX), .R(R)) u_mreg (
    .clk   (clk),
    .rst_n (rst_n),
    .clr   (launch),
    .we    (state == S3_UPDATE),
    .idx   (p_idx),
    .d     (m_new),
    .m     (m)
  );

  tyche_pbit_core #(.NM_MAX(NM_MAX), .I0(I0), .R(R)) u_core (
    .clk       (clk),
    .rst_n     (rst_n),
    .j_row     (j_row),
    .h_i       (h_rdata),
    .m         (m),
    .nm        (nm_q),
    .load_i    (state == S2_WEIGHT),
    .seed_load (launch),
    .seed      (seed),
    .lfsr_step (state == S3_UPDATE),
    .m_new     (m_new),
    .i_val     (i_val)
  );

  assign m_final = m;

endmodule
