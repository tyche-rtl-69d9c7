// Control registers: the run settings and the update-order state.
//
// When a run is launched the module latches N_m and N_s (so the inputs may
// change during a run) and loads the sequence register from the pattern input.
// During the run it returns p_idx, the index of the p-bit at position i_idx of
// the current update order, which addresses J_Mem, h_Mem and m_Reg. next_seq
// (end of a sample) moves the sequence register to the next order. Keeping the
// sequence register among the control registers follows the original design;
// latching N_m and N_s at launch is this design's choice.
//
// Timing: registers load on the rising edge of clk; p_idx is combinational from
// i_idx and the sequence register.
module tyche_ctrl_regs #(
  parameter int unsigned NM_MAX = 64,
  parameter int unsigned NS_W   = 32,
  parameter int unsigned R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      launch,
  input  logic                      next_seq,
  input  logic [R:0]                nm_in,
  input  logic [NS_W-1:0]           ns_in,
  input  logic [NM_MAX-1:0][R-1:0]  pattern,
  input  logic [R-1:0]              i_idx,
  output logic [R:0]                nm,
  output logic [NS_W-1:0]           ns,
  output logic [R-1:0]              p_idx
);

  logic [NM_MAX-1:0][R-1:0] seq;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      nm <= '0;
      ns <= '0;
    end else if (launch) begin
      nm <= nm_in;
      ns <= ns_in;
    end
  end

  tyche_seq_reg #(.NM_MAX(NM_MAX), .R(R)) u_seq (
    .clk     (clk),
    .rst_n   (rst_n),
    .load    (launch),
    .step    (next_seq),
    .pattern (pattern),
    .seq     (seq)
  );

  assign p_idx = seq[i_idx];

endmodule
