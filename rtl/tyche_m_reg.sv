// m_Reg: the NM_MAX-bit register of p-bit states.
//
// Bit j holds p-bit m_j, with 0 standing for -1 and 1 for +1. The p-bit core
// updates one p-bit at a time, so the register has a single-bit write port
// (we, idx, d). clr sets every p-bit to -1; it is used when a run starts. The
// whole register is visible at once on m, feeding the adder tree and the
// m_final output. Clearing at reset and at start is this design's choice.
//
// Timing: clr and the bit write take effect on the rising edge of clk; clr wins.
module tyche_m_reg #(
  parameter int unsigned NM_MAX = 64,
  parameter int unsigned R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              clr,
  input  logic              we,
  input  logic [R-1:0]      idx,
  input  logic              d,
  output logic [NM_MAX-1:0] m
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                           m <= '0;
    else if (clr)                         m <= '0;
    else if (we && (32'(idx) < NM_MAX))   m[idx] <= d;
  end

endmodule
