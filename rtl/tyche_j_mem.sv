// J matrix memory (J_Mem): NM_MAX banks of single-port RAM, each NM_MAX words
// of D bits.
//
// Word i of bank j holds J(i,j), the coupling from p-bit j into p-bit i. All
// banks share one address, so a single read of address i returns the whole row
// J(i,1..NM_MAX) at once, which the p-bit core's adder tree consumes in one
// cycle. This bank organisation is the accelerator's own; the shared address and
// the one-cycle registered read are this design's choices.
//
// Interface: bank_we is one-hot (at most one bank written per cycle, chosen by
// the column address), addr is the word (row) address, row[j] is bank j's read
// data one cycle after addr.
module tyche_j_mem #(
  parameter int unsigned NM_MAX = 64,
  parameter int unsigned D      = tyche_pkg::D,
  parameter int unsigned R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic                clk,
  input  logic [NM_MAX-1:0]   bank_we,
  input  logic [R-1:0]        addr,
  input  logic [D-1:0]        wdata,
  output logic [D-1:0]        row [NM_MAX]
);

  for (genvar j = 0; j < NM_MAX; j++) begin : g_bank
    tyche_sp_ram #(.WIDTH(D), .DEPTH(NM_MAX), .AW(R)) u_bank (
      .clk   (clk),
      .we    (bank_we[j]),
      .addr  (addr),
      .wdata (wdata),
      .rdata (row[j])
    );
  end

endmodule
