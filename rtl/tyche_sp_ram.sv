// Single-port RAM with a registered read port.
//
// This is the storage element of the accelerator's coupling memories: the h
// vector memory is one instance (NM_MAX words of d bits) and the J matrix memory
// is NM_MAX instances side by side. One address port serves both writes (while
// the accelerator is being configured) and reads (while it runs). A read returns
// the word one clock after its address is presented, as a block RAM does; on a
// write the read register returns the old word (read-first). Contents are not
// reset. The registered read and read-first behaviour are this design's choice.
//
// Interface: we / addr / wdata write on the rising edge of clk; rdata is the
// word at the address presented on the previous edge.
module tyche_sp_ram #(
  parameter int unsigned WIDTH = 24,
  parameter int unsigned DEPTH = 64,
  parameter int unsigned AW    = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule
