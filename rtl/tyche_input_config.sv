// Input configuration module: address decoder and write control for J_Mem and
// h_Mem.
//
// The host writes J one element at a time with a row address, a column address
// and a D-bit value, and h with an index and a D-bit value. The column address
// is decoded into a one-hot write enable for the J bank that holds that column;
// the row address becomes the word address inside the bank. While the
// accelerator runs (cfg_en low) writes are ignored and both memories are
// addressed by the index of the p-bit being updated, so the same single RAM port
// serves configuration and computation. The decoding follows the accelerator's
// memory organisation; the write strobes j_wr_en / h_wr_en and the blocking of
// writes during a run are this design's choices.
//
// Purely combinational: outputs follow the inputs in the same cycle.
module tyche_input_config #(
  parameter int unsigned NM_MAX = 64,
  parameter int unsigned D      = tyche_pkg::D,
  parameter int unsigned R      = (NM_MAX > 1) ? $clog2(NM_MAX) : 1
) (
  input  logic               cfg_en,      // accelerator idle: writes allowed
  // J write port
  input  logic               j_wr_en,
  input  logic [R-1:0]       j_row_addr,
  input  logic [R-1:0]       j_col_addr,
  input  logic [D-1:0]       j_val,
  // h write port
  input  logic               h_wr_en,
  input  logic [R-1:0]       h_addr,
  input  logic [D-1:0]       h_val,
  // p-bit index being updated (run time read address)
  input  logic [R-1:0]       p_idx,
  // to J_Mem
  output logic [NM_MAX-1:0]  j_bank_we,
  output logic [R-1:0]       j_ram_addr,
  output logic [D-1:0]       j_ram_wdata,
  // to h_Mem
  output logic               h_we,
  output logic [R-1:0]       h_ram_addr,
  output logic [D-1:0]       h_ram_wdata
);

  always_comb begin
    j_bank_we = '0;
    if (cfg_en && j_wr_en && (32'(j_col_addr) < NM_MAX) && (32'(j_row_addr) < NM_MAX))
      j_bank_we[j_col_addr] = 1'b1;
    j_ram_addr  = cfg_en ? j_row_addr : p_idx;
    j_ram_wdata = j_val;

    h_we        = cfg_en && h_wr_en && (32'(h_addr) < NM_MAX);
    h_ram_addr  = cfg_en ? h_addr : p_idx;
    h_ram_wdata = h_val;
  end

endmodule
