// tanh lookup table: 1024 entries of 32 bits.
//
// Entry k holds tanh(k / 256) in the 32-bit Q0.31 format of tyche_pkg
// (+1.0 = 2^31 - 1), so the table covers |I| in [0, 4) in steps of 1/256. The
// p-bit core addresses it with bits [13:4] of |I_i| in Q11.12 and handles the
// sign and the |I_i| >= 4 saturation itself. The size (1024 x 32 bits) is the
// accelerator's; the covered range, the step and the rounding are this design's
// choices.
//
// The contents are a constant computed at elaboration with integer arithmetic,
// so any synthesis tool can build the ROM without a data file:
//   E_k    = exp(2k/256) = b^k,  b = exp(1/128) summed as a Taylor series,
//            both held as unsigned fixed point with 64 fraction bits;
//   rom[k] = round((E_k - 1) / (E_k + 1) * (2^31 - 1)).
// The result is within one LSB of the exactly rounded value.
//
// Read is combinational (a distributed ROM); the p-bit core registers I_i in
// front of it.
module tyche_tanh_lut #(
  parameter int unsigned AW    = tyche_pkg::LUT_AW,
  parameter int unsigned WIDTH = tyche_pkg::TANH_W
) (
  input  logic [AW-1:0]    addr,
  output logic [WIDTH-1:0] data
);

  localparam int unsigned DEPTH = 1 << AW;
  // steps per unit of |I|: DEPTH entries span [0, 4)
  localparam int unsigned STEPS_LOG2 = AW - 2;
  localparam int unsigned XW = 192;   // width of the fixed-point intermediates
  localparam int unsigned FB = 64;    // fraction bits of the intermediates

  typedef logic [WIDTH-1:0] rom_t [DEPTH];

  function automatic rom_t build_rom();
    rom_t                r;
    logic [XW-1:0]       one, base, term, e, num, den, q;
    logic [XW-1:0]       full;
    one  = XW'(1) << FB;
    // b = exp(2 / 2^STEPS_LOG2) = sum_n (2^-(STEPS_LOG2-1))^n / n!
    base = one;
    term = one;
    for (int n = 1; n < 12; n++) begin
      term = (term >> (STEPS_LOG2 - 1)) / XW'(n);
      base = base + term;
    end
    full = (XW'(1) << (WIDTH - 1)) - XW'(1);
    e = one;
    for (int k = 0; k < DEPTH; k++) begin
      num  = (e - one) * full;
      den  = e + one;
      q    = (num + (den >> 1)) / den;
      r[k] = WIDTH'(q);
      e    = (e * base) >> FB;
    end
    return r;
  endfunction

  localparam rom_t ROM = build_rom();

  assign data = ROM[addr];

endmodule
