// 32-bit linear feedback shift register: the p-bit core's source of randomness.
//
// Fibonacci form, shifting towards the MSB, with the maximal-length feedback
// polynomial x^32 + x^22 + x^2 + x + 1 (taps at bits 31, 21, 1 and 0). The state
// is read as a signed Q0.31 number, i.e. a value in [-1, +1). The seed comes from
// an external input; a zero seed, which would lock the register, is replaced by
// 1. The width and the external seed follow the accelerator; the polynomial and
// the zero-seed rule are this design's choices.
//
// One step pulse advances the register by STEPS shifts at once (a leap-forward
// LFSR), so with STEPS = W every update sees a word made of W fresh bits.
// Advancing by a single shift would make consecutive words nearly copies of
// each other (the next word is the last one shifted by one place) and biases
// the p-circuit's statistics; how far the register moves per update is not
// given by the original design and is this design's choice.
//
// Timing: load has priority over step; both act on the rising edge of clk.
module tyche_lfsr #(
  parameter int unsigned W     = tyche_pkg::TANH_W,
  parameter int unsigned STEPS = 32
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] seed,
  input  logic         step,
  output logic [W-1:0] q
);

  // STEPS shifts of the register, unrolled into one XOR network
  function automatic logic [W-1:0] advance(logic [W-1:0] s);
    for (int n = 0; n < STEPS; n++) s = {s[W-2:0], s[31] ^ s[21] ^ s[1] ^ s[0]};
    return s;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    q <= W'(1);
    else if (load) q <= (seed == '0) ? W'(1) : seed;
    else if (step) q <= advance(q);
  end

endmodule
