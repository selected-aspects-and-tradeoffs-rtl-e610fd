// lfsr: Galois linear feedback shift register used as the random source.
// Each 'step' advances the register by STEPS single-bit shifts in one clock,
// so the whole word is fresh at every use. 'load' takes a seed (a zero seed is
// replaced by 1, the all-zero state being a lock-up state). The state is the
// output; it is registered and changes the cycle after 'step' or 'load'.
// Default taps give a maximal-length 16-bit sequence (x^16+x^14+x^13+x^11+1).
module lfsr #(
  parameter int          WIDTH = 16,
  parameter logic [63:0] TAPS  = 64'hB400,
  parameter int          STEPS = 16
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             load,
  input  logic [WIDTH-1:0] seed,
  input  logic             step,
  output logic [WIDTH-1:0] state
);
  function automatic logic [WIDTH-1:0] adv(logic [WIDTH-1:0] s);
    logic [WIDTH-1:0] r;
    r = s;
    for (int i = 0; i < STEPS; i++)
      r = (r >> 1) ^ (r[0] ? TAPS[WIDTH-1:0] : '0);
    return r;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     state <= WIDTH'(1);
    else if (load)  state <= (seed == '0) ? WIDTH'(1) : seed;
    else if (step)  state <= adv(state);
  end
endmodule
