// moga_rng: W pseudo-random bits per clock for the genetic operators.
//
// A bank of ceil(W/32) xorshift32 generators (shifts 13, 17, 5) advance once
// per clock while enabled; their states, concatenated, are the output. Each
// generator gets its own non-zero seed derived from SEED and its index, so
// islands and operators seeded differently draw unrelated streams. The
// generator type is this design's choice; the algorithm only asks for random
// choices.
//
// Interface: rnd_o is valid every cycle and changes one clock after each
// enabled edge; synchronous active-low reset loads the seeds.
module moga_rng #(
  parameter int          W    = 32,
  parameter logic [31:0] SEED = 32'h1234_5678
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,
  output logic [W-1:0] rnd_o
);
  localparam int NG = (W + 31) / 32;

  logic [NG-1:0][31:0] state;

  function automatic logic [31:0] seed_of(int g);
    logic [31:0] s;
    s = SEED ^ (32'h9E37_79B9 * (g + 1));
    s = s ^ (s >> 16);
    return (s == 32'd0) ? 32'h0BAD_5EED : s;
  endfunction

  function automatic logic [31:0] step(logic [31:0] x);
    logic [31:0] y;
    y = x ^ (x << 13);
    y = y ^ (y >> 17);
    y = y ^ (y << 5);
    return y;
  endfunction

  always_ff @(posedge clk) begin
    for (int g = 0; g < NG; g++) begin
      if (!rst_n)  state[g] <= seed_of(g);
      else if (en) state[g] <= step(state[g]);
    end
  end

  logic [NG*32-1:0] flat;
  assign flat  = state;
  assign rnd_o = flat[W-1:0];
endmodule
