// lfsr: Galois linear feedback shift register, the pseudo-random number
// generator of the packet source.
//
// Each enabled clock the state shifts right by one; when the bit shifted out
// is 1 the tap mask TAPS is XORed into the state. With a primitive
// polynomial the state runs through all 2**WIDTH-1 non-zero values. The
// source uses LFSRs for addresses, lengths and TTLs as the prototype did;
// the Galois form and the tap masks are this design's choice.
// Interface: en_i steps the register, state_o is the current state
// (registered). Reset loads SEED, which must be non-zero.
module lfsr #(
  parameter int               WIDTH = 32,
  parameter logic [WIDTH-1:0] TAPS  = 32'h8020_0003,  // x^32+x^22+x^2+x+1
  parameter logic [WIDTH-1:0] SEED  = 32'h1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             en_i,
  output logic [WIDTH-1:0] state_o
);

  always_ff @(posedge clk) begin
    if (!rst_n)    state_o <= SEED;
    else if (en_i) state_o <= (state_o >> 1) ^ (state_o[0] ? TAPS : '0);
  end

  initial assert (SEED != '0) else $error("lfsr: SEED must be non-zero");

endmodule
