// sample_delay: the Z^-8 FIFO of an ADC conditioner.
//
// The ADC words of one conditioner arrive one per clock, cavity after cavity.
// To pair the current sample V_k of a cavity with its previous sample V_k-1,
// the stream goes through a DEPTH-word shift register that advances only on
// clocks where en ("Process data") marks a new word. dout is the word that
// entered DEPTH enabled clocks ago, i.e. the same cavity's previous sample;
// it is combinational from the register, so it is valid in the same clock as
// the din it belongs to.
// The enabled 8-word delay is the reference design's; building it as a shift
// register, and clearing it on reset (so the first burst after reset pairs
// each sample with zero), are this design's choices.
module sample_delay #(
  parameter int W     = 14,
  parameter int DEPTH = 8
) (
  input  logic                clk,
  input  logic                rst,
  input  logic                en,
  input  logic signed [W-1:0] din,
  output logic signed [W-1:0] dout
);
  logic signed [W-1:0] sr [DEPTH];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else if (en) begin
      sr[0] <= din;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  assign dout = sr[DEPTH-1];

endmodule
