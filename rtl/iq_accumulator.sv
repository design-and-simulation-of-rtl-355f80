// iq_accumulator: the I/Q accumulator of one ADC conditioner.
//
// Sums the per-cavity field estimates I_c, Q_c coming out of the matrix
// rotation. On load the accumulator is preset with the incoming pair (the
// first cavity of a sampling cycle), on add the pair is added, otherwise it
// holds. After the N_ADC words of one sampling cycle it holds the field sum
// of those cavities.
// Timing: one clock; the sum is visible the clock after the last add.
// Presetting with the first cavity follows the reference design;
// OUT_W = IN_W + clog2(N_ADC), so the sum cannot overflow, is this design's choice.
module iq_accumulator #(
  parameter int IN_W  = 15,
  parameter int N_ADC = 8,
  parameter int OUT_W = IN_W + $clog2(N_ADC)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    load,
  input  logic                    add,
  input  logic signed [IN_W-1:0]  i_in,
  input  logic signed [IN_W-1:0]  q_in,
  output logic signed [OUT_W-1:0] i_acc,
  output logic signed [OUT_W-1:0] q_acc
);
  always_ff @(posedge clk) begin
    if (rst) begin
      i_acc <= '0;
      q_acc <= '0;
    end else if (load) begin
      i_acc <= OUT_W'(i_in);
      q_acc <= OUT_W'(q_in);
    end else if (add) begin
      i_acc <= i_acc + OUT_W'(i_in);
      q_acc <= q_acc + OUT_W'(q_in);
    end
  end

endmodule
