// vector_sum: adds the field sums of all ADC conditioners.
//
// Produces the total I and Q of the cryomodule string, I = sum of I_c over all
// cavities (likewise Q), from the N_COND conditioner sums. The conditioners
// run in lock step, so the result is marked valid when every conditioner
// reports data ready; combining them that way is this design's choice.
// Timing: one register stage; sums and data_ready appear together one clock
// after the inputs. OUT_W = IN_W + clog2(N_COND) so the sum cannot overflow.
module vector_sum #(
  parameter int N_COND = 4,
  parameter int IN_W   = 18,
  parameter int OUT_W  = IN_W + $clog2(N_COND)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  i_in [N_COND],
  input  logic signed [IN_W-1:0]  q_in [N_COND],
  input  logic [N_COND-1:0]       dr_in,
  output logic signed [OUT_W-1:0] i_sum,
  output logic signed [OUT_W-1:0] q_sum,
  output logic                    data_ready
);
  logic signed [OUT_W-1:0] i_c, q_c;

  always_comb begin
    i_c = '0;
    q_c = '0;
    for (int n = 0; n < N_COND; n++) begin
      i_c += OUT_W'(i_in[n]);
      q_c += OUT_W'(q_in[n]);
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      i_sum      <= '0;
      q_sum      <= '0;
      data_ready <= 1'b0;
    end else begin
      i_sum      <= i_c;
      q_sum      <= q_c;
      data_ready <= &dr_in;
    end
  end

endmodule
