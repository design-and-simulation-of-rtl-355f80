// matrix_rotation: complex scaling and rotation of one cavity's sample pair.
//
// Computes, for the current sample I_In = V_k and the previous sample of the
// same cavity Q_In = V_k-1,
//     I_Out = (I_In * cos_k >>> SHIFT) - (Q_In * sin_k >>> SHIFT)
//     Q_Out = (Q_In * cos_k >>> SHIFT) + (I_In * sin_k >>> SHIFT)
// with four multipliers, as in the reference structure. cos_k and sin_k are
// the coefficients read for this cavity and quarter; which of +-cos(phi)/K and
// +-sin(phi)/K sits on each port depends on the quarter, so one datapath
// covers all four quarter equations. Coefficients are signed fractions with
// SHIFT fractional bits (value = coef / 2**SHIFT).
//
// Timing: fully pipelined, one pair per clock, latency 3 clocks (2 for the
// multipliers, 1 for the add/subtract), as in the reference structure.
// The arithmetic shift truncates towards minus infinity (this design's choice).
module matrix_rotation #(
  parameter int DATA_W = 14,
  parameter int COEF_W = 18,
  parameter int SHIFT  = 18,
  parameter int OUT_W  = DATA_W + COEF_W - SHIFT + 1
) (
  input  logic                     clk,
  input  logic signed [DATA_W-1:0] i_in,
  input  logic signed [DATA_W-1:0] q_in,
  input  logic signed [COEF_W-1:0] cos_k,
  input  logic signed [COEF_W-1:0] sin_k,
  output logic signed [OUT_W-1:0]  i_out,
  output logic signed [OUT_W-1:0]  q_out
);
  localparam int PW = DATA_W + COEF_W;

  // Two register stages per multiplier (z^-2).
  logic signed [PW-1:0] p_ic [2];  // I_In * cos
  logic signed [PW-1:0] p_qs [2];  // Q_In * sin
  logic signed [PW-1:0] p_qc [2];  // Q_In * cos
  logic signed [PW-1:0] p_is [2];  // I_In * sin

  always_ff @(posedge clk) begin
    p_ic[0] <= i_in * cos_k;
    p_qs[0] <= q_in * sin_k;
    p_qc[0] <= q_in * cos_k;
    p_is[0] <= i_in * sin_k;
    p_ic[1] <= p_ic[0];
    p_qs[1] <= p_qs[0];
    p_qc[1] <= p_qc[0];
    p_is[1] <= p_is[0];
  end

  logic signed [OUT_W-1:0] s_ic, s_qs, s_qc, s_is;
  always_comb begin
    s_ic = OUT_W'(p_ic[1] >>> SHIFT);
    s_qs = OUT_W'(p_qs[1] >>> SHIFT);
    s_qc = OUT_W'(p_qc[1] >>> SHIFT);
    s_is = OUT_W'(p_is[1] >>> SHIFT);
  end

  // Add/subtract stage (z^-1).
  always_ff @(posedge clk) begin
    i_out <= s_ic - s_qs;
    q_out <= s_qc + s_is;
  end

endmodule
