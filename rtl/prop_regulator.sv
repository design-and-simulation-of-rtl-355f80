// prop_regulator: proportional regulator with feed-forward for I and Q.
//
//     I_ctrl = I_ff + K_fb,I * (I_set - I_av)
//     Q_ctrl = Q_ff + K_fb,Q * (Q_set - Q_av)
//
// Three register stages, as the three blocks of the reference structure
// (subtract, multiply, add): the error is saturated to the 18-bit multiplier
// width, multiplied by the gain (a signed fraction with KF fractional bits),
// shifted right by KF, added to the feed-forward value and saturated to the
// OUT_W-bit drive of the vector modulator. A sync delay line carries
// data_ready alongside, so dr_out marks the clock in which the outputs belong
// to the filter output marked by dr_in.
// Timing: latency 3 clocks; the stages run every clock, so the outputs also
// follow changes of set point, gain or feed-forward between field updates.
// Gain scaling, saturation and widths are this design's choices.
module prop_regulator
  import llrf_pkg::*;
#(
  parameter int IN_W  = 20,
  parameter int MW    = MULT_W,
  parameter int KF    = KFB_FRAC,
  parameter int OUT_W = CTRL_W
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [IN_W-1:0]  i_av,
  input  logic signed [IN_W-1:0]  q_av,
  input  logic                    dr_in,
  input  logic signed [IN_W-1:0]  i_set,
  input  logic signed [IN_W-1:0]  q_set,
  input  logic signed [MW-1:0]    kfb_i,
  input  logic signed [MW-1:0]    kfb_q,
  input  logic signed [OUT_W-1:0] i_ff,
  input  logic signed [OUT_W-1:0] q_ff,
  output logic signed [OUT_W-1:0] i_ctrl,
  output logic signed [OUT_W-1:0] q_ctrl,
  output logic                    dr_out
);
  logic signed [MW-1:0]   err_i, err_q;    // stage 1: set - av
  logic signed [2*MW-1:0] p_i, p_q;        // stage 2: gain * error
  logic [2:0]             dr_d;            // sync

  always_ff @(posedge clk) begin
    err_i  <= MW'(sat(64'(i_set) - 64'(i_av), MW));
    err_q  <= MW'(sat(64'(q_set) - 64'(q_av), MW));
    p_i    <= err_i * kfb_i;
    p_q    <= err_q * kfb_q;
    i_ctrl <= OUT_W'(sat(64'(i_ff) + 64'(p_i >>> KF), OUT_W));
    q_ctrl <= OUT_W'(sat(64'(q_ff) + 64'(p_q >>> KF), OUT_W));
  end

  always_ff @(posedge clk) begin
    if (rst) dr_d <= '0;
    else     dr_d <= {dr_d[1:0], dr_in};
  end

  assign dr_out = dr_d[2];

endmodule
