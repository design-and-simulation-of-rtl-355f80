// lp_filter: single-pole IIR low-pass filter of one field component.
//
//     y_k = y_k-1 + alpha * (x_k - y_k-1),   alpha = one_over_n / 2**17
//
// Structure, as in the reference design: subtract the filter state from the
// input, cast the difference to the 18-bit multiplier width, multiply by the
// 1/N register (z^-2), shift right by 17, cast back to the state width and
// add into the accumulator that holds y. The accumulator is enabled for one
// clock per new input: data_ready is delayed by SYNC_K clocks (to meet the
// product) and its rising edge is detected (delay, invert, and), so a
// data_ready that stays high for many clocks still gives a single update.
// The 1/N register is loaded from one_over_n when we is high.
//
// Timing: with data_ready rising in clock v (input valid in v), y is updated
// and dout_valid pulses in clock v+3. The input need only be valid in clock v.
// Both casts saturate, and the shift truncates towards minus infinity; these,
// reset values (state 0, 1/N = 0) and SYNC_K = 2 are this design's choices.
module lp_filter
  import llrf_pkg::*;
#(
  parameter int IN_W   = 20,
  parameter int MW     = MULT_W,
  parameter int SHIFT  = LPF_SHIFT,
  parameter int SYNC_K = 2
) (
  input  logic                   clk,
  input  logic                   rst,
  input  logic signed [IN_W-1:0] din,
  input  logic                   data_ready,
  input  logic signed [MW-1:0]   one_over_n,
  input  logic                   we,
  output logic signed [IN_W-1:0] dout,
  output logic                   dout_valid
);
  logic signed [MW-1:0]     k_reg;      // 1/N register
  logic signed [IN_W:0]     diff;       // AddSub
  logic signed [MW-1:0]     diff_c;     // Convert2
  logic signed [2*MW-1:0]   prod [2];   // Mult, z^-2
  logic signed [IN_W-1:0]   step;       // Shift + Convert
  logic [SYNC_K:0]          dr_d;       // Sync (z^-k) and Delay
  logic                     acc_en;     // Inverter + Logical

  always_ff @(posedge clk) begin
    if (rst)     k_reg <= '0;
    else if (we) k_reg <= one_over_n;
  end

  always_comb begin
    diff   = (IN_W+1)'(din) - (IN_W+1)'(dout);
    diff_c = MW'(sat(64'(diff), MW));
    step   = IN_W'(sat(64'(prod[1] >>> SHIFT), IN_W));
    acc_en = dr_d[SYNC_K-1] && !dr_d[SYNC_K];
  end

  always_ff @(posedge clk) begin
    prod[0] <= diff_c * k_reg;
    prod[1] <= prod[0];
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      dr_d       <= '0;
      dout       <= '0;
      dout_valid <= 1'b0;
    end else begin
      dr_d       <= {dr_d[SYNC_K-1:0], data_ready};
      dout_valid <= acc_en;
      if (acc_en) dout <= dout + step;
    end
  end

endmodule
