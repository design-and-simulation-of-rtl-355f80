// llrf_top: digital low-level RF field controller for a string of
// superconducting cavities driven by one klystron.
//
// The 32 cavity probe signals, down-converted to 250 kHz and sampled at four
// samples per IF period, arrive on N_COND ADC buses of N_ADC ADCs each. All
// buses are clocked in lock step: after a conversion the ADC with number
// adc_num presents its sample on every bus, one ADC per clock, with
// process_data high and the quarter number (0..3) of this sample in the IF
// period. The datapath then computes
//   adc_conditioner x N_COND : per-cavity calibration (scaling and rotation)
//                              of each (V_k, V_k-1) pair into I_c, Q_c and
//                              their sum over the bus's cavities;
//   vector_sum               : total field vector I, Q of all cavities;
//   lp_filter x 2            : single-pole IIR averaging of I and of Q;
//   prop_regulator           : I/Q drive of the klystron's vector modulator,
//                              feed-forward plus gain times the set-point error.
// data_ready accompanies each stage and marks the clock in which the outputs
// hold a new control vector.
//
// CPU bus (cpu_wr): a single-cycle write bus for the rotation coefficients,
// address {conditioner, ADC number, quarter, select} from bit 0 upwards as
// select (bit 0), quarter (bits 2:1), ADC number, conditioner index; see
// llrf_pkg. The filter coefficient one_over_n is loaded with lpf_we; set
// points, gains and feed-forward values are plain inputs.
//
// Timing: one new control vector per burst of N_ADC ADC words; bursts may be
// back to back. The control vector for a burst is valid 19 clocks after the
// burst's first ADC word (ADC number 0) was presented, with the defaults
// (N_ADC = 8): 7 more words, 1 RAM read, 3 rotation, 1 accumulator,
// 1 vector sum, 3 filter, 3 regulator.
// The structure and the 4 x 8 organisation follow the reference design; the
// bus protocol, word widths and per-stage latencies are this design's own.
module llrf_top
  import llrf_pkg::*;
#(
  parameter int N_COND = 4,
  parameter int N_ADC  = 8,
  parameter int NW     = $clog2(N_ADC),
  parameter int CW     = (N_COND > 1) ? $clog2(N_COND) : 1,
  parameter int ROT_W  = ADC_W + COEF_W - ROT_SHIFT + 1,
  parameter int SUM_W  = ROT_W + $clog2(N_ADC),
  parameter int FLD_W  = SUM_W + $clog2(N_COND)
) (
  input  logic                    clk,
  input  logic                    rst,
  // ADC buses
  input  logic signed [ADC_W-1:0] adc_data [N_COND],
  input  logic                    process_data,
  input  logic [NW-1:0]           adc_num,
  input  quarter_t                quarter,
  // host access
  input  cpu_wr_t                 cpu_wr,
  input  logic signed [MULT_W-1:0] one_over_n,
  input  logic                    lpf_we,
  // regulator settings
  input  logic signed [FLD_W-1:0] i_set,
  input  logic signed [FLD_W-1:0] q_set,
  input  logic signed [MULT_W-1:0] kfb_i,
  input  logic signed [MULT_W-1:0] kfb_q,
  input  logic signed [CTRL_W-1:0] i_ff,
  input  logic signed [CTRL_W-1:0] q_ff,
  // vector modulator drive
  output logic signed [CTRL_W-1:0] i_ctrl,
  output logic signed [CTRL_W-1:0] q_ctrl,
  output logic                    data_ready
);
  logic signed [SUM_W-1:0] i_cond [N_COND];
  logic signed [SUM_W-1:0] q_cond [N_COND];
  logic [N_COND-1:0]       dr_cond;
  logic signed [FLD_W-1:0] i_tot, q_tot, i_av, q_av;
  logic                    dr_tot, dr_av_i, dr_av_q;

  for (genvar n = 0; n < N_COND; n++) begin : g_cond
    logic sel_cond;
    assign sel_cond = cpu_wr.we && (cpu_wr.addr[NW+3 +: CW] == CW'(n));

    adc_conditioner #(.N_ADC(N_ADC)) u_cond (
      .clk, .rst,
      .adc_data(adc_data[n]), .process_data, .adc_num, .quarter,
      .coef_we(sel_cond), .coef_addr(cpu_wr.addr[NW+2:1]),
      .coef_sel(cpu_wr.addr[0]), .coef_data(cpu_wr.data),
      .i_sum(i_cond[n]), .q_sum(q_cond[n]), .data_ready(dr_cond[n])
    );
  end

  vector_sum #(.N_COND(N_COND), .IN_W(SUM_W), .OUT_W(FLD_W)) u_vsum (
    .clk, .rst, .i_in(i_cond), .q_in(q_cond), .dr_in(dr_cond),
    .i_sum(i_tot), .q_sum(q_tot), .data_ready(dr_tot)
  );

  lp_filter #(.IN_W(FLD_W)) u_lpf_i (
    .clk, .rst, .din(i_tot), .data_ready(dr_tot), .one_over_n, .we(lpf_we),
    .dout(i_av), .dout_valid(dr_av_i)
  );

  lp_filter #(.IN_W(FLD_W)) u_lpf_q (
    .clk, .rst, .din(q_tot), .data_ready(dr_tot), .one_over_n, .we(lpf_we),
    .dout(q_av), .dout_valid(dr_av_q)
  );

  prop_regulator #(.IN_W(FLD_W)) u_reg (
    .clk, .rst, .i_av, .q_av, .dr_in(dr_av_i && dr_av_q),
    .i_set, .q_set, .kfb_i, .kfb_q, .i_ff, .q_ff,
    .i_ctrl, .q_ctrl, .dr_out(data_ready)
  );

endmodule
