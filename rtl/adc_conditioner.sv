// adc_conditioner: turns the multiplexed samples of N_ADC cavity probes into
// the summed complex field (I, Q) of those cavities.
//
// After each conversion the N_ADC ADCs on the conditioner's bus deliver their
// samples one per clock, with ADC number and quarter number alongside and
// process_data high. The datapath:
//   * sample_delay (Z^-8, enabled by process_data) supplies the same cavity's
//     previous sample V_k-1 next to the current one V_k;
//   * coef_ram, addressed by {ADC number, quarter}, supplies the two
//     calibration coefficients; V_k and V_k-1 are registered once to meet them;
//   * matrix_rotation turns (V_k, V_k-1) into the cavity's I_c, Q_c;
//   * iq_accumulator is preset with cavity 0 and adds the others;
//   * cond_control aligns the ADC number with the pipeline, drives the
//     accumulator and raises data_ready with the complete sum.
// Timing: the sum appears, with data_ready rising, 5 clocks after the last
// ADC word of a burst was presented (1 RAM read, 3 rotation, 1 accumulator).
// Bursts may follow back to back. data_ready stays high until the sum is
// overwritten by the next burst's first cavity.
// Follows the reference structure (Z^-8 FIFO, coefficient RAM, matrix
// rotation, accumulator, control logic); word widths, the RAM read register
// and the alignment register are this design's choices.
module adc_conditioner
  import llrf_pkg::*;
#(
  parameter int N_ADC = 8,
  parameter int NW    = $clog2(N_ADC),
  parameter int ROT_W = ADC_W + COEF_W - ROT_SHIFT + 1,
  parameter int SUM_W = ROT_W + $clog2(N_ADC)
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic signed [ADC_W-1:0] adc_data,
  input  logic                    process_data,
  input  logic [NW-1:0]           adc_num,
  input  quarter_t                quarter,
  // coefficient write port (from the CPU bus decoder)
  input  logic                    coef_we,
  input  logic [NW+1:0]           coef_addr,
  input  logic                    coef_sel,
  input  logic signed [COEF_W-1:0] coef_data,
  output logic signed [SUM_W-1:0] i_sum,
  output logic signed [SUM_W-1:0] q_sum,
  output logic                    data_ready
);
  logic signed [ADC_W-1:0]  prev_sample;
  logic signed [ADC_W-1:0]  cur_r, prev_r;
  logic signed [COEF_W-1:0] c_coef, s_coef;
  logic signed [ROT_W-1:0]  i_cav, q_cav;
  logic                     acc_load, acc_add;

  sample_delay #(.W(ADC_W), .DEPTH(N_ADC)) u_fifo (
    .clk, .rst, .en(process_data), .din(adc_data), .dout(prev_sample)
  );

  coef_ram #(.N_ADC(N_ADC)) u_ram (
    .clk,
    .we(coef_we), .waddr(coef_addr), .wsel(coef_sel), .wdata(coef_data),
    .raddr({adc_num, quarter}),
    .c_out(c_coef), .s_out(s_coef)
  );

  // Align the samples with the synchronous RAM read.
  always_ff @(posedge clk) begin
    cur_r  <= adc_data;
    prev_r <= prev_sample;
  end

  matrix_rotation #(.DATA_W(ADC_W), .COEF_W(COEF_W), .SHIFT(ROT_SHIFT), .OUT_W(ROT_W)) u_rot (
    .clk, .i_in(cur_r), .q_in(prev_r), .cos_k(c_coef), .sin_k(s_coef),
    .i_out(i_cav), .q_out(q_cav)
  );

  cond_control #(.N_ADC(N_ADC), .LAT(4)) u_ctrl (
    .clk, .rst, .valid_in(process_data), .adc_num,
    .acc_load, .acc_add, .data_ready
  );

  iq_accumulator #(.IN_W(ROT_W), .N_ADC(N_ADC), .OUT_W(SUM_W)) u_acc (
    .clk, .rst, .load(acc_load), .add(acc_add),
    .i_in(i_cav), .q_in(q_cav), .i_acc(i_sum), .q_acc(q_sum)
  );

endmodule
