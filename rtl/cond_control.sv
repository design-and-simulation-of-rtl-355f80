// cond_control: control logic of one ADC conditioner.
//
// Each ADC word enters the conditioner with its ADC (cavity) number and a
// valid flag ("Process data"). This block delays number and flag by LAT
// clocks, the latency of the coefficient RAM read plus the matrix rotation,
// so that they line up with the rotated I_c, Q_c at the accumulator input.
// There it issues
//   acc_load  - preset the accumulator with this word (ADC number 0),
//   acc_add   - add this word to the accumulator (other ADC numbers),
//   data_ready- a level, set in the same clock the accumulator receives the
//               last cavity (ADC number N_ADC-1), so it rises together with
//               the complete 8-cavity sum, and cleared when the next preset
//               overwrites that sum.
// Data ready as a level (rather than a pulse) is this design's choice; the
// low-pass filter downstream detects its rising edge.
// Bus rule (checked by an assertion): valid words carry consecutive ADC
// numbers, 0 after N_ADC-1, so every burst is 0..N_ADC-1 in order.
module cond_control #(
  parameter int N_ADC = 8,
  parameter int LAT   = 4,
  parameter int NW    = $clog2(N_ADC)
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          valid_in,
  input  logic [NW-1:0] adc_num,
  output logic          acc_load,
  output logic          acc_add,
  output logic          data_ready
);
  logic          v_d [LAT];
  logic [NW-1:0] n_d [LAT];

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < LAT; i++) begin
        v_d[i] <= 1'b0;
        n_d[i] <= '0;
      end
    end else begin
      v_d[0] <= valid_in;
      n_d[0] <= adc_num;
      for (int i = 1; i < LAT; i++) begin
        v_d[i] <= v_d[i-1];
        n_d[i] <= n_d[i-1];
      end
    end
  end

  assign acc_load = v_d[LAT-1] && (n_d[LAT-1] == '0);
  assign acc_add  = v_d[LAT-1] && (n_d[LAT-1] != '0);

  always_ff @(posedge clk) begin
    if (rst)
      data_ready <= 1'b0;
    else if (v_d[LAT-1] && n_d[LAT-1] == NW'(N_ADC - 1))
      data_ready <= 1'b1;
    else if (acc_load)
      data_ready <= 1'b0;
  end

  // Framing check of the ADC bus.
  logic [NW-1:0] last_num;
  logic          seen;
  always_ff @(posedge clk) begin
    if (rst) begin
      seen     <= 1'b0;
      last_num <= '0;
    end else if (valid_in) begin
      seen     <= 1'b1;
      last_num <= adc_num;
    end
  end

  a_burst_order: assert property (@(posedge clk) disable iff (rst)
    (valid_in && seen) |-> (adc_num == ((last_num == NW'(N_ADC - 1)) ? '0 : last_num + 1'b1)))
    else $error("ADC number %0d follows %0d", adc_num, last_num);

endmodule
