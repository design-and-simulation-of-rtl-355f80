// tb_cond_control: feeds bursts of ADC numbers 0..7 (back to back, with idle
// gaps, and with process_data dropped inside a burst) and checks that
//  * acc_load / acc_add appear exactly LAT = 4 clocks after each valid word,
//    load for ADC 0 and add for the others, nothing for invalid words;
//  * data_ready rises one clock after the add of ADC 7 and falls one clock
//    after the next load.
module tb_cond_control;
  localparam int N_ADC = 8, LAT = 4, NW = 3;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, valid_in, acc_load, acc_add, data_ready;
  logic [NW-1:0] adc_num;
  int checks = 0, failures = 0, rises = 0;
  logic v_hist [$];
  logic [NW-1:0] n_hist [$];
  logic exp_dr;

  cond_control #(.N_ADC(N_ADC), .LAT(LAT)) dut (.clk, .rst, .valid_in, .adc_num, .acc_load, .acc_add, .data_ready);

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Reference: the word presented LAT clocks ago drives the accumulator now.
  always @(negedge clk) if (!rst) begin
    logic v; logic [NW-1:0] nn; logic el, ea;
    v = v_hist[v_hist.size() - 1 - LAT];
    nn = n_hist[n_hist.size() - 1 - LAT];
    el = v && nn == 0;
    ea = v && nn != 0;
    checks++;
    if (acc_load !== el || acc_add !== ea || data_ready !== exp_dr) begin
      failures++;
      if (failures < 10) $display("%t: load %b/%b add %b/%b dr %b/%b", $time, acc_load, el, acc_add, ea, data_ready, exp_dr);
    end
    // next data_ready value
    if (v && nn == NW'(N_ADC-1)) begin exp_dr = 1; rises++; end
    else if (el) exp_dr = 0;
  end

  task automatic present(input logic v, input int nn);
    @(posedge clk);
    #1;
    valid_in = v; adc_num = NW'(nn);
    v_hist.push_back(v); n_hist.push_back(NW'(nn));
  endtask

  initial begin
    rst = 1; valid_in = 0; adc_num = 0; exp_dr = 0;
    for (int i = 0; i <= LAT; i++) begin v_hist.push_back(0); n_hist.push_back(0); end
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int b = 0; b < 200; b++) begin
      for (int a = 0; a < N_ADC; a++) begin
        if (b % 5 == 3 && a == 4) present(0, 4);   // stall inside a burst
        present(1, a);
      end
      for (int g = 0; g < int'(b % 4); g++) present(0, $urandom_range(7));
    end
    repeat (8) present(0, 0);
    if (rises < 200) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
