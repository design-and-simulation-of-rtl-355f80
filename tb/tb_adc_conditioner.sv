// tb_adc_conditioner: one conditioner with random calibration coefficients
// and random ADC samples. Bursts of 8 ADC words (one per clock, quarter
// number advancing 0,1,2,3 per burst) are sent back to back, with idle gaps,
// and with process_data dropped in the middle of a burst. The reference
// model keeps each cavity's previous sample, rotates every (V_k, V_k-1) pair
// with the coefficients of its ADC and quarter, and sums the 8 results.
// Checked: the sum at each rising edge of data_ready, that data_ready rises
// 5 clocks after the last word of the burst, and that it stays high through
// idle gaps until the next burst's first cavity is accumulated.
module tb_adc_conditioner;
  import llrf_pkg::*;
  localparam int N_ADC = 8, NW = 3, ROT_W = 15, SUM_W = 18;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, process_data, coef_we, coef_sel, data_ready;
  logic signed [ADC_W-1:0] adc_data;
  logic [NW-1:0] adc_num;
  quarter_t quarter;
  logic [NW+1:0] coef_addr;
  logic signed [COEF_W-1:0] coef_data;
  logic signed [SUM_W-1:0] i_sum, q_sum;

  adc_conditioner #(.N_ADC(N_ADC)) dut (.*);

  int checks = 0, failures = 0, cycle = 0, stalls = 0, held = 0, b2b = 0;
  logic signed [COEF_W-1:0] cc [N_ADC*4], ss [N_ADC*4];
  logic signed [ADC_W-1:0] prev [N_ADC];
  logic signed [SUM_W-1:0] exp_i [$], exp_q [$];
  int exp_t [$];
  logic dr_q;

  always @(posedge clk) cycle++;

  initial begin
    #400000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic signed [ROT_W-1:0] rot_i(int v, int vp, int c, int s);
    return ROT_W'(((longint'(v) * c) >>> ROT_SHIFT) - ((longint'(vp) * s) >>> ROT_SHIFT));
  endfunction
  function automatic logic signed [ROT_W-1:0] rot_q(int v, int vp, int c, int s);
    return ROT_W'(((longint'(vp) * c) >>> ROT_SHIFT) + ((longint'(v) * s) >>> ROT_SHIFT));
  endfunction

  // Monitor: rising edges of data_ready against the expected sums.
  always @(posedge clk) begin
    #2;
    if (!rst) begin
      if (data_ready && !dr_q) begin
        checks++;
        if (exp_i.size() == 0) begin
          failures++; $display("unexpected data_ready");
        end else begin
          if (i_sum !== exp_i[0] || q_sum !== exp_q[0] || cycle - exp_t[0] != 5) begin
            failures++;
            $display("burst: got %0d,%0d after %0d clk, exp %0d,%0d after 5", i_sum, q_sum, cycle - exp_t[0], exp_i[0], exp_q[0]);
          end
          void'(exp_i.pop_front()); void'(exp_q.pop_front()); void'(exp_t.pop_front());
        end
      end
      if (data_ready && dr_q) held++;
    end
    dr_q = data_ready;
  end

  initial begin
    rst = 1; process_data = 0; coef_we = 0; coef_sel = 0; coef_addr = 0; coef_data = 0;
    adc_data = 0; adc_num = 0; quarter = 0; dr_q = 0;
    for (int a = 0; a < N_ADC; a++) prev[a] = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    for (int e = 0; e < N_ADC*4; e++) begin
      for (int sel = 0; sel < 2; sel++) begin
        @(posedge clk); #1;
        coef_we = 1; coef_addr = (NW+2)'(e); coef_sel = sel[0]; coef_data = COEF_W'($urandom);
        if (sel == 0) cc[e] = coef_data; else ss[e] = coef_data;
      end
    end
    @(posedge clk); #1 coef_we = 0;
    for (int b = 0; b < 120; b++) begin
      logic signed [SUM_W-1:0] si, sq;
      si = 0; sq = 0;
      for (int a = 0; a < N_ADC; a++) begin
        int e;
        if (b % 7 == 5 && a == 3) begin       // stall inside the burst
          @(posedge clk); #1;
          process_data = 0; adc_data = ADC_W'($urandom); adc_num = NW'($urandom);
          stalls++;
        end
        @(posedge clk); #1;
        process_data = 1; adc_num = NW'(a); quarter = quarter_t'(b % 4);
        adc_data = ADC_W'($urandom);
        e = a * 4 + b % 4;
        si += SUM_W'(rot_i(adc_data, prev[a], cc[e], ss[e]));
        sq += SUM_W'(rot_q(adc_data, prev[a], cc[e], ss[e]));
        prev[a] = adc_data;
      end
      exp_i.push_back(si); exp_q.push_back(sq); exp_t.push_back(cycle);
      if (b % 3 == 0) b2b++;
      else repeat (b % 3 == 1 ? 2 : 9) begin
        @(posedge clk); #1;
        process_data = 0; adc_data = ADC_W'($urandom); adc_num = NW'($urandom);
      end
    end
    @(posedge clk); #1 process_data = 0;
    repeat (12) @(posedge clk);
    if (exp_i.size() != 0) begin failures++; $display("%0d bursts without data_ready", exp_i.size()); end
    if (stalls == 0 || held == 0 || b2b == 0) failures++;
    $display("stalls=%0d held=%0d back_to_back=%0d", stalls, held, b2b);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
