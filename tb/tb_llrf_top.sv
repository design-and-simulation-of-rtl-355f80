// tb_llrf_top: end-to-end test of the whole field controller at its default
// size (4 conditioners x 8 ADCs, 32 cavities).
//
// Calibration: every cavity gets its own probe gain K_c (2.2 .. 4.0) and
// cable phase phi_c; the host writes the four quarter-dependent coefficient
// pairs of every cavity over the CPU bus:
//   quarter 0: (sin/K, cos/K)   quarter 1: (cos/K, -sin/K)
//   quarter 2: (-sin/K, -cos/K) quarter 3: (-cos/K, sin/K)
// (the word on the rotation's "cos" port first), scaled by 2**18.
// Signal: a common cavity field (I, Q) is turned into the four IF samples
// each probe would deliver, K*(Q cos + I sin), K*(I cos - Q sin) and their
// negatives, plus a little noise, and sent as bursts of 8 words per bus.
//
// Checks:
//  * every control vector equals a bit-exact integer model of the whole
//    chain (rotation, sums, filter, regulator);
//  * each appears 19 clocks after the first ADC word of its burst
//    (12 after the last word when the burst was stalled);
//  * after a settled constant field the filtered field estimate equals
//    32 x (I, Q) within the rounding of the coefficients;
//  * mechanisms exercised and counted: all four quarters, back-to-back
//    bursts, idle gaps (held conditioner data ready), process_data dropped
//    inside a burst, filter coefficient change, set point / gain /
//    feed-forward change, output saturation.
module tb_llrf_top;
  import llrf_pkg::*;
  localparam int N_COND = 4, N_ADC = 8, NW = 3, NCAV = 32;
  localparam int ROT_W = 15, SUM_W = 18, FLD_W = 20;
  localparam real PI = 3.14159265358979;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, process_data, lpf_we, data_ready;
  logic signed [ADC_W-1:0] adc_data [N_COND];
  logic [NW-1:0] adc_num;
  quarter_t quarter;
  cpu_wr_t cpu_wr;
  logic signed [MULT_W-1:0] one_over_n, kfb_i, kfb_q;
  logic signed [FLD_W-1:0] i_set, q_set;
  logic signed [CTRL_W-1:0] i_ff, q_ff, i_ctrl, q_ctrl;

  llrf_top dut (.*);

  int checks = 0, failures = 0, cycle = 0;
  int n_quarter [4], n_b2b = 0, n_gap = 0, n_stall = 0, n_kwrite = 0, n_setchg = 0, n_sat = 0, n_out = 0;

  // calibration and model state
  real kc [NCAV], ph [NCAV];
  longint cc [NCAV][4], ss [NCAV][4];
  longint prev [NCAV];
  longint y_i = 0, y_q = 0, k_lpf = 0;
  longint exp_i [$], exp_q [$];
  int exp_t [$];
  logic signed [CTRL_W-1:0] last_i, last_q;

  always @(posedge clk) cycle++;

  initial begin
    #3000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic longint satl(longint v, int w);
    longint hi, lo;
    hi = (64'sd1 <<< (w-1)) - 1; lo = -(64'sd1 <<< (w-1));
    return v > hi ? hi : (v < lo ? lo : v);
  endfunction

  // Output monitor.
  always @(posedge clk) begin
    #2;
    if (!rst && data_ready) begin
      n_out++;
      last_i = i_ctrl; last_q = q_ctrl;
      checks++;
      if (exp_i.size() == 0) begin failures++; $display("unexpected data_ready"); end
      else begin
        if (i_ctrl !== CTRL_W'(exp_i[0]) || q_ctrl !== CTRL_W'(exp_q[0]) || cycle != exp_t[0]) begin
          failures++;
          if (failures < 10) $display("out %0d: got %0d,%0d at %0d, exp %0d,%0d at %0d",
                                      n_out, i_ctrl, q_ctrl, cycle, exp_i[0], exp_q[0], exp_t[0]);
        end
        void'(exp_i.pop_front()); void'(exp_q.pop_front()); void'(exp_t.pop_front());
      end
    end
  end

  task automatic cpu_write(input int cond, input int adc, input int q, input int sel, input longint v);
    @(posedge clk); #1;
    cpu_wr.we = 1;
    cpu_wr.addr = CPU_AW'((cond << 6) | (adc << 3) | (q << 1) | sel);
    cpu_wr.data = COEF_W'(v);
    n_kwrite++;
  endtask

  task automatic idle(input int n);
    repeat (n) begin
      @(posedge clk); #1;
      cpu_wr.we = 0; lpf_we = 0; process_data = 0; adc_num = NW'($urandom);
      for (int b = 0; b < N_COND; b++) adc_data[b] = ADC_W'($urandom);
    end
  endtask

  // Rotation of one pair as the hardware does it (15-bit result).
  function automatic longint rot(longint a, longint b, longint c, longint s, bit q_part);
    logic signed [ROT_W-1:0] r;
    if (!q_part) r = ROT_W'(((a * c) >>> ROT_SHIFT) - ((b * s) >>> ROT_SHIFT));
    else         r = ROT_W'(((b * c) >>> ROT_SHIFT) + ((a * s) >>> ROT_SHIFT));
    return longint'(r);
  endfunction

  // One burst: every bus sends the samples of its 8 cavities for quarter q.
  task automatic burst(input real fi, input real fq, input int q, input bit stall, input longint set_i,
                       input longint set_q, input longint ki, input longint kq, input longint fi_ff, input longint fq_ff);
    longint si [N_COND], sq [N_COND], vi, vq, e, o;
    int t0;
    n_quarter[q]++;
    for (int b = 0; b < N_COND; b++) begin si[b] = 0; sq[b] = 0; end
    for (int a = 0; a < N_ADC; a++) begin
      if (stall && a == 5) idle(1);
      @(posedge clk); #1;
      cpu_wr.we = 0; lpf_we = 0;
      process_data = 1; adc_num = NW'(a); quarter = quarter_t'(q);
      if (a == 0) t0 = cycle;
      for (int b = 0; b < N_COND; b++) begin
        int cav;
        real v;
        longint vs;
        logic signed [SUM_W-1:0] ti, tq;
        cav = b * N_ADC + a;
        case (q)
          0: v =  kc[cav] * (fq * $cos(ph[cav]) + fi * $sin(ph[cav]));
          1: v =  kc[cav] * (fi * $cos(ph[cav]) - fq * $sin(ph[cav]));
          2: v = -kc[cav] * (fq * $cos(ph[cav]) + fi * $sin(ph[cav]));
          default: v = -kc[cav] * (fi * $cos(ph[cav]) - fq * $sin(ph[cav]));
        endcase
        vs = longint'($rtoi(v)) + longint'($urandom_range(4)) - 2;
        adc_data[b] = ADC_W'(vs);
        ti = SUM_W'(si[b] + rot(vs, prev[cav], cc[cav][q], ss[cav][q], 0));
        tq = SUM_W'(sq[b] + rot(vs, prev[cav], cc[cav][q], ss[cav][q], 1));
        si[b] = longint'(ti); sq[b] = longint'(tq);
        prev[cav] = vs;
      end
    end
    // vector sum, filter and regulator model
    vi = 0; vq = 0;
    for (int b = 0; b < N_COND; b++) begin vi += si[b]; vq += sq[b]; end
    y_i += satl((satl(vi - y_i, MULT_W) * k_lpf) >>> LPF_SHIFT, FLD_W);
    y_q += satl((satl(vq - y_q, MULT_W) * k_lpf) >>> LPF_SHIFT, FLD_W);
    o = fi_ff + ((satl(set_i - y_i, MULT_W) * ki) >>> KFB_FRAC);
    if (o != satl(o, CTRL_W)) n_sat++;
    exp_i.push_back(satl(o, CTRL_W));
    o = fq_ff + ((satl(set_q - y_q, MULT_W) * kq) >>> KFB_FRAC);
    if (o != satl(o, CTRL_W)) n_sat++;
    exp_q.push_back(satl(o, CTRL_W));
    exp_t.push_back(stall ? cycle + 12 : t0 + 19);
    if (stall) n_stall++;
  endtask

  task automatic settings(input longint si_, input longint sq_, input longint ki, input longint kq, input longint fi, input longint fq);
    idle(24);   // let the previous control vectors leave the regulator
    i_set = FLD_W'(si_); q_set = FLD_W'(sq_); kfb_i = MULT_W'(ki); kfb_q = MULT_W'(kq);
    i_ff = CTRL_W'(fi); q_ff = CTRL_W'(fq);
    n_setchg++;
  endtask

  // A run of bursts with a given field; gap pattern varies.
  task automatic run(input int n, input real fi0, input real fq0, input real dfi, input int gap_mode);
    for (int k = 0; k < n; k++) begin
      int g;
      burst(fi0 + dfi * k, fq0 - dfi * k, k % 4, (k % 11) == 6,
            longint'(i_set), longint'(q_set), longint'(kfb_i), longint'(kfb_q), longint'(i_ff), longint'(q_ff));
      g = (gap_mode == 0) ? 0 : (gap_mode == 1 ? 2 : int'($urandom_range(0, 6)));
      if (g == 0) n_b2b++; else n_gap++;
      if (g != 0) idle(g);
    end
  endtask

  initial begin
    rst = 1; process_data = 0; adc_num = 0; quarter = 0; lpf_we = 0; one_over_n = 0;
    cpu_wr = '0; i_set = 0; q_set = 0; kfb_i = 0; kfb_q = 0; i_ff = 0; q_ff = 0;
    for (int b = 0; b < N_COND; b++) adc_data[b] = 0;
    for (int c = 0; c < NCAV; c++) prev[c] = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;

    // calibration
    for (int c = 0; c < NCAV; c++) begin
      real cs, sn;
      kc[c] = 2.2 + 1.8 * real'($urandom_range(1000)) / 1000.0;
      ph[c] = 2.0 * PI * real'($urandom_range(1000)) / 1000.0;
      cs = $cos(ph[c]) / kc[c] * 262144.0;
      sn = $sin(ph[c]) / kc[c] * 262144.0;
      cc[c][0] = longint'($rtoi(sn));  ss[c][0] = longint'($rtoi(cs));
      cc[c][1] = longint'($rtoi(cs));  ss[c][1] = -longint'($rtoi(sn));
      cc[c][2] = -longint'($rtoi(sn)); ss[c][2] = -longint'($rtoi(cs));
      cc[c][3] = -longint'($rtoi(cs)); ss[c][3] = longint'($rtoi(sn));
      for (int q = 0; q < 4; q++) begin
        cpu_write(c / N_ADC, c % N_ADC, q, 0, cc[c][q]);
        cpu_write(c / N_ADC, c % N_ADC, q, 1, ss[c][q]);
      end
    end
    @(posedge clk); #1 cpu_wr.we = 0; lpf_we = 1; one_over_n = MULT_W'(1 << 15); k_lpf = 1 << 15;  // alpha 1/4
    @(posedge clk); #1 lpf_we = 0;

    // phase 1: constant field, regulator at unity gain around 0
    settings(0, 0, 4096, 4096, 0, 0);
    run(120, 400.0, -250.0, 0.0, 2);
    idle(24);
    begin
      // At unity gain and zero set point the drive is minus the filtered field
      // estimate, which must be 32 x (400, -250): truncation of the two
      // products and coefficient rounding cost up to about 3 LSB per cavity.
      int ei, eq;
      ei = -int'(last_i); eq = -int'(last_q);
      checks++;
      if (ei > 32*400 + 16 || ei < 32*400 - 112 || eq > -32*250 + 16 || eq < -32*250 - 112) begin
        failures++;
        $display("field estimate %0d,%0d, expected about %0d,%0d", ei, eq, 32*400, -32*250);
      end
      $display("settled field estimate I=%0d Q=%0d (32 x field = %0d, %0d)", ei, eq, 32*400, -32*250);
    end
    // phase 2: set point at the field, feed-forward and other gains, back to back
    settings(12800, -8000, 20000, -15000, 1000, -2000);
    run(80, 400.0, -250.0, 0.5, 0);
    // phase 3: new filter coefficient, field step, strong gain (output saturates)
    idle(24);
    @(posedge clk); #1 lpf_we = 1; one_over_n = MULT_W'(1 << 13); k_lpf = 1 << 13;      // alpha 1/16
    @(posedge clk); #1 lpf_we = 0;
    settings(0, 0, 131071, -131072, -300, 300);
    run(80, -600.0, 700.0, -1.0, 1);
    idle(30);

    if (exp_i.size() != 0) begin failures++; $display("%0d control vectors missing", exp_i.size()); end
    for (int q = 0; q < 4; q++) if (n_quarter[q] == 0) begin failures++; $display("quarter %0d never used", q); end
    if (n_b2b == 0)  begin failures++; $display("no back-to-back bursts"); end
    if (n_gap == 0)  begin failures++; $display("no idle gaps"); end
    if (n_stall == 0) begin failures++; $display("no stalled bursts"); end
    if (n_sat == 0)  begin failures++; $display("no output saturation"); end
    if (n_setchg < 3) begin failures++; $display("settings not changed"); end
    $display("bursts q0..q3=%0d,%0d,%0d,%0d back_to_back=%0d gaps=%0d stalls=%0d coef_writes=%0d setting_changes=%0d saturated=%0d outputs=%0d",
             n_quarter[0], n_quarter[1], n_quarter[2], n_quarter[3], n_b2b, n_gap, n_stall, n_kwrite, n_setchg, n_sat, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
