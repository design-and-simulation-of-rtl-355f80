// tb_llrf_closed_loop: the controller at its default size closing the loop
// around a simple behavioural model of the cavities, at 1 Msample/s and at
// 10 Msample/s (one ADC burst every 100 or every 10 clocks at 100 MHz).
//
// Cavity model (baseband, one complex field V = I + jQ shared by all 32
// cavities, updated once per sample with the drive held in between):
//   V += a * (G * u - (1 - j*d) * V)
// u = i_ctrl + j*q_ctrl is the vector modulator drive, G = 0.1 the gain from
// drive to field, a = 0.05 per microsecond the cavity bandwidth term and d the
// detuning (0.3, stepped to 0.6 to model a Lorentz-force detuning change).
// Every cavity's probe has its own gain and phase error; the calibration table
// is written as in normal operation. The set point is 32 x 400 (|V| = 400).
//
// Checks, each against values worked out from the model equations:
//  * feedback only (K_fb = 4): steady state V = G K set / ((1 - j d) + 32 G K);
//  * feed-forward only: V = G u_ff / (1 - j d); after the detuning step the
//    field drops by about 10 percent (what feedback must correct);
//  * feed-forward plus feedback: |V| stays within 1 percent of 400 before and
//    after the detuning step, at both sample rates.
module tb_llrf_closed_loop;
  import llrf_pkg::*;
  localparam int N_COND = 4, N_ADC = 8, NW = 3, NCAV = 32, FLD_W = 20;
  localparam real PI = 3.14159265358979;
  localparam real G = 0.1;
  localparam real SETV = 400.0;
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

  int checks = 0, failures = 0, n_updates = 0, n_steps = 0, q_cnt = 0;
  real kc [NCAV], ph [NCAV];
  real vr = 0.0, vi = 0.0, det = 0.3;

  always @(posedge clk) if (data_ready) n_updates++;

  initial begin
    #20000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic cpu_write(input int cond, input int adc, input int q, input int sel, input real v);
    @(posedge clk); #1;
    cpu_wr.we = 1;
    cpu_wr.addr = CPU_AW'((cond << 6) | (adc << 3) | (q << 1) | sel);
    cpu_wr.data = COEF_W'($rtoi(v));
  endtask

  // One sample period: a burst of 8 words on every bus, idle clocks, then the
  // cavity advances one sample with the drive now on the outputs.
  task automatic sample(input int period, input real a);
    real ur, ui, nr, ni;
    for (int w = 0; w < period; w++) begin
      @(posedge clk); #1;
      cpu_wr.we = 0; lpf_we = 0;
      process_data = (w < N_ADC);
      adc_num = NW'(w);
      quarter = quarter_t'(q_cnt % 4);
      for (int b = 0; b < N_COND; b++) begin
        int cav;
        real v;
        cav = b * N_ADC + (w % N_ADC);
        case (q_cnt % 4)
          0: v =  kc[cav] * (vi * $cos(ph[cav]) + vr * $sin(ph[cav]));
          1: v =  kc[cav] * (vr * $cos(ph[cav]) - vi * $sin(ph[cav]));
          2: v = -kc[cav] * (vi * $cos(ph[cav]) + vr * $sin(ph[cav]));
          default: v = -kc[cav] * (vr * $cos(ph[cav]) - vi * $sin(ph[cav]));
        endcase
        adc_data[b] = ADC_W'($rtoi(v) + int'($urandom_range(4)) - 2);
      end
    end
    q_cnt++;
    ur = real'(i_ctrl); ui = real'(q_ctrl);
    // V += a (G u - (1 - j d) V)
    nr = vr + a * (G * ur - (vr + det * vi));
    ni = vi + a * (G * ui - (vi - det * vr));
    vr = nr; vi = ni;
  endtask

  task automatic settle(input int period, input int n);
    real a;
    a = 0.05 * real'(period) / 100.0;
    repeat (n) sample(period, a);
  endtask

  function automatic real mag(real x, real y);
    return $sqrt(x * x + y * y);
  endfunction

  task automatic expect_near(input string what, input real got, input real want, input real tol);
    checks++;
    $display("%s: |V| = %0.2f, expected %0.2f", what, got, want);
    if (got > want * (1.0 + tol) || got < want * (1.0 - tol)) begin
      failures++;
      $display("  outside +-%0.1f percent", tol * 100.0);
    end
  endtask

  task automatic set_regulator(input real k, input real ffr, input real ffi);
    kfb_i = MULT_W'($rtoi(k * 4096.0)); kfb_q = MULT_W'($rtoi(k * 4096.0));
    i_ff = CTRL_W'($rtoi(ffr)); q_ff = CTRL_W'($rtoi(ffi));
  endtask

  initial begin
    real pr, pi_, den_r, den_i, ffr, ffi;
    rst = 1; process_data = 0; adc_num = 0; quarter = 0; lpf_we = 0; one_over_n = 0;
    cpu_wr = '0; i_set = FLD_W'(32 * 400); q_set = 0;
    kfb_i = 0; kfb_q = 0; i_ff = 0; q_ff = 0;
    for (int b = 0; b < N_COND; b++) adc_data[b] = 0;
    repeat (4) @(posedge clk);
    #1 rst = 0;

    for (int c = 0; c < NCAV; c++) begin
      real cs, sn;
      kc[c] = 2.2 + 1.8 * real'($urandom_range(1000)) / 1000.0;
      ph[c] = 2.0 * PI * real'($urandom_range(1000)) / 1000.0;
      cs = $cos(ph[c]) / kc[c] * 262144.0;
      sn = $sin(ph[c]) / kc[c] * 262144.0;
      cpu_write(c / N_ADC, c % N_ADC, 0, 0,  sn); cpu_write(c / N_ADC, c % N_ADC, 0, 1,  cs);
      cpu_write(c / N_ADC, c % N_ADC, 1, 0,  cs); cpu_write(c / N_ADC, c % N_ADC, 1, 1, -sn);
      cpu_write(c / N_ADC, c % N_ADC, 2, 0, -sn); cpu_write(c / N_ADC, c % N_ADC, 2, 1, -cs);
      cpu_write(c / N_ADC, c % N_ADC, 3, 0, -cs); cpu_write(c / N_ADC, c % N_ADC, 3, 1,  sn);
    end
    @(posedge clk); #1 cpu_wr.we = 0; lpf_we = 1; one_over_n = MULT_W'(1 << 15);   // alpha 1/4
    @(posedge clk); #1 lpf_we = 0;

    // ---- 1 Msample/s: 100 clocks per sample ----
    // feedback only
    det = 0.3;
    set_regulator(4.0, 0.0, 0.0);
    settle(100, 300);
    // V = G K S / ((1 - j d) + 32 G K), S = 32 * 400
    den_r = 1.0 + 32.0 * G * 4.0; den_i = -det;
    pr = G * 4.0 * 32.0 * SETV * den_r / (den_r * den_r + den_i * den_i);
    pi_ = -G * 4.0 * 32.0 * SETV * den_i / (den_r * den_r + den_i * den_i);
    expect_near("1 MS/s, feedback only", mag(vr, vi), mag(pr, pi_), 0.02);

    // feed-forward only: u_ff = V_set (1 - j d) / G
    ffr = SETV / G; ffi = -SETV * det / G;
    set_regulator(0.0, ffr, ffi);
    settle(100, 300);
    expect_near("1 MS/s, feed-forward only", mag(vr, vi), SETV, 0.01);
    det = 0.6; n_steps++;
    settle(100, 300);
    // V = G u_ff / (1 - j d)
    expect_near("1 MS/s, feed-forward only after detuning step", mag(vr, vi),
                G * mag(ffr, ffi) / mag(1.0, det), 0.01);

    // feed-forward plus feedback, detuning stepped back and forth
    det = 0.3;
    set_regulator(4.0, ffr, ffi);
    settle(100, 300);
    expect_near("1 MS/s, feed-forward + feedback", mag(vr, vi), SETV, 0.01);
    det = 0.6; n_steps++;
    settle(100, 300);
    expect_near("1 MS/s, feed-forward + feedback after detuning step", mag(vr, vi), SETV, 0.01);

    // ---- 10 Msample/s: 10 clocks per sample ----
    det = 0.3; n_steps++;
    settle(10, 3000);
    expect_near("10 MS/s, feed-forward + feedback", mag(vr, vi), SETV, 0.01);
    det = 0.6; n_steps++;
    settle(10, 3000);
    expect_near("10 MS/s, feed-forward + feedback after detuning step", mag(vr, vi), SETV, 0.01);

    // let the last control vectors leave the pipeline, then count them
    @(posedge clk); #1 process_data = 0;
    repeat (30) @(posedge clk);
    checks++;
    if (n_updates != q_cnt) begin
      failures++;
      $display("%0d control updates for %0d samples", n_updates, q_cnt);
    end
    if (n_steps < 4) failures++;
    $display("samples=%0d control_updates=%0d detuning_steps=%0d", q_cnt, n_updates, n_steps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
