// tb_matrix_rotation: checks the rotation datapath against an integer model.
// Random sample pairs and coefficients are applied every clock (including
// full-scale corners); each output pair must equal
//   I = (V_k*c >>> 18) - (V_k-1*s >>> 18),  Q = (V_k-1*c >>> 18) + (V_k*s >>> 18)
// exactly 3 clocks after its inputs. It also checks one calibration case
// end to end: with the quarter-1 coefficients (c = cos/K, s = -sin/K) the
// pair produced by a field of known I, Q rotates back to that I, Q.
module tb_matrix_rotation;
  localparam int DW = 14, CWID = 18, SH = 18, OW = DW + CWID - SH + 1;
  logic clk = 0;
  always #5 clk = ~clk;

  logic signed [DW-1:0]   i_in, q_in;
  logic signed [CWID-1:0] c, s;
  logic signed [OW-1:0]   i_out, q_out;
  int checks = 0, failures = 0;

  matrix_rotation #(.DATA_W(DW), .COEF_W(CWID), .SHIFT(SH)) dut (
    .clk, .i_in, .q_in, .cos_k(c), .sin_k(s), .i_out, .q_out
  );

  function automatic logic signed [OW-1:0] mdl_i(int a, int b, int cc, int ss);
    longint pa, pb;
    pa = (longint'(a) * cc) >>> SH;
    pb = (longint'(b) * ss) >>> SH;
    return OW'(pa - pb);
  endfunction
  function automatic logic signed [OW-1:0] mdl_q(int a, int b, int cc, int ss);
    longint pa, pb;
    pa = (longint'(b) * cc) >>> SH;
    pb = (longint'(a) * ss) >>> SH;
    return OW'(pa + pb);
  endfunction

  logic signed [OW-1:0] exp_i [$], exp_q [$];

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    i_in = 0; q_in = 0; c = 0; s = 0;
    repeat (4) @(posedge clk);
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      if (n < 4) begin
        i_in = (n[0]) ? -14'sd8192 : 14'sd8191;
        q_in = (n[1]) ? -14'sd8192 : 14'sd8191;
        c = -18'sd131072; s = (n[0]) ? 18'sd131071 : -18'sd131072;
      end else begin
        i_in = DW'($urandom); q_in = DW'($urandom);
        c = CWID'($urandom); s = CWID'($urandom);
      end
      exp_i.push_back(mdl_i(i_in, q_in, c, s));
      exp_q.push_back(mdl_q(i_in, q_in, c, s));
      if (n >= 3) begin
        // outputs visible now belong to the inputs of 3 clocks ago
        checks++;
        if (i_out !== exp_i[0] || q_out !== exp_q[0]) begin
          failures++;
          if (failures < 10) $display("mismatch n=%0d got %0d,%0d exp %0d,%0d", n, i_out, q_out, exp_i[0], exp_q[0]);
        end
        void'(exp_i.pop_front()); void'(exp_q.pop_front());
      end
    end
    // calibration case: K = 0.5 would need coefficients of 2.0 (too big);
    // use K = 4 (|coef| = 0.25 * cos/sin), phi = 30 degrees, I = 1000, Q = -600.
    begin
      real kc, ph, vi, vq, v0, v1, cc, ss;
      kc = 4.0; ph = 3.14159265358979 / 6.0; vi = 1000.0; vq = -600.0;
      // eq. 24 and 25: samples of quarter 0 and 1
      v0 = kc * vq * $cos(ph) + kc * vi * $sin(ph);
      v1 = -kc * vq * $sin(ph) + kc * vi * $cos(ph);
      cc = $cos(ph) / kc * 262144.0;
      ss = -$sin(ph) / kc * 262144.0;
      @(negedge clk);
      i_in = DW'($rtoi(v1)); q_in = DW'($rtoi(v0));
      c = CWID'($rtoi(cc)); s = CWID'($rtoi(ss));
      repeat (3) @(negedge clk);
      checks++;
      if (i_out < 995 || i_out > 1005 || q_out < -605 || q_out > -595) begin
        failures++;
        $display("calibration case: got I=%0d Q=%0d", i_out, q_out);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
