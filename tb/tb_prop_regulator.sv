// tb_prop_regulator: random field estimates, set points, gains and
// feed-forward values every clock, with values large enough to saturate both
// the error and the output. Each clock the outputs must equal
//   sat16(ff + (sat18(set - av) * kfb >>> 12))
// built from set/av of 3 clocks earlier, the gain of 2 clocks earlier and the
// feed-forward of 1 clock earlier (the three pipeline stages), and dr_out must
// be dr_in delayed by 3.
module tb_prop_regulator;
  import llrf_pkg::*;
  localparam int IW = 20;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, dr_in, dr_out;
  logic signed [IW-1:0] i_av, q_av, i_set, q_set;
  logic signed [MULT_W-1:0] kfb_i, kfb_q;
  logic signed [CTRL_W-1:0] i_ff, q_ff, i_ctrl, q_ctrl;
  int checks = 0, failures = 0, sat_out = 0, sat_err = 0;

  typedef struct {
    longint ia, qa, is, qs, ki, kq, fi, fq;
    logic dr;
  } hist_t;
  hist_t h [$];

  prop_regulator #(.IN_W(IW)) dut (.*);

  initial begin
    #200000;
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

  function automatic longint model(longint set, longint av, longint k, longint ff, ref int se, ref int so);
    longint e, o;
    e = satl(set - av, MULT_W);
    if (e != set - av) se++;
    o = ff + ((e * k) >>> KFB_FRAC);
    if (o != satl(o, CTRL_W)) so++;
    return satl(o, CTRL_W);
  endfunction

  initial begin
    hist_t x;
    rst = 1; dr_in = 0;
    i_av = 0; q_av = 0; i_set = 0; q_set = 0; kfb_i = 0; kfb_q = 0; i_ff = 0; q_ff = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t >= 3) begin
        longint ei, eq;
        hist_t a, b, c;
        a = h[h.size()-3]; b = h[h.size()-2]; c = h[h.size()-1];
        ei = model(a.is, a.ia, b.ki, c.fi, sat_err, sat_out);
        eq = model(a.qs, a.qa, b.kq, c.fq, sat_err, sat_out);
        checks++;
        if (i_ctrl !== CTRL_W'(ei) || q_ctrl !== CTRL_W'(eq) || dr_out !== a.dr) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d,%0d,%b exp %0d,%0d,%b", t, i_ctrl, q_ctrl, dr_out, ei, eq, a.dr);
        end
      end
      // small values most of the time, large ones now and then
      i_av  = (t % 5 == 0) ? IW'($urandom) : IW'(int'($urandom_range(8000)) - 4000);
      q_av  = (t % 7 == 0) ? IW'($urandom) : IW'(int'($urandom_range(8000)) - 4000);
      i_set = IW'(int'($urandom_range(8000)) - 4000);
      q_set = IW'(int'($urandom_range(8000)) - 4000);
      kfb_i = MULT_W'(int'($urandom_range(40000)) - 20000);
      kfb_q = MULT_W'(int'($urandom_range(40000)) - 20000);
      i_ff  = CTRL_W'($urandom); q_ff = CTRL_W'($urandom);
      dr_in = ($urandom_range(7) == 0);
      x.ia = i_av; x.qa = q_av; x.is = i_set; x.qs = q_set;
      x.ki = kfb_i; x.kq = kfb_q; x.fi = i_ff; x.fq = q_ff; x.dr = dr_in;
      h.push_back(x);
    end
    if (sat_out == 0 || sat_err == 0) failures++;
    $display("saturated errors=%0d saturated outputs=%0d", sat_err, sat_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
