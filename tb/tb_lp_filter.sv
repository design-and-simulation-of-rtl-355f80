// tb_lp_filter: the IIR low-pass against an integer model of
//   y += sat20((sat18(x - y) * one_over_n) >>> 17)
// The input changes between updates (steps, full-scale jumps that saturate
// the 18-bit difference, random values); data_ready is sometimes a one-clock
// pulse and sometimes held high for many clocks, which must still give one
// update. one_over_n is rewritten during the run. Checked at every
// dout_valid: the new state, and that it arrives 3 clocks after the rising
// edge of data_ready. Finally a long constant input must be approached to
// within the truncation dead band.
module tb_lp_filter;
  import llrf_pkg::*;
  localparam int IW = 20;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, data_ready, we, dout_valid;
  logic signed [IW-1:0] din, dout;
  logic signed [MULT_W-1:0] one_over_n;
  int checks = 0, failures = 0, cycle = 0, sats = 0, long_dr = 0, updates = 0;
  longint y, k;
  int t_edge;
  logic signed [IW-1:0] exp_y [$];
  int exp_t [$];

  lp_filter #(.IN_W(IW)) dut (.*);

  always @(posedge clk) cycle++;

  initial begin
    #2000000;
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

  always @(posedge clk) begin
    #2;
    if (dout_valid) begin
      checks++;
      if (exp_y.size() == 0) begin failures++; $display("unexpected dout_valid"); end
      else begin
        if (dout !== exp_y[0] || cycle - exp_t[0] != 3) begin
          failures++;
          if (failures < 10) $display("got %0d after %0d clk, exp %0d after 3", dout, cycle - exp_t[0], exp_y[0]);
        end
        void'(exp_y.pop_front()); void'(exp_t.pop_front());
      end
    end
  end

  task automatic update(input logic signed [IW-1:0] x, input int hold);
    longint d;
    @(posedge clk); #1;
    din = x; data_ready = 1;
    d = longint'(x) - y;
    if (d != satl(d, MULT_W)) sats++;
    y = y + satl((satl(d, MULT_W) * k) >>> LPF_SHIFT, IW);
    exp_y.push_back(IW'(y)); exp_t.push_back(cycle);
    updates++;
    if (hold > 1) long_dr++;
    repeat (hold) begin @(posedge clk); #1 din = IW'($urandom); end
    data_ready = 0;
    repeat (4) @(posedge clk);
  endtask

  task automatic set_k(input int v);
    @(posedge clk); #1 we = 1; one_over_n = MULT_W'(v); k = v;
    @(posedge clk); #1 we = 0; one_over_n = MULT_W'($urandom);
  endtask

  initial begin
    rst = 1; data_ready = 0; we = 0; din = 0; one_over_n = 0; y = 0; k = 0;
    repeat (3) @(posedge clk);
    #1 rst = 0;
    set_k(1 << 14);                                     // alpha = 1/8
    update(20'sd300000, 1);                             // big step, difference saturates
    update(-20'sd524288, 6);                            // full-scale jump, held data_ready
    for (int n = 0; n < 200; n++) update(IW'($urandom), $urandom_range(1, 12));
    set_k(131071);                                      // alpha just below 1
    for (int n = 0; n < 50; n++) update(IW'($urandom) >>> 3, 1);
    set_k(1 << 13);                                     // alpha = 1/16
    for (int n = 0; n < 300; n++) update(20'sd12345, 1 + n % 3);
    repeat (6) @(posedge clk);
    checks++;
    if (dout > 12345 || dout < 12345 - 16) begin
      failures++; $display("did not settle: %0d", dout);
    end
    if (exp_y.size() != 0) begin failures++; $display("missing updates"); end
    if (sats == 0 || long_dr == 0) failures++;
    $display("updates=%0d saturated=%0d held_data_ready=%0d", updates, sats, long_dr);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
