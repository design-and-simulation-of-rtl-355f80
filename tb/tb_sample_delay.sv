// tb_sample_delay: drives the Z^-8 delay with a random enable pattern and
// random data. A reference queue records every enabled word; in each clock
// the output must be the word enabled 8 enables earlier (zero for the first
// 8 after reset), and a clock without enable must leave it unchanged.
module tb_sample_delay;
  localparam int W = 14, DEPTH = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, en;
  logic signed [W-1:0] din, dout;
  logic signed [W-1:0] hist [$];
  int checks = 0, failures = 0, gaps = 0;

  sample_delay #(.W(W), .DEPTH(DEPTH)) dut (.clk, .rst, .en, .din, .dout);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; en = 0; din = 0;
    for (int i = 0; i < DEPTH; i++) hist.push_back('0);
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      en  = ($urandom_range(3) != 0);
      din = W'($urandom);
      if (!en) gaps++;
      #1;
      checks++;
      if (dout !== hist[hist.size() - DEPTH]) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d exp %0d", n, dout, hist[hist.size() - DEPTH]);
      end
      if (en) hist.push_back(din);
    end
    if (gaps == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
