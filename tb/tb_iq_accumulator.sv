// tb_iq_accumulator: random load / add / hold sequences with random signed
// inputs; after every clock both accumulator outputs must equal a reference
// sum (preset on load, summed on add, unchanged otherwise).
module tb_iq_accumulator;
  localparam int IN_W = 15, N_ADC = 8, OUT_W = 18;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, load, add;
  logic signed [IN_W-1:0] i_in, q_in;
  logic signed [OUT_W-1:0] i_acc, q_acc, ri, rq;
  int checks = 0, failures = 0;

  iq_accumulator #(.IN_W(IN_W), .N_ADC(N_ADC)) dut (.clk, .rst, .load, .add, .i_in, .q_in, .i_acc, .q_acc);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; load = 0; add = 0; i_in = 0; q_in = 0; ri = 0; rq = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int n = 0; n < 2000; n++) begin
      int r;
      @(negedge clk);
      r = $urandom_range(9);
      load = (r == 0) || (n % 8 == 0);
      add  = !load && r < 8;
      i_in = IN_W'($urandom); q_in = IN_W'($urandom);
      if (load) begin ri = OUT_W'(i_in); rq = OUT_W'(q_in); end
      else if (add) begin ri += OUT_W'(i_in); rq += OUT_W'(q_in); end
      @(posedge clk); #1;
      checks++;
      if (i_acc !== ri || q_acc !== rq) begin
        failures++;
        if (failures < 10) $display("n=%0d got %0d,%0d exp %0d,%0d", n, i_acc, q_acc, ri, rq);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
