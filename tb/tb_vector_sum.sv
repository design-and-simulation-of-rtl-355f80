// tb_vector_sum: random conditioner sums (including full-scale values, which
// must not overflow) and random data-ready patterns. One clock later the
// outputs must be the exact sums and data_ready must be high only when all
// four inputs were high.
module tb_vector_sum;
  localparam int N = 4, IW = 18, OW = 20;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, data_ready;
  logic signed [IW-1:0] i_in [N], q_in [N];
  logic [N-1:0] dr_in;
  logic signed [OW-1:0] i_sum, q_sum, ei, eq;
  logic edr;
  int checks = 0, failures = 0, partial_dr = 0, all_dr = 0;

  vector_sum #(.N_COND(N), .IN_W(IW)) dut (.*);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; dr_in = 0;
    for (int n = 0; n < N; n++) begin i_in[n] = 0; q_in[n] = 0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst = 0;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      ei = 0; eq = 0;
      for (int n = 0; n < N; n++) begin
        if (t < 2) begin
          i_in[n] = t[0] ? {1'b1, {(IW-1){1'b0}}} : {1'b0, {(IW-1){1'b1}}};
          q_in[n] = t[0] ? {1'b0, {(IW-1){1'b1}}} : {1'b1, {(IW-1){1'b0}}};
        end else begin
          i_in[n] = IW'($urandom); q_in[n] = IW'($urandom);
        end
        ei += OW'(i_in[n]); eq += OW'(q_in[n]);
      end
      dr_in = ($urandom_range(2) == 0) ? '1 : N'($urandom);
      edr = &dr_in;
      if (edr) all_dr++; else if (dr_in != 0) partial_dr++;
      @(negedge clk);
      checks++;
      if (i_sum !== ei || q_sum !== eq || data_ready !== edr) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d,%0d,%b exp %0d,%0d,%b", t, i_sum, q_sum, data_ready, ei, eq, edr);
      end
    end
    if (partial_dr == 0 || all_dr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
