// tb_coef_ram: writes random coefficients to every entry of the coefficient
// memory in random order, then reads all entries back in random order and
// checks both words against a reference array, including that the read data
// arrive exactly one clock after the address. Also checks that a write to one
// word of an entry leaves the other word alone.
module tb_coef_ram;
  import llrf_pkg::*;
  localparam int N_ADC = 8, AW = 5, DEPTH = 32;
  logic clk = 0;
  always #5 clk = ~clk;

  logic we, wsel;
  logic [AW-1:0] waddr, raddr;
  logic signed [COEF_W-1:0] wdata, c_out, s_out;
  logic signed [COEF_W-1:0] ref_c [DEPTH], ref_s [DEPTH];
  int checks = 0, failures = 0;

  coef_ram #(.N_ADC(N_ADC)) dut (.clk, .we, .waddr, .wsel, .wdata, .raddr, .c_out, .s_out);

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic wr(input int a, input bit sel, input logic signed [COEF_W-1:0] d);
    @(negedge clk);
    we = 1; waddr = AW'(a); wsel = sel; wdata = d;
    if (sel) ref_s[a] = d; else ref_c[a] = d;
    @(negedge clk);
    we = 0;
  endtask

  initial begin
    we = 0; wsel = 0; waddr = 0; raddr = 0; wdata = 0;
    for (int a = 0; a < DEPTH; a++) begin
      wr(a, 0, COEF_W'($urandom));
      wr(a, 1, COEF_W'($urandom));
    end
    for (int n = 0; n < 40; n++) wr($urandom_range(DEPTH-1), n[0], COEF_W'($urandom));
    for (int n = 0; n < 200; n++) begin
      int a;
      a = $urandom_range(DEPTH-1);
      @(negedge clk);
      raddr = AW'(a);
      @(negedge clk);
      raddr = AW'(a + 1);   // a new address must not disturb this clock's data
      checks++;
      if (c_out !== ref_c[a] || s_out !== ref_s[a]) begin
        failures++;
        $display("read %0d: got %0d,%0d exp %0d,%0d", a, c_out, s_out, ref_c[a], ref_s[a]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
