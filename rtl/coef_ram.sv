// coef_ram: scaling and rotation coefficient memory of one ADC conditioner.
//
// Holds, for each of N_ADC cavities and each of the 4 quarters of the IF
// period, the two coefficients fed to the matrix rotation: word "c" (for the
// rotation's cos port) and word "s" (for its sin port). They are the
// +-cos(phi_c)/K_c and +-sin(phi_c)/K_c values worked out during calibration
// and written by the host over the CPU bus. The read address is the ADC
// (cavity) number and quarter number that accompany each ADC word.
//
// Interface: one write port (we, waddr = {adc, quarter}, wsel 0 = c, 1 = s,
// wdata) and one read port returning both words of an entry.
// Timing: synchronous read, data valid one clock after the address, as a
// block RAM. The contents are not reset; they must be written before use.
// Depth and organisation are this design's choice; the reference design only
// states that ADC and quarter number together address the RAM.
module coef_ram
  import llrf_pkg::*;
#(
  parameter int N_ADC = 8,
  parameter int AW    = $clog2(N_ADC) + 2
) (
  input  logic                     clk,
  input  logic                     we,
  input  logic [AW-1:0]            waddr,
  input  logic                     wsel,
  input  logic signed [COEF_W-1:0] wdata,
  input  logic [AW-1:0]            raddr,
  output logic signed [COEF_W-1:0] c_out,
  output logic signed [COEF_W-1:0] s_out
);
  localparam int DEPTH = N_ADC * 4;

  logic signed [COEF_W-1:0] mem_c [DEPTH];
  logic signed [COEF_W-1:0] mem_s [DEPTH];

  always_ff @(posedge clk) begin
    if (we && !wsel) mem_c[waddr] <= wdata;
    if (we &&  wsel) mem_s[waddr] <= wdata;
    c_out <= mem_c[raddr];
    s_out <= mem_s[raddr];
  end

endmodule
