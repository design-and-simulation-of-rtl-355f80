// llrf_pkg: constants and types shared by the LLRF field controller.
//
// The controller turns the down-converted (250 kHz IF) probe signals of 32
// superconducting cavities into the in-phase/quadrature drive of the klystron's
// vector modulator. Word lengths are fixed here because the fixed-point
// scaling of every stage depends on them:
//   * COEF_W = 18 and the multiplier operand width MULT_W = 18 match the 18x18
//     embedded multipliers of the target FPGA family; the 18-bit right shift
//     of the rotation products and the 17-bit shift of the filter product are
//     the shifts of the reference design.
//   * ADC_W = 14 and the regulator gain scaling KFB_FRAC are this design's
//     own choices; the reference design does not state them.
// The CPU bus used to load the rotation coefficients is a simple single-cycle
// write bus (cpu_wr_t); its address map is this design's own:
//   addr = {conditioner index, ADC number, quarter, select}, select 0 = the
//   coefficient multiplying the current sample ("cos" port of the rotation),
//   select 1 = the coefficient multiplying the previous sample ("sin" port).
package llrf_pkg;

  localparam int ADC_W      = 14;  // ADC sample width (assumed)
  localparam int COEF_W     = 18;  // rotation coefficient width
  localparam int MULT_W     = 18;  // multiplier operand width
  localparam int ROT_SHIFT  = 18;  // right shift after the rotation multipliers
  localparam int LPF_SHIFT  = 17;  // right shift after the filter multiplier
  localparam int KFB_FRAC   = 12;  // fractional bits of the feedback gain (assumed)
  localparam int CTRL_W     = 16;  // vector modulator drive width (assumed)
  localparam int CPU_AW     = 16;  // CPU bus address width (assumed)

  typedef logic [1:0] quarter_t;   // quarter of the IF period, 0..3

  // One CPU bus write cycle.
  typedef struct packed {
    logic                     we;
    logic [CPU_AW-1:0]        addr;
    logic signed [COEF_W-1:0] data;
  } cpu_wr_t;

  // Saturate a wide signed value to OUT_W bits.
  function automatic logic signed [63:0] sat(input logic signed [63:0] v, input int out_w);
    logic signed [63:0] hi, lo;
    hi = (64'sd1 <<< (out_w - 1)) - 64'sd1;
    lo = -(64'sd1 <<< (out_w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

endpackage
