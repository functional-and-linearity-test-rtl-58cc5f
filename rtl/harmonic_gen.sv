// harmonic_gen: sine generator for the high-voltage modulation test.
//
// One LHC test modulates a small part of the chamber high voltage and
// checks that the Running Maxima see the induced current. The FPGA makes
// the harmonic signal from a memory: a PHASE_W-bit phase accumulator
// advances by step every clock, its top TBL_LOG2 bits address a table of
// one sine period (signed 16-bit), and the sample is scaled by amp/65536
// and centred on mid-scale to give an unsigned 16-bit DAC code:
//     code = 32768 + (sin_table[phase >> (PHASE_W-TBL_LOG2)] * amp) >>> 16
// The DAC refresh picks the code up; the analog board adds it to the base
// voltage of the supply. Output frequency = f_clk * step / 2**PHASE_W.
// The table is computed at elaboration with integer arithmetic (a
// ninth-order Taylor series of the sine on each quarter period), so no
// data file is needed. When en is low the phase stays at zero and code is
// mid-scale. Timing: two clocks from phase to code (table read, scaling).
// Table size, widths and the scaling are this design's choices.
module harmonic_gen #(
  parameter int unsigned TBL_LOG2 = 8,
  parameter int unsigned PHASE_W  = 24
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        en,
  input  logic [15:0] step,
  input  logic [15:0] amp,
  output logic [15:0] code
);
  localparam int unsigned TBL = 1 << TBL_LOG2;
  typedef logic signed [15:0] tbl_t [TBL];

  // sin(2*pi*i/TBL) * 32767, Q30 fixed point Taylor series
  function automatic tbl_t make_table();
    tbl_t t;
    longint q, x, x2, term, s;
    longint pi_q30, quarter;
    quarter = longint'(TBL) >>> 2;
    pi_q30 = 64'sd3373259426;              // pi * 2**30
    for (int i = 0; i < int'(TBL); i++) begin
      q = longint'(i) % quarter;
      if (((i / int'(TBL / 4)) % 2) == 1) q = quarter - q;
      x    = (pi_q30 * 2 * q) / longint'(TBL);   // angle in [0, pi/2]
      x2   = (x * x) >>> 30;
      term = x;
      s    = x;
      for (int n = 1; n <= 4; n++) begin
        term = -((term * x2) >>> 30) / longint'((2 * n) * (2 * n + 1));
        s    = s + term;
      end
      s = (s * 32767 + (64'sd1 <<< 29)) >>> 30;
      if (i >= int'(TBL / 2)) s = -s;
      t[i] = 16'(s);
    end
    return t;
  endfunction

  localparam tbl_t SINE = make_table();

  logic [PHASE_W-1:0]  phase;
  logic signed [15:0]  samp;
  logic signed [32:0]  prod;

  assign prod = samp * $signed({1'b0, amp});

  always_ff @(posedge clk) begin
    if (rst) begin
      phase <= '0;
      samp  <= '0;
      code  <= 16'h8000;
    end else begin
      phase <= en ? phase + PHASE_W'(step) : '0;
      samp  <= en ? SINE[phase[PHASE_W-1 -: TBL_LOG2]] : 16'sd0;
      code  <= 16'h8000 + 16'(prod >>> 16);
    end
  end
endmodule
