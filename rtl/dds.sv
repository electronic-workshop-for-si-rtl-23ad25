// dds: direct digital synthesizer (numerically controlled oscillator).
//
// A phase-increment register feeds a PHASE_W-bit phase accumulator that wraps
// modulo 2^PHASE_W; the quantizer keeps the top LUT_W bits of the phase, which
// address a sine/cosine lookup table of 2^LUT_W entries. The output frequency
// is f_out = f_clk * phase_inc / 2^PHASE_W: with the document's numbers
// (f_clk = 120 MHz, increment 12, N = 10) 1.40625 MHz. The same block with a
// 4-bit accumulator and increment 5 at 160 MHz is the 50 MHz LO of the vector
// output. The table holds round(AMP * sin(2*pi*k / 2^LUT_W)), AMP = 2^(AMP_W-1)-1,
// computed at elaboration; cosine reads the same table a quarter turn ahead.
// Table amplitude, quantizer rounding (truncation) and reset are this design's.
//
// Timing: while en is high the accumulator advances every clock. phase_inc is
// registered first, then the accumulator, then the table output, as in the
// document's block diagram: a new increment shows in the phase two clocks
// later, the outputs are the table values of the phase one clock earlier.
module dds #(
  parameter int PHASE_W = 10,
  parameter int LUT_W   = 10,
  parameter int AMP_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic [PHASE_W-1:0]      phase_inc,
  output logic [PHASE_W-1:0]      phase,
  output logic signed [AMP_W-1:0] sin_out,
  output logic signed [AMP_W-1:0] cos_out
);

  import llrf_pkg::*;

  localparam int DEPTH = 1 << LUT_W;
  localparam int AMP   = (1 << (AMP_W - 1)) - 1;

  typedef logic signed [AMP_W-1:0] amp_t;

  function automatic amp_t [DEPTH-1:0] make_table();
    amp_t [DEPTH-1:0] t;
    for (int k = 0; k < DEPTH; k++) t[k] = AMP_W'(sine_entry(k, LUT_W, AMP));
    return t;
  endfunction

  localparam amp_t [DEPTH-1:0] SINE = make_table();

  logic [PHASE_W-1:0] inc_q;
  logic [LUT_W-1:0]   addr_s, addr_c;

  always_comb begin
    addr_s = phase[PHASE_W-1 -: LUT_W];
    addr_c = addr_s + LUT_W'(DEPTH / 4);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      inc_q   <= '0;
      phase   <= '0;
      sin_out <= '0;
      cos_out <= '0;
    end else if (en) begin
      inc_q   <= phase_inc;
      phase   <= phase + inc_q;
      sin_out <= SINE[addr_s];
      cos_out <= SINE[addr_c];
    end
  end

endmodule
