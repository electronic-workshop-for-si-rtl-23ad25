// iq_demux: IQ sampling demultiplexer for an IF at exactly a quarter of the
// sample rate (fs = 4 * f_IF, the n = 0 case of fs = 4/(2n+1) * f_IF). The
// same sample sequence results for n = 2, 450 degrees per sample, which is
// how a 50 MHz IF is sampled at 40 MS/s.
//
// With that sampling the samples run Q, I, -Q, -I, ... (k = 0, 1, 2, 3 mod 4).
// Each new sample is differenced with the one taken two samples earlier and
// halved, so a constant ADC offset cancels:
//   k = 1: I = (x(k) - x(k-2)) / 2       k = 3: I = (x(k-2) - x(k)) / 2
//   k = 0: Q = (x(k) - x(k-2)) / 2       k = 2: Q = (x(k-2) - x(k)) / 2
// Every sample therefore refreshes either I or Q, so both are new at fs/2
// (20 MHz for a 40 MS/s ADC); the component not refreshed holds its value.
// A pair is complete when Q has been refreshed (after the I of the sample
// before), and out_valid marks those pairs, at fs/2.
// The sign convention follows the document's sample table; the halving is an
// arithmetic shift (floor), and k restarts at 0 after reset - both choices of
// this design.
//
// Interface: in_valid qualifies in_x. Once two samples have been seen, out_i
// or out_q changes one clock after each accepted sample, and out_valid pulses
// with every change of out_q (even k).
module iq_demux #(
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_x,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q
);

  logic        [1:0]        k;        // sample index mod 4
  logic signed [DATA_W-1:0] x_d1, x_d2;
  logic        [1:0]        primed;   // counts the first two samples
  logic signed [DATA_W:0]   diff;
  logic signed [DATA_W-1:0] half;

  always_comb begin
    // x(k) - x(k-2), negated on the second half of the cycle (k = 2, 3)
    if (k[1]) diff = {x_d2[DATA_W-1], x_d2} - {in_x[DATA_W-1], in_x};
    else      diff = {in_x[DATA_W-1], in_x} - {x_d2[DATA_W-1], x_d2};
    half = DATA_W'(diff >>> 1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      k         <= '0;
      x_d1      <= '0;
      x_d2      <= '0;
      primed    <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        k    <= k + 2'd1;
        x_d1 <= in_x;
        x_d2 <= x_d1;
        if (primed != 2'd2) primed <= primed + 2'd1;
        if (primed == 2'd2) begin
          if (k[0]) begin
            out_i <= half;
          end else begin
            out_q     <= half;
            out_valid <= 1'b1;
          end
        end
      end
    end
  end

endmodule
