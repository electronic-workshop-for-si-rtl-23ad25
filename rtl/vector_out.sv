// vector_out: digital vector (IQ) modulator for a single-DAC output.
//
// The PI controller's I and Q are put on an intermediate frequency inside the
// FPGA,  RF(t) = I * sin(wt) + Q * cos(wt) = A * sin(wt + phi),
// A = sqrt(I^2 + Q^2), phi = atan(Q/I). The IF local oscillator is a dds with a
// 4-bit phase accumulator advanced by M = 5 each clock: at 160 MHz that is
// 5 * 160 MHz / 2^4 = 50 MHz, 112.5 degrees per sample, so sixteen table
// entries are enough. These numbers and the I*sin + Q*cos structure are the
// document's. The product scaling, taking the top DAC_W bits with saturation,
// and the output register are this design's.
//
// Timing: in_i/in_q are sampled every clock (the PI outputs are held between
// updates). dac_out changes every clock, one clock after the LO table output.
module vector_out #(
  parameter int DATA_W     = 16,
  parameter int DAC_W      = 14,
  parameter int LO_PHASE_W = 4,
  parameter int LO_INC     = 5
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic signed [DAC_W-1:0]  dac_out
);

  localparam int AMP_W = 16;
  localparam int SUM_W = DATA_W + AMP_W + 1;
  localparam int SHIFT = (AMP_W - 1) + (DATA_W - DAC_W);
  localparam logic signed [SUM_W-1:0] MAXV =  (SUM_W'(1) <<< (DAC_W - 1)) - SUM_W'(1);
  localparam logic signed [SUM_W-1:0] MINV = -(SUM_W'(1) <<< (DAC_W - 1));

  logic [LO_PHASE_W-1:0]    lo_phase;
  logic signed [AMP_W-1:0]  lo_sin, lo_cos;
  logic signed [SUM_W-1:0]  prod_s, prod_c, sum, scaled;

  dds #(
    .PHASE_W (LO_PHASE_W),
    .LUT_W   (LO_PHASE_W),
    .AMP_W   (AMP_W)
  ) u_lo (
    .clk       (clk),
    .rst_n     (rst_n),
    .en        (1'b1),
    .phase_inc (LO_PHASE_W'(LO_INC)),
    .phase     (lo_phase),
    .sin_out   (lo_sin),
    .cos_out   (lo_cos)
  );

  always_comb begin
    prod_s = SUM_W'(in_i) * SUM_W'(lo_sin);
    prod_c = SUM_W'(in_q) * SUM_W'(lo_cos);
    sum    = prod_s + prod_c;
    scaled = sum >>> SHIFT;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) dac_out <= '0;
    else if (scaled > MAXV) dac_out <= DAC_W'(MAXV);
    else if (scaled < MINV) dac_out <= DAC_W'(MINV);
    else                    dac_out <= DAC_W'(scaled);
  end

endmodule
