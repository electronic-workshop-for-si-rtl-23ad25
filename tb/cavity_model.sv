// cavity_model: behavioural RF plant for the LLRF board testbenches.
//
// Works in complex baseband at one ADC sample per clock (f_s = 40 MS/s). The forward wave is the board's drive word (dac_i, dac_q).
// The cavity voltage V follows the first-order cavity with half bandwidth
// F_HALF and detuning detune_hz:
//   V += 2*pi*F_HALF*dt * (GAIN*D - V) + j*2*pi*detune_hz*dt * V.
// The reference is a constant vector (REF_I, REF_Q). Each channel is put on
// an IF of F_IF (50 MHz, sampled at 40 MS/s: 450 degrees per sample) as
// x(k) = I sin(2 pi F_IF k dt) + Q cos(2 pi F_IF k dt), plus an ADC offset and
// a little noise. Each rising step pulse of the tuner moves the detuning by STEP_HZ
// towards lower frequency when dir is 0 and higher when dir is 1.
module cavity_model #(
  parameter real F_HALF  = 4340.0,
  parameter real GAIN    = 1.0,
  parameter real STEP_HZ = 10.0,
  parameter real F_IF    = 50.0e6,
  parameter int  REF_I   = 8000,
  parameter int  REF_Q   = 0,
  parameter int  OFFSET  = 100
) (
  input  logic               clk,
  input  logic               run,
  input  logic signed [15:0] drive_i,
  input  logic signed [15:0] drive_q,
  input  logic               step,
  input  logic               dir,
  output logic               adc_valid,
  output logic signed [15:0] adc_ref,
  output logic signed [15:0] adc_cav,
  output logic signed [15:0] adc_fw
);
  localparam real DT = 25.0e-9;
  localparam real TWO_PI = 6.283185307179586;

  real vi = 0.0, vq = 0.0;
  real detune_hz = 0.0;
  int  k = 0;
  int  steps_up = 0, steps_down = 0;
  logic step_d = 0;

  function automatic logic signed [15:0] if_sample(int kk, real i, real q);
    real v;
    int  n;
    real w;
    w = TWO_PI * F_IF * DT * real'(kk);
    v = i * $sin(w) + q * $cos(w);
    n = int'(v) + OFFSET + ($signed($urandom) % 3);
    if (n > 32767) n = 32767;
    if (n < -32768) n = -32768;
    return 16'(n);
  endfunction

  initial begin
    adc_valid = 0;
    adc_ref = 0; adc_cav = 0; adc_fw = 0;
  end

  always @(posedge clk) begin
    real a, b, di, dq, ni, nq;
    step_d <= step;
    if (step && !step_d) begin
      if (dir) begin detune_hz = detune_hz + STEP_HZ; steps_up++; end
      else     begin detune_hz = detune_hz - STEP_HZ; steps_down++; end
    end
    if (run) begin
      a  = TWO_PI * F_HALF * DT;
      b  = TWO_PI * detune_hz * DT;
      di = real'(drive_i) * GAIN;
      dq = real'(drive_q) * GAIN;
      ni = vi + a * (di - vi) - b * vq;
      nq = vq + a * (dq - vq) + b * vi;
      vi = ni;
      vq = nq;
      adc_valid <= 1'b1;
      adc_ref   <= if_sample(k, real'(REF_I), real'(REF_Q));
      adc_cav   <= if_sample(k, vi, vq);
      adc_fw    <= if_sample(k, real'(drive_i), real'(drive_q));
      k++;
    end else begin
      adc_valid <= 1'b0;
    end
  end
endmodule
