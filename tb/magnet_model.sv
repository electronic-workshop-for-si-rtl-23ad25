// magnet_model: behavioural plant of the magnet power supply for testbenches:
// an ideal H-bridge on a DC link of VDC volts feeding a magnet of R_OHM and
// L_H (1.5 ohm, 15 mH), integrated every clock of 10 ns, and four serial
// ADCs (ad977a_model). ADC channel 0 reads the current at 1 V/A on a +-10 V
// range (32767 = 10 A); channel 1 reads the bridge output voltage at 1/4
// scale (32767 = 40 V) after an ideal output filter, modelled as its mean
// over the last AVG_N clocks (one PWM period); channels 2 and 3 are fixed
// test words. A leg whose two FETs are both off (dead time, trip)
// is clamped by the freewheeling diodes: the current drives it to the rail
// that opposes the current.
`timescale 1ns/1ps
module magnet_model #(
  parameter real VDC   = 24.0,
  parameter real R_OHM = 1.5,
  parameter real L_H   = 15.0e-3,
  parameter int  AVG_N = 4000
) (
  input  logic       clk,
  input  logic [3:0] gate,
  input  logic       adc_cs_n,
  input  logic       adc_rc_n,
  output logic       adc_busy_n,
  input  logic       adc_dclk,
  output logic [3:0] adc_data
);
  real i_load = 0.0;
  logic leg_a = 0, leg_b = 0;
  logic [15:0] words [4];
  real v_hist [AVG_N];
  real v_sum = 0.0, v_out = 0.0;
  int  v_ptr = 0;

  initial foreach (v_hist[k]) v_hist[k] = 0.0;

  function automatic logic [15:0] to_code(real v, real fs);
    int n;
    n = int'(v / fs * 32767.0);
    if (n > 32767) n = 32767;
    if (n < -32768) n = -32768;
    return 16'(n);
  endfunction

  always @(posedge clk) begin
    real v;
    if (gate[0]) leg_a = 1; else if (gate[1]) leg_a = 0; else leg_a = (i_load < 0.0);
    if (gate[2]) leg_b = 1; else if (gate[3]) leg_b = 0; else leg_b = (i_load > 0.0);
    v = VDC * (real'(leg_a) - real'(leg_b));
    if (gate == 0 && i_load < 1.0e-3 && i_load > -1.0e-3) v = 0.0;  // diodes block
    i_load = i_load + (v - R_OHM * i_load) * 10.0e-9 / L_H;
    v_sum = v_sum + v - v_hist[v_ptr];
    v_hist[v_ptr] = v;
    v_ptr = (v_ptr == AVG_N - 1) ? 0 : v_ptr + 1;
    v_out = v_sum / real'(AVG_N);
  end

  always_comb begin
    words[0] = to_code(i_load, 10.0);
    words[1] = to_code(v_out, 40.0);
    words[2] = 16'h1234;
    words[3] = 16'hfedc;
  end

  ad977a_model #(.N_CH(4), .CONV_NS(4000.0)) adc (
    .cs_n(adc_cs_n), .rc_n(adc_rc_n), .busy_n(adc_busy_n), .dclk(adc_dclk),
    .data(adc_data), .sample_in(words)
  );
endmodule
