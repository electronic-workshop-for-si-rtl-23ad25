// mps_top: digital current controller of the magnet power supply (bipolar
// or unipolar).
//
// Once per PWM period (25 kHz) the four serial ADCs are read together;
// channel I_CH (0) is the output current measured across the shunt and
// channel V_CH (1) the filtered bridge output voltage. The control is a
// cascade, as the document's closed-loop model G_c * G_in * H_I with the inner
// loop G_in = G_P G_V / (1 + G_P G_V) describes: the outer current PI,
// G_c(s) = (Kp s + Ki)/s, turns the current error i_set - i_meas into a
// voltage reference v_ref (same code scale as channel V_CH); the inner voltage
// controller G_V turns v_ref - v_meas into the signed duty command of the
// H-bridge PWM, taken at the start of the next period. The document does not
// give the form of G_V; it is a second PI here, so that a proportional-only
// inner loop is kp_v with ki_v = 0. A latching interlock removes all gate
// drive and empties both integrators while any fault is latched. In the
// document the control law and the PWM run on a DSP and an FPGA sequences the
// ADCs; here all of it is logic, running from one 100 MHz clock. The gains are
// inputs (kp Q8.8, ki Q0.16 per control cycle); the document gives none.
//
// Timing: a control cycle is the ADC read (well under one period) plus three
// clocks (outer PI, inner PI); the new duty is used from the following period
// start. unipolar selects the bridge mode of mps_pwm (one current direction,
// one switching leg); it takes effect at the next period start. In that mode a
// negative duty command only gives zero volts, so the voltage integrator is
// bounded by the PI output range rather than by the bridge.
module mps_top #(
  parameter int PERIOD   = 4000,
  parameter int DEADTIME = 50,
  parameter int N_CH     = 4,
  parameter int SCLK_DIV = 4,
  parameter int N_FAULT  = 4,
  parameter int I_CH     = 0,
  parameter int V_CH     = 1
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [15:0]     i_set,
  input  logic        [15:0]     kp,
  input  logic        [15:0]     ki,
  input  logic        [15:0]     kp_v,
  input  logic        [15:0]     ki_v,
  input  logic [N_FAULT-1:0]     fault,
  input  logic                   fault_clear,
  input  logic                   unipolar,
  output logic [3:0]             gate,
  output logic                   adc_cs_n,
  output logic                   adc_rc_n,
  input  logic                   adc_busy_n,
  output logic                   adc_dclk,
  input  logic [N_CH-1:0]        adc_data,
  output logic signed [15:0]     adc_word [N_CH],
  output logic signed [15:0]     v_ref,
  output logic signed [15:0]     duty,
  output logic                   trip,
  output logic [N_FAULT-1:0]     fault_latched
);

  logic period_start, adc_busy, adc_valid, vref_valid, duty_valid;
  logic signed [16:0] err, v_err;

  mps_interlock #(.N_FAULT(N_FAULT)) u_ilk (
    .clk, .rst_n, .fault, .clear(fault_clear), .latched(fault_latched), .trip
  );

  mps_pwm #(.PERIOD(PERIOD), .DEADTIME(DEADTIME), .DUTY_W(16)) u_pwm (
    .clk, .rst_n, .enable(!trip), .unipolar, .duty, .gate, .period_start
  );

  ad977a_ctrl #(.N_CH(N_CH), .DATA_W(16), .SCLK_DIV(SCLK_DIV)) u_adc (
    .clk, .rst_n, .req(period_start), .busy(adc_busy),
    .adc_cs_n, .adc_rc_n, .adc_busy_n, .adc_dclk, .adc_data,
    .valid(adc_valid), .data(adc_word)
  );

  // outer current loop
  always_comb err = 17'(i_set) - 17'(adc_word[I_CH]);

  pi_ctrl #(.E_W(17), .OUT_W(16)) u_pi (
    .clk, .rst_n, .clear(trip), .in_valid(adc_valid), .err, .kp, .ki,
    .out_valid(vref_valid), .u(v_ref)
  );

  // inner voltage loop; the ADC words hold until the next read
  always_comb v_err = 17'(v_ref) - 17'(adc_word[V_CH]);

  pi_ctrl #(.E_W(17), .OUT_W(16)) u_pi_v (
    .clk, .rst_n, .clear(trip), .in_valid(vref_valid), .err(v_err), .kp(kp_v), .ki(ki_v),
    .out_valid(duty_valid), .u(duty)
  );

endmodule
