// llrf_top: digital board of the low-level RF (LLRF) system.
//
// Three IF channels (reference, cavity, forward power), each sampled at
// f_s = 4 * f_IF or 4/5 * f_IF (the 50 MHz IF at 40 MS/s), enter as 16-bit
// words qualified by adc_valid.
//
// Field loop: reference and cavity go through an IQ demux (I and Q at f_s/2)
// and a CIC decimator (R = 10, the 2 MHz loop rate). Each vector is turned and
// scaled by its rotation matrix (set_*_c = A cos t, set_*_s = A sin t), the
// error junction forms reference minus cavity, and one PI controller per
// component drives the error to zero. The PI outputs are the I and Q words for
// the two DACs in front of the analog IQ modulator (dac_i, dac_q) and also
// feed the digital vector modulator, which puts them on a 50 MHz IF for a
// single DAC (dac_if).
//
// Tuner loop: the cavity and forward vectors (the cavity's demux and CIC are
// shared) are converted to amplitude and phase by two iterative CORDICs. The
// phase rotation adds phi_offset to the forward phase and forms the wrapped
// difference to the cavity phase; a PI controller turns it into a step rate
// and the pulse generator into step/direction pulses for the tuner motor
// driver. Both CORDIC results (cav_amp/cav_phase, fw_amp/fw_phase) are brought
// out for monitoring.
//
// Local oscillator: a DDS (10-bit phase accumulator, phase increment lo_inc)
// gives sine and cosine words for an external DAC.
//
// The chain is the document's; running all of it from one clock with sample
// strobes, and the shared cavity channel, are this design's. With
// adc_valid high every clock the vector output and DDS run at the same clock
// as the ADC path; the document runs them from their own 160 MHz and 120 MHz
// clocks. The CORDICs need ITER + 2 = 18 clocks, less than the 20 ADC samples
// between CIC outputs, so adc_valid may be high every clock.
module llrf_top #(
  parameter int DATA_W    = 16,
  parameter int CIC_R     = 10,
  parameter int CIC_N     = 3,
  parameter int PHASE_W   = 20,
  parameter int LO_W      = 10
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     adc_valid,
  input  logic signed [DATA_W-1:0] adc_ref,
  input  logic signed [DATA_W-1:0] adc_cav,
  input  logic signed [DATA_W-1:0] adc_fw,
  // set points of the rotation matrices: A*cos(theta), A*sin(theta), Q1.14
  input  logic signed [15:0]       set_ref_c,
  input  logic signed [15:0]       set_ref_s,
  input  logic signed [15:0]       set_cav_c,
  input  logic signed [15:0]       set_cav_s,
  input  logic        [15:0]       kp,          // field loop, Q8.8
  input  logic        [15:0]       ki,          // field loop Ki*Ts, Q0.16
  input  logic        [15:0]       tuner_kp,
  input  logic        [15:0]       tuner_ki,
  input  logic        [PHASE_W-1:0] phi_offset,
  input  logic        [LO_W-1:0]   lo_inc,
  output logic signed [DATA_W-1:0] dac_i,
  output logic signed [DATA_W-1:0] dac_q,
  output logic                     dac_valid,
  output logic signed [13:0]       dac_if,
  output logic                     tuner_step,
  output logic                     tuner_dir,
  output logic signed [15:0]       lo_sin,
  output logic signed [15:0]       lo_cos,
  // monitoring
  output logic [DATA_W:0]          cav_amp,
  output logic [PHASE_W-1:0]       cav_phase,
  output logic [PHASE_W-1:0]       fw_phase,
  output logic [DATA_W:0]          fw_amp,
  output logic signed [DATA_W-1:0] tuner_rate
);

  // ---- demux and decimation, one per channel
  logic                     dm_v   [3];
  logic signed [DATA_W-1:0] dm_i   [3], dm_q [3];
  logic                     cic_v  [3];
  logic signed [DATA_W-1:0] cic_i  [3], cic_q [3];
  logic signed [DATA_W-1:0] adc    [3];

  assign adc[0] = adc_ref;
  assign adc[1] = adc_cav;
  assign adc[2] = adc_fw;

  for (genvar c = 0; c < 3; c++) begin : g_ch
    iq_demux #(.DATA_W(DATA_W)) u_demux (
      .clk, .rst_n, .in_valid(adc_valid), .in_x(adc[c]),
      .out_valid(dm_v[c]), .out_i(dm_i[c]), .out_q(dm_q[c])
    );
    cic_decim #(.DATA_W(DATA_W), .R(CIC_R), .N(CIC_N), .M(1)) u_cic (
      .clk, .rst_n, .in_valid(dm_v[c]), .in_i(dm_i[c]), .in_q(dm_q[c]),
      .out_valid(cic_v[c]), .out_i(cic_i[c]), .out_q(cic_q[c])
    );
  end

  // ---- field loop
  logic                     rot_ref_v, rot_cav_v;
  logic signed [DATA_W-1:0] rot_ref_i, rot_ref_q, rot_cav_i, rot_cav_q;
  logic                     err_v;
  logic signed [DATA_W:0]   err_i, err_q;
  logic                     pi_i_v, pi_q_v;

  rotation_matrix #(.DATA_W(DATA_W)) u_rot_ref (
    .clk, .rst_n, .in_valid(cic_v[0]), .in_i(cic_i[0]), .in_q(cic_q[0]),
    .coef_c(set_ref_c), .coef_s(set_ref_s),
    .out_valid(rot_ref_v), .out_i(rot_ref_i), .out_q(rot_ref_q)
  );
  rotation_matrix #(.DATA_W(DATA_W)) u_rot_cav (
    .clk, .rst_n, .in_valid(cic_v[1]), .in_i(cic_i[1]), .in_q(cic_q[1]),
    .coef_c(set_cav_c), .coef_s(set_cav_s),
    .out_valid(rot_cav_v), .out_i(rot_cav_i), .out_q(rot_cav_q)
  );
  iq_error #(.DATA_W(DATA_W)) u_err (
    .clk, .rst_n, .in_valid(rot_ref_v && rot_cav_v),
    .ref_i(rot_ref_i), .ref_q(rot_ref_q), .cav_i(rot_cav_i), .cav_q(rot_cav_q),
    .out_valid(err_v), .err_i(err_i), .err_q(err_q)
  );
  pi_ctrl #(.E_W(DATA_W+1), .OUT_W(DATA_W)) u_pi_i (
    .clk, .rst_n, .clear(1'b0), .in_valid(err_v), .err(err_i), .kp(kp), .ki(ki),
    .out_valid(pi_i_v), .u(dac_i)
  );
  pi_ctrl #(.E_W(DATA_W+1), .OUT_W(DATA_W)) u_pi_q (
    .clk, .rst_n, .clear(1'b0), .in_valid(err_v), .err(err_q), .kp(kp), .ki(ki),
    .out_valid(pi_q_v), .u(dac_q)
  );
  assign dac_valid = pi_i_v && pi_q_v;

  vector_out #(.DATA_W(DATA_W), .DAC_W(14), .LO_PHASE_W(4), .LO_INC(5)) u_vout (
    .clk, .rst_n, .in_i(dac_i), .in_q(dac_q), .dac_out(dac_if)
  );

  // ---- tuner loop
  logic cav_done, fw_done, cav_busy, fw_busy;
  logic [LO_W-1:0] lo_phase;
  logic ph_v, tpi_v;
  logic signed [DATA_W:0] ph_err;

  cordic_vec #(.DATA_W(DATA_W), .PHASE_W(PHASE_W), .ITER(16)) u_cordic_cav (
    .clk, .rst_n, .start(cic_v[1]), .in_i(cic_i[1]), .in_q(cic_q[1]),
    .busy(cav_busy), .done(cav_done), .mag(cav_amp), .phase(cav_phase)
  );
  cordic_vec #(.DATA_W(DATA_W), .PHASE_W(PHASE_W), .ITER(16)) u_cordic_fw (
    .clk, .rst_n, .start(cic_v[2]), .in_i(cic_i[2]), .in_q(cic_q[2]),
    .busy(fw_busy), .done(fw_done), .mag(fw_amp), .phase(fw_phase)
  );
  tuner_phase_error #(.PHASE_W(PHASE_W), .OUT_W(DATA_W+1)) u_phrot (
    .clk, .rst_n, .in_valid(cav_done && fw_done),
    .phi_fw(fw_phase), .phi_cav(cav_phase), .phi_offset(phi_offset),
    .out_valid(ph_v), .err(ph_err)
  );
  pi_ctrl #(.E_W(DATA_W+1), .OUT_W(DATA_W)) u_pi_tuner (
    .clk, .rst_n, .clear(1'b0), .in_valid(ph_v), .err(ph_err), .kp(tuner_kp), .ki(tuner_ki),
    .out_valid(tpi_v), .u(tuner_rate)
  );
  pulse_gen #(.IN_W(DATA_W)) u_pulse (
    .clk, .rst_n, .rate(tuner_rate), .step(tuner_step), .dir(tuner_dir)
  );

  // ---- local oscillator
  dds #(.PHASE_W(LO_W), .LUT_W(LO_W), .AMP_W(16)) u_lo (
    .clk, .rst_n, .en(1'b1), .phase_inc(lo_inc), .phase(lo_phase),
    .sin_out(lo_sin), .cos_out(lo_cos)
  );

endmodule
