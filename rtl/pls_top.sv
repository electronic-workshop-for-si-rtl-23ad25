// pls_top: the two digital controllers side by side - the LLRF board of the
// storage ring RF system (llrf_*) and the digital current controller of the
// magnet power supply (mps_*). They share nothing: each has its own clock and
// reset and all its ports brought out. See llrf_top and mps_top.
module pls_top (
  // LLRF board
  input  logic               llrf_clk,
  input  logic               llrf_rst_n,
  input  logic               llrf_adc_valid,
  input  logic signed [15:0] llrf_adc_ref,
  input  logic signed [15:0] llrf_adc_cav,
  input  logic signed [15:0] llrf_adc_fw,
  input  logic signed [15:0] llrf_set_ref_c,
  input  logic signed [15:0] llrf_set_ref_s,
  input  logic signed [15:0] llrf_set_cav_c,
  input  logic signed [15:0] llrf_set_cav_s,
  input  logic        [15:0] llrf_kp,
  input  logic        [15:0] llrf_ki,
  input  logic        [15:0] llrf_tuner_kp,
  input  logic        [15:0] llrf_tuner_ki,
  input  logic        [19:0] llrf_phi_offset,
  input  logic        [9:0]  llrf_lo_inc,
  output logic signed [15:0] llrf_dac_i,
  output logic signed [15:0] llrf_dac_q,
  output logic               llrf_dac_valid,
  output logic signed [13:0] llrf_dac_if,
  output logic               llrf_tuner_step,
  output logic               llrf_tuner_dir,
  output logic signed [15:0] llrf_lo_sin,
  output logic signed [15:0] llrf_lo_cos,
  output logic        [16:0] llrf_cav_amp,
  output logic        [19:0] llrf_cav_phase,
  output logic        [19:0] llrf_fw_phase,
  output logic        [16:0] llrf_fw_amp,
  output logic signed [15:0] llrf_tuner_rate,
  // magnet power supply controller
  input  logic               mps_clk,
  input  logic               mps_rst_n,
  input  logic signed [15:0] mps_i_set,
  input  logic        [15:0] mps_kp,
  input  logic        [15:0] mps_ki,
  input  logic        [15:0] mps_kp_v,
  input  logic        [15:0] mps_ki_v,
  input  logic        [3:0]  mps_fault,
  input  logic               mps_fault_clear,
  input  logic               mps_unipolar,
  output logic        [3:0]  mps_gate,
  output logic               mps_adc_cs_n,
  output logic               mps_adc_rc_n,
  input  logic               mps_adc_busy_n,
  output logic               mps_adc_dclk,
  input  logic        [3:0]  mps_adc_data,
  output logic signed [15:0] mps_adc_word [4],
  output logic signed [15:0] mps_v_ref,
  output logic signed [15:0] mps_duty,
  output logic               mps_trip,
  output logic        [3:0]  mps_fault_latched
);

  llrf_top u_llrf (
    .clk        (llrf_clk),
    .rst_n      (llrf_rst_n),
    .adc_valid  (llrf_adc_valid),
    .adc_ref    (llrf_adc_ref),
    .adc_cav    (llrf_adc_cav),
    .adc_fw     (llrf_adc_fw),
    .set_ref_c  (llrf_set_ref_c),
    .set_ref_s  (llrf_set_ref_s),
    .set_cav_c  (llrf_set_cav_c),
    .set_cav_s  (llrf_set_cav_s),
    .kp         (llrf_kp),
    .ki         (llrf_ki),
    .tuner_kp   (llrf_tuner_kp),
    .tuner_ki   (llrf_tuner_ki),
    .phi_offset (llrf_phi_offset),
    .lo_inc     (llrf_lo_inc),
    .dac_i      (llrf_dac_i),
    .dac_q      (llrf_dac_q),
    .dac_valid  (llrf_dac_valid),
    .dac_if     (llrf_dac_if),
    .tuner_step (llrf_tuner_step),
    .tuner_dir  (llrf_tuner_dir),
    .lo_sin     (llrf_lo_sin),
    .lo_cos     (llrf_lo_cos),
    .cav_amp    (llrf_cav_amp),
    .cav_phase  (llrf_cav_phase),
    .fw_phase   (llrf_fw_phase),
    .fw_amp     (llrf_fw_amp),
    .tuner_rate (llrf_tuner_rate)
  );

  mps_top u_mps (
    .clk           (mps_clk),
    .rst_n         (mps_rst_n),
    .i_set         (mps_i_set),
    .kp            (mps_kp),
    .ki            (mps_ki),
    .kp_v          (mps_kp_v),
    .ki_v          (mps_ki_v),
    .fault         (mps_fault),
    .fault_clear   (mps_fault_clear),
    .unipolar      (mps_unipolar),
    .gate          (mps_gate),
    .adc_cs_n      (mps_adc_cs_n),
    .adc_rc_n      (mps_adc_rc_n),
    .adc_busy_n    (mps_adc_busy_n),
    .adc_dclk      (mps_adc_dclk),
    .adc_data      (mps_adc_data),
    .adc_word      (mps_adc_word),
    .v_ref         (mps_v_ref),
    .duty          (mps_duty),
    .trip          (mps_trip),
    .fault_latched (mps_fault_latched)
  );

endmodule
