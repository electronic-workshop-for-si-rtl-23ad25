// tb_llrf_top: closed-loop test of the LLRF board at its default parameters
// against a behavioural cavity (half bandwidth 4.34 kHz) with a detuning the
// tuner motor moves by 10 Hz per step. One ADC sample per clock (40 MS/s),
// field-loop gains Kp = 15 and Ki*Ts = 906/2^16 as in the document.
//  1. From rest with +1500 Hz detuning: the field loop must bring the cavity
//     vector to the reference within 1 % and 1 degree, and the tuner must
//     step the detuning down below 50 Hz (dir = 0 steps).
//  2. Detuning thrown to -1500 Hz: the tuner must step it back up (dir = 1).
//  3. Cavity rotation matrix set to 30 degrees: the loop must settle with the
//     cavity at -30 degrees to the reference, same amplitude.
// Also checks the DDS local oscillator frequency (12 periods per 1024 clocks
// for increment 12), that the vector output carries the drive on its IF, and
// that the field PI saturated at the start. Every mechanism's count is shown.
module tb_llrf_top;
  logic clk = 0, rst_n = 0, run = 0;
  logic adc_valid;
  logic signed [15:0] adc_ref, adc_cav, adc_fw;
  logic signed [15:0] set_ref_c, set_ref_s, set_cav_c, set_cav_s;
  logic [15:0] kp, ki, tuner_kp, tuner_ki;
  logic [19:0] phi_offset;
  logic [9:0]  lo_inc;
  logic signed [15:0] dac_i, dac_q, lo_sin, lo_cos, tuner_rate;
  logic dac_valid, tuner_step, tuner_dir;
  logic signed [13:0] dac_if;
  logic [16:0] cav_amp;
  logic [19:0] cav_phase, fw_phase;
  logic [16:0] fw_amp;
  int checks = 0, failures = 0;

  llrf_top dut (.*);
  cavity_model #(.F_HALF(4340.0), .GAIN(1.0), .STEP_HZ(10.0), .REF_I(8000), .REF_Q(0)) cav (
    .clk, .run, .drive_i(dac_i), .drive_q(dac_q), .step(tuner_step), .dir(tuner_dir),
    .adc_valid, .adc_ref, .adc_cav, .adc_fw
  );

  always #5 clk = ~clk;

  initial begin
    #20ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int n_pi = 0, n_sat = 0, n_cordic = 0, if_max = 0;
  int lat_bad = 0, lat_n = 0, since_cic = 100;
  // ADC word to DAC word: demux 1 + CIC 1 + rotation 1 + junction 1 + PI 1
  // = 5 clocks (125 ns at 40 MHz, within the 200 ns FPGA budget); here
  // checked from the CIC output: 3 clocks
  always @(posedge clk) begin
    if (dut.cic_v[1]) since_cic = 0; else since_cic++;
    if (dac_valid) begin lat_n++; if (since_cic != 3) lat_bad++; end
  end
  always @(posedge clk) begin
    if (dac_valid) n_pi++;
    if (dac_valid && (dac_i == 16'sd32767 || dac_i == -16'sd32768)) n_sat++;
    if (dut.u_cordic_cav.done) n_cordic++;
    if (dac_if > if_max) if_max = dac_if;
  end

  function automatic real deg(real y, real x);
    return $atan2(y, x) * 180.0 / 3.14159265358979;
  endfunction

  task automatic check_field(input real want_deg, input string tag);
    real a, p, dp;
    a = $sqrt(cav.vi * cav.vi + cav.vq * cav.vq);
    p = deg(cav.vq, cav.vi);
    dp = p - want_deg;
    checks++;
    if (a < 7920.0 || a > 8080.0 || dp > 1.0 || dp < -1.0) begin
      failures++;
      $display("%s: cavity %f at %f deg, want 8000 at %f", tag, a, p, want_deg);
    end else $display("%s: cavity %f at %f deg", tag, a, p);
  endtask

  initial begin
    set_ref_c = 16'sd16384; set_ref_s = 0; set_cav_c = 16'sd16384; set_cav_s = 0;
    kp = 16'd3840; ki = 16'd906; tuner_kp = 16'd4096; tuner_ki = 16'd0;
    phi_offset = 0; lo_inc = 10'd12;
    cav.detune_hz = 1500.0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    // local oscillator frequency
    begin
      int rising = 0;
      logic signed [15:0] prev;
      repeat (4) @(posedge clk);
      prev = lo_sin;
      repeat (1024) begin @(posedge clk); #1; if (prev < 0 && lo_sin >= 0) rising++; prev = lo_sin; end
      checks++;
      if (rising != 12) begin failures++; $display("LO periods %0d", rising); end
    end
    run = 1;
    repeat (150000) @(posedge clk);
    check_field(0.0, "step 1");
    checks++;
    if (cav.detune_hz > 50.0 || cav.detune_hz < -50.0 || cav.steps_down == 0) begin
      failures++; $display("tuner: detune %f Hz, %0d down steps", cav.detune_hz, cav.steps_down);
    end else $display("tuner: detune %f Hz after %0d down steps", cav.detune_hz, cav.steps_down);
    checks++;
    if (n_sat == 0) begin failures++; $display("field PI never saturated"); end
    // vector output: amplitude of the IF ~ |drive| / 4
    if_max = 0;
    repeat (64) @(posedge clk);
    begin
      real d;
      d = $sqrt(real'(dac_i) * dac_i + real'(dac_q) * dac_q) / 4.0;
      checks++;
      if (real'(if_max) < 0.9 * d || real'(if_max) > 1.1 * d + 4.0) begin failures++; $display("IF peak %0d, drive/4 %f", if_max, d); end
    end
    cav.detune_hz = -1500.0;
    repeat (150000) @(posedge clk);
    check_field(0.0, "step 2");
    checks++;
    if (cav.detune_hz > 50.0 || cav.detune_hz < -50.0 || cav.steps_up == 0) begin
      failures++; $display("tuner: detune %f Hz, %0d up steps", cav.detune_hz, cav.steps_up);
    end else $display("tuner: detune %f Hz after %0d up steps", cav.detune_hz, cav.steps_up);
    set_cav_c = 16'sd14189; set_cav_s = 16'sd8192;    // 30 degrees
    repeat (100000) @(posedge clk);
    check_field(-30.0, "step 3");
    checks++;
    if (n_pi < 19000 || n_cordic < 19000) begin failures++; $display("loop updates %0d, cordic %0d", n_pi, n_cordic); end
    checks++;
    if (lat_bad != 0 || lat_n == 0) begin failures++; $display("CIC to DAC latency wrong %0d of %0d", lat_bad, lat_n); end
    $display("PI updates %0d (saturated %0d), CORDIC runs %0d, tuner steps down %0d up %0d",
             n_pi, n_sat, n_cordic, cav.steps_down, cav.steps_up);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
