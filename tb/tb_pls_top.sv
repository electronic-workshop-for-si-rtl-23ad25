// tb_pls_top: end-to-end test of the whole design, pls_top at its default
// parameters, with both plants running side by side: the LLRF board on a
// 40 MHz clock against the behavioural cavity, and the magnet current
// controller on a 100 MHz clock against the magnet and its ADCs.
// LLRF: field loop settles the cavity on the reference (1 %, 1 degree), the
// tuner removes +1500 Hz and then -1500 Hz of detuning, a 30-degree rotation
// set point moves the cavity phase. MPS (current PI feeding an inner
// voltage PI): 0 -> 5 A -> -3 A settles within 20 mA, a fault trips the
// bridge off and a clear restarts it at 2 A, then 3 A in unipolar mode.
// Every mechanism is counted and a failure is counted for one that never
// happened: CIC decimation, field PI saturation, tuner steps in both
// directions, CORDIC runs, IF vector output, DDS output, ADC reads, PWM
// periods, inner-loop updates, saturation of each MPS loop, interlock trip,
// unipolar periods. The CIC-to-DAC latency is checked in tb_llrf_top.
`timescale 1ns/1ps
module tb_pls_top;
  logic llrf_clk = 0, llrf_rst_n = 0, run = 0;
  logic mps_clk = 0, mps_rst_n = 0;
  logic llrf_adc_valid;
  logic signed [15:0] llrf_adc_ref, llrf_adc_cav, llrf_adc_fw;
  logic signed [15:0] llrf_set_ref_c, llrf_set_ref_s, llrf_set_cav_c, llrf_set_cav_s;
  logic [15:0] llrf_kp, llrf_ki, llrf_tuner_kp, llrf_tuner_ki;
  logic [19:0] llrf_phi_offset;
  logic [9:0]  llrf_lo_inc;
  logic signed [15:0] llrf_dac_i, llrf_dac_q, llrf_lo_sin, llrf_lo_cos, llrf_tuner_rate;
  logic llrf_dac_valid, llrf_tuner_step, llrf_tuner_dir;
  logic signed [13:0] llrf_dac_if;
  logic [16:0] llrf_cav_amp;
  logic [19:0] llrf_cav_phase, llrf_fw_phase;
  logic [16:0] llrf_fw_amp;
  logic signed [15:0] mps_i_set, mps_duty, mps_v_ref;
  logic [15:0] mps_kp, mps_ki, mps_kp_v, mps_ki_v;
  logic [3:0] mps_fault, mps_gate, mps_fault_latched, mps_adc_data;
  logic mps_unipolar;
  logic mps_fault_clear, mps_adc_cs_n, mps_adc_rc_n, mps_adc_busy_n, mps_adc_dclk, mps_trip;
  logic signed [15:0] mps_adc_word [4];
  int checks = 0, failures = 0;

  pls_top dut (.*);

  cavity_model #(.F_HALF(4340.0), .GAIN(1.0), .STEP_HZ(10.0), .REF_I(8000), .REF_Q(0)) cav (
    .clk(llrf_clk), .run, .drive_i(llrf_dac_i), .drive_q(llrf_dac_q),
    .step(llrf_tuner_step), .dir(llrf_tuner_dir),
    .adc_valid(llrf_adc_valid), .adc_ref(llrf_adc_ref), .adc_cav(llrf_adc_cav), .adc_fw(llrf_adc_fw)
  );
  magnet_model mag (
    .clk(mps_clk), .gate(mps_gate), .adc_cs_n(mps_adc_cs_n), .adc_rc_n(mps_adc_rc_n),
    .adc_busy_n(mps_adc_busy_n), .adc_dclk(mps_adc_dclk), .adc_data(mps_adc_data)
  );

  always #12.5 llrf_clk = ~llrf_clk;   // 40 MHz
  always #5    mps_clk  = ~mps_clk;    // 100 MHz

  initial begin
    #150ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_cic = 0, n_pi_sat = 0, n_cordic = 0, n_if = 0, n_lo = 0;
  int n_adc = 0, n_period = 0, n_mps_sat = 0, n_trip = 0, n_rot = 0, n_vloop = 0, n_vref_sat = 0, n_uni = 0;
  always @(posedge llrf_clk) begin
    if (dut.u_llrf.cic_v[1]) n_cic++;
    if (llrf_dac_valid && (llrf_dac_i == 16'sd32767 || llrf_dac_i == -16'sd32768)) n_pi_sat++;
    if (dut.u_llrf.u_cordic_cav.done) n_cordic++;
    if (llrf_dac_if != 0) n_if++;
    if (llrf_lo_sin != 0) n_lo++;
    if (dut.u_llrf.rot_cav_v && llrf_set_cav_s != 0) n_rot++;
  end
  always @(posedge mps_clk) begin
    if (dut.u_mps.adc_valid) n_adc++;
    if (dut.u_mps.period_start) n_period++;
    if (mps_duty == 16'sd32767 || mps_duty == -16'sd32768) n_mps_sat++;
    if (mps_v_ref == 16'sd32767 || mps_v_ref == -16'sd32768) n_vref_sat++;
    if (dut.u_mps.duty_valid) n_vloop++;
    if (dut.u_mps.period_start && mps_unipolar && mps_gate[3:2] == 2'b10) n_uni++;
    if (mps_trip && mps_gate == 0) n_trip++;
  end

  task automatic check_field(input real want_deg, input string tag);
    real a, p, dp;
    a = $sqrt(cav.vi * cav.vi + cav.vq * cav.vq);
    p = $atan2(cav.vq, cav.vi) * 180.0 / 3.14159265358979;
    dp = p - want_deg;
    checks++;
    if (a < 7920.0 || a > 8080.0 || dp > 1.0 || dp < -1.0) begin
      failures++;
      $display("%s: cavity %f at %f deg, want 8000 at %f", tag, a, p, want_deg);
    end else $display("%s: cavity %f at %f deg", tag, a, p);
  endtask

  task automatic check_detune(input string tag);
    checks++;
    if (cav.detune_hz > 50.0 || cav.detune_hz < -50.0) begin
      failures++; $display("%s: detune %f Hz", tag, cav.detune_hz);
    end else $display("%s: detune %f Hz", tag, cav.detune_hz);
  endtask

  task automatic mps_settle(input real amps, input int periods);
    real avg;
    mps_i_set = 16'(int'(amps / 10.0 * 32767.0));
    repeat ((periods - 1) * 4000) @(posedge mps_clk);
    avg = 0.0;
    repeat (4000) begin @(posedge mps_clk); avg += mag.i_load / 4000.0; end
    checks++;
    if (avg - amps > 0.02 || avg - amps < -0.02) begin failures++; $display("MPS set %f A, got %f A", amps, avg); end
    else $display("MPS set %f A, got %f A", amps, avg);
  endtask

  task automatic need(input int n, input string what);
    checks++;
    if (n == 0) begin failures++; $display("never happened: %s", what); end
    else $display("%s: %0d", what, n);
  endtask

  initial begin
    llrf_set_ref_c = 16'sd16384; llrf_set_ref_s = 0; llrf_set_cav_c = 16'sd16384; llrf_set_cav_s = 0;
    llrf_kp = 16'd3840; llrf_ki = 16'd906; llrf_tuner_kp = 16'd4096; llrf_tuner_ki = 0;
    llrf_phi_offset = 0; llrf_lo_inc = 10'd12;
    mps_i_set = 0; mps_kp = 16'd3072; mps_ki = 16'd1311; mps_kp_v = 16'd256; mps_ki_v = 16'd16384; mps_fault = 0; mps_fault_clear = 0; mps_unipolar = 0;
    cav.detune_hz = 1500.0;
    #100;
    llrf_rst_n = 1; mps_rst_n = 1;
    @(posedge llrf_clk); #1 run = 1;
    fork
      begin : llrf_seq
        repeat (150000) @(posedge llrf_clk);
        check_field(0.0, "LLRF step 1");
        check_detune("LLRF tuner, from +1500 Hz");
        cav.detune_hz = -1500.0;
        repeat (150000) @(posedge llrf_clk);
        check_field(0.0, "LLRF step 2");
        check_detune("LLRF tuner, from -1500 Hz");
        llrf_set_cav_c = 16'sd14189; llrf_set_cav_s = 16'sd8192;
        repeat (100000) @(posedge llrf_clk);
        check_field(-30.0, "LLRF 30 degree rotation");
      end
      begin : mps_seq
        mps_settle(5.0, 600);
        mps_settle(-3.0, 600);
        @(posedge mps_clk); #1 mps_fault = 4'b1000;
        @(posedge mps_clk); #1 mps_fault = 0;
        repeat (4000 * 100) @(posedge mps_clk);
        checks++;
        if (!mps_trip || mps_fault_latched != 4'b1000 || mag.i_load < -0.05) begin
          failures++; $display("trip: %b latched %b current %f", mps_trip, mps_fault_latched, mag.i_load);
        end
        mps_fault_clear = 1; @(posedge mps_clk); #1 mps_fault_clear = 0;
        mps_settle(2.0, 600);
        mps_unipolar = 1;
        mps_settle(3.0, 600);
        mps_unipolar = 0;
      end
    join
    need(n_cic, "CIC decimated outputs");
    need(n_pi_sat, "field PI saturated updates");
    need(n_cordic, "CORDIC conversions");
    need(cav.steps_down, "tuner steps down");
    need(cav.steps_up, "tuner steps up");
    need(n_rot, "rotated cavity vectors");
    need(n_if, "IF vector output samples");
    need(n_lo, "DDS LO samples");
    need(n_adc, "MPS ADC reads");
    need(n_period, "PWM periods");
    need(n_vloop, "inner voltage loop updates");
    need(n_vref_sat, "current loop (voltage reference) saturated clocks");
    need(n_mps_sat, "voltage loop (duty) saturated clocks");
    need(n_trip, "interlock trip clocks");
    need(n_uni, "unipolar-mode periods");
    checks++;
    if (n_adc < n_period - 2) begin failures++; $display("ADC reads %0d < periods %0d", n_adc, n_period); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
