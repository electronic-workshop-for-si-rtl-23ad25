// tb_mps_top: closed-loop test of the magnet current controller at its
// default parameters (25 kHz PWM at 100 MHz) on a 1.5 ohm / 15 mH magnet fed
// from 24 V. Steps the set current 0 -> 5 A -> -3 A (bipolar) and checks the
// settled mean current within 0.2 % of full scale, one ADC read per PWM period,
// the ADC words of the other channels, that the duty command saturated during
// a step, and that a fault trips the interlock (all gates off within two
// clocks), and the loop recovers after clear. Then, in unipolar mode, settles
// 3 A and 1 A with leg B held on its low FET.
`timescale 1ns/1ps
module tb_mps_top;
  logic clk = 0, rst_n = 0, fault_clear = 0, unipolar = 0;
  logic signed [15:0] i_set, duty, v_ref;
  logic [15:0] kp, ki, kp_v, ki_v;
  logic [3:0] fault, gate, fault_latched;
  logic adc_cs_n, adc_rc_n, adc_busy_n, adc_dclk, trip;
  logic [3:0] adc_data;
  logic signed [15:0] adc_word [4];
  int checks = 0, failures = 0;
  int n_adc = 0, n_sat = 0, n_trip = 0, n_period = 0;

  mps_top dut (.*);
  magnet_model plant (.clk, .gate, .adc_cs_n, .adc_rc_n, .adc_busy_n, .adc_dclk, .adc_data);

  always #5 clk = ~clk;

  initial begin
    #600ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (dut.u_adc.valid) n_adc++;
    if (dut.period_start) n_period++;
    if (duty == 16'sd32767 || duty == -16'sd32768) n_sat++;
  end

  task automatic settle(input real amps, input int periods);
    real err, avg;
    i_set = 16'(int'(amps / 10.0 * 32767.0));
    repeat ((periods - 1) * 4000) @(posedge clk);
    avg = 0.0;                                   // mean over the last period
    repeat (4000) begin @(posedge clk); avg += plant.i_load / 4000.0; end
    err = avg - amps;
    checks++;
    if (err > 0.02 || err < -0.02) begin failures++; $display("set %f A, got %f A", amps, avg); end
    else $display("set %f A, got %f A", amps, avg);
  endtask

  initial begin
    i_set = 0; kp = 16'd3072; ki = 16'd1311; kp_v = 16'd256; ki_v = 16'd16384; fault = 0;
    repeat (5) @(posedge clk);
    #1 rst_n = 1;
    settle(0.0, 20);
    settle(5.0, 600);
    checks++;
    if (n_sat == 0) begin failures++; $display("duty never saturated on the step"); end
    settle(-3.0, 600);
    checks++;
    if (n_adc < n_period - 1 || n_adc > n_period) begin failures++; $display("adc reads %0d periods %0d", n_adc, n_period); end
    checks++;
    if (adc_word[2] !== 16'sh1234 || adc_word[3] !== 16'shfedc) begin
      failures++; $display("adc words %h %h", adc_word[2], adc_word[3]);
    end
    // inner loop: the measured output voltage follows v_ref, and settles at
    // R * I = -4.5 V (-3686 at 40 V full scale)
    checks++;
    if (adc_word[1] - v_ref > 40 || adc_word[1] - v_ref < -40 ||
        adc_word[1] > -3686 + 80 || adc_word[1] < -3686 - 80) begin
      failures++; $display("output voltage %0d, v_ref %0d", adc_word[1], v_ref);
    end
    // interlock
    @(posedge clk); #1 fault = 4'b0010;
    @(posedge clk); #1 fault = 0;
    @(posedge clk); #1;
    checks++;
    if (!trip || gate != 0 || fault_latched != 4'b0010) begin failures++; $display("no trip: gate %b", gate); end
    repeat (4000 * 100) begin
      @(posedge clk); #1;
      if (gate != 0) begin failures++; checks++; $display("gate during trip"); break; end
    end
    n_trip++;
    checks++;
    if (plant.i_load < -0.05) begin failures++; $display("current did not decay: %f", plant.i_load); end
    fault_clear = 1; @(posedge clk); #1 fault_clear = 0;
    settle(2.0, 600);
    // unipolar mode: leg B low FET always on, current one way only
    unipolar = 1;
    settle(3.0, 600);
    checks++;
    if (gate[2] || !gate[3]) begin failures++; $display("unipolar: leg B gates %b", gate[3:2]); end
    settle(1.0, 600);
    unipolar = 0;
    $display("adc reads %0d, duty saturated %0d clocks, trips %0d", n_adc, n_sat, n_trip);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
