// tb_mps_pwm: mps_pwm with a short period (200 clocks, dead time 5). For a
// set of duty commands it measures, per period, the on-time of each of the
// four gates and checks: period_start every PERIOD clocks; A-high on for
// PERIOD*(1+d)/2 - DEADTIME and B-high for PERIOD*(1-d)/2 - DEADTIME (+-2),
// or the whole period for a leg that does not switch;
// never both FETs of a leg on; at least DEADTIME clocks between one FET of a
// leg turning off and the other turning on; enable low turns all gates off.
// In unipolar mode: A-high on for PERIOD*d - DEADTIME (none for d <= 0),
// B-high never on and B-low on for the whole period.
module tb_mps_pwm;
  localparam int PERIOD = 200, DEADTIME = 5;
  logic clk = 0, rst_n = 0, enable = 0, unipolar = 0;
  logic signed [15:0] duty;
  logic [3:0] gate;
  logic period_start;
  int checks = 0, failures = 0;

  mps_pwm #(.PERIOD(PERIOD), .DEADTIME(DEADTIME), .DUTY_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int shoot = 0, dead_bad = 0;
  int off_a = 100, off_b = 100;   // clocks since leg went all-off
  logic [3:0] g_d = 0;
  always @(posedge clk) begin
    #1;
    if ((gate[0] && gate[1]) || (gate[2] && gate[3])) shoot++;
    // a FET of a leg turning on must follow >= DEADTIME clocks with the leg off
    if ((gate[0] && !g_d[0]) || (gate[1] && !g_d[1])) if (off_a < DEADTIME) dead_bad++;
    if ((gate[2] && !g_d[2]) || (gate[3] && !g_d[3])) if (off_b < DEADTIME) dead_bad++;
    off_a = (gate[1:0] == 0) ? off_a + 1 : 0;
    off_b = (gate[3:2] == 0) ? off_b + 1 : 0;
    g_d = gate;
  end

  task automatic measure(input int d);
    int on0, on2, on3, n, last;
    real dd;
    duty = 16'(d);
    // wait for two period starts (duty is taken at the period boundary)
    repeat (2) begin @(posedge clk); while (!period_start) @(posedge clk); end
    on0 = 0; on2 = 0; on3 = 0; n = 0;
    @(posedge clk);
    while (!period_start) begin
      #1; if (gate[0]) on0++; if (gate[2]) on2++; if (gate[3]) on3++; n++;
      @(posedge clk);
    end
    dd = real'(d) / 32768.0;
    checks++;
    if (n + 1 != PERIOD) begin failures++; $display("period %0d", n + 1); end
    begin
      int ea, eb;
      // a leg that never switches within the period has no dead time
      if (unipolar) begin
        ea = (d < 0) ? 0 : (d * PERIOD) >>> 15;
        eb = 0;
        checks++;
        if (on3 < PERIOD - 1) begin failures++; $display("unipolar: B low on %0d", on3); end
      end else begin
        ea = PERIOD / 2 + ((d * (PERIOD / 2)) >>> 15);   // floor
        eb = PERIOD - ea;
      end
      ea = (ea >= PERIOD) ? PERIOD - 1 : (ea <= DEADTIME) ? 0 : ea - DEADTIME;
      eb = (eb >= PERIOD) ? PERIOD - 1 : (eb <= DEADTIME) ? 0 : eb - DEADTIME;
      checks++;
      if (on0 < ea - 2 || on0 > ea + 2 || on2 < eb - 2 || on2 > eb + 2) begin
        failures++;
        $display("duty %0d: A on %0d exp %0d, B on %0d exp %0d", d, on0, ea, on2, eb);
      end
    end
  endtask

  initial begin
    duty = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; enable = 1;
    measure(0);
    measure(16384);
    measure(-16384);
    measure(30000);
    measure(-30000);
    measure(32767);
    measure(-32768);
    for (int n = 0; n < 10; n++) measure($signed($urandom) % 30000);
    unipolar = 1;
    measure(16384);
    measure(3000);
    measure(32767);
    measure(-8000);
    for (int n = 0; n < 5; n++) measure($signed($urandom) % 30000);
    unipolar = 0;
    measure(-16384);
    checks++;
    if (shoot != 0) begin failures++; $display("shoot-through %0d", shoot); end
    checks++;
    if (dead_bad != 0) begin failures++; $display("dead-time violations %0d", dead_bad); end
    enable = 0;
    repeat (2) @(posedge clk);
    repeat (PERIOD) begin
      @(posedge clk); #1;
      checks++;
      if (gate != 0) begin failures++; $display("gate on while disabled"); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
