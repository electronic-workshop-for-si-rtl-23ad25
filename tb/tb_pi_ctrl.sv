// tb_pi_ctrl: drives pi_ctrl with error sequences and compares each output
// with a model of u = sat16(floor(Kp/256 * (e + floor(s/2^16)))),
// s = clamp(s + Ki*e) in 64-bit integers, s held when u is saturated and e
// pushes it further. Covers pure P (Ki = 0), the
// document's gains (Kp = 15, Ki*Ts = 906/2^16), integrator wind-up against
// the clamp, output saturation and clear.
module tb_pi_ctrl;
  logic clk = 0, rst_n = 0, in_valid = 0, clear = 0;
  logic signed [16:0] err;
  logic [15:0] kp, ki;
  logic signed [15:0] u;
  logic out_valid;
  int checks = 0, failures = 0;
  int nsat = 0;

  pi_ctrl #(.E_W(17), .OUT_W(16), .KP_FRAC(8), .KI_FRAC(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint s_model = 0;
  localparam longint SMAX = (longint'(1) << 31) - 1;
  localparam longint SMIN = -(longint'(1) << 31);

  task automatic step(input int e);
    longint t, uu, sn;
    err = 17'(e); in_valid = 1;
    sn = s_model + longint'(e) * longint'(ki);
    if (sn > SMAX) sn = SMAX;
    if (sn < SMIN) sn = SMIN;
    t  = longint'(e) + (sn >>> 16);
    uu = (t * longint'(kp)) >>> 8;
    // integrate unless that drives a saturated output further out
    if (!((uu > 32767 && e > 0) || (uu < -32768 && e < 0))) s_model = sn;
    if (uu > 32767) begin uu = 32767; nsat++; end
    if (uu < -32768) begin uu = -32768; nsat++; end
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || u !== 16'(uu)) begin
      failures++;
      if (failures < 10) $display("e=%0d u=%0d exp %0d", e, u, uu);
    end
  endtask

  initial begin
    err = 0; kp = 16'd256; ki = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    // pure proportional, gain 1.0 and 15.0
    for (int n = 0; n < 50; n++) step($signed($urandom) % 2000);
    kp = 16'd3840;
    for (int n = 0; n < 50; n++) step($signed($urandom) % 2000);
    // document gains
    ki = 16'd906;
    for (int n = 0; n < 300; n++) step(100);      // ramps and winds into the clamp
    for (int n = 0; n < 300; n++) step(-150);
    for (int n = 0; n < 300; n++) step(($signed($urandom) % 4000));
    // clear empties the integrator
    clear = 1; @(posedge clk); #1; clear = 0; s_model = 0;
    step(10);
    checks++;
    if (u !== 16'(((10 + (10 * 906 >>> 16)) * 3840) >>> 8)) begin failures++; $display("after clear u=%0d", u); end
    checks++;
    if (nsat == 0) begin failures++; $display("saturation never reached"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
