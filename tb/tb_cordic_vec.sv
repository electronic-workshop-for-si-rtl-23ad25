// tb_cordic_vec: random vectors in all four quadrants through cordic_vec.
// The phase is compared with atan2(Q, I) as a 20-bit fraction of a turn
// (tolerance 12 LSB, 0.004 degrees; sixteen iterations resolve
// atan(2^-15) = 5 LSB), the magnitude with sqrt(I^2 + Q^2) (tolerance 3).
// The latency from start to done must be ITER + 2 = 18 clocks: sixteen
// iterations, 200 ns at 80 MHz. Start while busy must be ignored.
module tb_cordic_vec;
  logic clk = 0, rst_n = 0, start = 0;
  logic signed [15:0] in_i, in_q;
  logic busy, done;
  logic [16:0] mag;
  logic [19:0] phase;
  int checks = 0, failures = 0;

  cordic_vec #(.DATA_W(16), .PHASE_W(20), .ITER(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #5000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int i, input int q);
    real ang, m;
    int ep, dp, lat;
    in_i = 16'(i); in_q = 16'(q); start = 1;
    @(posedge clk); #1;
    start = 0;
    in_i = 16'(-i);   // a start during busy must not be taken
    lat = 1;
    start = 1;
    while (!done && lat < 100) begin @(posedge clk); #1; lat++; start = (lat < 5); end
    start = 0;
    ang = $atan2(real'(q), real'(i)) / (2.0 * 3.14159265358979);
    if (ang < 0) ang += 1.0;
    ep = int'(ang * 1048576.0) % 1048576;
    dp = int'(phase) - ep;
    if (dp > 524288) dp -= 1048576;
    if (dp < -524288) dp += 1048576;
    m = $sqrt(real'(i) * i + real'(q) * q);
    checks++;
    if (dp > 12 || dp < -12) begin failures++; if (failures < 10) $display("(%0d,%0d) phase %0d exp %0d", i, q, phase, ep); end
    checks++;
    if (real'(mag) - m > 3.0 || m - real'(mag) > 3.0) begin failures++; if (failures < 10) $display("(%0d,%0d) mag %0d exp %f", i, q, mag, m); end
    checks++;
    if (lat != 18) begin failures++; $display("latency %0d", lat); end
    @(posedge clk); #1;
  endtask

  initial begin
    in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    one(10000, 0);
    one(0, 10000);
    one(-10000, 0);
    one(0, -10000);
    one(-32768, -32768);
    one(32767, 32767);
    one(-32768, 1);
    for (int n = 0; n < 300; n++) one($signed($urandom) % 32768, $signed($urandom) % 32768);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
