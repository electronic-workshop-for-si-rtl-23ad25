// tb_pulse_gen: constant rate commands into pulse_gen (12-bit accumulator and
// 2-clock pulses to keep the run short). Over 40960 clocks the number of step
// pulses must be 40960*|rate|/4096 (+-1), every pulse exactly PULSE_LEN clocks
// high, dir equal to the command's sign, and no steps inside the dead band.
module tb_pulse_gen;
  localparam int ACC_W = 12, PULSE_LEN = 2, DEADBAND = 16;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] rate;
  logic step, dir;
  int checks = 0, failures = 0;

  pulse_gen #(.IN_W(16), .ACC_W(ACC_W), .PULSE_LEN(PULSE_LEN), .DEADBAND(DEADBAND)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #10000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input int r);
    int nstep = 0, hi = 0, badw = 0, baddir = 0;
    int expn, ar;
    ar = (r < 0) ? -r : r;
    rate = 16'(r);
    repeat (40) @(posedge clk);   // settle the previous command
    for (int n = 0; n < 40960; n++) begin
      @(posedge clk); #1;
      if (step) begin
        if (hi == 0) nstep++;
        hi++;
        if (dir !== (r < 0)) baddir++;
      end else begin
        if (hi != 0 && hi != PULSE_LEN) badw++;
        hi = 0;
      end
    end
    expn = (ar >= DEADBAND) ? (40960 * ar) / 4096 : 0;
    if (expn > 40960 / (2 * PULSE_LEN)) expn = 40960 / (2 * PULSE_LEN);
    checks++;
    if (nstep < expn - 1 || nstep > expn + 1) begin failures++; $display("rate %0d: %0d steps, exp %0d", r, nstep, expn); end
    checks++;
    if (badw != 0) begin failures++; $display("rate %0d: %0d pulses of wrong width", r, badw); end
    checks++;
    if (baddir != 0) begin failures++; $display("rate %0d: wrong dir", r); end
  endtask

  initial begin
    rate = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    run(100);
    run(-100);
    run(400);
    run(-37);
    run(10);     // dead band
    run(-15);    // dead band
    run(1000);   // 1 step / 4.1 clocks asked, limited to 1 per 4 clocks
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
