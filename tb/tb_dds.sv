// tb_dds: runs dds with the document's numbers (10-bit accumulator, phase
// increment 12) and checks every sine and cosine word against
// round(32767 * sin/cos(2*pi*phase/1024)) computed here, the phase sequence
// (increments of 12 mod 1024 after the two-register latency), and the output
// frequency: 12 sine periods in 1024 clocks, i.e. f_clk * 12 / 2^10
// (1.40625 MHz at 120 MHz). Then changes the increment and checks again.
module tb_dds;
  logic clk = 0, rst_n = 0, en = 0;
  logic [9:0] phase_inc, phase;
  logic signed [15:0] sin_out, cos_out;
  int checks = 0, failures = 0;

  dds #(.PHASE_W(10), .LUT_W(10), .AMP_W(16)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int ref_sin(int p);
    return int'(32767.0 * $sin(2.0 * 3.14159265358979 * p / 1024.0));
  endfunction
  function automatic int ref_cos(int p);
    return int'(32767.0 * $cos(2.0 * 3.14159265358979 * p / 1024.0));
  endfunction

  task automatic run(input int inc, input int ncyc, output int rising);
    int prev_phase, prev_sin;
    rising = 0;
    prev_phase = phase;
    prev_sin = sin_out;
    for (int n = 0; n < ncyc; n++) begin
      @(posedge clk); #1;
      // table output is that of the phase before this edge
      checks++;
      if (sin_out !== 16'(ref_sin(prev_phase)) || cos_out !== 16'(ref_cos(prev_phase))) begin
        failures++;
        if (failures < 10) $display("phase %0d sin %0d exp %0d cos %0d exp %0d", prev_phase, sin_out, ref_sin(prev_phase), cos_out, ref_cos(prev_phase));
      end
      checks++;
      if (n > 2 && phase !== 10'(prev_phase + inc)) begin
        failures++;
        if (failures < 10) $display("phase %0d after %0d", phase, prev_phase);
      end
      if (prev_sin < 0 && sin_out >= 0) rising++;
      prev_phase = phase;
      prev_sin = sin_out;
    end
  endtask

  initial begin
    int r;
    phase_inc = 10'd12;
    repeat (3) @(posedge clk);
    #1 rst_n = 1; en = 1;
    run(12, 8, r);
    run(12, 1024, r);
    checks++;
    if (r != 12) begin failures++; $display("periods in 1024 clocks: %0d", r); end
    phase_inc = 10'd100;
    run(100, 4, r);
    run(100, 1024, r);
    checks++;
    if (r != 100) begin failures++; $display("periods: %0d", r); end
    // en low holds everything
    en = 0;
    begin
      int p;
      p = phase;
      repeat (5) @(posedge clk);
      #1 checks++;
      if (phase !== 10'(p)) begin failures++; $display("en low moved phase"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
