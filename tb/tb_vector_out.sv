// tb_vector_out: holds I and Q constant at the input of vector_out and checks
// the DAC stream against  sat14(floor((I*s(n) + Q*c(n)) / 2^17)), with
// s(n) = round(32767 sin(2*pi*5n/16)), c(n) likewise cosine: a 50 MHz IF at
// 160 MS/s, 112.5 degrees per sample. The phase origin of the stream is found
// once from the first I-only pattern and kept for all others; each vector
// must then match on every sample. Also checks the stream repeats every 16
// samples with 5 IF cycles and that the amplitude is sqrt(I^2 + Q^2)/4.
module tb_vector_out;
  logic clk = 0, rst_n = 0;
  logic signed [15:0] in_i, in_q;
  logic signed [13:0] dac_out;
  int checks = 0, failures = 0;

  vector_out #(.DATA_W(16), .DAC_W(14), .LO_PHASE_W(4), .LO_INC(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int expv(int i, int q, int n);
    real a;
    longint s, c, v;
    a = 2.0 * 3.14159265358979 * 5.0 * n / 16.0;
    s = int'(32767.0 * $sin(a));
    c = int'(32767.0 * $cos(a));
    v = (longint'(i) * s + longint'(q) * c) >>> 17;
    if (v > 8191) v = 8191;
    if (v < -8192) v = -8192;
    return int'(v);
  endfunction

  int origin = -1;
  int cnt = 0;   // clocks since the vector was applied

  task automatic apply(input int i, input int q);
    int got[64];
    in_i = 16'(i); in_q = 16'(q);
    repeat (4) @(posedge clk);   // let the new vector through the pipeline
    for (int n = 0; n < 64; n++) begin
      @(posedge clk); #1;
      got[n] = dac_out;
    end
    if (origin < 0) begin
      for (int o = 0; o < 16; o++) begin
        int bad = 0;
        for (int n = 0; n < 64; n++) if (got[n] != expv(i, q, n + o)) bad++;
        if (bad == 0 && origin < 0) origin = o;
      end
      checks++;
      if (origin < 0) begin failures++; $display("no phase origin fits"); origin = 0; end
    end
    for (int n = 0; n < 64; n++) begin
      checks++;
      if (got[n] != expv(i, q, n + origin)) begin
        failures++;
        if (failures < 10) $display("I=%0d Q=%0d n=%0d got %0d exp %0d", i, q, n, got[n], expv(i, q, n + origin));
      end
    end
    // repeats every 16 samples
    for (int n = 16; n < 64; n++) begin
      checks++;
      if (got[n] != got[n-16]) begin failures++; $display("not 16-periodic"); end
    end
    origin = (origin + 68) % 16;   // 4 + 64 clocks elapsed
  endtask

  initial begin
    in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    apply(20000, 0);
    apply(0, 20000);
    apply(-12000, 9000);
    apply(32767, 32767);      // saturates the 14-bit DAC word
    apply($signed($urandom) % 20000, $signed($urandom) % 20000);
    // amplitude of an I=Q=16384 vector: 16384*sqrt(2)/4 = 5793 (+- table rounding)
    begin
      int mx = 0;
      in_i = 16384; in_q = 16384;
      repeat (4) @(posedge clk);
      for (int n = 0; n < 16; n++) begin
        @(posedge clk); #1;
        if (dac_out > mx) mx = dac_out;
      end
      checks++;
      if (mx < 5500 || mx > 5794) begin failures++; $display("amplitude %0d", mx); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
