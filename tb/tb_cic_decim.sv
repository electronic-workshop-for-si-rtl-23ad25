// tb_cic_decim: checks cic_decim against its equivalent FIR filter: the
// impulse response of N cascaded length-R*M boxcars, applied to the input
// history (delayed by the N integrator registers), then shifted right by
// clog2((R*M)^N). Random and constant inputs on I and Q; also checks one
// output per R inputs and the DC gain.
module tb_cic_decim;
  localparam int W = 16, R = 10, N = 3, M = 1;
  localparam int GROWTH = $clog2((R*M)**N);
  localparam int HL = N * (R*M - 1) + 1;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_i, in_q, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;

  cic_decim #(.DATA_W(W), .R(R), .N(N), .M(M)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint h[HL];
  int xi[$], xq[$];
  int nout = 0;

  function automatic longint fir(ref int x[$], input int t);
    longint s = 0;
    for (int j = 0; j < HL; j++)
      if (t - N - j >= 0) s += h[j] * x[t - N - j];
    return s >>> GROWTH;
  endfunction

  task automatic push(input int a, input int b);
    int t;
    in_i = W'(a); in_q = W'(b); in_valid = 1;
    xi.push_back(a); xq.push_back(b);
    t = xi.size() - 1;
    @(posedge clk); #1;
    in_valid = 0;
    if ((t % R) == R - 1) begin
      longint ei, eq;
      ei = fir(xi, t); eq = fir(xq, t);
      checks++;
      if (!out_valid || out_i !== W'(ei) || out_q !== W'(eq)) begin
        failures++;
        if (failures < 10) $display("t=%0d valid=%0b I=%0d exp %0d Q=%0d exp %0d", t, out_valid, out_i, ei, out_q, eq);
      end
      nout++;
    end else begin
      checks++;
      if (out_valid) begin failures++; $display("unexpected valid t=%0d", t); end
    end
  endtask

  initial begin
    // boxcar^N impulse response
    longint b[HL];
    for (int j = 0; j < HL; j++) h[j] = (j < R*M) ? 1 : 0;
    for (int s = 1; s < N; s++) begin
      for (int j = 0; j < HL; j++) begin
        b[j] = 0;
        for (int u = 0; u < R*M; u++) if (j - u >= 0) b[j] += h[j-u];
      end
      h = b;
    end
    in_i = 0; in_q = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    for (int n = 0; n < 600; n++) push($signed($urandom) % 32768, $signed($urandom) % 32768);
    for (int n = 0; n < 100; n++) push(32767, -32768);   // full-scale DC
    for (int n = 0; n < 100; n++) push(1000, -2000);
    checks++;
    if (out_i !== 16'sd976 || out_q !== -16'sd1954) begin
      failures++;
      $display("DC gain: %0d %0d", out_i, out_q);
    end
    checks++;
    if (nout != xi.size() / R) begin failures++; $display("outputs %0d", nout); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
