// tb_iq_demux: drives random ADC words and an ideal quarter-rate IF with an
// offset into iq_demux and compares I and Q with a sample-history model:
// I from the odd samples, Q from the even ones, (x(k) - x(k-2))/2 negated for
// k = 2, 3. Also checks that an IF with offset gives back its I and Q exactly
// and that pairs come at half the sample rate. Last, a 50 MHz IF sampled at
// 40 MS/s (fs = 4/(2n+1) * f_IF with n = 2, 450 degrees per sample) must give
// the same I = A cos(phi), Q = A sin(phi) as the quarter-rate case.
module tb_iq_demux;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_x, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;

  iq_demux #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int xs[$];
  int exp_i, exp_q, nvalid;

  function automatic int fl2(int d);  // floor(d/2)
    return (d >= 0) ? d / 2 : -((-d + 1) / 2);
  endfunction

  task automatic push(input int x);
    int k, d;
    in_x     = W'(x);
    in_valid = 1;
    xs.push_back(x);
    k = xs.size() - 1;
    if (k >= 2) begin
      d = xs[k] - xs[k-2];
      if ((k % 4) >= 2) d = -d;
      if (k % 2) exp_i = fl2(d);
      else       exp_q = fl2(d);
    end
    @(posedge clk); #1;
    in_valid = 0;
    if (k >= 2) begin
      if (k % 2 == 0) begin
        checks++;
        if (!out_valid || out_i !== W'(exp_i) || out_q !== W'(exp_q)) begin
          failures++;
          $display("k=%0d valid=%0b I=%0d exp %0d Q=%0d exp %0d", k, out_valid, out_i, exp_i, out_q, exp_q);
        end
        nvalid++;
      end else begin
        checks++;
        if (out_valid || out_i !== W'(exp_i)) begin
          failures++;
          $display("k=%0d (odd) valid=%0b I=%0d exp %0d", k, out_valid, out_i, exp_i);
        end
      end
    end else if (out_valid) begin
      failures++; checks++;
      $display("valid before two samples");
    end
  endtask

  initial begin
    in_x = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1;
    // random words, including the extremes
    for (int n = 0; n < 400; n++) begin
      int x;
      x = $signed($urandom) % 32768;
      if (n == 5) x = 32767;
      if (n == 7) x = -32768;
      push(x);
    end
    // quarter-rate IF: Q, I, -Q, -I plus offset; index continues mod 4
    begin
      int I0 = 12000, Q0 = -7000, off = 321;
      int k0;
      for (int n = 0; n < 40; n++) begin
        k0 = xs.size() % 4;
        case (k0)
          0: push(Q0 + off);
          1: push(I0 + off);
          2: push(-Q0 + off);
          default: push(-I0 + off);
        endcase
      end
      checks++;
      if (out_i !== W'(I0) || out_q !== W'(Q0)) begin
        failures++;
        $display("IF recovery: I=%0d Q=%0d", out_i, out_q);
      end
    end
    // undersampled IF: 50 MHz at 40 MS/s, 450 degrees per sample
    begin
      real A = 20000.0, phi = 0.7, off = -150.0, w;
      int k0;
      for (int n = 0; n < 40; n++) begin
        k0 = xs.size() % 4;   // the demux counts samples from reset
        w  = 2.0 * 3.14159265358979 * 50.0e6 / 40.0e6 * real'(k0);
        push(int'($floor(A * $sin(w + phi) + off + 0.5)));
      end
      checks++;
      if (int'(out_i) - int'(A * $cos(phi)) > 1 || int'(out_i) - int'(A * $cos(phi)) < -1 ||
          int'(out_q) - int'(A * $sin(phi)) > 1 || int'(out_q) - int'(A * $sin(phi)) < -1) begin
        failures++;
        $display("50 MHz IF at 40 MS/s: I=%0d Q=%0d, want %f %f", out_i, out_q, A * $cos(phi), A * $sin(phi));
      end
    end
    // pair rate = half the sample rate
    checks++;
    if (nvalid != (xs.size() - 1) / 2) begin
      failures++;
      $display("pairs %0d for %0d samples", nvalid, xs.size());
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
