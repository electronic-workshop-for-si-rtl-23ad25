// tb_rotation_matrix: random vectors and coefficients through
// rotation_matrix, compared with floor((c*I - s*Q) / 2^14) and
// floor((s*I + c*Q) / 2^14) saturated to 16 bits, one clock later; also a
// 90-degree rotation (c = 0, s = 1.0) and a gain of 1.5 at zero angle.
module tb_rotation_matrix;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] in_i, in_q, coef_c, coef_s, out_i, out_q;
  logic out_valid;
  int checks = 0, failures = 0;

  rotation_matrix #(.DATA_W(W), .COEF_W(16), .COEF_FRAC(14)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int sat(longint v);
    if (v > 32767) return 32767;
    if (v < -32768) return -32768;
    return int'(v);
  endfunction

  task automatic one(input int i, input int q, input int c, input int s);
    longint ei, eq;
    in_i = W'(i); in_q = W'(q); coef_c = W'(c); coef_s = W'(s); in_valid = 1;
    ei = sat((longint'(c) * i - longint'(s) * q) >>> 14);
    eq = sat((longint'(s) * i + longint'(c) * q) >>> 14);
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || out_i !== W'(ei) || out_q !== W'(eq)) begin
      failures++;
      if (failures < 10) $display("i=%0d q=%0d c=%0d s=%0d -> %0d %0d exp %0d %0d", i, q, c, s, out_i, out_q, ei, eq);
    end
    @(posedge clk); #1;
    checks++;
    if (out_valid) begin failures++; $display("valid held"); end
  endtask

  initial begin
    in_i = 0; in_q = 0; coef_c = 0; coef_s = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 500; n++)
      one($signed($urandom) % 32768, $signed($urandom) % 32768, $signed($urandom) % 32768, $signed($urandom) % 32768);
    one(1000, 2000, 0, 16384);          // 90 degrees: (-2000, 1000)
    checks++;
    if (out_i !== -16'sd2000 || out_q !== 16'sd1000) begin failures++; $display("rot90 %0d %0d", out_i, out_q); end
    one(1000, -3000, 24576, 0);         // gain 1.5
    checks++;
    if (out_i !== 16'sd1500 || out_q !== -16'sd4500) begin failures++; $display("gain %0d %0d", out_i, out_q); end
    one(30000, 30000, 32767, 32767);    // saturates
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
