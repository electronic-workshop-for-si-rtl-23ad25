// tb_iq_error: random and extreme reference and cavity vectors through
// iq_error; the 17-bit result must equal reference minus cavity exactly, one
// clock later, and only when in_valid was high.
module tb_iq_error;
  localparam int W = 16;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic signed [W-1:0] ref_i, ref_q, cav_i, cav_q;
  logic signed [W:0] err_i, err_q;
  logic out_valid;
  int checks = 0, failures = 0;

  iq_error #(.DATA_W(W)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int a, input int b, input int c, input int d);
    ref_i = W'(a); ref_q = W'(b); cav_i = W'(c); cav_q = W'(d); in_valid = 1;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || err_i !== 17'(a - c) || err_q !== 17'(b - d)) begin
      failures++;
      if (failures < 10) $display("%0d-%0d=%0d, %0d-%0d=%0d", a, c, err_i, b, d, err_q);
    end
    ref_i = 0;
    @(posedge clk); #1;
    checks++;
    if (out_valid || err_i !== 17'(a - c)) begin failures++; $display("not held"); end
  endtask

  initial begin
    ref_i = 0; ref_q = 0; cav_i = 0; cav_q = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 300; n++)
      one($signed($urandom) % 32768, $signed($urandom) % 32768, $signed($urandom) % 32768, $signed($urandom) % 32768);
    one(32767, -32768, -32768, 32767);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
