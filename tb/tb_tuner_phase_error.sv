// tb_tuner_phase_error: random forward, cavity and offset phases (20-bit
// fractions of a turn) into tuner_phase_error; the error must be
// phi_cav - phi_fw - phi_offset wrapped into +-half a turn, in units of
// 2^3 LSB (17 bits kept), one clock after in_valid.
module tb_tuner_phase_error;
  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [19:0] phi_fw, phi_cav, phi_offset;
  logic signed [16:0] err;
  logic out_valid;
  int checks = 0, failures = 0;

  tuner_phase_error #(.PHASE_W(20), .OUT_W(17)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #500000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic one(input int f, input int c, input int o);
    int d;
    phi_fw = 20'(f); phi_cav = 20'(c); phi_offset = 20'(o); in_valid = 1;
    d = c - f - o;
    while (d >= 524288) d -= 1048576;
    while (d < -524288) d += 1048576;
    d = d >>> 3;
    @(posedge clk); #1;
    in_valid = 0;
    checks++;
    if (!out_valid || err !== 17'(d)) begin
      failures++;
      if (failures < 10) $display("fw %0d cav %0d off %0d err %0d exp %0d", f, c, o, err, d);
    end
  endtask

  initial begin
    phi_fw = 0; phi_cav = 0; phi_offset = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    one(1000, 1000, 0);
    one(1048000, 100, 0);       // wraps across zero: +676
    one(100, 1048000, 0);       // -676
    one(0, 0, 262144);          // quarter-turn offset: -quarter
    for (int n = 0; n < 500; n++) one($urandom % 1048576, $urandom % 1048576, $urandom % 1048576);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
