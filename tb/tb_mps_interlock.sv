// tb_mps_interlock: fault pulses must latch and trip; clear must drop only
// the bits whose fault is gone; several faults latch together.
module tb_mps_interlock;
  logic clk = 0, rst_n = 0, clear = 0, trip;
  logic [3:0] fault, latched;
  int checks = 0, failures = 0;

  mps_interlock #(.N_FAULT(4)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_state(input logic [3:0] l);
    checks++;
    if (latched !== l || trip !== (l != 0)) begin
      failures++;
      $display("latched %b trip %b exp %b", latched, trip, l);
    end
  endtask

  initial begin
    fault = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    @(posedge clk); #1 expect_state(4'b0000);
    fault = 4'b0100; @(posedge clk); #1 fault = 0;
    expect_state(4'b0100);
    repeat (5) @(posedge clk); #1 expect_state(4'b0100);   // stays latched
    fault = 4'b0001; @(posedge clk); #1 expect_state(4'b0101);
    clear = 1; @(posedge clk); #1 clear = 0;                 // bit 0 still present
    expect_state(4'b0001);
    fault = 0; @(posedge clk); #1 expect_state(4'b0001);
    clear = 1; @(posedge clk); #1 clear = 0;
    expect_state(4'b0000);
    for (int n = 0; n < 50; n++) begin
      logic [3:0] f;
      f = 4'($urandom);
      fault = f; @(posedge clk); #1 fault = 0;
      expect_state(f);
      clear = 1; @(posedge clk); #1 clear = 0;
      expect_state(4'b0000);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
