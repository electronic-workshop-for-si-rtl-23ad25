// tb_ad977a_ctrl: ad977a_ctrl reading four behavioural serial ADCs. Random
// words are put on the model's inputs, a request is made, and the four words
// the controller presents with valid must be those words. Also checks that
// exactly one conversion is started per request, that a request while busy
// is ignored, and the sequence length: R/C, conversion, 16 bits of SCLK_DIV
// clocks.
`timescale 1ns/1ps
module tb_ad977a_ctrl;
  localparam int N_CH = 4, SCLK_DIV = 4;
  logic clk = 0, rst_n = 0, req = 0;
  logic busy, adc_cs_n, adc_rc_n, adc_busy_n, adc_dclk, valid;
  logic [N_CH-1:0] adc_data;
  logic signed [15:0] data [N_CH];
  logic [15:0] words [N_CH];
  int checks = 0, failures = 0;

  ad977a_ctrl #(.N_CH(N_CH), .DATA_W(16), .SCLK_DIV(SCLK_DIV), .RC_LEN(4)) dut (.*);
  ad977a_model #(.N_CH(N_CH), .CONV_NS(4000.0)) adc (
    .cs_n(adc_cs_n), .rc_n(adc_rc_n), .busy_n(adc_busy_n), .dclk(adc_dclk),
    .data(adc_data), .sample_in(words)
  );

  always #5 clk = ~clk;   // 100 MHz

  initial begin
    #50ms;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int cyc;
    for (int c = 0; c < N_CH; c++) words[c] = 0;
    repeat (3) @(posedge clk);
    #1 rst_n = 1;
    for (int n = 0; n < 50; n++) begin
      for (int c = 0; c < N_CH; c++) words[c] = 16'($urandom);
      if (n == 0) begin words[0] = 16'h8000; words[1] = 16'h7fff; words[2] = 16'hffff; words[3] = 16'h0001; end
      @(posedge clk); #1 req = 1;
      @(posedge clk); #1 req = 0;
      repeat (20) @(posedge clk);
      #1 req = 1;                     // ignored: busy
      @(posedge clk); #1 req = 0;
      cyc = 22;
      while (!valid && cyc < 10000) begin @(posedge clk); #1; cyc++; end
      checks++;
      if (!valid) begin failures++; $display("no valid"); end
      for (int c = 0; c < N_CH; c++) begin
        checks++;
        if (data[c] !== words[c]) begin failures++; $display("ch%0d %h exp %h", c, data[c], words[c]); end
      end
      // 4 clocks R/C + 400 clocks conversion + 64 clocks of data + a few
      checks++;
      if (cyc < 400 + 16 * SCLK_DIV || cyc > 400 + 16 * SCLK_DIV + 12) begin failures++; $display("cycle count %0d", cyc); end
      repeat (5) @(posedge clk);
    end
    checks++;
    if (adc.conversions != 50) begin failures++; $display("conversions %0d", adc.conversions); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
