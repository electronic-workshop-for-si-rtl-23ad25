// ad977a_model: behavioural model of N_CH serial 16-bit sampling ADCs of the
// AD977A kind sharing R/C, CS, BUSY and the data clock, for testbenches only.
// A falling R/C with CS low samples the per-channel words on sample_in and
// pulls BUSY low for CONV_NS; after BUSY returns high the MSB is on each data
// line and every falling edge of the data clock moves to the next bit.
module ad977a_model #(
  parameter int  N_CH    = 4,
  parameter real CONV_NS = 4000.0
) (
  input  logic              cs_n,
  input  logic              rc_n,
  output logic              busy_n,
  input  logic              dclk,
  output logic [N_CH-1:0]   data,
  input  logic [15:0]       sample_in [N_CH]
);
  logic [15:0] sr [N_CH];
  int conversions = 0;

  initial begin
    busy_n = 1'b1;
    data   = '0;
  end

  always @(negedge rc_n) begin
    if (!cs_n && busy_n) begin
      for (int c = 0; c < N_CH; c++) sr[c] = sample_in[c];
      busy_n = 1'b0;
      conversions++;
      #(CONV_NS);
      for (int c = 0; c < N_CH; c++) data[c] = sr[c][15];
      busy_n = 1'b1;
    end
  end

  always @(negedge dclk) begin
    if (!cs_n && busy_n) begin
      for (int c = 0; c < N_CH; c++) begin
        sr[c]   = {sr[c][14:0], 1'b0};
        data[c] = sr[c][15];
      end
    end
  end
endmodule
