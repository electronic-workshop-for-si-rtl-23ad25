// iq_error: the error junction in front of the field-loop PI controllers.
// It subtracts the rotated cavity vector from the rotated reference vector,
// component by component, giving the I and Q errors the two PI controllers
// drive to zero. The result is one bit wider than the inputs so it never
// overflows. The document draws the junctions without a sign; reference minus
// cavity is this design's reading.
//
// Timing: registered, out_valid one clock after in_valid. The two vectors must
// arrive on the same in_valid (both channels run from one ADC clock).
module iq_error #(
  parameter int DATA_W = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] ref_i,
  input  logic signed [DATA_W-1:0] ref_q,
  input  logic signed [DATA_W-1:0] cav_i,
  input  logic signed [DATA_W-1:0] cav_q,
  output logic                     out_valid,
  output logic signed [DATA_W:0]   err_i,
  output logic signed [DATA_W:0]   err_q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err_i     <= '0;
      err_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        err_i <= (DATA_W+1)'(ref_i) - (DATA_W+1)'(cav_i);
        err_q <= (DATA_W+1)'(ref_q) - (DATA_W+1)'(cav_q);
      end
    end
  end

endmodule
