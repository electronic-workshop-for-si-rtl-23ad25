// mps_interlock: latching interlock of the magnet power supply.
//
// Any fault input sets its bit in the latched fault word; trip is high while
// any bit is set and removes the gate drive and empties the current loop's
// integrator. clear resets only the bits whose fault input has gone away, so
// a standing fault cannot be cleared. The document only names the interlock;
// this behaviour is this design's.
//
// Timing: a fault shows on trip one clock later.
module mps_interlock #(
  parameter int N_FAULT = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_FAULT-1:0] fault,
  input  logic               clear,
  output logic [N_FAULT-1:0] latched,
  output logic               trip
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) latched <= '0;
    else if (clear) latched <= fault;
    else latched <= latched | fault;
  end

  assign trip = |latched;

endmodule
