// pulse_gen: step/direction pulse generator for the tuner's stepper motor
// driver.
//
// The signed rate command (the tuner PI output) sets the step frequency:
// every clock its magnitude is added to an ACC_W-bit accumulator and each
// carry out starts one step pulse, so f_step = f_clk * |rate| / 2^ACC_W. dir
// is the sign of the command, latched at the start of each pulse so it is
// stable while the pulse is high. A step pulse is PULSE_LEN clocks high
// followed by at least PULSE_LEN clocks low; a carry that comes while a pulse
// is in progress is kept (one pending step). Commands with |rate| < DEADBAND
// make no steps, so the motor rests when the phase error is small. The
// document names only the block; this rate-generator design is its own.
//
// Timing: step rises one clock after the carry.
module pulse_gen #(
  parameter int IN_W      = 16,
  parameter int ACC_W     = 24,
  parameter int PULSE_LEN = 8,
  parameter int DEADBAND  = 16
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  logic signed [IN_W-1:0] rate,
  output logic                   step,
  output logic                   dir
);

  localparam int CNT_W = $clog2(2 * PULSE_LEN + 1);

  logic [IN_W-1:0]  mag;
  logic [ACC_W:0]   acc_sum;
  logic [ACC_W-1:0] acc;
  logic [CNT_W-1:0] cnt;      // clocks left in the current high+low pulse
  logic             pending;
  logic             carry;

  always_comb begin
    mag     = rate[IN_W-1] ? IN_W'(-rate) : IN_W'(rate);
    acc_sum = {1'b0, acc} + (ACC_W+1)'(mag);
    carry   = (mag >= IN_W'(DEADBAND)) && acc_sum[ACC_W];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc     <= '0;
      cnt     <= '0;
      pending <= 1'b0;
      step    <= 1'b0;
      dir     <= 1'b0;
    end else begin
      if (mag >= IN_W'(DEADBAND)) acc <= acc_sum[ACC_W-1:0];
      if (cnt != 0) begin
        cnt  <= cnt - CNT_W'(1);
        step <= (cnt > CNT_W'(PULSE_LEN));
        if (carry) pending <= 1'b1;
      end else if (carry || pending) begin
        pending <= 1'b0;
        cnt     <= CNT_W'(2 * PULSE_LEN - 1);
        step    <= 1'b1;
        dir     <= rate[IN_W-1];
      end else begin
        step <= 1'b0;
      end
    end
  end

endmodule
