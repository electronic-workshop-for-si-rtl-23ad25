// mps_pwm: 25 kHz PWM for the four-FET H-bridge of the bipolar magnet power
// supply.
//
// A sawtooth counter runs 0 .. PERIOD-1 (PERIOD = 4000 clocks of 100 MHz is
// the document's 25 kHz switching frequency). The signed duty command d
// (Q1.15, -1 .. +1) gives leg A an on-time of PERIOD*(1+d)/2 and leg B
// PERIOD*(1-d)/2, so the mean bridge voltage is d times the link voltage and
// the current can flow either way (bipolar mode). With unipolar set, leg B
// keeps its low FET on and only leg A switches, with an on-time of
// PERIOD*d for d >= 0 (none for d < 0): the mean voltage is d times the link
// voltage and the current flows one way only. Each leg drives its high FET while the
// counter is below its on-time and its low FET otherwise; after every change a
// leg keeps both FETs off for DEADTIME clocks. gate = {B low, B high, A low,
// A high}. The duty command and the mode are taken only at the start of a
// period. The switching frequency, four FETs and the bipolar and unipolar
// modes are the document's; the modulation scheme, dead time and clock are
// this design's.
//
// Timing: period_start pulses on counter value 0, each period; enable low
// turns all four gates off at once.
module mps_pwm #(
  parameter int PERIOD   = 4000,
  parameter int DEADTIME = 50,
  parameter int DUTY_W   = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    enable,
  input  logic                    unipolar,
  input  logic signed [DUTY_W-1:0] duty,
  output logic [3:0]              gate,
  output logic                    period_start
);

  localparam int CNT_W  = $clog2(PERIOD + 1);
  localparam int DT_W   = $clog2(DEADTIME + 1);
  localparam int CALC_W = CNT_W + DUTY_W + 2;

  logic [CNT_W-1:0]  cnt, on_a, on_b;
  logic signed [CALC_W-1:0] half, delta, on_a_full, on_u_full;
  logic              raw_a, raw_b, raw_a_q, raw_b_q;
  logic [DT_W-1:0]   dt_a, dt_b;

  always_comb begin
    half      = CALC_W'(PERIOD / 2);
    delta     = (CALC_W'(duty) * half) >>> (DUTY_W - 1);
    on_a_full = half + delta;
    on_u_full = (duty < 0) ? '0 : (CALC_W'(duty) * CALC_W'(PERIOD)) >>> (DUTY_W - 1);
    raw_a     = (cnt < on_a);
    raw_b     = (cnt < on_b);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      cnt          <= '0;
      on_a         <= CNT_W'(PERIOD / 2);
      on_b         <= CNT_W'(PERIOD / 2);
      period_start <= 1'b0;
      raw_a_q      <= 1'b0;
      raw_b_q      <= 1'b0;
      dt_a         <= DT_W'(DEADTIME);
      dt_b         <= DT_W'(DEADTIME);
      gate         <= '0;
    end else begin
      // the two FETs of a leg are never on together
      a_no_shoot_through: assert (!(gate[0] && gate[1]) && !(gate[2] && gate[3]));
      period_start <= (cnt == 0);
      if (cnt == CNT_W'(PERIOD - 1)) begin
        cnt <= '0;
        // shadow load of the duty command, clamped to 0 .. PERIOD
        if (unipolar) begin
          on_a <= (on_u_full > CALC_W'(PERIOD)) ? CNT_W'(PERIOD) : CNT_W'(on_u_full);
          on_b <= '0;
        end else if (on_a_full < 0) begin
          on_a <= '0;
          on_b <= CNT_W'(PERIOD);
        end else if (on_a_full > CALC_W'(PERIOD)) begin
          on_a <= CNT_W'(PERIOD);
          on_b <= '0;
        end else begin
          on_a <= CNT_W'(on_a_full);
          on_b <= CNT_W'(PERIOD) - CNT_W'(on_a_full);
        end
      end else begin
        cnt <= cnt + CNT_W'(1);
      end
      // dead time: a change of the raw leg command restarts the blanking
      raw_a_q <= raw_a;
      raw_b_q <= raw_b;
      if (raw_a != raw_a_q)  dt_a <= DT_W'(DEADTIME);
      else if (dt_a != 0)    dt_a <= dt_a - DT_W'(1);
      if (raw_b != raw_b_q)  dt_b <= DT_W'(DEADTIME);
      else if (dt_b != 0)    dt_b <= dt_b - DT_W'(1);
      if (!enable) begin
        gate <= '0;
      end else begin
        gate[0] <= raw_a_q  && (dt_a == 0) && (raw_a == raw_a_q);
        gate[1] <= !raw_a_q && (dt_a == 0) && (raw_a == raw_a_q);
        gate[2] <= raw_b_q  && (dt_b == 0) && (raw_b == raw_b_q);
        gate[3] <= !raw_b_q && (dt_b == 0) && (raw_b == raw_b_q);
      end
    end
  end

endmodule
