// pi_ctrl: discrete proportional-integral controller,
//   s[n] = clamp(s[n-1] + Ki*Ts * e[n])          (integrator, backward Euler)
//   u[n] = sat(Kp * (e[n] + s[n]))
// the sampled form of G(s) = Kp * (1 + Ki/s). kp is an unsigned Q8.8 gain
// (KP_FRAC = 8: 15.0 is 3840) and ki is Ki*Ts as an unsigned Q0.16 fraction
// (KI_FRAC = 16: Ki = 2*pi*4.4 kHz at Ts = 0.5 us is 906). The integrator keeps
// KI_FRAC fraction bits and is clamped to the output range; the output
// saturates to OUT_W bits, and while it is saturated an error that would drive
// it further into saturation is not integrated (conditional integration, so
// a large step does not wind the integrator up). The structure is the document's PI law; the
// number formats, the clamp and the saturation are this design's.
//
// The same module serves the LLRF field loop (one per I and Q), the tuner loop
// and the magnet current loop.
//
// Interface and timing: in_valid qualifies err; u and out_valid follow one
// clock later. clear empties the integrator (e.g. on an interlock).
module pi_ctrl #(
  parameter int E_W     = 17,
  parameter int OUT_W   = 16,
  parameter int KP_FRAC = 8,
  parameter int KI_FRAC = 16
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    clear,
  input  logic                    in_valid,
  input  logic signed [E_W-1:0]   err,
  input  logic        [15:0]      kp,
  input  logic        [15:0]      ki,
  output logic                    out_valid,
  output logic signed [OUT_W-1:0] u
);

  localparam int ACC_W = OUT_W + KI_FRAC + 2;        // integrator, e units << KI_FRAC
  localparam int SUM_W = ((E_W > OUT_W) ? E_W : OUT_W) + 2;
  localparam int MUL_W = SUM_W + 17;

  localparam logic signed [ACC_W-1:0] ACC_MAX =  (ACC_W'(1) <<< (OUT_W - 1 + KI_FRAC)) - ACC_W'(1);
  localparam logic signed [ACC_W-1:0] ACC_MIN = -(ACC_W'(1) <<< (OUT_W - 1 + KI_FRAC));
  localparam logic signed [MUL_W-1:0] U_MAX   =  (MUL_W'(1) <<< (OUT_W - 1)) - MUL_W'(1);
  localparam logic signed [MUL_W-1:0] U_MIN   = -(MUL_W'(1) <<< (OUT_W - 1));

  logic signed [ACC_W-1:0] acc, e_wide, ki_wide, acc_next, acc_sum;
  logic signed [SUM_W-1:0] sum;
  logic signed [MUL_W-1:0] sum_wide, kp_wide, prod, u_full;

  always_comb begin
    e_wide   = ACC_W'(err);
    ki_wide  = ACC_W'({1'b0, ki});
    acc_sum  = acc + e_wide * ki_wide;
    if (acc_sum > ACC_MAX)      acc_next = ACC_MAX;
    else if (acc_sum < ACC_MIN) acc_next = ACC_MIN;
    else                        acc_next = acc_sum;
    sum      = SUM_W'(err) + SUM_W'(acc_next >>> KI_FRAC);
    sum_wide = MUL_W'(sum);
    kp_wide  = MUL_W'({1'b0, kp});
    prod     = sum_wide * kp_wide;
    u_full   = prod >>> KP_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc       <= '0;
      out_valid <= 1'b0;
      u         <= '0;
    end else begin
      out_valid <= in_valid && !clear;
      if (clear) begin
        acc <= '0;
        u   <= '0;
      end else if (in_valid) begin
        if (!((u_full > U_MAX && err > 0) || (u_full < U_MIN && err < 0))) acc <= acc_next;
        if (u_full > U_MAX)      u <= OUT_W'(U_MAX);
        else if (u_full < U_MIN) u <= OUT_W'(U_MIN);
        else                     u <= OUT_W'(u_full);
      end
    end
  end

endmodule
