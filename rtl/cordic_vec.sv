// cordic_vec: iterative CORDIC in vectoring mode - converts an I/Q vector to
// amplitude and phase.
//
// A vector in the left half-plane is first turned by half a turn. Then each
// clock one micro-rotation by +-atan(2^-i) drives y towards zero while z
// accumulates the angle turned; after ITER iterations x holds the magnitude
// times the CORDIC gain K = prod sqrt(1 + 2^-2i) (1.6468 for 16 iterations)
// and z the phase. The magnitude is multiplied by round(2^16/K) to remove K.
// x and y carry GUARD = 4 fraction bits so the shifts lose little, and the
// magnitude is rounded at the end. The phase is a PHASE_W-bit fraction of a turn (2^PHASE_W = 360 degrees).
// Sixteen iterations, one per clock, take 200 ns at 80 MHz as in the document;
// the arithmetic widths and the half-plane pre-rotation are this design's.
//
// Interface and timing: start (while idle) loads in_i/in_q; start while busy
// is ignored. done pulses for one clock ITER + 2 clocks after the start clock
// (one load, ITER iterations, one output), with mag and phase, which then hold.
module cordic_vec #(
  parameter int DATA_W  = 16,
  parameter int PHASE_W = 20,
  parameter int ITER    = 16
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     start,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic                     busy,
  output logic                     done,
  output logic [DATA_W:0]          mag,
  output logic [PHASE_W-1:0]       phase
);

  import llrf_pkg::*;

  localparam int GUARD = 4;                     // fraction bits against truncation
  localparam int XW    = DATA_W + 2 + GUARD;
  localparam int IT_W  = $clog2(ITER + 1);
  localparam int GAIN_FRAC = 16;
  localparam logic [GAIN_FRAC:0] INV_GAIN = (GAIN_FRAC+1)'(cordic_inv_gain(ITER, GAIN_FRAC));

  typedef logic [PHASE_W-1:0] ph_t;

  function automatic ph_t [ITER-1:0] make_atan();
    ph_t [ITER-1:0] t;
    for (int i = 0; i < ITER; i++) t[i] = PHASE_W'(cordic_atan(i, PHASE_W));
    return t;
  endfunction

  localparam ph_t [ITER-1:0] ATAN = make_atan();

  logic signed [XW-1:0] x, y, xs, ys;
  ph_t                  z;
  logic [IT_W-1:0]      it;
  logic [XW+GAIN_FRAC:0] mag_full;

  always_comb begin
    xs       = x >>> it;
    ys       = y >>> it;
    mag_full = (XW+GAIN_FRAC+1)'(unsigned'(x)) * (XW+GAIN_FRAC+1)'(INV_GAIN);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x     <= '0;
      y     <= '0;
      z     <= '0;
      it    <= '0;
      busy  <= 1'b0;
      done  <= 1'b0;
      mag   <= '0;
      phase <= '0;
    end else begin
      done <= 1'b0;
      if (!busy) begin
        if (start) begin
          busy <= 1'b1;
          it   <= '0;
          if (in_i < 0) begin
            x <= -(XW'(in_i) <<< GUARD);
            y <= -(XW'(in_q) <<< GUARD);
            z <= ph_t'(1) << (PHASE_W - 1);
          end else begin
            x <= XW'(in_i) <<< GUARD;
            y <= XW'(in_q) <<< GUARD;
            z <= '0;
          end
        end
      end else if (it == IT_W'(ITER)) begin
        busy  <= 1'b0;
        done  <= 1'b1;
        mag   <= (DATA_W+1)'((mag_full + (1 << (GAIN_FRAC + GUARD - 1))) >> (GAIN_FRAC + GUARD));
        phase <= z;
      end else begin
        it <= it + IT_W'(1);
        if (y >= 0) begin
          x <= x + ys;
          y <= y - xs;
          z <= z + ATAN[it[$clog2(ITER)-1:0]];
        end else begin
          x <= x - ys;
          y <= y + xs;
          z <= z - ATAN[it[$clog2(ITER)-1:0]];
        end
      end
    end
  end

endmodule
