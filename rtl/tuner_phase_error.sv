// tuner_phase_error: phase rotation and phase detector of the tuner loop.
//
// The forward-power phase is rotated by a programmable offset and compared
// with the cavity phase:
//   err = wrap(phi_cav - (phi_fw + phi_offset))
// Phases are PHASE_W-bit fractions of a turn, so the modular subtraction wraps
// to +-half a turn by itself; the top OUT_W bits are kept (the PHASE_W-OUT_W
// lowest bits are below the loop's resolution and are dropped) as a signed error
// for the tuner PI controller. At the tuner's resonance the cavity phase
// relative to the forward wave is constant, so phi_offset sets the detuning
// the loop holds. The offset and the rotation come from the document's tuner
// diagram; the subtraction order, widths and the register are this design's.
//
// Timing: in_valid qualifies the two phases; err and out_valid one clock later.
module tuner_phase_error #(
  parameter int PHASE_W = 20,
  parameter int OUT_W   = 17
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic [PHASE_W-1:0]       phi_fw,
  input  logic [PHASE_W-1:0]       phi_cav,
  input  logic [PHASE_W-1:0]       phi_offset,
  output logic                     out_valid,
  output logic signed [OUT_W-1:0]  err
);

  logic [PHASE_W-1:0] diff;

  always_comb diff = phi_cav - (phi_fw + phi_offset);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      err       <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) err <= diff[PHASE_W-1 -: OUT_W];
    end
  end

endmodule
