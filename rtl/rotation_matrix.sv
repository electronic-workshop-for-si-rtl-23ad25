// rotation_matrix: gain and phase correction of an I/Q vector,
//   [I_out]       [cos t  -sin t] [I_in]
//   [Q_out] = A * [sin t   cos t] [Q_in]
// The two products A*cos(t) and A*sin(t) come in as signed fixed-point
// coefficients with COEF_FRAC fraction bits (Q1.14 by default, so A up to
// about 2). The matrix is the document's; the coefficient format, the rounding
// (arithmetic shift, i.e. floor) and the saturation are this design's.
//
// Interface and timing: in_valid qualifies the vector; out_valid and the
// saturated result follow one clock later. coef_c/coef_s are sampled with the
// vector.
module rotation_matrix #(
  parameter int DATA_W    = 16,
  parameter int COEF_W    = 16,
  parameter int COEF_FRAC = 14
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  input  logic signed [COEF_W-1:0] coef_c,   // A*cos(theta)
  input  logic signed [COEF_W-1:0] coef_s,   // A*sin(theta)
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q
);

  localparam int PROD_W = DATA_W + COEF_W + 1;
  localparam logic signed [DATA_W-1:0] MAXV = {1'b0, {(DATA_W-1){1'b1}}};
  localparam logic signed [DATA_W-1:0] MINV = {1'b1, {(DATA_W-1){1'b0}}};

  logic signed [PROD_W-1:0] xi, xq, cc, cs;
  logic signed [PROD_W-1:0] sum_i, sum_q, sh_i, sh_q;

  function automatic logic signed [DATA_W-1:0] sat(input logic signed [PROD_W-1:0] v);
    if (v > PROD_W'(MAXV))      return MAXV;
    else if (v < PROD_W'(MINV)) return MINV;
    else                        return DATA_W'(v);
  endfunction

  always_comb begin
    xi    = PROD_W'(in_i);
    xq    = PROD_W'(in_q);
    cc    = PROD_W'(coef_c);
    cs    = PROD_W'(coef_s);
    sum_i = cc * xi - cs * xq;
    sum_q = cs * xi + cc * xq;
    sh_i  = sum_i >>> COEF_FRAC;
    sh_q  = sum_q >>> COEF_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= in_valid;
      if (in_valid) begin
        out_i <= sat(sh_i);
        out_q <= sat(sh_q);
      end
    end
  end

endmodule
