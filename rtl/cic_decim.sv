// cic_decim: cascaded integrator-comb decimation filter for an I/Q pair.
//
// N integrators run on every input sample; every R-th sample the last
// integrator's value is passed through N comb (differentiator) stages with
// differential delay M, giving one output per R inputs. The DC gain (R*M)^N is
// removed by an arithmetic shift of GROWTH = clog2((R*M)^N) bits, so the output
// has the input width and a DC gain of (R*M)^N / 2^GROWTH (1000/1024 for the
// defaults). Internal width DATA_W + GROWTH, so the modular integrator
// arithmetic never loses the result.
//
// The decimation factor R = 10 takes the 20 MHz I/Q stream of the IQ demux to
// the 2 MHz loop rate, as the document gives. The number of stages N = 3 and
// M = 1 are this design's choices.
//
// Interface: in_valid qualifies in_i/in_q. out_valid pulses one clock after
// every R-th accepted input (the first output after R inputs following reset).
module cic_decim #(
  parameter int DATA_W = 16,
  parameter int R      = 10,
  parameter int N      = 3,
  parameter int M      = 1
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     in_valid,
  input  logic signed [DATA_W-1:0] in_i,
  input  logic signed [DATA_W-1:0] in_q,
  output logic                     out_valid,
  output logic signed [DATA_W-1:0] out_i,
  output logic signed [DATA_W-1:0] out_q
);

  localparam int GROWTH = $clog2((R * M) ** N);
  localparam int ACC_W  = DATA_W + GROWTH;
  localparam int CNT_W  = (R > 1) ? $clog2(R) : 1;

  typedef logic signed [ACC_W-1:0] acc_t;

  acc_t integ_i [N];
  acc_t integ_q [N];
  acc_t dly_i   [N][M];   // comb delay lines
  acc_t dly_q   [N][M];
  acc_t comb_i  [N+1];
  acc_t comb_q  [N+1];
  logic [CNT_W-1:0] phase;

  // comb chain, evaluated on the decimated sample
  always_comb begin
    comb_i[0] = integ_i[N-1];
    comb_q[0] = integ_q[N-1];
    for (int s = 0; s < N; s++) begin
      comb_i[s+1] = comb_i[s] - dly_i[s][M-1];
      comb_q[s+1] = comb_q[s] - dly_q[s][M-1];
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < N; s++) begin
        integ_i[s] <= '0;
        integ_q[s] <= '0;
        for (int d = 0; d < M; d++) begin
          dly_i[s][d] <= '0;
          dly_q[s][d] <= '0;
        end
      end
      phase     <= '0;
      out_valid <= 1'b0;
      out_i     <= '0;
      out_q     <= '0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        integ_i[0] <= integ_i[0] + acc_t'(in_i);
        integ_q[0] <= integ_q[0] + acc_t'(in_q);
        for (int s = 1; s < N; s++) begin
          integ_i[s] <= integ_i[s] + integ_i[s-1];
          integ_q[s] <= integ_q[s] + integ_q[s-1];
        end
        if (phase == CNT_W'(R - 1)) begin
          phase <= '0;
          for (int s = 0; s < N; s++) begin
            dly_i[s][0] <= comb_i[s];
            dly_q[s][0] <= comb_q[s];
            for (int d = 1; d < M; d++) begin
              dly_i[s][d] <= dly_i[s][d-1];
              dly_q[s][d] <= dly_q[s][d-1];
            end
          end
          out_valid <= 1'b1;
          out_i     <= DATA_W'(comb_i[N] >>> GROWTH);
          out_q     <= DATA_W'(comb_q[N] >>> GROWTH);
        end else begin
          phase <= phase + CNT_W'(1);
        end
      end
    end
  end

endmodule
