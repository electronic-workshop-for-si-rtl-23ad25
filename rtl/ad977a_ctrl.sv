// ad977a_ctrl: control sequencer for N_CH serial 16-bit sampling ADCs of the
// AD977A kind that convert together and read out in parallel.
//
// On req (while idle) it pulls chip select and R/C low for RC_LEN clocks,
// which starts a conversion in every ADC; it then waits until BUSY has gone low
// and back high (conversion finished), and shifts the DATA_W result bits of
// all channels in at once, MSB first, with a generated data clock of SCLK_DIV
// system clocks per bit. Each bit is sampled at the end of the data clock's
// high half (the ADC changes its data line after the falling edge). When all
// bits are in, data holds the two's-complement results and valid pulses for
// one clock. The document gives only the ADC type, the channel count and that
// an FPGA generates the ADC control signals; this sequence is a simplified
// reading of such an ADC's serial interface.
//
// Timing: one conversion takes RC_LEN + conversion time + DATA_W * SCLK_DIV
// + a few clocks; req while busy is ignored.
module ad977a_ctrl #(
  parameter int N_CH     = 4,
  parameter int DATA_W   = 16,
  parameter int SCLK_DIV = 4,
  parameter int RC_LEN   = 4
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          req,
  output logic                          busy,
  output logic                          adc_cs_n,
  output logic                          adc_rc_n,
  input  logic                          adc_busy_n,
  output logic                          adc_dclk,
  input  logic [N_CH-1:0]               adc_data,
  output logic                          valid,
  output logic signed [DATA_W-1:0]      data [N_CH]
);

  typedef enum logic [2:0] {S_IDLE, S_RC, S_WAIT_LO, S_WAIT_HI, S_SHIFT, S_DONE} state_t;

  localparam int DIV_W = $clog2(SCLK_DIV + 1);
  localparam int RC_W  = $clog2(RC_LEN + 1);
  localparam int BIT_W = $clog2(DATA_W + 1);

  state_t           state;
  logic [DIV_W-1:0] div;
  logic [RC_W-1:0]  rc_cnt;
  logic [BIT_W-1:0] nbits;
  logic [DATA_W-1:0] sh [N_CH];

  assign busy = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      div      <= '0;
      rc_cnt   <= '0;
      nbits    <= '0;
      adc_cs_n <= 1'b1;
      adc_rc_n <= 1'b1;
      adc_dclk <= 1'b0;
      valid    <= 1'b0;
      for (int c = 0; c < N_CH; c++) begin
        sh[c]   <= '0;
        data[c] <= '0;
      end
    end else begin
      // interface rules: R/C low and data-clock pulses only while the
      // converters are selected
      a_rc_with_cs:   assert (adc_rc_n || !adc_cs_n);
      a_dclk_with_cs: assert (!adc_dclk || !adc_cs_n);
      valid <= 1'b0;
      case (state)
        S_IDLE: if (req) begin
          adc_cs_n <= 1'b0;
          adc_rc_n <= 1'b0;
          rc_cnt   <= RC_W'(RC_LEN - 1);
          state    <= S_RC;
        end
        S_RC: if (rc_cnt == 0) begin
          adc_rc_n <= 1'b1;
          state    <= S_WAIT_LO;
        end else begin
          rc_cnt <= rc_cnt - RC_W'(1);
        end
        S_WAIT_LO: if (!adc_busy_n) state <= S_WAIT_HI;
        S_WAIT_HI: if (adc_busy_n) begin
          nbits <= '0;
          div   <= '0;
          state <= S_SHIFT;
        end
        S_SHIFT: begin
          if (div == DIV_W'(SCLK_DIV - 1)) begin
            div <= '0;
          end else begin
            div <= div + DIV_W'(1);
          end
          // data clock: low for the first half of each bit, high for the second
          adc_dclk <= (div >= DIV_W'(SCLK_DIV / 2 - 1)) && (div != DIV_W'(SCLK_DIV - 1));
          if (div == DIV_W'(SCLK_DIV - 1)) begin
            for (int c = 0; c < N_CH; c++) sh[c] <= {sh[c][DATA_W-2:0], adc_data[c]};
            nbits <= nbits + BIT_W'(1);
            if (nbits == BIT_W'(DATA_W - 1)) state <= S_DONE;
          end
        end
        S_DONE: begin
          adc_cs_n <= 1'b1;
          adc_dclk <= 1'b0;
          valid    <= 1'b1;
          for (int c = 0; c < N_CH; c++) data[c] <= sh[c];
          state    <= S_IDLE;
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule
