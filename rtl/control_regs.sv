// Control logic: the memory-mapped registers that set up a run.
//
// Word map inside the control bank (per-channel registers at base + m):
//   0x00 RESET        bit 0 holds the model in reset while 1
//   0x01 CH_ENABLE    bit m enables channel m in the output order
//   0x02 ADC_BYPASS   {lut, offset, gain} bypass of every ADC model
//   0x03 BCA_BYPASS   {gain, offset} bypass of every calibration stage
//   0x04 MODE         bit 0: 0 FIFO mode, 1 circular mode of the buffer
//   0x10+m NCO_START  initial phase of channel m's oscillator
//   0x20+m NCO_STEP   phase step of channel m's oscillator
//   0x30+m ADC_OFFSET offset o_m of channel m (18-bit signed, sample LSBs)
//   0x40+m ADC_GAIN   gain 1+g_m of channel m (18-bit signed, 2^16 = 1.0)
// Every register reads back what was written (unused bits read 0; narrower
// fields are sign- or zero-extended). Unmapped words read 0 and ignore
// writes. Read data is registered: valid the clock after `re`.
// After power-on reset RESET is 1, all channels are enabled, nothing is
// bypassed, FIFO mode is selected, gains are 1.0 and offsets, starts and
// steps are 0. The register set follows the source design; the word
// offsets, field widths and reset values are this design's choices.
module control_regs
  import ti_adc_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               we,
  input  logic [WADDR_W-1:0] waddr,
  input  logic [BUS_W-1:0]   wdata,
  input  logic               re,
  input  logic [WADDR_W-1:0] raddr,
  output logic [BUS_W-1:0]   rdata,
  // register values
  output logic               soft_reset,
  output logic [M-1:0]       ch_enable,
  output adc_bypass_t        adc_bypass,
  output bca_bypass_t        bca_bypass,
  output buf_mode_e          mode,
  output logic [31:0]        nco_start  [M],
  output logic [31:0]        nco_step   [M],
  output sample_t            adc_offset [M],
  output sample_t            adc_gain   [M]
);

  localparam sample_t GAIN_ONE = sample_t'(1 << GAIN_FRAC);

  // per-channel register decode
  function automatic logic is_ch(input logic [WADDR_W-1:0] a,
                                 input logic [WADDR_W-1:0] base, input logic [3:0] m);
    return a == base + WADDR_W'(m);
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      soft_reset <= 1'b1;
      ch_enable  <= '1;
      adc_bypass <= '0;
      bca_bypass <= '0;
      mode       <= MODE_FIFO;
      for (int m = 0; m < M; m++) begin
        nco_start[m]  <= '0;
        nco_step[m]   <= '0;
        adc_offset[m] <= '0;
        adc_gain[m]   <= GAIN_ONE;
      end
    end else if (we) begin
      case (waddr)
        REG_RESET:      soft_reset <= wdata[0];
        REG_CH_ENABLE:  ch_enable  <= wdata[M-1:0];
        REG_ADC_BYPASS: adc_bypass <= adc_bypass_t'(wdata[2:0]);
        REG_BCA_BYPASS: bca_bypass <= bca_bypass_t'(wdata[1:0]);
        REG_MODE:       mode       <= buf_mode_e'(wdata[0]);
        default: ;
      endcase
      for (int m = 0; m < M; m++) begin
        if (is_ch(waddr, REG_NCO_START, 4'(m)))  nco_start[m]  <= wdata;
        if (is_ch(waddr, REG_NCO_STEP, 4'(m)))   nco_step[m]   <= wdata;
        if (is_ch(waddr, REG_ADC_OFFSET, 4'(m))) adc_offset[m] <= wdata[SAMPLE_W-1:0];
        if (is_ch(waddr, REG_ADC_GAIN, 4'(m)))   adc_gain[m]   <= wdata[SAMPLE_W-1:0];
      end
    end
  end

  always_ff @(posedge clk) begin
    if (!rst_n) rdata <= '0;
    else if (re) begin
      rdata <= '0;
      case (raddr)
        REG_RESET:      rdata <= BUS_W'(soft_reset);
        REG_CH_ENABLE:  rdata <= BUS_W'(ch_enable);
        REG_ADC_BYPASS: rdata <= BUS_W'(adc_bypass);
        REG_BCA_BYPASS: rdata <= BUS_W'(bca_bypass);
        REG_MODE:       rdata <= BUS_W'(mode);
        default: ;
      endcase
      for (int m = 0; m < M; m++) begin
        if (is_ch(raddr, REG_NCO_START, 4'(m)))  rdata <= nco_start[m];
        if (is_ch(raddr, REG_NCO_STEP, 4'(m)))   rdata <= nco_step[m];
        if (is_ch(raddr, REG_ADC_OFFSET, 4'(m))) rdata <= BUS_W'(adc_offset[m]);
        if (is_ch(raddr, REG_ADC_GAIN, 4'(m)))   rdata <= BUS_W'(adc_gain[m]);
      end
    end
  end

endmodule
