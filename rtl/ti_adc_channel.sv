// One channel of the time-interleaved ADC model: input generator, ADC
// core model and the two background calibration stages in series.
//
//   nco -> adc_model -> offset_bca -> gain_bca -> m_*
//
// All links are valid/ready streams of 18-bit samples. The calibration
// stages compare this channel with the reference channel: off_ref and
// gain_ref carry the reference channel's samples entering the same stage,
// and off_in_data / gain_in_data expose this channel's own stage inputs so
// that the reference channel's can be broadcast. The reference channel
// feeds its own samples back as reference; its offset correction then
// stays at zero and its gain coefficient settles at one.
//
// Latency from NCO phase to calibrated sample is 5 clocks (NCO 1, ADC 2,
// each calibration stage 1); throughput is one sample per clock. The chain
// and its order follow the source design.
module ti_adc_channel
  import ti_adc_pkg::*;
#(
  parameter int unsigned PHASE_W      = 32,
  parameter int unsigned NCO_LUT_BITS = 13,
  parameter int unsigned ADC_LUT_BITS = 14,
  parameter int unsigned CODE_W       = 10,
  parameter int unsigned OFF_SHIFT    = 16,
  parameter int unsigned GAIN_SHIFT   = 30
) (
  input  logic                    clk,
  input  logic                    rst,
  // configuration
  input  logic [PHASE_W-1:0]      nco_start,
  input  logic [PHASE_W-1:0]      nco_step,
  input  sample_t                 adc_gain,
  input  sample_t                 adc_offset,
  input  adc_bypass_t             adc_bypass,
  input  bca_bypass_t             bca_bypass,
  // table write ports
  input  logic                    nco_lut_we,
  input  logic [NCO_LUT_BITS-1:0] nco_lut_waddr,
  input  sample_t                 nco_lut_wdata,
  input  logic                    adc_lut_we,
  input  logic [ADC_LUT_BITS-1:0] adc_lut_waddr,
  input  logic [CODE_W-1:0]       adc_lut_wdata,
  // reference channel exchange
  output sample_t                 off_in_data,
  output sample_t                 gain_in_data,
  input  sample_t                 off_ref,
  input  sample_t                 gain_ref,
  // calibrated output stream
  output logic                    m_valid,
  input  logic                    m_ready,
  output sample_t                 m_data,
  // calibration state, for observation
  output logic signed [31:0]      off_acc,
  output logic signed [31:0]      gain_acc
);

  logic    nco_v, nco_r;  sample_t nco_d;
  logic    adc_v, adc_r;  sample_t adc_d;
  logic    off_v, off_r;  sample_t off_d;

  nco #(.PHASE_W(PHASE_W), .LUT_BITS(NCO_LUT_BITS), .SAMPLE_W(SAMPLE_W)) u_nco (
    .clk, .rst,
    .phase_start (nco_start),
    .phase_step  (nco_step),
    .lut_we      (nco_lut_we),
    .lut_waddr   (nco_lut_waddr),
    .lut_wdata   (nco_lut_wdata),
    .m_valid     (nco_v),
    .m_ready     (nco_r),
    .m_data      (nco_d)
  );

  adc_model #(.LUT_BITS(ADC_LUT_BITS), .CODE_W(CODE_W)) u_adc (
    .clk, .rst,
    .gain      (adc_gain),
    .offset    (adc_offset),
    .bypass    (adc_bypass),
    .lut_we    (adc_lut_we),
    .lut_waddr (adc_lut_waddr),
    .lut_wdata (adc_lut_wdata),
    .s_valid   (nco_v),
    .s_ready   (nco_r),
    .s_data    (nco_d),
    .m_valid   (adc_v),
    .m_ready   (adc_r),
    .m_data    (adc_d)
  );

  offset_bca #(.ACC_W(32), .SHIFT(OFF_SHIFT)) u_off (
    .clk, .rst,
    .bypass   (bca_bypass.offset),
    .s_valid  (adc_v),
    .s_ready  (adc_r),
    .s_data   (adc_d),
    .ref_data (off_ref),
    .m_valid  (off_v),
    .m_ready  (off_r),
    .m_data   (off_d),
    .acc      (off_acc)
  );

  gain_bca #(.ACC_W(32), .SHIFT(GAIN_SHIFT)) u_gain (
    .clk, .rst,
    .bypass   (bca_bypass.gain),
    .s_valid  (off_v),
    .s_ready  (off_r),
    .s_data   (off_d),
    .ref_data (gain_ref),
    .m_valid  (m_valid),
    .m_ready  (m_ready),
    .m_data   (m_data),
    .acc      (gain_acc)
  );

  assign off_in_data  = adc_d;
  assign gain_in_data = off_d;

endmodule
