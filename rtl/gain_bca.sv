// Gain background calibration of one channel.
//
// An IIR estimator equalises the gain of this channel to the reference
// channel using absolute values (no squaring multiplier needed):
//   S_corr[k] = (S_in[k] * g[k]) >>> SHIFT          gamma_gain = 2^-SHIFT
//   g[k+1]    = g[k] - |S_corr[k]| + |S_ref[k]|
// g is an ACC_W-bit accumulator cleared by rst, so the channel first
// outputs zeros and its transfer grows until gamma_gain * g settles at the
// gain ratio to the reference. The shift follows the multiplication so the
// low product bits still count. The 32 x 18 product is formed as two
// partial products that each fit a 25 x 18 DSP multiplier:
//   g = A_H * 2^17 + A_L   (A_H = g[31:17] signed, A_L = g[16:0] unsigned)
//   P = (A_H * S_in) * 2^17 + A_L * S_in
// S_corr saturates to 18 bits; the accumulator wraps.
//
// Timing: one register stage, one sample per clock; the accumulator steps
// when an input sample is accepted. With bypass set, S_out = S_in and the
// accumulator holds. The equations, the zero start, the 32-bit accumulator
// and the split product follow the source design; SHIFT = 30, the
// saturation and the hold-on-bypass behaviour are this design's. With
// 18-bit integer samples, SHIFT = 30 keeps the per-sample change of the
// coefficient near 1e-4 of its value while gamma*g = 1 still fits the
// 32-bit accumulator for gain ratios below 2 (g < 2^31).
module gain_bca
  import ti_adc_pkg::*;
#(
  parameter int unsigned ACC_W = 32,
  parameter int unsigned SHIFT = 30
) (
  input  logic                    clk,
  input  logic                    rst,
  input  logic                    bypass,
  input  logic                    s_valid,
  output logic                    s_ready,
  input  sample_t                 s_data,
  input  sample_t                 ref_data,
  output logic                    m_valid,
  input  logic                    m_ready,
  output sample_t                 m_data,
  output logic signed [ACC_W-1:0] acc
);

  localparam int unsigned LO_W = 17;
  localparam int unsigned P_W  = ACC_W + SAMPLE_W;

  logic                           take;
  logic signed [ACC_W-LO_W-1:0]   a_hi;
  logic signed [LO_W:0]           a_lo;     // zero-extended low part
  logic signed [ACC_W-LO_W+SAMPLE_W-1:0] p_hi;
  logic signed [LO_W+1+SAMPLE_W-1:0]     p_lo;
  logic signed [P_W-1:0]          prod;
  sample_t                        corr;
  logic signed [SAMPLE_W:0]       abs_corr, abs_ref;

  assign s_ready = !m_valid || m_ready;
  assign take    = s_valid && s_ready;

  always_comb begin
    a_hi     = acc[ACC_W-1:LO_W];
    a_lo     = $signed({1'b0, acc[LO_W-1:0]});
    p_hi     = a_hi * s_data;
    p_lo     = a_lo * s_data;
    prod     = (P_W'(p_hi) <<< LO_W) + P_W'(p_lo);
    corr     = sat_sample(64'(prod >>> SHIFT));
    abs_corr = corr[SAMPLE_W-1] ? -(SAMPLE_W+1)'(corr) : (SAMPLE_W+1)'(corr);
    abs_ref  = ref_data[SAMPLE_W-1] ? -(SAMPLE_W+1)'(ref_data) : (SAMPLE_W+1)'(ref_data);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      acc     <= '0;
    end else begin
      if (s_ready) m_valid <= s_valid;
      if (take) begin
        m_data <= bypass ? s_data : corr;
        if (!bypass) acc <= acc - ACC_W'(abs_corr) + ACC_W'(abs_ref);
      end
    end
  end

  property p_hold;
    @(posedge clk) disable iff (rst) m_valid && !m_ready |=> m_valid && $stable(m_data);
  endproperty
  assert property (p_hold);

endmodule
