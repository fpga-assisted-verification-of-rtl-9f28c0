// Offset background calibration of one channel.
//
// An IIR estimator removes the offset difference between this channel and
// the reference channel:
//   S_corr[k] = S_in[k] - (o[k] >>> SHIFT)          gamma_offset = 2^-SHIFT
//   o[k+1]    = o[k] + S_corr[k] - S_ref[k]
// o is an ACC_W-bit two's-complement accumulator cleared by rst. It wraps
// rather than saturates, so drift or overflow of the accumulator stays
// visible, which is what a long emulation run is meant to expose. S_ref is
// the reference channel's sample of the same index k, presented alongside
// s_data; the channels run in lock step so that it is. S_corr saturates to
// 18 bits.
//
// Timing: one register stage, one sample per clock; the accumulator steps
// when an input sample is accepted. With bypass set, S_out = S_in and the
// accumulator holds. The equations, the 32-bit accumulator and the
// shift-before-subtract structure follow the source design; SHIFT = 16,
// the saturation and the hold-on-bypass behaviour are this design's.
module offset_bca
  import ti_adc_pkg::*;
#(
  parameter int unsigned ACC_W = 32,
  parameter int unsigned SHIFT = 16
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

  logic    take;
  sample_t corr;

  assign s_ready = !m_valid || m_ready;
  assign take    = s_valid && s_ready;

  always_comb begin
    corr = sat_sample(64'(s_data) - 64'(acc >>> SHIFT));
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      m_valid <= 1'b0;
      acc     <= '0;
    end else begin
      if (s_ready) m_valid <= s_valid;
      if (take) begin
        m_data <= bypass ? s_data : corr;
        if (!bypass) acc <= acc + ACC_W'(corr) - ACC_W'(ref_data);
      end
    end
  end

  property p_hold;
    @(posedge clk) disable iff (rst) m_valid && !m_ready |=> m_valid && $stable(m_data);
  endproperty
  assert property (p_hold);

endmodule
