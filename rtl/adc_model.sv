// Model of one ADC core with its non-idealities: gain error, offset error
// and a nonlinear, quantising transfer characteristic.
//
//   S_g   = sat18(S_in * (1 + g_m))      gain first, so the offset is not scaled
//   S_o   = sat18(S_g + o_m)
//   S_out = { LUT[S_o[17:4]], 8'b0 }     10-bit code, MSB-aligned in 18 bits
//
// The gain word is signed with GAIN_FRAC fraction bits (1.0 = 2^16); the
// offset is in sample LSBs. Both operations saturate at the 18-bit range.
// The characteristic table has 2^14 entries addressed by the raw
// two's-complement bits [17:4] of the sample (4 LSBs dropped) and holds
// CODE_W-bit codes, so loading it sets both the ADC resolution and its
// nonlinearity. Each of the three steps can be bypassed on its own
// (bypass = {lut, offset, gain}); with all three bypassed S_out = S_in.
//
// Timing: two register stages (arithmetic, then the block-RAM read), one
// sample per clock. The whole pipeline stalls while the output sample is
// not taken, so s_ready is simply "the output can move". The operation
// order, saturation, table size and address slice follow the source
// design; the gain word format and the pipeline depth are this design's.
module adc_model
  import ti_adc_pkg::*;
#(
  parameter int unsigned LUT_BITS = 14,
  parameter int unsigned CODE_W   = 10
) (
  input  logic                clk,
  input  logic                rst,
  input  sample_t             gain,
  input  sample_t             offset,
  input  adc_bypass_t         bypass,
  // table write port
  input  logic                lut_we,
  input  logic [LUT_BITS-1:0] lut_waddr,
  input  logic [CODE_W-1:0]   lut_wdata,
  // input stream
  input  logic                s_valid,
  output logic                s_ready,
  input  sample_t             s_data,
  // output stream
  output logic                m_valid,
  input  logic                m_ready,
  output sample_t             m_data
);

  logic en;
  assign en      = !m_valid || m_ready;
  assign s_ready = en;

  // ---- stage 1: gain and offset ------------------------------------
  logic signed [2*SAMPLE_W-1:0] prod;
  sample_t                      s_g, s_o;

  always_comb begin
    prod = s_data * gain;
    s_g  = bypass.gain ? s_data : sat_sample(64'(prod >>> GAIN_FRAC));
    s_o  = bypass.offset ? s_g : sat_sample(64'(s_g) + 64'(offset));
  end

  logic    v1;
  sample_t s1;
  always_ff @(posedge clk) begin
    if (rst) v1 <= 1'b0;
    else if (en) begin
      v1 <= s_valid;
      s1 <= s_o;
    end
  end

  // ---- stage 2: characteristic table ----------------------------------
  logic [CODE_W-1:0] code;
  sample_t           s2;
  logic              lut_bypass_q;

  sdp_ram #(.DEPTH(2**LUT_BITS), .WIDTH(CODE_W)) u_lut (
    .clk   (clk),
    .we    (lut_we),
    .waddr (lut_waddr),
    .wdata (lut_wdata),
    .re    (en && v1),
    .raddr (s1[SAMPLE_W-1 -: LUT_BITS]),
    .rdata (code)
  );

  always_ff @(posedge clk) begin
    if (rst) m_valid <= 1'b0;
    else if (en) begin
      m_valid <= v1;
      if (v1) begin
        s2           <= s1;
        lut_bypass_q <= bypass.lut;
      end
    end
  end

  assign m_data = lut_bypass_q ? s2 : sample_t'({code, {(SAMPLE_W-CODE_W){1'b0}}});

  property p_hold;
    @(posedge clk) disable iff (rst) m_valid && !m_ready |=> m_valid && $stable(m_data);
  endproperty
  assert property (p_hold);

endmodule
