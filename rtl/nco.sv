// Full look-up-table numerically controlled oscillator: the model's
// stand-in for the sample-and-hold of one ADC channel.
//
// A PHASE_W-bit phase accumulator holds the normalised phase (a fraction
// of a full turn; the integer part is never stored, so wrap-around is the
// natural unsigned overflow). Its top LUT_BITS bits address a writable
// table holding one period of the input waveform, so
//   f_out = f_sample * phase_step / 2^PHASE_W.
// Because every channel has its own table, each channel can be loaded with
// a sine shifted by its own phase, which is how sampling-time skew is
// modelled; phase_start sets the channel's sampling instant within the
// interleaving period.
//
// Output: a valid/ready stream of 18-bit signed samples. After rst the
// first sample is LUT[phase_start]; each accepted sample advances the
// phase by phase_step. The table read is a one-cycle block-RAM read whose
// output register is the stream's data register, so the stream runs at
// one sample per clock. The full-table architecture, the 2^13 x 18 table
// and the configurable start/step follow the source design; the 32-bit
// phase accumulator width is this design's choice.
module nco #(
  parameter int unsigned PHASE_W  = 32,
  parameter int unsigned LUT_BITS = 13,
  parameter int unsigned SAMPLE_W = 18
) (
  input  logic                clk,
  input  logic                rst,
  input  logic [PHASE_W-1:0]  phase_start,
  input  logic [PHASE_W-1:0]  phase_step,
  // table write port (memory-mapped bus)
  input  logic                lut_we,
  input  logic [LUT_BITS-1:0] lut_waddr,
  input  logic [SAMPLE_W-1:0] lut_wdata,
  // sample stream
  output logic                m_valid,
  input  logic                m_ready,
  output logic [SAMPLE_W-1:0] m_data
);

  logic [PHASE_W-1:0] phase;
  logic               advance;

  assign advance = !m_valid || m_ready;

  always_ff @(posedge clk) begin
    if (rst) begin
      phase   <= phase_start;
      m_valid <= 1'b0;
    end else if (advance) begin
      phase   <= phase + phase_step;
      m_valid <= 1'b1;
    end
  end

  sdp_ram #(.DEPTH(2**LUT_BITS), .WIDTH(SAMPLE_W)) u_lut (
    .clk   (clk),
    .we    (lut_we),
    .waddr (lut_waddr),
    .wdata (lut_wdata),
    .re    (advance && !rst),
    .raddr (phase[PHASE_W-1 -: LUT_BITS]),
    .rdata (m_data)
  );

  // a presented sample stays put until it is taken
  property p_hold;
    @(posedge clk) disable iff (rst) m_valid && !m_ready |=> m_valid && $stable(m_data);
  endproperty
  assert property (p_hold);

endmodule
