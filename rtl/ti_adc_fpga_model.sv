// Emulation model of an M-channel time-interleaved ADC together with its
// digital background calibration of offset and gain mismatch, built to run
// the calibration for hours of converter time at the clock rate.
//
// Structure:
//   AXI4-Lite -> axil_mm_bridge -> bank decode -> control_regs, LUT write
//                                               ports, output buffer reads
//   M x ti_adc_channel (NCO -> ADC model -> offset BCA -> gain BCA)
//     -> per-channel hold register -> reorderer -> mm_fifo (output buffer)
// The channels run in parallel, each producing the samples the real
// converter's channel m takes at instants n*M + m, which the host sets up
// through each NCO's start phase and step. Channel 0 is the calibration
// reference: its samples entering each calibration stage are broadcast to
// all channels.
//
// Lock step: the reference sample given to a channel must be the one of
// the same index, so all channels advance together. Each channel's newest
// calibrated sample waits in a hold register; the channels are allowed to
// advance (their common m_ready) when every enabled channel's hold register
// is empty or is being read by the reorderer in this clock. With all
// channels enabled this gives one output sample per clock. A full buffer
// in FIFO mode stalls the reorderer and through it every channel.
//
// Bus map (address bits 27:20 = bank, 17:2 = word):
//   bank 0x00       control registers (see control_regs)
//   bank 0x01       output buffer (see mm_fifo)
//   bank 0x10 + m   channel m NCO table, write-only, 18-bit words
//   bank 0x20 + m   channel m ADC table, write-only, 10-bit words
// Read data returns one clock after the read strobe. The RESET register
// (held at 1 after power-on) resets every channel, the reorderer and the
// buffer pointers while it is 1; tables and registers keep their contents.
// The block structure, sizes and register set follow the source design;
// the bank numbers, the lock-step hold registers and the choice of channel
// 0 as reference are this design's.
module ti_adc_fpga_model
  import ti_adc_pkg::*;
#(
  parameter int unsigned M            = 8,
  parameter int unsigned NCO_LUT_BITS = 13,
  parameter int unsigned ADC_LUT_BITS = 14,
  parameter int unsigned CODE_W       = 10,
  parameter int unsigned BUF_BITS     = 16,
  parameter int unsigned OFF_SHIFT    = 16,
  parameter int unsigned GAIN_SHIFT   = 30
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [31:0] s_axi_awaddr,
  input  logic        s_axi_awvalid,
  output logic        s_axi_awready,
  input  logic [31:0] s_axi_wdata,
  input  logic [3:0]  s_axi_wstrb,
  input  logic        s_axi_wvalid,
  output logic        s_axi_wready,
  output logic [1:0]  s_axi_bresp,
  output logic        s_axi_bvalid,
  input  logic        s_axi_bready,
  input  logic [31:0] s_axi_araddr,
  input  logic        s_axi_arvalid,
  output logic        s_axi_arready,
  output logic [31:0] s_axi_rdata,
  output logic [1:0]  s_axi_rresp,
  output logic        s_axi_rvalid,
  input  logic        s_axi_rready
);

  // ---------------- bus ----------------
  logic               mm_we, mm_re, mm_rvalid;
  logic [BANK_W-1:0]  mm_wbank, mm_rbank, rbank_q;
  logic [WADDR_W-1:0] mm_waddr, mm_raddr;
  logic [BUS_W-1:0]   mm_wdata, mm_rdata, ctrl_rdata, buf_rdata;

  axil_mm_bridge u_bridge (
    .clk, .rst_n,
    .s_axi_awaddr, .s_axi_awvalid, .s_axi_awready,
    .s_axi_wdata, .s_axi_wstrb, .s_axi_wvalid, .s_axi_wready,
    .s_axi_bresp, .s_axi_bvalid, .s_axi_bready,
    .s_axi_araddr, .s_axi_arvalid, .s_axi_arready,
    .s_axi_rdata, .s_axi_rresp, .s_axi_rvalid, .s_axi_rready,
    .mm_we, .mm_wbank, .mm_waddr, .mm_wdata,
    .mm_re, .mm_rbank, .mm_raddr, .mm_rdata, .mm_rvalid
  );

  always_ff @(posedge clk) begin
    if (!rst_n) mm_rvalid <= 1'b0;
    else        mm_rvalid <= mm_re;
    if (mm_re) rbank_q <= mm_rbank;
  end

  always_comb begin
    unique case (rbank_q)
      BANK_CTRL: mm_rdata = ctrl_rdata;
      BANK_BUF:  mm_rdata = buf_rdata;
      default:   mm_rdata = '0;
    endcase
  end

  // ---------------- control registers ----------------
  logic        soft_reset, mrst;
  logic [M-1:0] ch_enable;
  adc_bypass_t adc_bypass;
  bca_bypass_t bca_bypass;
  buf_mode_e   mode;
  logic [31:0] nco_start [M];
  logic [31:0] nco_step  [M];
  sample_t     adc_offset [M];
  sample_t     adc_gain   [M];

  control_regs #(.M(M)) u_ctrl (
    .clk, .rst_n,
    .we    (mm_we && mm_wbank == BANK_CTRL),
    .waddr (mm_waddr),
    .wdata (mm_wdata),
    .re    (mm_re && mm_rbank == BANK_CTRL),
    .raddr (mm_raddr),
    .rdata (ctrl_rdata),
    .soft_reset, .ch_enable, .adc_bypass, .bca_bypass, .mode,
    .nco_start, .nco_step, .adc_offset, .adc_gain
  );

  assign mrst = !rst_n || soft_reset;

  // ---------------- channels ----------------
  logic [M-1:0] ch_valid;
  sample_t      ch_data [M];
  sample_t      off_in  [M];
  sample_t      gain_in [M];
  logic         chain_ready;

  for (genvar m = 0; m < M; m++) begin : g_ch
    ti_adc_channel #(
      .NCO_LUT_BITS (NCO_LUT_BITS),
      .ADC_LUT_BITS (ADC_LUT_BITS),
      .CODE_W       (CODE_W),
      .OFF_SHIFT    (OFF_SHIFT),
      .GAIN_SHIFT   (GAIN_SHIFT)
    ) u_ch (
      .clk,
      .rst           (mrst),
      .nco_start     (nco_start[m]),
      .nco_step      (nco_step[m]),
      .adc_gain      (adc_gain[m]),
      .adc_offset    (adc_offset[m]),
      .adc_bypass    (adc_bypass),
      .bca_bypass    (bca_bypass),
      .nco_lut_we    (mm_we && mm_wbank == BANK_NCO_LUT + BANK_W'(m)),
      .nco_lut_waddr (mm_waddr[NCO_LUT_BITS-1:0]),
      .nco_lut_wdata (mm_wdata[SAMPLE_W-1:0]),
      .adc_lut_we    (mm_we && mm_wbank == BANK_ADC_LUT + BANK_W'(m)),
      .adc_lut_waddr (mm_waddr[ADC_LUT_BITS-1:0]),
      .adc_lut_wdata (mm_wdata[CODE_W-1:0]),
      .off_in_data   (off_in[m]),
      .gain_in_data  (gain_in[m]),
      .off_ref       (off_in[0]),
      .gain_ref      (gain_in[0]),
      .m_valid       (ch_valid[m]),
      .m_ready       (chain_ready),
      .m_data        (ch_data[m]),
      .off_acc       (),
      .gain_acc      ()
    );
  end

  // ---------------- lock-step hold registers ----------------
  logic [M-1:0] hold_v, hold_ready, slot_free;
  sample_t      hold_d [M];

  always_comb begin
    for (int m = 0; m < M; m++)
      slot_free[m] = !ch_enable[m] || !hold_v[m] || hold_ready[m];
    chain_ready = &slot_free;
  end

  always_ff @(posedge clk) begin
    for (int m = 0; m < M; m++) begin
      if (mrst) hold_v[m] <= 1'b0;
      else if (chain_ready) begin
        hold_v[m] <= ch_valid[m] && ch_enable[m];
        hold_d[m] <= ch_data[m];
      end else if (hold_ready[m]) hold_v[m] <= 1'b0;
    end
  end

  // ---------------- output buffer ----------------
  logic    ro_valid, ro_ready;
  sample_t ro_data;

  reorderer #(.M(M)) u_reorder (
    .clk, .rst (mrst),
    .ch_enable,
    .s_valid (hold_v),
    .s_ready (hold_ready),
    .s_data  (hold_d),
    .m_valid (ro_valid),
    .m_ready (ro_ready),
    .m_data  (ro_data)
  );

  mm_fifo #(.ADDR_BITS(BUF_BITS)) u_buf (
    .clk, .rst (mrst),
    .circular  (mode == MODE_CIRCULAR),
    .s_valid   (ro_valid),
    .s_ready   (ro_ready),
    .s_data    (ro_data),
    .rd_en     (mm_re && mm_rbank == BANK_BUF),
    .rd_addr   (mm_raddr),
    .rd_data   (buf_rdata),
    .occupancy (),
    .full      (),
    .empty     ()
  );

  // all channels produce sample k in the same clock
  property p_lockstep;
    @(posedge clk) disable iff (mrst) ch_valid == '0 || ch_valid == '1;
  endproperty
  assert property (p_lockstep);

endmodule
