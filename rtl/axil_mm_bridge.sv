// AXI4-Lite slave to word-addressed memory-mapped bus bridge: the host
// entry point of the model.
//
// Address translation, identical for reads and writes:
//   bits 31:28  ignored (outside the model's space)
//   bits 27:20  bank number (one enable per memory space, decoded outside)
//   bits 19:18  ignored
//   bits 17:2   word address inside the bank
//   bits  1:0   ignored (AXI is byte-addressed, the model word-addressed)
// Write path: address and data are captured independently; once both are
// held, a one-clock mm_we strobe is issued with the bank, word address and
// data, and an OKAY response is returned on B. Read path: after an address
// is captured, a one-clock mm_re strobe is issued; the data arriving with
// mm_rvalid is returned on R with an OKAY response. The two paths are
// independent and may be active together, so the write and read sides of
// the MM bus are separate. One transaction per direction is in flight.
// Write strobes are not used: every write is a full 32-bit word. The
// translation scheme follows the source design; the always-OKAY response
// and the handling of bits 19:18 are this design's choices.
module axil_mm_bridge
  import ti_adc_pkg::*;
(
  input  logic                clk,
  input  logic                rst_n,
  // AXI4-Lite slave
  input  logic [31:0]         s_axi_awaddr,
  input  logic                s_axi_awvalid,
  output logic                s_axi_awready,
  input  logic [31:0]         s_axi_wdata,
  input  logic [3:0]          s_axi_wstrb,
  input  logic                s_axi_wvalid,
  output logic                s_axi_wready,
  output logic [1:0]          s_axi_bresp,
  output logic                s_axi_bvalid,
  input  logic                s_axi_bready,
  input  logic [31:0]         s_axi_araddr,
  input  logic                s_axi_arvalid,
  output logic                s_axi_arready,
  output logic [31:0]         s_axi_rdata,
  output logic [1:0]          s_axi_rresp,
  output logic                s_axi_rvalid,
  input  logic                s_axi_rready,
  // memory-mapped write side
  output logic                mm_we,
  output logic [BANK_W-1:0]   mm_wbank,
  output logic [WADDR_W-1:0]  mm_waddr,
  output logic [BUS_W-1:0]    mm_wdata,
  // memory-mapped read side
  output logic                mm_re,
  output logic [BANK_W-1:0]   mm_rbank,
  output logic [WADDR_W-1:0]  mm_raddr,
  input  logic [BUS_W-1:0]    mm_rdata,
  input  logic                mm_rvalid
);

  // ---------------- write path ----------------
  logic        aw_have, w_have;
  logic [31:0] awaddr_q;

  assign s_axi_awready = !aw_have;
  assign s_axi_wready  = !w_have;
  assign s_axi_bresp   = 2'b00;
  assign mm_we         = aw_have && w_have && !s_axi_bvalid;
  assign mm_wbank      = awaddr_q[27:20];
  assign mm_waddr      = awaddr_q[17:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      aw_have      <= 1'b0;
      w_have       <= 1'b0;
      s_axi_bvalid <= 1'b0;
    end else begin
      if (s_axi_awvalid && s_axi_awready) begin
        aw_have  <= 1'b1;
        awaddr_q <= s_axi_awaddr;
      end
      if (s_axi_wvalid && s_axi_wready) begin
        w_have   <= 1'b1;
        mm_wdata <= s_axi_wdata;
      end
      if (mm_we) begin
        aw_have      <= 1'b0;
        w_have       <= 1'b0;
        s_axi_bvalid <= 1'b1;
      end else if (s_axi_bvalid && s_axi_bready) begin
        s_axi_bvalid <= 1'b0;
      end
    end
  end

  // ---------------- read path ----------------
  logic        ar_have, rd_wait;
  logic [31:0] araddr_q;

  assign s_axi_arready = !ar_have;
  assign s_axi_rresp   = 2'b00;
  assign mm_re         = ar_have && !rd_wait && !s_axi_rvalid;
  assign mm_rbank      = araddr_q[27:20];
  assign mm_raddr      = araddr_q[17:2];

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      ar_have      <= 1'b0;
      rd_wait      <= 1'b0;
      s_axi_rvalid <= 1'b0;
    end else begin
      if (s_axi_arvalid && s_axi_arready) begin
        ar_have  <= 1'b1;
        araddr_q <= s_axi_araddr;
      end
      if (mm_re) rd_wait <= 1'b1;
      if (rd_wait && mm_rvalid) begin
        rd_wait      <= 1'b0;
        ar_have      <= 1'b0;
        s_axi_rvalid <= 1'b1;
        s_axi_rdata  <= mm_rdata;
      end else if (s_axi_rvalid && s_axi_rready) begin
        s_axi_rvalid <= 1'b0;
      end
    end
  end

  // AXI rule: a response, once valid, stays valid and unchanged until taken
  property p_r_hold;
    @(posedge clk) disable iff (!rst_n)
      s_axi_rvalid && !s_axi_rready |=> s_axi_rvalid && $stable(s_axi_rdata);
  endproperty
  assert property (p_r_hold);

  property p_b_hold;
    @(posedge clk) disable iff (!rst_n) s_axi_bvalid && !s_axi_bready |=> s_axi_bvalid;
  endproperty
  assert property (p_b_hold);

endmodule
