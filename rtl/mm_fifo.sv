// Output buffer of the model: a 2^ADDR_BITS-sample memory between the
// sample stream and the memory-mapped bus.
//
// Write pointer WP and read pointer RP are ADDR_BITS+1 bits wide, so the
// occupancy OCC = WP - RP runs from 0 (empty) to 2^ADDR_BITS (full).
// Two modes, chosen by `circular`:
//   FIFO mode      s_ready drops while the buffer is full, which stalls the
//                  whole model until the host has read samples out.
//   circular mode  s_ready stays high; a write into a full buffer also
//                  moves RP, so the oldest sample is overwritten and the
//                  model never stops.
// Bus side (word addresses inside the bank):
//   0  read pops the oldest sample, returned sign-extended to 32 bits
//      (0 and no pop when empty)
//   1  occupancy
//   2  status {full, empty}
// Read data is registered: rd_data is valid the clock after rd_en. A pop
// and an overwrite in the same clock read the old word before it is
// replaced. The two modes and the pointer arithmetic follow the source
// design; the bus layout is this design's choice.
module mm_fifo
  import ti_adc_pkg::*;
#(
  parameter int unsigned ADDR_BITS = 16
) (
  input  logic               clk,
  input  logic               rst,
  input  logic               circular,
  // sample stream
  input  logic               s_valid,
  output logic               s_ready,
  input  sample_t            s_data,
  // bus read side
  input  logic               rd_en,
  input  logic [WADDR_W-1:0] rd_addr,
  output logic [BUS_W-1:0]   rd_data,
  // status
  output logic [ADDR_BITS:0] occupancy,
  output logic               full,
  output logic               empty
);

  localparam logic [ADDR_BITS:0] SIZE = (ADDR_BITS+1)'(2**ADDR_BITS);

  logic [ADDR_BITS:0] wp, rp;
  logic               push, pop;
  sample_t            ram_q;

  assign occupancy = wp - rp;
  assign full      = (occupancy == SIZE);
  assign empty     = (occupancy == '0);
  assign s_ready   = circular || !full;
  assign push      = s_valid && s_ready;
  assign pop       = rd_en && (rd_addr == BUF_DATA) && !empty;

  sdp_ram #(.DEPTH(2**ADDR_BITS), .WIDTH(SAMPLE_W)) u_mem (
    .clk   (clk),
    .we    (push),
    .waddr (wp[ADDR_BITS-1:0]),
    .wdata (s_data),
    .re    (pop),
    .raddr (rp[ADDR_BITS-1:0]),
    .rdata (ram_q)
  );

  always_ff @(posedge clk) begin
    if (rst) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (push) wp <= wp + 1'b1;
      if (pop || (push && full)) rp <= rp + 1'b1;
    end
  end

  // registered bus read
  logic               popped_q;
  logic [1:0]         sel_q;
  logic [BUS_W-1:0]   info_q;

  always_ff @(posedge clk) begin
    if (rd_en) begin
      popped_q <= pop;
      sel_q    <= (rd_addr == BUF_DATA) ? 2'd0 : 2'd1;
      unique case (rd_addr)
        BUF_OCC:    info_q <= BUS_W'(occupancy);
        BUF_STATUS: info_q <= BUS_W'({full, empty});
        default:    info_q <= '0;
      endcase
    end
  end

  always_comb begin
    if (sel_q == 2'd0) rd_data = popped_q ? BUS_W'(ram_q) : '0;
    else               rd_data = info_q;
  end

endmodule
