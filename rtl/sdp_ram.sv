// Simple dual-port RAM used for the waveform and characteristic look-up
// tables of the model.
//
// One write port is driven by the memory-mapped configuration bus; the
// read port serves the datapath. The read is synchronous with a read
// enable, so it maps onto a block RAM: rdata shows mem[raddr] one clock
// after a cycle with re high and holds otherwise. A read and a write of
// the same address in one cycle return the old contents. The contents are
// not initialised: the host loads the table before it starts a run.
module sdp_ram #(
  parameter int unsigned DEPTH = 8192,
  parameter int unsigned WIDTH = 18,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    waddr,
  input  logic [WIDTH-1:0] wdata,
  input  logic             re,
  input  logic [AW-1:0]    raddr,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr] <= wdata;
  end

  always_ff @(posedge clk) begin
    if (re) rdata <= mem[raddr];
  end

endmodule
