// Reorderer: puts the samples of the parallel channels back into the
// time-interleaved order of the emulated converter.
//
// A pointer selects one channel; its stream is connected to the output
// and only the selected channel sees m_ready. After a handshake
// (VALID and READY high on the same clock edge) the pointer moves to the
// next enabled channel, wrapping from M-1 to 0, so with all channels
// enabled the output is ch0, ch1, ..., ch(M-1), ch0, ... Disabled channels
// are skipped; if the pointer rests on a channel that has just been
// disabled it moves on without a transfer. With no channel enabled the
// output is idle. The combinational path is a single M-way multiplexer, so
// a sample can pass every clock. The behaviour follows the source design;
// the start at channel 0 after reset is this design's choice.
module reorderer
  import ti_adc_pkg::*;
#(
  parameter int unsigned M = 8
) (
  input  logic              clk,
  input  logic              rst,
  input  logic [M-1:0]      ch_enable,
  input  logic [M-1:0]      s_valid,
  output logic [M-1:0]      s_ready,
  input  sample_t           s_data [M],
  output logic              m_valid,
  input  logic              m_ready,
  output sample_t           m_data
);

  localparam int unsigned PW = (M > 1) ? $clog2(M) : 1;

  logic [PW-1:0] ptr, nxt;
  logic          sel_en;

  // next enabled channel after ptr, cyclically (ptr itself if it is the only one)
  function automatic logic [PW-1:0] next_enabled(input logic [PW-1:0] p,
                                                 input logic [M-1:0] en);
    logic [PW-1:0] r;
    r = p;
    for (int k = M - 1; k >= 1; k--) begin
      if (en[(int'(p) + k) % M]) r = PW'((int'(p) + k) % M);
    end
    return r;
  endfunction

  assign nxt = next_enabled(ptr, ch_enable);

  assign sel_en  = ch_enable[ptr];
  assign m_valid = sel_en && s_valid[ptr];
  assign m_data  = s_data[ptr];

  always_comb begin
    s_ready = '0;
    s_ready[ptr] = sel_en && m_ready;
  end

  always_ff @(posedge clk) begin
    if (rst) ptr <= '0;
    else if (!sel_en || (m_valid && m_ready)) ptr <= nxt;
  end

endmodule
