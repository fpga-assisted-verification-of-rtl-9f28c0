// Self-checking test of the reorderer. Each channel offers a numbered
// sequence of samples tagged with its channel number, with random gaps;
// the output is random back-pressured. For several channel-enable patterns
// the testbench checks that the channels come out in cyclic order of the
// enabled channels, that each channel's samples arrive in sequence, that
// disabled channels are never read, and that with every channel ready the
// output carries one sample per clock.
module tb_reorderer;
  import ti_adc_pkg::*;
  localparam int M = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [M-1:0] ch_enable, s_valid, s_ready;
  sample_t s_data [M];
  logic m_valid, m_ready;
  sample_t m_data;
  int checks = 0, failures = 0;

  reorderer #(.M(M)) dut (.*);

  int seq [M];        // next sequence number each channel offers
  int exp_seq [M];    // next sequence number expected at the output
  int last_ch;
  int n_out;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int next_enabled(input int c);
    for (int k = 1; k <= M; k++)
      if (ch_enable[(c + k) % M]) return (c + k) % M;
    return -1;
  endfunction

  task automatic run(input logic [M-1:0] en, input int n, input int vpct, input int rpct);
    int cyc = 0;
    rst = 1; ch_enable = en; s_valid = '0;
    for (int c = 0; c < M; c++) begin seq[c] = 0; exp_seq[c] = 0; s_data[c] = 0; end
    @(negedge clk); rst = 0;
    last_ch = M - 1;   // so the first expected channel is the lowest enabled one
    n_out = 0;
    while (n_out < n) begin
      logic [M-1:0] taken;
      // drive: a channel keeps its sample until it is taken
      for (int c = 0; c < M; c++)
        if (!s_valid[c]) begin
          s_valid[c] = ($urandom_range(99) < vpct);
          s_data[c]  = sample_t'((c << 15) | (seq[c] & 32'h7fff));
        end
      m_ready = ($urandom_range(99) < rpct);
      #1;
      for (int c = 0; c < M; c++) begin
        if (s_ready[c] && !en[c]) begin failures++; $display("FAIL disabled channel %0d read", c); end
      end
      if (m_valid && m_ready) begin
        int ch, sq, e;
        ch = int'(m_data[17:15]);
        sq = int'(m_data[14:0]);
        e  = next_enabled(last_ch);
        checks++;
        if (ch != e || sq != exp_seq[ch]) begin
          failures++;
          if (failures < 10) $display("FAIL got ch %0d seq %0d, expected ch %0d seq %0d", ch, sq, e, exp_seq[e]);
        end
        exp_seq[ch]++;
        last_ch = ch;
        n_out++;
      end
      taken = s_valid & s_ready;
      @(posedge clk);
      cyc++;
      @(negedge clk);
      for (int c = 0; c < M; c++)
        if (taken[c]) begin s_valid[c] = 0; seq[c]++; end
    end
    if (vpct == 100 && rpct == 100) begin
      checks++;
      // one clock may be spent skipping a disabled channel 0 after reset
      if (cyc > n + 1) begin failures++; $display("FAIL rate: %0d samples in %0d clocks", n, cyc); end
    end
  endtask

  initial begin
    rst = 1; m_ready = 0; ch_enable = '1; s_valid = '0;
    run(8'hff, 4000, 100, 100);
    run(8'hff, 4000, 60, 70);
    run(8'b1101_0110, 4000, 100, 100);
    run(8'b1101_0110, 4000, 50, 50);
    run(8'b1000_0000, 500, 70, 70);
    run(8'b0000_0001, 500, 70, 70);
    for (int i = 0; i < 10; i++) run(M'($urandom_range(1, 255)), 1000, 70, 80);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
