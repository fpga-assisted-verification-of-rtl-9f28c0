// Self-checking test of the full-LUT NCO: the table is loaded with a known
// pattern, then the sample stream is compared with LUT[phase >> 19] for a
// phase the testbench accumulates itself, under random back-pressure and
// for several start/step settings. Also checks one sample per clock with
// the output always ready, and the hold of a stalled sample.
module tb_nco;
  localparam int PHASE_W = 32, LUT_BITS = 13, SAMPLE_W = 18;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [PHASE_W-1:0] phase_start, phase_step;
  logic lut_we;
  logic [LUT_BITS-1:0] lut_waddr;
  logic [SAMPLE_W-1:0] lut_wdata;
  logic m_valid, m_ready;
  logic [SAMPLE_W-1:0] m_data;
  int checks = 0, failures = 0;

  nco dut (.*);

  logic [SAMPLE_W-1:0] lut [2**LUT_BITS];

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic run(input logic [31:0] start, step, input int n, input int ready_pct);
    logic [31:0] ph;
    int got_n, cycles;
    rst = 1; phase_start = start; phase_step = step; m_ready = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    ph = start; got_n = 0; cycles = 0;
    while (got_n < n) begin
      m_ready = ($urandom_range(99) < ready_pct);
      @(posedge clk);
      cycles++;
      if (m_valid && m_ready) begin
        checks++;
        if (m_data !== lut[ph[31 -: LUT_BITS]]) begin
          failures++;
          if (failures < 10) $display("FAIL sample %0d: got %h exp %h", got_n, m_data, lut[ph[31 -: LUT_BITS]]);
        end
        ph += step;
        got_n++;
      end
      @(negedge clk);
    end
    if (ready_pct == 100) begin
      // first sample needs one clock of table read, then one per clock
      checks++;
      if (cycles != n + 1) begin
        failures++;
        $display("FAIL rate: %0d samples took %0d clocks", n, cycles);
      end
    end
    m_ready = 0;
  endtask

  initial begin
    rst = 1; m_ready = 0; lut_we = 0; lut_waddr = 0; lut_wdata = 0;
    phase_start = 0; phase_step = 0;
    for (int i = 0; i < 2**LUT_BITS; i++) begin
      @(negedge clk);
      lut_we = 1; lut_waddr = LUT_BITS'(i);
      lut_wdata = SAMPLE_W'($urandom);
      lut[i] = lut_wdata;
    end
    @(negedge clk); lut_we = 0;
    run(32'h0, 32'h0008_0000, 9000, 100);          // one table entry per sample
    run(32'h1234_5678, 32'h0376_1b2f, 5000, 100);   // fractional step
    run(32'hfff0_0000, 32'h9abc_def1, 5000, 60);    // back-pressure
    run(32'h0, 32'hffff_ffff, 2000, 30);            // negative frequency
    // stalled output holds its sample
    rst = 1; phase_start = 0; phase_step = 32'h0008_0000;
    @(negedge clk); rst = 0; m_ready = 0;
    repeat (3) @(negedge clk);
    checks++;
    if (!(m_valid && m_data === lut[0])) begin failures++; $display("FAIL hold"); end
    repeat (5) @(negedge clk);
    checks++;
    if (!(m_valid && m_data === lut[0])) begin failures++; $display("FAIL hold 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
