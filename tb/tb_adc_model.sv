// Self-checking test of the ADC core model. The characteristic table is
// loaded with random codes; random samples go through the model under
// random input gaps and output back-pressure, for random gain and offset
// values (including ones that saturate) and every bypass combination. Each
// output is compared with a reference computed here with 64-bit integer
// arithmetic. The two-clock latency and one-sample-per-clock rate are
// checked with a continuous stream.
module tb_adc_model;
  import ti_adc_pkg::*;
  localparam int LUT_BITS = 14, CODE_W = 10;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  sample_t gain, offset;
  adc_bypass_t bypass;
  logic lut_we;
  logic [LUT_BITS-1:0] lut_waddr;
  logic [CODE_W-1:0] lut_wdata;
  logic s_valid, s_ready, m_valid, m_ready;
  sample_t s_data, m_data;
  int checks = 0, failures = 0, n_sat = 0;

  adc_model dut (.*);

  logic [CODE_W-1:0] lut [2**LUT_BITS];
  sample_t exp_q [$];

  function automatic longint clip(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  function automatic sample_t model(input sample_t x);
    longint g, o;
    g = bypass.gain ? longint'(x) : clip((longint'(x) * longint'(gain)) >>> 16);
    o = bypass.offset ? g : clip(g + longint'(offset));
    if (o == 131071 || o == -131072) n_sat++;
    if (bypass.lut) return sample_t'(o);
    return sample_t'({lut[o[17:4]], 8'h00});
  endfunction

  initial begin
    repeat (600000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // output monitor
  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      checks++;
      if (exp_q.size() == 0) begin
        failures++; $display("FAIL unexpected output");
      end else begin
        sample_t e;
        e = exp_q.pop_front();
        if (m_data !== e) begin
          failures++;
          if (failures < 10) $display("FAIL got %h exp %h (byp %b)", m_data, e, bypass);
        end
      end
    end
  end

  task automatic burst(input int n, input int vpct, input int rpct);
    int sent = 0;
    while (sent < n) begin
      @(negedge clk);
      m_ready = ($urandom_range(99) < rpct);
      if (!s_valid || s_ready) begin
        s_valid = ($urandom_range(99) < vpct);
        s_data = sample_t'($urandom);
      end
      @(posedge clk);
      if (s_valid && s_ready) begin
        exp_q.push_back(model(s_data));
        sent++;
      end
    end
    @(negedge clk);
    s_valid = 0; m_ready = 1;
    repeat (5) @(negedge clk);
  endtask

  initial begin
    rst = 1; s_valid = 0; s_data = 0; m_ready = 0; lut_we = 0;
    lut_waddr = 0; lut_wdata = 0; gain = 18'sh10000; offset = 0; bypass = '0;
    for (int i = 0; i < 2**LUT_BITS; i++) begin
      @(negedge clk);
      lut_we = 1; lut_waddr = LUT_BITS'(i); lut_wdata = CODE_W'($urandom);
      lut[i] = lut_wdata;
    end
    @(negedge clk); lut_we = 0; rst = 0;

    // latency and rate: continuous stream, output always ready
    begin
      int first_in, first_out, cyc, outs;
      @(negedge clk);
      s_valid = 1; m_ready = 1; s_data = 18'sh01234;
      cyc = 0; outs = 0; first_out = -1;
      repeat (40) begin
        @(posedge clk);
        if (s_valid && s_ready) exp_q.push_back(model(s_data));
        if (m_valid) begin
          outs++;
          if (first_out < 0) first_out = cyc;
        end
        cyc++;
        @(negedge clk);
        s_data = sample_t'($urandom);
      end
      s_valid = 0;
      checks++;
      if (first_out != 2) begin failures++; $display("FAIL latency %0d", first_out); end
      checks++;
      if (outs != 38) begin failures++; $display("FAIL rate %0d outputs in 40 clocks", outs); end
      repeat (5) @(negedge clk);
    end

    for (int b = 0; b < 8; b++) begin
      bypass = adc_bypass_t'(b);
      repeat (4) begin
        gain   = sample_t'($urandom_range(32'h8000, 32'h18000));   // 0.5 .. 1.5
        offset = sample_t'($signed($urandom_range(0, 8000)) - 4000);
        burst(1500, 70, 70);
      end
      gain = 18'sh1c000; offset = 18'sh0f000;                         // drives saturation
      burst(1500, 90, 50);
      gain = 18'sh20000; offset = -18'sh0f000;                        // gain -2.0
      burst(500, 90, 50);
    end
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL %0d outputs missing", exp_q.size()); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
