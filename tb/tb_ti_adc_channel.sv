// Self-checking test of one model channel (NCO, ADC model, offset and
// gain calibration in series). The reference inputs are derived from the
// channel's own stage inputs with a known offset and gain, so that the
// calibration has a non-trivial target: off_ref = x - REF_OFF and
// gain_ref = x * REF_G. A sample-by-sample model of the whole chain checks
// every output word under random output backpressure and random bypass
// settings; the 5-clock latency from reset release is checked, and a long
// run checks that both accumulators settle at the values implied by
// REF_OFF and REF_G.
module tb_ti_adc_channel;
  import ti_adc_pkg::*;
  localparam int NL = 13, AL = 14, CW = 10;
  localparam int REF_OFF = 1500;
  localparam int REF_G   = 62259;      // 0.95 with 16 fraction bits

  logic clk = 0;
  always #5 clk = ~clk;

  logic rst;
  logic [31:0] nco_start, nco_step;
  sample_t adc_gain, adc_offset;
  adc_bypass_t adc_bypass;
  bca_bypass_t bca_bypass;
  logic nco_lut_we, adc_lut_we;
  logic [NL-1:0] nco_lut_waddr;
  sample_t nco_lut_wdata;
  logic [AL-1:0] adc_lut_waddr;
  logic [CW-1:0] adc_lut_wdata;
  sample_t off_in_data, gain_in_data, off_ref, gain_ref;
  logic m_valid, m_ready;
  sample_t m_data;
  logic signed [31:0] off_acc, gain_acc;
  int checks = 0, failures = 0;

  ti_adc_channel dut (.*);

  function automatic sample_t sat(input longint v);
    if (v > 131071) return 18'sd131071;
    if (v < -131072) return -18'sd131072;
    return sample_t'(v);
  endfunction

  assign off_ref  = sat(longint'(off_in_data) - REF_OFF);
  assign gain_ref = sat((longint'(gain_in_data) * REF_G) >>> 16);

  sample_t nco_mem [2**NL];
  logic [CW-1:0] adc_mem [2**AL];

  // ---------------- chain model ----------------
  int unsigned k_m;
  int off_acc_m, gain_acc_m;
  bit bp_ready;          // random backpressure enabled

  function automatic sample_t model_next();
    logic [31:0] ph;
    sample_t x, g, o, a, c, r, y;
    longint p;
    ph = nco_start + k_m * nco_step;
    k_m++;
    x = nco_mem[ph[31 -: NL]];
    g = adc_bypass.gain ? x : sat((longint'(x) * longint'(adc_gain)) >>> 16);
    o = adc_bypass.offset ? g : sat(longint'(g) + longint'(adc_offset));
    a = adc_bypass.lut ? o : sample_t'({adc_mem[o[17 -: AL]], 8'b0});
    // offset stage
    c = sat(longint'(a) - longint'(off_acc_m >>> 16));
    if (bca_bypass.offset) y = a;
    else begin
      y = c;
      r = sat(longint'(a) - REF_OFF);
      off_acc_m = off_acc_m + int'(c) - int'(r);
    end
    // gain stage
    p = longint'(gain_acc_m) * longint'(y);
    c = sat(p >>> 30);
    r = sat((longint'(y) * REF_G) >>> 16);
    if (bca_bypass.gain) return y;
    gain_acc_m = gain_acc_m - (c < 0 ? -int'(c) : int'(c)) + (r < 0 ? -int'(r) : int'(r));
    return c;
  endfunction

  int unsigned outputs = 0;
  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      sample_t e;
      e = model_next();
      outputs++;
      checks++;
      if (m_data !== e) begin
        failures++;
        if (failures < 10) $display("FAIL sample %0d: got %0d exp %0d", k_m - 1, m_data, e);
      end
    end
  end

  // the sink takes exactly n_target samples per run, then stops
  int unsigned n_target = 0;
  logic rnd;
  always @(negedge clk) rnd <= ($urandom_range(3) != 0);
  assign m_ready = (outputs < n_target) && (!bp_ready || rnd);

  task automatic load_luts(input bit random_adc);
    @(negedge clk);
    for (int i = 0; i < 2**NL; i++) begin
      nco_mem[i] = sample_t'($rtoi(0.8 * 131072.0 * $sin(6.283185307179586 * i / 2.0**NL)));
      nco_lut_we = 1; nco_lut_waddr = NL'(i); nco_lut_wdata = nco_mem[i];
      @(negedge clk);
    end
    nco_lut_we = 0;
    for (int i = 0; i < 2**AL; i++) begin
      adc_mem[i] = random_adc ? CW'($urandom) : CW'(i >> (AL - CW));
      adc_lut_we = 1; adc_lut_waddr = AL'(i); adc_lut_wdata = adc_mem[i];
      @(negedge clk);
    end
    adc_lut_we = 0;
  endtask

  task automatic run(input int n, input bit bp, input bit check_lat);
    @(negedge clk);
    rst = 1; bp_ready = 0;
    k_m = 0; off_acc_m = 0; gain_acc_m = 0; outputs = 0; n_target = n;
    repeat (2) @(negedge clk);
    rst = 0;
    if (check_lat) begin
      for (int c = 1; c <= 5; c++) begin
        @(posedge clk); #1;
        checks++;
        if (m_valid !== (c == 5)) begin
          failures++;
          $display("FAIL latency: m_valid=%b after %0d clocks", m_valid, c);
        end
      end
    end
    bp_ready = bp;
    while (outputs < n) @(negedge clk);
    bp_ready = 0;
  endtask

  initial begin
    repeat (3_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst = 1; bp_ready = 0; nco_lut_we = 0; adc_lut_we = 0;
    nco_lut_waddr = 0; nco_lut_wdata = 0; adc_lut_waddr = 0; adc_lut_wdata = 0;
    nco_start = 0; nco_step = 32'd57_982_058;   // about 0.0135 of full scale
    adc_gain = 18'sh10000; adc_offset = 0; adc_bypass = '0; bca_bypass = '0;
    load_luts(0);

    // long run: calibration settles to the reference offset and gain
    adc_gain = 18'sd68000; adc_offset = 18'sd900;
    run(600_000, 0, 1);
    checks++;
    if ((off_acc >>> 16) < REF_OFF - 4 || (off_acc >>> 16) > REF_OFF + 4) begin
      failures++;
      $display("FAIL offset coefficient %0d, expected about %0d", off_acc >>> 16, REF_OFF);
    end
    checks++;
    if (gain_acc < 0.998 * 0.95 * 2.0**30 || gain_acc > 1.002 * 0.95 * 2.0**30) begin
      failures++;
      $display("FAIL gain coefficient %0d, expected about %0d", gain_acc, int'(0.95 * 2.0**30));
    end

    // bypass combinations and random settings under backpressure
    for (int i = 0; i < 32; i++) begin
      {adc_bypass, bca_bypass} = 5'(i);
      adc_gain = sample_t'($urandom_range(40000, 90000));
      adc_offset = sample_t'(int'($urandom_range(0, 40000)) - 20000);
      nco_start = $urandom; nco_step = $urandom;
      if (i == 7) load_luts(1);
      run(4000, 1, i < 2);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
