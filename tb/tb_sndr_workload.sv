// Workload test of the TI-ADC emulation model at its full size: the
// experiment of measuring the converter's SNDR on consecutive windows of
// 2^16 output samples while the background calibration converges.
//
// The host side is modelled as a real host would run it: FIFO mode, so the
// model fills the 65536-sample buffer, waits, and the testbench reads every
// window out over AXI4-Lite. Each window's SNDR is found with a
// three-parameter sine fit at the known input frequency (DC, cosine and
// sine terms by least squares): the fitted sine is the signal and the
// residual is noise plus distortion. The input is a 0.9-of-full-scale sine
// at 27 MHz for a 2 GS/s converter, and each ADC table is an ideal 10-bit
// quantiser, so a calibrated converter approaches the ideal
// 6.02*10 + 1.76 + 20*log10(0.9) = 61.1 dB.
//
// Runs:
//   A  offset and gain mismatch, 2^23 samples (128 windows): the SNDR must
//      start far below the ideal and be within 1 dB of it after 2^21 and
//      after 2^23 samples
//   B  the same with the calibration bypassed, 2^18 samples: the SNDR must
//      stay low
//   C  offset, gain and sampling-time skew of up to 0.034 sample periods,
//      2^21 samples: each channel's NCO table holds the sine shifted by the
//      phase its skew gives at the input frequency. The calibration removes
//      offset and gain but not skew, so the SNDR must end below A's at the
//      same point
//   D  offset, gain and a mild tanh characteristic (tanh(0.3x)) in channel
//      5, 2^21 samples: likewise limited by the uncorrected distortion
module tb_sndr_workload;
  import ti_adc_pkg::*;
  localparam int M = 8, NL = 13, AL = 14, CW = 10, WIN = 1 << 16;
  localparam longint BASE = 64'd57_982_058;   // 27 MHz at 2 GS/s, 32-bit phase
  localparam real PI2 = 6.283185307179586;

  logic clk = 0;
  always #5 clk = ~clk;

  logic        rst_n;
  logic [31:0] s_axi_awaddr, s_axi_wdata, s_axi_araddr, s_axi_rdata;
  logic        s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [3:0]  s_axi_wstrb;
  logic [1:0]  s_axi_bresp, s_axi_rresp;
  logic        s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready;
  logic        s_axi_rvalid, s_axi_rready;

  ti_adc_fpga_model dut (.*);

  int checks = 0, failures = 0;
  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // ---------------- AXI4-Lite host ----------------
  function automatic logic [31:0] addr(input logic [7:0] bank, input logic [15:0] word);
    return {4'h0, bank, 2'b00, word, 2'b00};
  endfunction

  task automatic axi_wr(input logic [31:0] a, d);
    bit aw_done = 0, w_done = 0, b_done = 0;
    @(negedge clk);
    s_axi_awvalid = 1; s_axi_awaddr = a; s_axi_wvalid = 1; s_axi_wdata = d;
    while (!(aw_done && w_done)) begin
      #1;
      if (s_axi_awvalid && s_axi_awready) aw_done = 1;
      if (s_axi_wvalid && s_axi_wready) w_done = 1;
      @(negedge clk);
      if (aw_done) s_axi_awvalid = 0;
      if (w_done) s_axi_wvalid = 0;
    end
    while (!b_done) begin
      #1;
      b_done = s_axi_bvalid;
      @(negedge clk);
    end
  endtask

  task automatic axi_rd(input logic [31:0] a, output logic [31:0] d);
    bit ar_done = 0, r_done = 0;
    @(negedge clk);
    s_axi_arvalid = 1; s_axi_araddr = a;
    while (!ar_done) begin
      #1;
      ar_done = s_axi_arready;
      @(negedge clk);
    end
    s_axi_arvalid = 0;
    while (!r_done) begin
      #1;
      r_done = s_axi_rvalid;
      d = s_axi_rdata;
      @(negedge clk);
    end
  endtask

  task automatic reg_wr(input logic [15:0] w, input logic [31:0] d);
    axi_wr(addr(BANK_CTRL, w), d);
  endtask

  // ---------------- set-up ----------------
  localparam real GAIN [M] = '{1.0, 1.03, 0.98, 1.04, 0.96, 1.04, 0.96, 1.06};
  localparam real OFFS [M] = '{0.001, 0.0031, -0.004, -0.0014, -0.005, 0.002, 0.001, 0.0027};

  // skew of channel m in sample periods (0 for the runs without skew)
  function automatic real skew_of(input int m, input real scale);
    return scale * ((m % 3) - 1) * (1.0 + 0.1 * m);
  endfunction

  // NCO table of channel m: one period of a 0.9-of-full-scale sine, shifted
  // by the phase a sampling-time skew gives at the input frequency
  task automatic load_nco(input int m, input real skew_scale);
    real dphi;
    dphi = PI2 * $itor(BASE) / 4294967296.0 * skew_of(m, skew_scale);
    for (int i = 0; i < 2**NL; i++)
      axi_wr(addr(BANK_NCO_LUT + 8'(m), 16'(i)),
             32'($rtoi(0.9 * 131072.0 * $sin(PI2 * i / 2.0**NL + dphi))));
  endtask

  task automatic load_tables();
    for (int m = 0; m < M; m++) begin
      load_nco(m, 0.0);
      for (int i = 0; i < 2**AL; i++)
        axi_wr(addr(BANK_ADC_LUT + 8'(m), 16'(i)), 32'(i >> (AL - CW)));
    end
  endtask

  task automatic load_tanh(input int m, input real alpha);
    for (int i = 0; i < 2**AL; i++) begin
      real u, v;
      int code;
      u = $itor(i < 2**(AL-1) ? i : i - 2**AL) / 8192.0;
      v = ((1.0 - $exp(-2.0 * alpha * u)) / (1.0 + $exp(-2.0 * alpha * u)))
          / ((1.0 - $exp(-2.0 * alpha)) / (1.0 + $exp(-2.0 * alpha)));
      code = $rtoi(v * 511.0 + (v < 0 ? -0.5 : 0.5));
      axi_wr(addr(BANK_ADC_LUT + 8'(m), 16'(i)), 32'(CW'(code)));
    end
  endtask

  task automatic configure(input bit bypass_bca);
    reg_wr(REG_RESET, 1);
    for (int m = 0; m < M; m++) begin
      reg_wr(REG_NCO_START + 16'(m), 32'(m * BASE));
      reg_wr(REG_NCO_STEP + 16'(m), 32'(M * BASE));
      reg_wr(REG_ADC_GAIN + 16'(m), 32'($rtoi(GAIN[m] * 65536.0 + 0.5)));
      reg_wr(REG_ADC_OFFSET + 16'(m), 32'($rtoi(OFFS[m] * 131072.0 + (OFFS[m] < 0 ? -0.5 : 0.5))));
    end
    reg_wr(REG_CH_ENABLE, 32'hff);
    reg_wr(REG_ADC_BYPASS, 0);
    reg_wr(REG_BCA_BYPASS, bypass_bca ? 3 : 0);
    reg_wr(REG_MODE, 0);
    reg_wr(REG_RESET, 0);
  endtask

  // ---------------- one window: read it out and fit a sine ----------------
  longint unsigned sample_index;   // index of the next sample since the run started

  task automatic window_sndr(output real sndr);
    logic [31:0] d;
    real w, y, c, s;
    real n, sc, ss, s1, scc, sss, scs, syc, sys, sy, syy;
    real a [3][4];
    real x [3];
    // wait until the model has filled the buffer
    do axi_rd(addr(BANK_BUF, BUF_STATUS), d); while (d[1] != 1'b1);
    n = 0; sc = 0; ss = 0; scc = 0; sss = 0; scs = 0; syc = 0; sys = 0; sy = 0; syy = 0;
    w = PI2 * $itor(BASE) / 4294967296.0;
    for (int i = 0; i < WIN; i++) begin
      axi_rd(addr(BANK_BUF, BUF_DATA), d);
      y = $itor($signed(d));
      c = $cos(w * $itor(sample_index));
      s = $sin(w * $itor(sample_index));
      sample_index++;
      n += 1; sc += c; ss += s; scc += c * c; sss += s * s; scs += c * s;
      syc += y * c; sys += y * s; sy += y; syy += y * y;
    end
    // normal equations for y = x0*cos + x1*sin + x2, Gauss-Jordan
    a[0] = '{scc, scs, sc, syc};
    a[1] = '{scs, sss, ss, sys};
    a[2] = '{sc,  ss,  n,  sy};
    for (int p = 0; p < 3; p++) begin
      for (int r = 0; r < 3; r++) begin
        if (r != p) begin
          real f;
          f = a[r][p] / a[p][p];
          for (int k = 0; k < 4; k++) a[r][k] -= f * a[p][k];
        end
      end
    end
    for (int p = 0; p < 3; p++) x[p] = a[p][3] / a[p][p];
    begin
      real sig, res;
      sig = (x[0] * x[0] + x[1] * x[1]) / 2.0 * n;
      res = syy - (x[0] * syc + x[1] * sys + x[2] * sy);
      sndr = 10.0 * $log10(sig / res);
    end
  endtask

  real at_window [int];

  task automatic run(input string name, input int windows, output real first, output real last);
    real v;
    sample_index = 0;
    for (int k = 0; k < windows; k++) begin
      window_sndr(v);
      if (k == 0) first = v;
      last = v;
      at_window[k + 1] = v;
      if (k < 4 || k % 16 == 15 || k == windows - 1)
        $display("%s window %0d: SNDR %0.2f dB", name, k + 1, v);
    end
  endtask

  initial begin
    repeat (400_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real a_first, a_last, a_w32, b_first, b_last, c_first, c_last, d_first, d_last;
    rst_n = 0;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_arvalid = 0; s_axi_awaddr = 0; s_axi_wdata = 0;
    s_axi_araddr = 0; s_axi_wstrb = 4'hf; s_axi_bready = 1; s_axi_rready = 1;
    repeat (4) @(negedge clk);
    rst_n = 1;
    load_tables();

    configure(0);
    run("offset+gain", 128, a_first, a_last);
    a_w32 = at_window[32];
    check(a_first < 20.0, "first window, with the calibration still settling, is far below the ideal SNDR");
    check(a_w32 > 60.0 && a_w32 < 61.6, "SNDR within 1 dB of the ideal 61.1 dB after 2^21 samples");
    check(a_last > 60.0 && a_last < 61.6, "SNDR within 1 dB of the ideal 61.1 dB after 2^23 samples");

    configure(1);
    run("no calibration", 4, b_first, b_last);
    check(b_last < 50.0, "without calibration the SNDR stays low");

    reg_wr(REG_RESET, 1);
    for (int m = 0; m < M; m++) load_nco(m, 0.02);
    configure(0);
    run("offset+gain+skew", 32, c_first, c_last);
    check(c_last < a_w32 - 1.0, "skew is not calibrated and limits the SNDR");
    check(c_last > c_first, "offset and gain calibration still improve the SNDR with skew");

    reg_wr(REG_RESET, 1);
    for (int m = 0; m < M; m++) load_nco(m, 0.0);
    load_tanh(5, 0.3);
    configure(0);
    run("offset+gain+nonlinearity", 32, d_first, d_last);
    check(d_last < a_w32 - 1.0, "a non-linear channel limits the SNDR");
    check(d_last > d_first, "offset and gain calibration still improve the SNDR with a non-linear channel");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
