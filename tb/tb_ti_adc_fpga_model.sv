// End-to-end test of the TI-ADC emulation model at its full size (8
// channels, 8192-entry NCO tables, 16384-entry ADC tables, 65536-sample
// output buffer), driven only through the AXI4-Lite port as a host would.
//
// A sample-exact model of all channels (NCO, ADC model, offset and gain
// calibration with channel 0 as reference, channel enables and bypasses)
// predicts every sample the buffer accepts; a mirror of the buffer,
// including overwrites in circular mode, predicts every word read back.
//
// Phases:
//   1. power-on values, empty-buffer reads while the model is held reset
//   2. table loading: sine in every NCO table, a 10-bit quantiser in every
//      ADC table
//   3. FIFO mode with the offset and gain mismatch of the reference
//      experiment: one sample per clock until the buffer is full, stall,
//      then 70000 samples read back and compared
//   4. random configurations (channel enables, bypasses, a gain that
//      drives the ADC model into saturation), each entered through the
//      RESET register
//   5. circular mode for 2^23 clocks: overwrites, then the calibration
//      coefficients are compared with the mismatch that was programmed
//   6. a non-linear (tanh) characteristic in one channel's ADC table and
//      sampling-time skew between the channels
// Every mechanism is counted and a mechanism that never occurred is a
// failure.
module tb_ti_adc_fpga_model;
  import ti_adc_pkg::*;
  localparam int M = 8, NL = 13, AL = 14, CW = 10, BUF = 1 << 16;
  localparam longint RUN_CIRC = 64'd1 << 23;
  localparam int     AVG = 1 << 18;
  real off_avg [M];
  real gain_avg [M];

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
      if (failures < 20) $display("FAIL %s", what);
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
      if (b_done) check(s_axi_bresp == 2'b00, "write response OKAY");
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

  // ---------------- model of the channels ----------------
  sample_t       nco_mem [M][2**NL];
  logic [CW-1:0] adc_mem [M][2**AL];
  int unsigned   k_idx;
  int            off_acc_m [M];
  int            gain_acc_m [M];
  sample_t       pend [$];         // predicted samples not yet in the buffer
  sample_t       mirror [$];       // predicted buffer contents
  sample_t       rd_exp [$];       // popped words on their way to the host
  int unsigned   n_sat;

  function automatic sample_t sat(input longint v);
    if (v > 131071) begin n_sat++; return 18'sd131071; end
    if (v < -131072) begin n_sat++; return -18'sd131072; end
    return sample_t'(v);
  endfunction

  function automatic int iabs(input sample_t v);
    return v < 0 ? -int'(v) : int'(v);
  endfunction

  function automatic void model_step();
    sample_t a [M];
    sample_t y [M];
    sample_t c;
    for (int m = 0; m < M; m++) begin
      logic [31:0] ph;
      sample_t x, g, o;
      ph = dut.nco_start[m] + k_idx * dut.nco_step[m];
      x  = nco_mem[m][ph[31 -: NL]];
      g  = dut.adc_bypass.gain ? x : sat((longint'(x) * longint'(dut.adc_gain[m])) >>> 16);
      o  = dut.adc_bypass.offset ? g : sat(longint'(g) + longint'(dut.adc_offset[m]));
      a[m] = dut.adc_bypass.lut ? o : sample_t'({adc_mem[m][o[17 -: AL]], 8'b0});
    end
    for (int m = 0; m < M; m++) begin
      c = sat(longint'(a[m]) - longint'(off_acc_m[m] >>> 16));
      if (dut.bca_bypass.offset) y[m] = a[m];
      else begin
        y[m] = c;
        off_acc_m[m] += int'(c) - int'(a[0]);
      end
    end
    for (int m = 0; m < M; m++) begin
      c = sat((longint'(gain_acc_m[m]) * longint'(y[m])) >>> 30);
      if (!dut.bca_bypass.gain) gain_acc_m[m] += iabs(y[0]) - iabs(c);
      if (dut.ch_enable[m]) pend.push_back(dut.bca_bypass.gain ? y[m] : c);
    end
    k_idx++;
  endfunction

  // ---------------- monitor and mechanism counters ----------------
  longint cyc = 0, first_push_cyc = -1, fill_cyc = -1;
  longint pushes_since_reset = 0;
  int unsigned n_push, n_pop, n_stall, n_overwrite, n_soft_reset, n_empty_read;
  int unsigned n_full_status, n_adc_bypass, n_bca_bypass, n_disabled, n_mismatch;
  int unsigned n_nonlinear;
  bit was_reset = 1;

  always @(posedge clk) begin
    cyc++;
    if (dut.mrst) begin
      if (!was_reset && rst_n) n_soft_reset++;
      was_reset = 1;
      k_idx = 0; pend.delete(); mirror.delete(); rd_exp.delete();
      for (int m = 0; m < M; m++) begin off_acc_m[m] = 0; gain_acc_m[m] = 0; end
      first_push_cyc = -1; fill_cyc = -1; pushes_since_reset = 0;
    end else begin
      was_reset = 0;
      if (dut.u_buf.pop) begin
        n_pop++;
        rd_exp.push_back(mirror.pop_front());
      end
      if (dut.ro_valid && !dut.ro_ready) n_stall++;
      if (dut.u_buf.push) begin
        sample_t e;
        if (pend.size() == 0) model_step();
        e = pend.pop_front();
        n_push++;
        pushes_since_reset++;
        if (first_push_cyc < 0) first_push_cyc = cyc;
        if (pushes_since_reset == BUF) fill_cyc = cyc;
        if (dut.adc_bypass != '0) n_adc_bypass++;
        if (dut.bca_bypass != '0) n_bca_bypass++;
        if (dut.ch_enable != '1) n_disabled++;
        checks++;
        if (dut.ro_data !== e) begin
          failures++;
          n_mismatch++;
          if (n_mismatch < 10) $display("FAIL buffer input %0d: got %0d exp %0d", n_push, dut.ro_data, e);
        end
        if (dut.u_buf.full && !dut.u_buf.pop) begin
          n_overwrite++;
          void'(mirror.pop_front());
        end
        mirror.push_back(e);
      end
    end
  end

  task automatic read_samples(input int n);
    logic [31:0] d;
    for (int i = 0; i < n; i++) begin
      axi_rd(addr(BANK_BUF, BUF_DATA), d);
      if (rd_exp.size() != 0) begin
        sample_t e = rd_exp.pop_front();
        check(d == 32'(e), $sformatf("read sample: got %0d exp %0d", $signed(d), e));
      end else begin
        n_empty_read++;
        check(d == 0, "empty buffer reads 0");
      end
    end
  endtask

  // calibration coefficients of every channel
  logic signed [31:0] off_acc_h [M];
  logic signed [31:0] gain_acc_h [M];
  for (genvar m = 0; m < M; m++) begin : g_acc
    assign off_acc_h[m]  = dut.g_ch[m].u_ch.off_acc;
    assign gain_acc_h[m] = dut.g_ch[m].u_ch.gain_acc;
  end

  // ---------------- configuration ----------------
  localparam real GAIN [M] = '{1.0, 1.03, 0.98, 1.04, 0.96, 1.04, 0.96, 1.06};
  localparam real OFFS [M] = '{0.001, 0.0031, -0.004, -0.0014, -0.005, 0.002, 0.001, 0.0027};
  localparam longint BASE = 64'd57_982_058;   // 27 MHz at 2 GS/s, 32-bit phase

  task automatic cfg_reference();
    for (int m = 0; m < M; m++) begin
      reg_wr(REG_NCO_START + 16'(m), 32'(m * BASE));
      reg_wr(REG_NCO_STEP + 16'(m), 32'(M * BASE));
      reg_wr(REG_ADC_GAIN + 16'(m), 32'($rtoi(GAIN[m] * 65536.0 + 0.5)));
      reg_wr(REG_ADC_OFFSET + 16'(m), 32'($rtoi(OFFS[m] * 131072.0 + (OFFS[m] < 0 ? -0.5 : 0.5))));
    end
    reg_wr(REG_CH_ENABLE, 32'hff);
    reg_wr(REG_ADC_BYPASS, 0);
    reg_wr(REG_BCA_BYPASS, 0);
  endtask

  task automatic load_nco(input int m);
    for (int i = 0; i < 2**NL; i++) begin
      nco_mem[m][i] = sample_t'($rtoi(0.9 * 131072.0 * $sin(6.283185307179586 * i / 2.0**NL)));
      axi_wr(addr(BANK_NCO_LUT + 8'(m), 16'(i)), 32'(nco_mem[m][i]));
    end
  endtask

  task automatic load_adc(input int m, input bit tanh_curve);
    for (int i = 0; i < 2**AL; i++) begin
      if (tanh_curve) begin
        real u, v;
        u = $itor(i < 2**(AL-1) ? i : i - 2**AL) / 8192.0;
        v = ((1.0 - $exp(-3.0 * u)) / (1.0 + $exp(-3.0 * u))) / ((1.0 - $exp(-3.0)) / (1.0 + $exp(-3.0)));
        adc_mem[m][i] = CW'($rtoi(v * 511.0 + (v < 0 ? -0.5 : 0.5)));
      end else adc_mem[m][i] = CW'(i >> (AL - CW));
      axi_wr(addr(BANK_ADC_LUT + 8'(m), 16'(i)), 32'(adc_mem[m][i]));
    end
  endtask

  initial begin
    repeat (40_000_000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    rst_n = 0;
    s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_arvalid = 0; s_axi_awaddr = 0; s_axi_wdata = 0;
    s_axi_araddr = 0; s_axi_wstrb = 4'hf; s_axi_bready = 1; s_axi_rready = 1;
    repeat (4) @(negedge clk);
    rst_n = 1;

    // 1. power-on state
    axi_rd(addr(BANK_CTRL, REG_RESET), d);        check(d == 1, "RESET register powers up at 1");
    axi_rd(addr(BANK_CTRL, REG_CH_ENABLE), d);    check(d == 32'hff, "all channels enabled");
    axi_rd(addr(BANK_CTRL, REG_ADC_GAIN + 3), d); check(d == 32'h10000, "unity ADC gain");
    axi_rd(addr(BANK_BUF, BUF_STATUS), d);        check(d == 1, "buffer empty at power-on");
    axi_rd(addr(BANK_BUF, BUF_OCC), d);           check(d == 0, "buffer occupancy 0");
    read_samples(3);
    axi_rd(addr(8'h7f, 16'h0), d);                check(d == 0, "unmapped bank reads 0");

    // 2. tables
    for (int m = 0; m < M; m++) begin
      load_nco(m);
      load_adc(m, 0);
    end
    $display("tables loaded at clock %0d", cyc);

    // 3. FIFO mode, reference mismatch
    cfg_reference();
    reg_wr(REG_MODE, 0);
    reg_wr(REG_RESET, 0);
    do axi_rd(addr(BANK_BUF, BUF_STATUS), d); while (d[1] != 1);
    check(fill_cyc - first_push_cyc == BUF - 1,
          $sformatf("buffer filled at one sample per clock (%0d clocks)", fill_cyc - first_push_cyc + 1));
    axi_rd(addr(BANK_BUF, BUF_OCC), d);           check(d == BUF, "occupancy reads 65536 when full");
    n_full_status++;
    repeat (200) @(negedge clk);
    read_samples(70000);
    $display("FIFO phase done at clock %0d", cyc);

    // 4. random configurations, each entered through RESET
    for (int r = 0; r < 8; r++) begin
      reg_wr(REG_RESET, 1);
      axi_rd(addr(BANK_BUF, BUF_STATUS), d);      check(d == 1, "buffer empty while held in reset");
      read_samples(1);
      reg_wr(REG_CH_ENABLE, r == 0 ? 32'h01 : r == 1 ? 32'hfe : 32'($urandom_range(1, 255)));
      reg_wr(REG_ADC_BYPASS, r < 2 ? 0 : $urandom_range(0, 7));
      reg_wr(REG_BCA_BYPASS, r < 2 ? 0 : $urandom_range(0, 3));
      if (r == 3) begin
        reg_wr(REG_ADC_GAIN + 2, 32'(18'sd110000));   // about 1.68
        reg_wr(REG_ADC_BYPASS, 0);
      end
      reg_wr(REG_NCO_START + 16'(r), $urandom);
      reg_wr(REG_RESET, 0);
      read_samples(3000);
    end

    // 5. circular mode, 2^23 clocks
    reg_wr(REG_RESET, 1);
    cfg_reference();
    reg_wr(REG_MODE, 1);
    reg_wr(REG_RESET, 0);
    // the coefficients move by up to a sample's size each update, so they
    // are averaged over the last AVG clocks of the run
    repeat (RUN_CIRC - AVG) @(negedge clk);
    for (int m = 0; m < M; m++) begin off_avg[m] = 0.0; gain_avg[m] = 0.0; end
    repeat (AVG) begin
      @(negedge clk);
      for (int m = 0; m < M; m++) begin
        off_avg[m] += $itor(off_acc_h[m]) / 65536.0 / AVG;
        gain_avg[m] += $itor(gain_acc_h[m]) / 1073741824.0 / AVG;
      end
    end
    axi_rd(addr(BANK_BUF, BUF_STATUS), d);        check(d == 2, "buffer full in circular mode");
    n_full_status++;
    axi_rd(addr(BANK_BUF, BUF_OCC), d);           check(d == BUF, "circular buffer stays at 65536");
    for (int m = 1; m < M; m++) begin
      real o_exp, o_got, g_exp, g_got;
      o_exp = (OFFS[m] - OFFS[0]) * 131072.0;
      o_got = off_avg[m];
      g_exp = GAIN[0] / GAIN[m];
      g_got = gain_avg[m];
      $display("channel %0d: offset coefficient %f (expected %f), gain coefficient %f (expected %f)",
               m, o_got, o_exp, g_got, g_exp);
      check(o_got > o_exp - 30.0 && o_got < o_exp + 30.0, $sformatf("offset of channel %0d settled", m));
      check(g_got > g_exp * 0.999 && g_got < g_exp * 1.001, $sformatf("gain of channel %0d settled", m));
    end
    check(off_acc_h[0] == 0, "reference offset coefficient stays 0");
    read_samples(2000);
    $display("circular phase done at clock %0d", cyc);

    // 6. non-linear characteristic in channel 5, and sampling-time skew:
    //    channel m samples 1/50 of a sample period early or late
    reg_wr(REG_RESET, 1);
    load_adc(5, 1);
    for (int m = 0; m < M; m++)
      reg_wr(REG_NCO_START + 16'(m), 32'(m * BASE + (m % 3 - 1) * (BASE / 50)));
    n_nonlinear++;
    reg_wr(REG_MODE, 0);
    reg_wr(REG_RESET, 0);
    read_samples(20000);

    // mechanisms
    $display("pushes %0d pops %0d stalls %0d overwrites %0d soft resets %0d empty reads %0d",
             n_push, n_pop, n_stall, n_overwrite, n_soft_reset, n_empty_read);
    $display("adc bypass %0d bca bypass %0d disabled-channel samples %0d saturations %0d",
             n_adc_bypass, n_bca_bypass, n_disabled, n_sat);
    check(n_stall > 0, "stall happened");
    check(n_overwrite > 0, "overwrite happened");
    check(n_soft_reset > 0, "soft reset happened");
    check(n_empty_read > 0, "empty read happened");
    check(n_full_status > 0, "full status seen");
    check(n_adc_bypass > 0, "ADC bypass happened");
    check(n_bca_bypass > 0, "calibration bypass happened");
    check(n_disabled > 0, "channel disable happened");
    check(n_sat > 0, "saturation happened");
    check(n_nonlinear > 0, "non-linear table used");
    check(n_pop > 0 && rd_exp.size() == 0, "all popped words reached the host");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
