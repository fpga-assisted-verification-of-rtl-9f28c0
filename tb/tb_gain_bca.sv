// Self-checking test of the gain calibration stage. The channel stream is
// the reference sine scaled by a gain error; every output and the
// accumulator are compared with a bit-exact reference model that uses one
// plain 64-bit product (not the split product of the design). Checks the
// zero start (no output at first), convergence of gamma*g to the gain
// ratio, saturation of the corrected sample, and bypass.
module tb_gain_bca;
  import ti_adc_pkg::*;
  localparam int SHIFT = 30;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, bypass, s_valid, s_ready, m_valid, m_ready;
  sample_t s_data, ref_data, m_data;
  logic signed [31:0] acc;
  int checks = 0, failures = 0, n_sat = 0;

  gain_bca dut (.*);

  logic signed [31:0] acc_m;
  sample_t exp_q [$];
  longint unsigned k;
  real g_true;
  bit first = 1;

  function automatic longint clip(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
  endfunction

  function automatic longint absl(input longint v);
    return v < 0 ? -v : v;
  endfunction

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    if (!rst && m_valid && m_ready) begin
      sample_t e;
      e = exp_q.pop_front();
      if (first) begin
        checks++;
        if (m_data !== 0) begin failures++; $display("FAIL first output %0d not 0", m_data); end
        first = 0;
      end
      checks++;
      if (m_data !== e) begin
        failures++;
        if (failures < 10) $display("FAIL out got %0d exp %0d", m_data, e);
      end
    end
  end

  task automatic stream(input int n, input int vpct, input int rpct, input real amp);
    int sent = 0;
    while (sent < n) begin
      @(negedge clk);
      m_ready = ($urandom_range(99) < rpct);
      if (!s_valid || s_ready) begin
        real sig;
        s_valid = ($urandom_range(99) < vpct);
        sig = amp * $sin(0.0137 * real'(k));
        ref_data = sample_t'(int'(sig));
        s_data   = sample_t'(int'(sig * g_true));
      end
      @(posedge clk);
      if (s_valid && s_ready) begin
        longint p, c;
        checks++;
        if (acc !== acc_m) begin failures++; if (failures < 10) $display("FAIL acc %0d exp %0d", acc, acc_m); end
        p = longint'(acc_m) * longint'(s_data);
        c = clip(p >>> SHIFT);
        if (c == 131071 || c == -131072) n_sat++;
        if (bypass) exp_q.push_back(s_data);
        else begin
          exp_q.push_back(sample_t'(c));
          acc_m = acc_m - 32'(absl(c)) + 32'(absl(longint'(ref_data)));
        end
        k++;
        sent++;
      end
    end
    @(negedge clk);
    s_valid = 0;
  endtask

  initial begin
    rst = 1; bypass = 0; s_valid = 0; m_ready = 0; s_data = 0; ref_data = 0;
    acc_m = 0; k = 0; g_true = 1.06;
    repeat (3) @(negedge clk);
    rst = 0;
    // first output is zero: the coefficient starts at 0
    stream(3000, 70, 70, 80000.0);
    stream(200000, 100, 100, 80000.0);
    // converged: gamma*g = 1/1.06
    begin
      real gg;
      gg = real'(acc) / real'(1 << SHIFT);
      checks++;
      if (gg < 0.935 || gg > 0.952) begin failures++; $display("FAIL gamma*g = %f, want %f", gg, 1.0/1.06); end
    end
    g_true = 0.96;
    stream(200000, 90, 90, 80000.0);
    begin
      real gg;
      gg = real'(acc) / real'(1 << SHIFT);
      checks++;
      if (gg < 1.033 || gg > 1.05) begin failures++; $display("FAIL gamma*g = %f, want %f", gg, 1.0/0.96); end
    end
    // large input with a large coefficient saturates the output
    g_true = 1.5;
    stream(300, 90, 90, 85000.0);
    checks++;
    if (n_sat == 0) begin failures++; $display("FAIL saturation never exercised"); end
    @(negedge clk);
    bypass = 1;
    begin
      logic signed [31:0] a0;
      a0 = acc;
      stream(2000, 80, 80, 50000.0);
      checks++;
      if (acc !== a0) begin failures++; $display("FAIL accumulator moved in bypass"); end
    end
    @(negedge clk); s_valid = 0; m_ready = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
