// Self-checking test of the offset calibration stage. A channel sample
// stream carrying a sine plus an offset and a reference stream with the
// same sine are fed in under random gaps and back-pressure. Every output
// and the accumulator are compared with a bit-exact reference model kept
// here; the run is long enough (about 12 time constants of 2^16 samples)
// to check that gamma*o converges to the offset difference and that the
// corrected output then tracks the reference. Bypass is checked too.
module tb_offset_bca;
  import ti_adc_pkg::*;
  localparam int SHIFT = 16;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, bypass, s_valid, s_ready, m_valid, m_ready;
  sample_t s_data, ref_data, m_data;
  logic signed [31:0] acc;
  int checks = 0, failures = 0;

  offset_bca dut (.*);

  logic signed [31:0] acc_m;
  sample_t exp_q [$];
  longint unsigned k;
  int off_true;

  function automatic longint clip(input longint v);
    if (v > 131071) return 131071;
    if (v < -131072) return -131072;
    return v;
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
      checks++;
      if (m_data !== e) begin
        failures++;
        if (failures < 10) $display("FAIL out got %0d exp %0d", m_data, e);
      end
    end
  end

  task automatic stream(input int n, input int vpct, input int rpct);
    int sent = 0;
    while (sent < n) begin
      @(negedge clk);
      m_ready = ($urandom_range(99) < rpct);
      if (!s_valid || s_ready) begin
        int sig;
        s_valid = ($urandom_range(99) < vpct);
        sig = int'(60000.0 * $sin(0.0137 * real'(k)));
        ref_data = sample_t'(sig + $signed($urandom_range(0, 400)) - 200);
        s_data   = sample_t'(sig + off_true + $signed($urandom_range(0, 400)) - 200);
      end
      @(posedge clk);
      if (s_valid && s_ready) begin
        longint c;
        checks++;
        if (acc !== acc_m) begin failures++; if (failures < 10) $display("FAIL acc %0d exp %0d", acc, acc_m); end
        c = clip(longint'(s_data) - longint'(acc_m >>> SHIFT));
        if (bypass) exp_q.push_back(s_data);
        else begin
          exp_q.push_back(sample_t'(c));
          acc_m = acc_m + 32'(c) - 32'(ref_data);
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
    acc_m = 0; k = 0; off_true = 1000;
    repeat (3) @(negedge clk);
    rst = 0;
    stream(3000, 70, 70);
    stream(800000, 100, 100);
    // converged: gamma*o equals the offset difference within a few LSB
    checks++;
    if ((acc >>> SHIFT) < off_true - 8 || (acc >>> SHIFT) > off_true + 8) begin
      failures++; $display("FAIL no convergence: gamma*o = %0d, want %0d", acc >>> SHIFT, off_true);
    end
    // bypass: output = input, accumulator frozen
    @(negedge clk);
    bypass = 1;
    begin
      logic signed [31:0] a0;
      a0 = acc;
      stream(2000, 80, 80);
      checks++;
      if (acc !== a0) begin failures++; $display("FAIL accumulator moved in bypass"); end
    end
    @(negedge clk);
    bypass = 0;
    off_true = -2500;
    stream(3000, 60, 60);
    @(negedge clk); s_valid = 0; m_ready = 1;
    repeat (4) @(negedge clk);
    checks++;
    if (exp_q.size() != 0) begin failures++; $display("FAIL outputs missing"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
