// Self-checking test of the control registers: power-on values, then
// random writes to every register (and to unmapped words) with read-back
// and a check of the decoded outputs against a model kept here. Reads
// return data the clock after the strobe.
module tb_control_regs;
  import ti_adc_pkg::*;
  localparam int M = 8;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n, we, re;
  logic [WADDR_W-1:0] waddr, raddr;
  logic [BUS_W-1:0] wdata, rdata;
  logic soft_reset;
  logic [M-1:0] ch_enable;
  adc_bypass_t adc_bypass;
  bca_bypass_t bca_bypass;
  buf_mode_e mode;
  logic [31:0] nco_start [M];
  logic [31:0] nco_step [M];
  sample_t adc_offset [M];
  sample_t adc_gain [M];
  int checks = 0, failures = 0;

  control_regs #(.M(M)) dut (.*);

  logic [31:0] model [logic [15:0]];   // expected read-back per word

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  function automatic logic [31:0] mask(input logic [15:0] a, input logic [31:0] d);
    if (a == REG_RESET || a == REG_MODE) return {31'b0, d[0]};
    if (a == REG_CH_ENABLE) return {24'b0, d[7:0]};
    if (a == REG_ADC_BYPASS) return {29'b0, d[2:0]};
    if (a == REG_BCA_BYPASS) return {30'b0, d[1:0]};
    if (a[15:4] == 12'h001 && a[3:0] < M) return d;
    if (a[15:4] == 12'h002 && a[3:0] < M) return d;
    if ((a[15:4] == 12'h003 || a[15:4] == 12'h004) && a[3:0] < M) return 32'(signed'(d[17:0]));
    return 0;
  endfunction

  task automatic rd(input logic [15:0] a, output logic [31:0] d);
    @(negedge clk); re = 1; raddr = a;
    @(negedge clk); re = 0;
    d = rdata;
  endtask

  task automatic wr(input logic [15:0] a, input logic [31:0] d);
    @(negedge clk); we = 1; waddr = a; wdata = d;
    @(negedge clk); we = 0;
    model[a] = mask(a, d);
  endtask

  function automatic logic [15:0] rand_addr();
    case ($urandom_range(5))
      0: return 16'($urandom_range(0, 5));
      1: return 16'h0010 + 16'($urandom_range(0, 8));
      2: return 16'h0020 + 16'($urandom_range(0, 8));
      3: return 16'h0030 + 16'($urandom_range(0, 8));
      4: return 16'h0040 + 16'($urandom_range(0, 8));
      default: return 16'($urandom);
    endcase
  endfunction

  task automatic check_outputs();
    check(32'(soft_reset), model[REG_RESET], "soft_reset");
    check(32'(ch_enable), model[REG_CH_ENABLE], "ch_enable");
    check(32'(adc_bypass), model[REG_ADC_BYPASS], "adc_bypass");
    check(32'(bca_bypass), model[REG_BCA_BYPASS], "bca_bypass");
    check(32'(mode), model[REG_MODE], "mode");
    for (int m = 0; m < M; m++) begin
      check(nco_start[m], model[16'h10 + 16'(m)], "nco_start");
      check(nco_step[m], model[16'h20 + 16'(m)], "nco_step");
      check(32'(adc_offset[m]), model[16'h30 + 16'(m)], "adc_offset");
      check(32'(adc_gain[m]), model[16'h40 + 16'(m)], "adc_gain");
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] d;
    logic [15:0] a;
    rst_n = 0; we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    model[REG_RESET] = 1; model[REG_CH_ENABLE] = 32'hff; model[REG_ADC_BYPASS] = 0;
    model[REG_BCA_BYPASS] = 0; model[REG_MODE] = 0;
    for (int m = 0; m < M; m++) begin
      model[16'h10 + 16'(m)] = 0; model[16'h20 + 16'(m)] = 0;
      model[16'h30 + 16'(m)] = 0; model[16'h40 + 16'(m)] = 32'h0001_0000;
    end
    check_outputs();
    foreach (model[k]) begin
      rd(k, d);
      check(d, model[k], $sformatf("reset value of word %h", k));
    end
    for (int i = 0; i < 3000; i++) begin
      a = rand_addr();
      if ($urandom_range(1)) wr(a, $urandom);
      else begin
        rd(a, d);
        check(d, model.exists(a) ? model[a] : 32'h0, $sformatf("read word %h", a));
      end
      if (i % 100 == 0) check_outputs();
    end
    check_outputs();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
