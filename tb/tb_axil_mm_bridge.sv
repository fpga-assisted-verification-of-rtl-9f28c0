// Self-checking test of the AXI4-Lite to memory-mapped bridge. A behavioural
// memory stands behind the MM side and answers reads after a random delay.
// Random writes (address before data, data before address, or together)
// and reads with random addresses are issued; the test checks the address
// translation (bank = bits 27:20, word = bits 17:2, other bits ignored),
// that each write produces exactly one MM strobe with the right data, that
// reads return what was written, that both responses are OKAY, and that a
// write and a read can be in flight at once.
module tb_axil_mm_bridge;
  import ti_adc_pkg::*;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst_n;
  logic [31:0] s_axi_awaddr, s_axi_wdata, s_axi_araddr, s_axi_rdata;
  logic [3:0] s_axi_wstrb;
  logic s_axi_awvalid, s_axi_awready, s_axi_wvalid, s_axi_wready;
  logic [1:0] s_axi_bresp, s_axi_rresp;
  logic s_axi_bvalid, s_axi_bready, s_axi_arvalid, s_axi_arready, s_axi_rvalid, s_axi_rready;
  logic mm_we, mm_re, mm_rvalid;
  logic [BANK_W-1:0] mm_wbank, mm_rbank;
  logic [WADDR_W-1:0] mm_waddr, mm_raddr;
  logic [BUS_W-1:0] mm_wdata, mm_rdata;
  int checks = 0, failures = 0, n_we = 0, n_concurrent = 0;

  axil_mm_bridge dut (.*);

  // behavioural MM memory: key = {bank, word}
  logic [31:0] mem [logic [23:0]];
  int rd_delay;
  logic [23:0] rd_key;
  logic rd_busy;

  always @(posedge clk) begin
    if (mm_we) begin
      mem[{mm_wbank, mm_waddr}] = mm_wdata;
      n_we++;
    end
    mm_rvalid <= 1'b0;
    if (mm_re) begin
      rd_busy  <= 1'b1;
      rd_key   <= {mm_rbank, mm_raddr};
      rd_delay <= $urandom_range(0, 3);
    end else if (rd_busy) begin
      if (rd_delay == 0) begin
        rd_busy   <= 1'b0;
        mm_rvalid <= 1'b1;
        mm_rdata  <= mem.exists(rd_key) ? mem[rd_key] : 32'hdead_beef;
      end else rd_delay <= rd_delay - 1;
    end
    if (mm_we && (mm_re || rd_busy)) n_concurrent++;
  end

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 10) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  task automatic axi_write(input logic [31:0] a, d, input int order);
    int we0;
    we0 = n_we;
    @(negedge clk);
    if (order != 1) begin s_axi_awvalid = 1; s_axi_awaddr = a; end
    if (order != 0) begin s_axi_wvalid = 1; s_axi_wdata = d; end
    while (s_axi_awvalid || s_axi_wvalid) begin
      logic aw_hs, w_hs;
      #1;
      aw_hs = s_axi_awvalid && s_axi_awready;
      w_hs  = s_axi_wvalid && s_axi_wready;
      @(negedge clk);
      if (aw_hs) s_axi_awvalid = 0;
      if (w_hs)  s_axi_wvalid = 0;
      if (order == 0 && !s_axi_awvalid && !aw_hs && s_axi_wdata !== d) begin s_axi_wvalid = 1; s_axi_wdata = d; end
      if (order == 1 && !s_axi_wvalid && !w_hs && s_axi_awaddr !== a) begin s_axi_awvalid = 1; s_axi_awaddr = a; end
      if (order == 0 && aw_hs) begin s_axi_wvalid = 1; s_axi_wdata = d; end
      if (order == 1 && w_hs) begin s_axi_awvalid = 1; s_axi_awaddr = a; end
    end
    s_axi_bready = 1;
    while (!s_axi_bvalid) @(negedge clk);
    check(32'(s_axi_bresp), 0, "bresp");
    @(negedge clk);
    s_axi_bready = 0;
    check(n_we - we0, 1, "one MM write per AXI write");
  endtask

  task automatic axi_read(input logic [31:0] a, output logic [31:0] d);
    @(negedge clk);
    s_axi_arvalid = 1; s_axi_araddr = a;
    #1;
    while (!s_axi_arready) begin @(negedge clk); #1; end
    @(negedge clk);
    s_axi_arvalid = 0;
    s_axi_rready = 1;
    while (!s_axi_rvalid) @(negedge clk);
    d = s_axi_rdata;
    check(32'(s_axi_rresp), 0, "rresp");
    @(negedge clk);
    s_axi_rready = 0;
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] ref_mem [logic [23:0]];
    logic [31:0] a, d, r;
    rst_n = 0; s_axi_awvalid = 0; s_axi_wvalid = 0; s_axi_bready = 0; s_axi_arvalid = 0;
    s_axi_rready = 0; s_axi_awaddr = 0; s_axi_wdata = 0; s_axi_araddr = 0; s_axi_wstrb = 4'hf;
    rd_busy = 0; mm_rvalid = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // translation: a write strobe shows bank and word
    fork
      axi_write(32'h0AB4_5678, 32'h1234_5678, 2);
      begin
        @(posedge mm_we);
        #1;
        check(32'(mm_wbank), 32'hAB, "bank bits 27:20");
        check(32'(mm_waddr), 32'h159E, "word bits 17:2");
        check(mm_wdata, 32'h1234_5678, "write data");
      end
    join
    for (int i = 0; i < 1500; i++) begin
      a = $urandom;
      a[27:20] = 8'($urandom_range(0, 3));
      a[17:12] = '0;
      d = $urandom;
      if ($urandom_range(2) != 0) begin
        axi_write(a, d, $urandom_range(2));
        ref_mem[{a[27:20], a[17:2]}] = d;
      end else if (ref_mem.exists({a[27:20], a[17:2]})) begin
        axi_read(a ^ 32'hF00C_0003, r);   // ignored bits flipped
        check(r, ref_mem[{a[27:20], a[17:2]}], "read back");
      end
    end
    // a write and a read in flight together
    for (int i = 0; i < 50; i++) begin
      a = 32'h0010_0000 | (i << 2);
      fork
        axi_write(a, 32'(i * 7), 2);
        axi_read(32'h0AB4_5678, r);
      join
      check(r, 32'h1234_5678, "concurrent read");
    end
    checks++;
    if (n_concurrent == 0) begin failures++; $display("FAIL no concurrent read and write"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
