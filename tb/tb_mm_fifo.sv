// Self-checking test of the output buffer at a reduced depth of 64
// samples. FIFO mode: the buffer fills, s_ready drops when full (the
// stall), reads through the bus return the samples in order, occupancy
// and status words are right, and a read of an empty buffer returns 0.
// Circular mode: writes never stall, and after writing more than the depth
// the buffer holds exactly the newest 64 samples (the overwrite). Random
// concurrent writes and reads are checked against a queue model.
module tb_mm_fifo;
  import ti_adc_pkg::*;
  localparam int AB = 6, SIZE = 1 << AB;
  logic clk = 0;
  always #5 clk = ~clk;

  logic rst, circular, s_valid, s_ready, rd_en;
  sample_t s_data;
  logic [WADDR_W-1:0] rd_addr;
  logic [BUS_W-1:0] rd_data;
  logic [AB:0] occupancy;
  logic full, empty;
  int checks = 0, failures = 0, n_stall = 0, n_over = 0;

  mm_fifo #(.ADDR_BITS(AB)) dut (.*);

  sample_t q [$];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input logic [31:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      if (failures < 12) $display("FAIL %s: got %h exp %h", what, got, exp);
    end
  endtask

  // one clock: optional write, optional bus read of word `a`
  task automatic step(input bit wr, input bit rd, input logic [15:0] a);
    logic [31:0] exp;
    bit popped;
    @(negedge clk);
    s_valid = wr; s_data = sample_t'($urandom); rd_en = rd; rd_addr = a;
    exp = 0; popped = 0;
    @(posedge clk);
    if (rd) begin
      if (a == BUF_DATA && q.size() > 0) begin exp = 32'(q.pop_front()); popped = 1; end
      else if (a == BUF_OCC) exp = 32'(q.size());
      else if (a == BUF_STATUS) exp = {30'b0, q.size() == SIZE, q.size() == 0};
    end
    if (wr && !s_ready) n_stall++;
    if (wr && s_ready) begin
      if (q.size() == SIZE && !popped) begin void'(q.pop_front()); n_over++; end
      q.push_back(s_data);
    end
    @(negedge clk);
    s_valid = 0; rd_en = 0;
    if (rd) check(rd_data, exp, $sformatf("read word %0d", a));
    check(32'(occupancy), 32'(q.size()), "occupancy");
  endtask

  initial begin
    rst = 1; circular = 0; s_valid = 0; s_data = 0; rd_en = 0; rd_addr = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    step(0, 1, BUF_DATA);                    // empty read
    step(0, 1, BUF_STATUS);
    for (int i = 0; i < SIZE + 5; i++) step(1, 0, 0);   // fill, then stall
    check(32'(full), 1, "full flag");
    check(32'(s_ready), 0, "ready low when full");
    step(0, 1, BUF_STATUS);
    step(1, 1, BUF_DATA);                    // read and write together when full
    for (int i = 0; i < SIZE + 3; i++) step(0, 1, (i % 7 == 3) ? BUF_OCC : BUF_DATA);
    for (int i = 0; i < 3000; i++) step($urandom_range(1), $urandom_range(1), 16'($urandom_range(2)));
    // circular mode
    circular = 1;
    for (int i = 0; i < 3 * SIZE; i++) step(1, 0, 0);
    check(32'(s_ready), 1, "ready high in circular mode");
    step(1, 1, BUF_DATA);                    // pop while overwriting
    for (int i = 0; i < 3000; i++) step($urandom_range(1), $urandom_range(3) == 0, BUF_DATA);
    for (int i = 0; i < SIZE + 2; i++) step(0, 1, BUF_DATA);
    checks++;
    if (n_stall == 0 || n_over == 0) begin
      failures++; $display("FAIL stall %0d / overwrite %0d never happened", n_stall, n_over);
    end
    $display("stalls %0d overwrites %0d", n_stall, n_over);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
