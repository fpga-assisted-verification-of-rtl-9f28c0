// Self-checking test of sdp_ram: random writes and reads against a
// reference array, one-cycle read latency, hold of rdata while re is low,
// and old-data return on a same-address read/write collision.
module tb_sdp_ram;
  localparam int DEPTH = 8192, WIDTH = 18, AW = $clog2(DEPTH);
  logic clk = 0;
  always #5 clk = ~clk;

  logic we, re;
  logic [AW-1:0] waddr, raddr;
  logic [WIDTH-1:0] wdata, rdata;
  int checks = 0, failures = 0;

  sdp_ram #(.DEPTH(DEPTH), .WIDTH(WIDTH)) dut (.*);

  logic [WIDTH-1:0] ref_mem [DEPTH];

  task automatic check(input logic [WIDTH-1:0] got, exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [WIDTH-1:0] exp, held;
    we = 0; re = 0; waddr = 0; raddr = 0; wdata = 0;
    // fill the whole memory
    for (int i = 0; i < DEPTH; i++) begin
      @(negedge clk);
      we = 1; waddr = AW'(i); wdata = WIDTH'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge clk); we = 0;
    // random reads, one-cycle latency
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      re = 1; raddr = AW'($urandom);
      exp = ref_mem[raddr];
      @(negedge clk);
      re = 0;
      check(rdata, exp, "read");
      // rdata holds while re is low
      @(negedge clk);
      check(rdata, exp, "hold");
    end
    // collision: read and write the same address together -> old data
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      raddr = AW'($urandom); waddr = raddr; re = 1; we = 1;
      wdata = WIDTH'($urandom);
      exp = ref_mem[raddr];
      ref_mem[waddr] = wdata;
      @(negedge clk);
      re = 0; we = 0;
      check(rdata, exp, "collision old data");
      re = 1;
      @(negedge clk);
      re = 0;
      check(rdata, ref_mem[raddr], "collision new data");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
