// tb_sdp_ram: checks the buffer RAM: zero contents after configuration,
// one-cycle read latency, writes at random addresses against a reference
// array, and that a read of the address being written returns the old word.
module tb_sdp_ram;
  logic clk = 0;
  logic wren = 0;
  logic [11:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_mem [4096];
  int checks = 0, failures = 0;

  sdp_ram #(.DEPTH(4096), .WIDTH(16)) dut (.*);

  always #5 clk = ~clk;

  task automatic expect_eq(input logic [15:0] got, input logic [15:0] exp, input string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %h expected %h", what, got, exp);
    end
  endtask

  initial begin
    for (int i = 0; i < 4096; i++) ref_mem[i] = '0;
    // initial contents
    for (int i = 0; i < 4096; i += 397) begin
      @(negedge clk) raddr = 12'(i);
      @(negedge clk) expect_eq(rdata, 16'h0, "initial zero");
    end
    // random writes
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      wren = 1; waddr = 12'($urandom); wdata = 16'($urandom);
      ref_mem[waddr] = wdata;
    end
    @(negedge clk) wren = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk) raddr = 12'(i);
      @(negedge clk) expect_eq(rdata, ref_mem[i], "read back");
    end
    // read during write of the same address returns the old word
    @(negedge clk);
    raddr = 12'd77; waddr = 12'd77; wdata = ~ref_mem[77]; wren = 1;
    @(negedge clk);
    wren = 0;
    expect_eq(rdata, ref_mem[77], "read-during-write old data");
    ref_mem[77] = ~ref_mem[77];
    @(negedge clk);
    expect_eq(rdata, ref_mem[77], "new data next cycle");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #2000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
