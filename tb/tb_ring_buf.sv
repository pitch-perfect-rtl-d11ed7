// tb_ring_buf: checks the two-clock ring RAM with unrelated write and read
// clocks: a full 5120-word pass written on one clock is read back on the other
// with one read-clock cycle of latency, including the last address.
module tb_ring_buf;
  logic wr_clk = 0, rd_clk = 0;
  logic wren = 0;
  logic [12:0] waddr = 0, raddr = 0;
  logic [15:0] wdata = 0, rdata;
  logic [15:0] ref_mem [5120];
  int checks = 0, failures = 0;

  ring_buf #(.DEPTH(5120), .WIDTH(16)) dut (.*);

  always #7 wr_clk = ~wr_clk;
  always #5 rd_clk = ~rd_clk;

  initial begin
    for (int i = 0; i < 5120; i++) begin
      @(negedge wr_clk);
      wren = 1; waddr = 13'(i); wdata = 16'($urandom);
      ref_mem[i] = wdata;
    end
    @(negedge wr_clk) wren = 0;
    for (int i = 0; i < 5120; i++) begin
      int a;
      a = (i * 7 + 3) % 5120;
      @(negedge rd_clk) raddr = 13'(a);
      @(negedge rd_clk);
      checks++;
      if (rdata !== ref_mem[a]) begin
        failures++;
        $display("FAIL addr %0d: got %h expected %h", a, rdata, ref_mem[a]);
      end
    end
    @(negedge rd_clk) raddr = 13'd5119;
    @(negedge rd_clk);
    checks++;
    if (rdata !== ref_mem[5119]) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
