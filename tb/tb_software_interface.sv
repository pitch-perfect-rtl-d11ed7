// tb_software_interface: checks the pitch-scale register: its reset value
// (64 = unity), that writes land only with chipselect and write both high,
// whatever the address, and that the value holds between writes.
module tb_software_interface;
  logic clk = 0, reset = 1;
  logic [7:0] writedata = 0;
  logic write = 0, chipselect = 0;
  logic [2:0] address = 0;
  logic [7:0] shift_amt;
  int checks = 0, failures = 0;

  software_interface dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic [7:0] exp, input string what);
    checks++;
    if (shift_amt !== exp) begin
      failures++;
      $display("FAIL %s: shift_amt=%0d expected %0d", what, shift_amt, exp);
    end
  endtask

  task automatic bus_write(input logic [7:0] d, input logic cs, input logic wr, input logic [2:0] a);
    @(negedge clk);
    writedata = d; chipselect = cs; write = wr; address = a;
    @(negedge clk);
    chipselect = 0; write = 0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    @(negedge clk) reset = 0;
    check(8'd64, "reset value");
    bus_write(8'd128, 1, 1, 3'd0); check(8'd128, "write addr 0");
    bus_write(8'd32, 0, 1, 3'd0);  check(8'd128, "no chipselect");
    bus_write(8'd33, 1, 0, 3'd0);  check(8'd128, "no write strobe");
    bus_write(8'd85, 1, 1, 3'd5);  check(8'd85, "write addr 5");
    repeat (5) @(posedge clk);     check(8'd85, "hold");
    for (int i = 0; i < 20; i++) begin
      logic [7:0] v;
      v = 8'($urandom);
      bus_write(v, 1, 1, 3'($urandom)); check(v, "random write");
    end
    @(negedge clk) reset = 1;
    @(negedge clk) reset = 0;
    check(8'd64, "second reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
