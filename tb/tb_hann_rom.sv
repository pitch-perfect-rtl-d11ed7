// tb_hann_rom: checks every ROM word on both read ports against
// 65536 * sin^2(pi*n/4096), computed here with the sine rather than the cosine
// form, within one LSB, plus the window's symmetry w[n] = w[4096-n].
module tb_hann_rom;
  logic clk = 0;
  logic [11:0] addr_a = 0, addr_b = 0;
  logic [15:0] data_a, data_b;
  int checks = 0, failures = 0;

  hann_rom #(.N(4096)) dut (.*);

  always #5 clk = ~clk;

  function automatic int expected(input int n);
    real s, v;
    s = $sin(3.14159265358979323846 * n / 4096.0);
    v = s * s * 65536.0;
    if (v > 65535.0) v = 65535.0;
    return int'(v);
  endfunction

  initial begin
    for (int n = 0; n < 4096; n++) begin
      int ea, eb;
      @(negedge clk);
      addr_a = 12'(n);
      addr_b = 12'((4096 - n) % 4096);
      @(negedge clk);
      ea = expected(n);
      eb = expected((4096 - n) % 4096);
      checks += 2;
      if ((int'(data_a) - ea) > 1 || (ea - int'(data_a)) > 1) begin
        failures++; $display("FAIL port a n=%0d got %0d exp %0d", n, data_a, ea);
      end
      if ((int'(data_b) - eb) > 1 || (eb - int'(data_b)) > 1) begin
        failures++; $display("FAIL port b n=%0d got %0d exp %0d", n, data_b, eb);
      end
      if (n != 0) begin
        checks++;
        if (data_a !== data_b) begin failures++; $display("FAIL symmetry n=%0d", n); end
      end
    end
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
