// fft_ip_model: behavioural model of the streaming FFT core used by the
// pipeline (4096-point, variable streaming, natural order, 16-bit fixed-point
// data), for simulation only.
//
// The sink takes one packet of N complex words (sop on the first, eop on the
// last); sink_ready is deasserted for one cycle in every STALL_EVERY while
// collecting (0 = never) to exercise back-pressure. The model then computes the
// transform in double precision with an iterative radix-2 FFT, waits LATENCY
// cycles and returns N words on the source in natural order, honouring
// source_ready. Scaling: the forward transform returns X[k] / N, the inverse
// returns the unnormalised sum of X[k] e^{+j2pi kn/N}, so a forward/inverse
// pair is the identity. Results are rounded and saturated to 16 bits.
module fft_ip_model #(
  parameter int N           = 4096,
  parameter int LATENCY     = 64,
  parameter int STALL_EVERY = 0
) (
  input  logic        clk,
  input  logic        sink_valid,
  output logic        sink_ready,
  input  logic        sink_sop,
  input  logic        sink_eop,
  input  logic [15:0] sink_real,
  input  logic [15:0] sink_imag,
  input  logic        inverse,
  output logic        source_valid,
  input  logic        source_ready,
  output logic        source_sop,
  output logic        source_eop,
  output logic [15:0] source_real,
  output logic [15:0] source_imag
);

  real re [N];
  real im [N];
  int  packets = 0;
  int  stalls  = 0;

  function automatic logic [15:0] to16(input real v);
    longint r;
    r = longint'(v);   // a real-to-integer cast rounds to nearest
    if (r > 32767)  r = 32767;
    if (r < -32768) r = -32768;
    return 16'(r);
  endfunction

  task automatic run_fft(input bit inv);
    int j, m;
    real tr, ti, wr, wi, ang;
    // bit reversal
    j = 0;
    for (int i = 0; i < N - 1; i++) begin
      if (i < j) begin
        tr = re[i]; re[i] = re[j]; re[j] = tr;
        ti = im[i]; im[i] = im[j]; im[j] = ti;
      end
      m = N >> 1;
      while (m >= 1 && (j & m) != 0) begin j = j ^ m; m = m >> 1; end
      j = j | m;
    end
    for (int len = 2; len <= N; len = len << 1) begin
      for (int k = 0; k < len / 2; k++) begin
        ang = (inv ? 2.0 : -2.0) * 3.14159265358979323846 * k / len;
        wr = $cos(ang); wi = $sin(ang);
        for (int s = 0; s < N; s += len) begin
          int a, b;
          a = s + k; b = s + k + len / 2;
          tr = re[b] * wr - im[b] * wi;
          ti = re[b] * wi + im[b] * wr;
          re[b] = re[a] - tr; im[b] = im[a] - ti;
          re[a] = re[a] + tr; im[a] = im[a] + ti;
        end
      end
    end
    if (!inv) for (int i = 0; i < N; i++) begin re[i] = re[i] / N; im[i] = im[i] / N; end
  endtask

  initial begin
    int cnt, cyc;
    bit inv;
    sink_ready   = 1'b0;
    source_valid = 1'b0;
    source_sop   = 1'b0;
    source_eop   = 1'b0;
    source_real  = '0;
    source_imag  = '0;
    forever begin
      // collect one packet
      cnt = 0; cyc = 0;
      @(posedge clk);
      sink_ready <= 1'b1;
      while (cnt < N) begin
        @(posedge clk);
        if (sink_valid && sink_ready) begin
          if (cnt == 0) inv = inverse;
          re[cnt] = real'($signed(sink_real));
          im[cnt] = real'($signed(sink_imag));
          cnt++;
        end
        cyc++;
        if (STALL_EVERY > 0 && (cyc % STALL_EVERY) == 0 && cnt < N) begin
          sink_ready <= 1'b0; stalls++;
        end else begin
          sink_ready <= (cnt < N);
        end
      end
      sink_ready <= 1'b0;
      run_fft(inv);
      packets++;
      repeat (LATENCY) @(posedge clk);
      for (int k = 0; k < N; k++) begin
        source_valid <= 1'b1;
        source_sop   <= (k == 0);
        source_eop   <= (k == N - 1);
        source_real  <= to16(re[k]);
        source_imag  <= to16(im[k]);
        @(posedge clk);
        while (!source_ready) @(posedge clk);
      end
      source_valid <= 1'b0;
      source_sop   <= 1'b0;
      source_eop   <= 1'b0;
    end
  end

endmodule
