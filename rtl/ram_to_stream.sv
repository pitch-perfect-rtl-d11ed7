// ram_to_stream: reads words 0 .. N-1 of a synchronous-read RAM and presents
// them as one Avalon streaming packet (valid/ready, ready latency 0, with
// start- and end-of-packet flags).
//
// A read is issued every cycle while the 4-entry queue plus the one read in
// flight leave room (raddr is sampled by the RAM at the issuing edge and the
// word is on rdata, and pushed, in the next cycle), so the
// packet flows at one word per cycle when the sink is always ready and pauses
// without loss when it is not. done pulses in the cycle the last word is
// accepted. start is ignored while a packet is in progress.
module ram_to_stream #(
  parameter int unsigned N  = 4096,
  parameter int unsigned DW = 32,
  localparam int unsigned AW = $clog2(N)
) (
  input  logic          clk,
  input  logic          reset,
  input  logic          start,
  output logic [AW-1:0] raddr,
  input  logic [DW-1:0] rdata,
  output logic          src_valid,
  input  logic          src_ready,
  output logic [DW-1:0] src_data,
  output logic          src_sop,
  output logic          src_eop,
  output logic          done,
  output logic          active
);

  logic          fetching;     // raddr holds an address still to be issued
  logic          issued;       // a read was issued last cycle: rdata holds it now
  logic [DW-1:0] q [4];
  logic [1:0]    rd_ptr, wr_ptr;
  logic [2:0]    count;
  logic [AW:0]   sent;
  logic          pop, push, issue;

  assign src_valid = (count != 3'd0);
  assign src_data  = q[rd_ptr];
  assign src_sop   = (sent == '0);
  assign src_eop   = (sent == (AW+1)'(N - 1));
  assign pop       = src_valid && src_ready;
  assign push      = issued;
  assign issue     = fetching && ((32'(count) + 32'(issued)) < 32'd4);
  assign done      = pop && src_eop;

  always_ff @(posedge clk) begin
    if (reset) begin
      fetching <= 1'b0;
      issued   <= 1'b0;
      raddr    <= '0;
      rd_ptr   <= '0;
      wr_ptr   <= '0;
      count    <= '0;
      sent     <= '0;
      active   <= 1'b0;
      for (int i = 0; i < 4; i++) q[i] <= '0;
    end else begin
      issued   <= issue;
      if (start && !active) begin
        active   <= 1'b1;
        fetching <= 1'b1;
        raddr    <= '0;
        sent     <= '0;
      end
      if (issue) begin
        if (raddr == AW'(N - 1)) fetching <= 1'b0;
        else                     raddr    <= raddr + AW'(1);
      end
      if (push) begin
        q[wr_ptr] <= rdata;
        wr_ptr    <= wr_ptr + 2'd1;
      end
      if (pop) begin
        rd_ptr <= rd_ptr + 2'd1;
        sent   <= sent + (AW+1)'(1);
        if (src_eop) active <= 1'b0;
      end
      count <= count + 3'(push) - 3'(pop);
    end
  end

endmodule
