// tb_fleet_fabric: self-checking test of the switch fabric. Every source
// sends numbered packets to random destinations with random signal bits while
// destinations accept at random. Each packet carries its source and sequence
// number, so the test checks that it reaches the destination its path names,
// with the signal bit intact, that packets from one source to one destination
// arrive in order, that none is lost or duplicated, and that an uncontended
// packet is delivered one cycle after it is accepted.
module tb_fleet_fabric;
  import fleet_pkg::*;
  localparam int unsigned NSRC = 4, NDST = 4, PER_SRC = 300;

  logic clk = 0, rst_n = 0;
  logic    src_valid [NSRC];
  logic    src_ready [NSRC];
  packet_t src_pkt   [NSRC];
  logic    dst_valid [NDST];
  logic    dst_ready [NDST];
  packet_t dst_pkt   [NDST];
  int checks = 0, failures = 0;

  fleet_fabric #(.NSRC(NSRC), .NDST(NDST)) dut (
    .clk, .rst_n,
    .src_valid_i (src_valid), .src_ready_o (src_ready), .src_pkt_i (src_pkt),
    .dst_valid_o (dst_valid), .dst_ready_i (dst_ready), .dst_pkt_o (dst_pkt)
  );

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic packet_t mk(int s, int d, int seq, bit sig);
    packet_t p;
    p.path  = {12'(d), sig};
    p.token = 1'b0;
    p.data  = {5'(s), 16'(seq), 15'(d), sig};
    return p;
  endfunction

  int sent [NSRC];
  int got;
  bit acc [NSRC];
  int last_seq [NSRC][NDST];

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int s = 0; s < NSRC; s++) begin
      src_valid[s] = 0; src_pkt[s] = '0; sent[s] = 0;
      for (int d = 0; d < NDST; d++) last_seq[s][d] = -1;
    end
    for (int d = 0; d < NDST; d++) dst_ready[d] = 1;
    got = 0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);

    // latency: one packet, source 1 -> destination 2
    src_valid[1] = 1; src_pkt[1] = mk(1, 2, 0, 1'b1);
    #1 check(src_ready[1], "uncontended packet accepted at once");
    @(negedge clk);
    src_valid[1] = 0;
    check(dst_valid[2] && dst_pkt[2] == mk(1, 2, 0, 1'b1), "delivered next cycle, intact");
    for (int d = 0; d < NDST; d++) if (d != 2) check(!dst_valid[d], "no stray delivery");
    @(negedge clk);
    check(!dst_valid[2], "delivered once");

    // random traffic
    for (int cyc = 0; cyc < 20000 && got < NSRC * PER_SRC; cyc++) begin
      for (int s = 0; s < NSRC; s++)
        if (!src_valid[s] && sent[s] < PER_SRC && $urandom_range(0, 1)) begin
          src_valid[s] = 1;
          src_pkt[s]   = mk(s, $urandom_range(0, NDST - 1), sent[s], 1'($urandom()));
        end
      for (int d = 0; d < NDST; d++) dst_ready[d] = ($urandom_range(0, 3) != 0);
      #1;
      for (int d = 0; d < NDST; d++)
        if (dst_valid[d] && dst_ready[d]) begin
          int s, seq;
          s   = int'(dst_pkt[d].data[36:32]);
          seq = int'(dst_pkt[d].data[31:16]);
          check(int'(dst_pkt[d].data[15:1]) == d, "routed to the destination in the path");
          check(dst_pkt[d].data[0] == dst_pkt[d].path[0], "signal bit intact");
          check(s < NSRC && seq > last_seq[s][d], "in order per source and destination");
          if (s < NSRC) last_seq[s][d] = seq;
          got++;
        end
      for (int s = 0; s < NSRC; s++)
        acc[s] = src_valid[s] && src_ready[s];
      @(negedge clk);
      for (int s = 0; s < NSRC; s++)
        if (acc[s]) begin sent[s]++; src_valid[s] = 0; end
    end
    // drain
    for (int d = 0; d < NDST; d++) dst_ready[d] = 1;
    for (int s = 0; s < NSRC; s++) src_valid[s] = 0;
    repeat (3) begin
      #1;
      for (int d = 0; d < NDST; d++) if (dst_valid[d]) got++;
      @(negedge clk);
    end
    check(got == NSRC * PER_SRC, "every packet delivered exactly once");
    $display("delivered %0d packets", got);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
