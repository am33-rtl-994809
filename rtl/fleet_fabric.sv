// fleet_fabric: the switch fabric of a Fleet, a packet-switched network that
// delivers every packet, in order, from its source to the destination its
// path names.
//
// Structure: a crossbar. Each of the NDST destinations owns one output
// register and a round-robin arbiter over the NSRC sources. A source whose
// packet names destination d (path bits PATH_W-1:1) requests d; when d's
// register is empty or being emptied, the arbiter grants one requester, which
// sees its ready high and hands over the packet. Bit 0 of the path is the
// signal bit: it does not affect routing and is delivered with the packet.
//
// Ordering: a source has at most one packet in flight per handshake and a
// destination register holds one packet, so packets from one source to one
// destination arrive in the order they were sent. A path naming no existing
// destination is an error caught by an assertion.
//
// Timing: a packet accepted in cycle t is presented at its destination in
// cycle t+1. Source ready depends combinationally on that source's valid and
// path, on the other sources' requests and on the destination's ready.
//
// The document gives the fabric's function (paths, reliable in-order
// delivery, the signal bit); the crossbar, the arbitration and the path
// encoding are this design's choices.
module fleet_fabric
  import fleet_pkg::*;
#(
  parameter int unsigned NSRC = 4,
  parameter int unsigned NDST = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    src_valid_i [NSRC],
  output logic    src_ready_o [NSRC],
  input  packet_t src_pkt_i   [NSRC],
  output logic    dst_valid_o [NDST],
  input  logic    dst_ready_i [NDST],
  output packet_t dst_pkt_o   [NDST]
);
  localparam int unsigned SW = (NSRC > 1) ? $clog2(NSRC) : 1;

  logic [NSRC-1:0] req   [NDST];
  logic [NSRC-1:0] grant [NDST];
  logic [SW-1:0]   rr_q  [NDST];   // source with the highest priority
  logic            ov_q  [NDST];
  packet_t         op_q  [NDST];
  logic            take  [NDST];

  function automatic int unsigned dest_of(packet_t p);
    return int'(p.path[PATH_W-1:1]);
  endfunction

  always_comb begin
    for (int d = 0; d < NDST; d++) begin
      for (int s = 0; s < NSRC; s++)
        req[d][s] = src_valid_i[s] && (dest_of(src_pkt_i[s]) == d);
    end
  end

  // round-robin pick per destination
  always_comb begin
    for (int d = 0; d < NDST; d++) begin
      grant[d] = '0;
      take[d]  = 1'b0;
      if (!ov_q[d] || dst_ready_i[d]) begin
        for (int k = 0; k < NSRC; k++) begin
          if (!take[d] && req[d][(int'(rr_q[d]) + k) % NSRC]) begin
            grant[d][(int'(rr_q[d]) + k) % NSRC] = 1'b1;
            take[d] = 1'b1;
          end
        end
      end
    end
  end

  always_comb begin
    for (int s = 0; s < NSRC; s++) begin
      src_ready_o[s] = 1'b0;
      for (int d = 0; d < NDST; d++)
        if (grant[d][s]) src_ready_o[s] = 1'b1;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int d = 0; d < NDST; d++) begin
        ov_q[d] <= 1'b0;
        op_q[d] <= '0;
        rr_q[d] <= '0;
      end
    end else begin
      for (int d = 0; d < NDST; d++) begin
        if (take[d]) begin
          ov_q[d] <= 1'b1;
          for (int s = 0; s < NSRC; s++)
            if (grant[d][s]) begin
              op_q[d] <= src_pkt_i[s];
              rr_q[d] <= SW'((s + 1) % NSRC);
            end
        end else if (dst_ready_i[d]) begin
          ov_q[d] <= 1'b0;
        end
      end
    end
  end

  always_comb begin
    for (int d = 0; d < NDST; d++) begin
      dst_valid_o[d] = ov_q[d];
      dst_pkt_o[d]   = op_q[d];
    end
  end

  for (genvar s = 0; s < NSRC; s++) begin : g_chk
    a_route: assert property (@(posedge clk) disable iff (!rst_n)
      src_valid_i[s] |-> dest_of(src_pkt_i[s]) < NDST);
  end

endmodule
