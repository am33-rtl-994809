// fleet_top: a small Fleet built around one FIFO ship.
//
// The FIFO ship sits between an input dock and an output dock, and both
// docks hang on a switch fabric. The other ships of a Fleet (ALUs, memory
// access, bitwise units and so on) are outside this design: their docks'
// fabric traffic enters through the ext_src ports and leaves through the
// ext_dst ports. Instructions reach a dock as packets from an external
// source, exactly as a dispatching dock elsewhere in the Fleet would send
// them.
//
// Fabric destinations (path bits 12:1; bit 0 is the signal bit):
//   0  input dock, instruction destination
//   1  input dock, data destination
//   2  output dock, instruction destination
//   3  output dock, data destination
//   4.. external destinations ext_dst[0..NEXT_DST-1]
// Fabric sources: input dock tokens, input dock data (never used: an input
// dock sends only tokens), output dock tokens, output dock data, then
// ext_src[0..NEXT_SRC-1].
//
// Timing: every handshake is valid/ready; a packet needs one cycle through
// the fabric. Status outputs show each dock's loop counters, flags, data
// latch and hatch, and one-cycle event pulses for observation.
module fleet_top
  import fleet_pkg::*;
#(
  parameter int unsigned NEXT_SRC   = 1,
  parameter int unsigned NEXT_DST   = 1,
  parameter int unsigned SHIP_DEPTH = 8,
  parameter int unsigned EF_DEPTH   = 2,
  parameter int unsigned IF_DEPTH   = 4,
  parameter int unsigned IN_DEPTH   = 4
) (
  input  logic    clk,
  input  logic    rst_n,
  input  logic    ext_src_valid [NEXT_SRC],
  output logic    ext_src_ready [NEXT_SRC],
  input  packet_t ext_src_pkt   [NEXT_SRC],
  output logic    ext_dst_valid [NEXT_DST],
  input  logic    ext_dst_ready [NEXT_DST],
  output packet_t ext_dst_pkt   [NEXT_DST],
  // status of the input dock [0] and the output dock [1]
  output logic [CNT_W-1:0] olc        [2],
  output ilc_t             ilc        [2],
  output logic [2:0]       flags      [2],
  output word_t            data_latch [2],
  output path_t            path       [2],
  output path_t            tapl       [2],
  output logic             sealed     [2],
  output logic             ev_torpedo [2],
  output logic             ev_iter    [2],
  output logic             ev_ignored [2],
  output logic             ev_requeue [2],
  output logic             ev_tail    [2]
);
  localparam int unsigned NSRC = 4 + NEXT_SRC;
  localparam int unsigned NDST = 4 + NEXT_DST;

  logic    src_valid [NSRC];
  logic    src_ready [NSRC];
  packet_t src_pkt   [NSRC];
  logic    dst_valid [NDST];
  logic    dst_ready [NDST];
  packet_t dst_pkt   [NDST];

  fleet_fabric #(.NSRC(NSRC), .NDST(NDST)) u_fabric (
    .clk, .rst_n,
    .src_valid_i (src_valid), .src_ready_o (src_ready), .src_pkt_i (src_pkt),
    .dst_valid_o (dst_valid), .dst_ready_i (dst_ready), .dst_pkt_o (dst_pkt)
  );

  for (genvar i = 0; i < NEXT_SRC; i++) begin : g_ext_src
    assign src_valid[4+i]   = ext_src_valid[i];
    assign src_pkt[4+i]     = ext_src_pkt[i];
    assign ext_src_ready[i] = src_ready[4+i];
  end
  for (genvar i = 0; i < NEXT_DST; i++) begin : g_ext_dst
    assign ext_dst_valid[i] = dst_valid[4+i];
    assign ext_dst_pkt[i]   = dst_pkt[4+i];
    assign dst_ready[4+i]   = ext_dst_ready[i];
  end

  // ship-side wiring: input dock -> FIFO ship -> output dock
  logic  sh_in_valid, sh_in_ready, sh_out_valid, sh_out_ready, sh_c;
  word_t sh_in_data, sh_out_data;

  fifo_ship #(.DEPTH(SHIP_DEPTH)) u_ship (
    .clk, .rst_n,
    .in_valid  (sh_in_valid),  .in_ready  (sh_in_ready),  .in_data (sh_in_data),
    .out_valid (sh_out_valid), .out_ready (sh_out_ready), .out_data(sh_out_data),
    .out_c     (sh_c)
  );

  logic unused_in_ready;
  word_t unused_out_data;
  logic  unused_out_valid;

  fleet_dock #(.IS_INPUT(1'b1), .EF_DEPTH(EF_DEPTH), .IF_DEPTH(IF_DEPTH), .IN_DEPTH(IN_DEPTH)) u_in_dock (
    .clk, .rst_n,
    .ins_valid_i (dst_valid[0]), .ins_ready_o (dst_ready[0]), .ins_pkt_i (dst_pkt[0]),
    .dst_valid_i (dst_valid[1]), .dst_ready_o (dst_ready[1]), .dst_pkt_i (dst_pkt[1]),
    .tok_valid_o (src_valid[0]), .tok_ready_i (src_ready[0]), .tok_pkt_o (src_pkt[0]),
    .dat_valid_o (src_valid[1]), .dat_ready_i (src_ready[1]), .dat_pkt_o (src_pkt[1]),
    .ship_in_valid_i  (1'b0),
    .ship_in_ready_o  (unused_in_ready),
    .ship_in_data_i   ('0),
    .ship_in_c_i      (1'b0),
    .ship_out_valid_o (sh_in_valid),
    .ship_out_ready_i (sh_in_ready),
    .ship_out_data_o  (sh_in_data),
    .olc_o (olc[0]), .ilc_o (ilc[0]), .flags_o (flags[0]), .data_latch_o (data_latch[0]),
    .path_o (path[0]), .tapl_o (tapl[0]),
    .sealed_o (sealed[0]),
    .ev_torpedo_o (ev_torpedo[0]), .ev_iter_o (ev_iter[0]), .ev_ignored_o (ev_ignored[0]),
    .ev_requeue_o (ev_requeue[0]), .ev_tail_o (ev_tail[0])
  );

  fleet_dock #(.IS_INPUT(1'b0), .EF_DEPTH(EF_DEPTH), .IF_DEPTH(IF_DEPTH), .IN_DEPTH(IN_DEPTH)) u_out_dock (
    .clk, .rst_n,
    .ins_valid_i (dst_valid[2]), .ins_ready_o (dst_ready[2]), .ins_pkt_i (dst_pkt[2]),
    .dst_valid_i (dst_valid[3]), .dst_ready_o (dst_ready[3]), .dst_pkt_i (dst_pkt[3]),
    .tok_valid_o (src_valid[2]), .tok_ready_i (src_ready[2]), .tok_pkt_o (src_pkt[2]),
    .dat_valid_o (src_valid[3]), .dat_ready_i (src_ready[3]), .dat_pkt_o (src_pkt[3]),
    .ship_in_valid_i  (sh_out_valid),
    .ship_in_ready_o  (sh_out_ready),
    .ship_in_data_i   (sh_out_data),
    .ship_in_c_i      (sh_c),
    .ship_out_valid_o (unused_out_valid),
    .ship_out_ready_i (1'b1),
    .ship_out_data_o  (unused_out_data),
    .olc_o (olc[1]), .ilc_o (ilc[1]), .flags_o (flags[1]), .data_latch_o (data_latch[1]),
    .path_o (path[1]), .tapl_o (tapl[1]),
    .sealed_o (sealed[1]),
    .ev_torpedo_o (ev_torpedo[1]), .ev_iter_o (ev_iter[1]), .ev_ignored_o (ev_ignored[1]),
    .ev_requeue_o (ev_requeue[1]), .ev_tail_o (ev_tail[1])
  );

endmodule
