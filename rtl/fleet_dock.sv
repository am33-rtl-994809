// fleet_dock: one FleetTwo dock, the programmable element between a ship and
// the switch fabric. IS_INPUT selects the kind:
//   input dock  (IS_INPUT = 1): packets arriving at the data destination are
//               buffered in a fifo; moves take them, can capture them in the
//               data latch and hand words to the ship; tokens go out along
//               the path.
//   output dock (IS_INPUT = 0): words come from the ship; tokens arriving at
//               the data destination wait in a small token store (only
//               their signal bit is kept); moves send data packets and
//               tokens along the path.
// Both kinds have two fabric destinations, instruction and data, and send
// packets into the fabric from a token source and, on an output dock, a data
// source. The pump (dock_pump: epilogue fifo, hatch, instruction fifo, on-deck
// stage, torpedo waiting area) feeds the execution unit (dock_exec: loop
// counters, flags, data latch, path latch, TAPL).
//
// The signal bit of an arriving packet is bit 0 of its path; it is kept with
// the packet and loads the C flag when a move takes it.
//
// Timing: all fabric- and ship-facing handshakes are valid/ready; all outputs
// toward the fabric and the ship come from registers.
//
// The split into input and output docks and their data flow follow the
// document's two dock diagrams. The buffer depths are this design's choice.
module fleet_dock
  import fleet_pkg::*;
#(
  parameter bit          IS_INPUT  = 1'b1,
  parameter int unsigned EF_DEPTH  = 2,
  parameter int unsigned IF_DEPTH  = 4,
  parameter int unsigned IN_DEPTH  = 4   // inbound data buffer / token store
) (
  input  logic    clk,
  input  logic    rst_n,
  // instruction destination
  input  logic    ins_valid_i,
  output logic    ins_ready_o,
  input  packet_t ins_pkt_i,
  // data destination
  input  logic    dst_valid_i,
  output logic    dst_ready_o,
  input  packet_t dst_pkt_i,
  // fabric sources
  output logic    tok_valid_o,
  input  logic    tok_ready_i,
  output packet_t tok_pkt_o,
  output logic    dat_valid_o,
  input  logic    dat_ready_i,
  output packet_t dat_pkt_o,
  // ship side
  input  logic    ship_in_valid_i,
  output logic    ship_in_ready_o,
  input  word_t   ship_in_data_i,
  input  logic    ship_in_c_i,
  output logic    ship_out_valid_o,
  input  logic    ship_out_ready_i,
  output word_t   ship_out_data_o,
  // status and events
  output logic [CNT_W-1:0] olc_o,
  output ilc_t    ilc_o,
  output logic [2:0] flags_o,       // {A, B, C}
  output word_t   data_latch_o,
  output path_t   path_o,
  output path_t   tapl_o,
  output logic    sealed_o,
  output logic    ev_torpedo_o,
  output logic    ev_iter_o,
  output logic    ev_ignored_o,
  output logic    ev_requeue_o,
  output logic    ev_tail_o
);

  logic   od_valid, exec_done, olc_zero, unseal, torpedo, torpedo_take;
  instr_t od_instr;
  word_t  od_lit;

  dock_pump #(.EF_DEPTH(EF_DEPTH), .IF_DEPTH(IF_DEPTH)) u_pump (
    .clk, .rst_n,
    .ins_valid_i     (ins_valid_i),
    .ins_ready_o     (ins_ready_o),
    .ins_token_i     (ins_pkt_i.token),
    .ins_instr_i     (ins_pkt_i.data[INSTR_W-1:0]),
    .od_exec_valid_o (od_valid),
    .od_instr_o      (od_instr),
    .od_literal_o    (od_lit),
    .exec_done_i     (exec_done),
    .olc_zero_i      (olc_zero),
    .unseal_i        (unseal),
    .torpedo_o       (torpedo),
    .torpedo_take_i  (torpedo_take),
    .sealed_o        (sealed_o),
    .requeue_o       (ev_requeue_o),
    .tail_o          (ev_tail_o)
  );

  // ---------------- inbound buffer at the data destination ----------------
  typedef struct packed {
    logic  signal;
    word_t data;
  } inbound_t;

  logic     fin_valid, fin_ready;
  inbound_t fin_head;

  if (IS_INPUT) begin : g_in_buf
    inbound_t in_d;
    assign in_d = '{signal: dst_pkt_i.path[0], data: dst_pkt_i.data};
    sync_fifo #(.T(inbound_t), .DEPTH(IN_DEPTH)) u_dbuf (
      .clk, .rst_n,
      .in_valid (dst_valid_i), .in_ready (dst_ready_o), .in_data (in_d),
      .out_valid(fin_valid), .out_ready(fin_ready), .out_data(fin_head),
      .count    ()
    );
  end else begin : g_tok_store
    logic sig_head;
    sync_fifo #(.T(logic), .DEPTH(IN_DEPTH)) u_tstore (
      .clk, .rst_n,
      .in_valid (dst_valid_i), .in_ready (dst_ready_o), .in_data (dst_pkt_i.path[0]),
      .out_valid(fin_valid), .out_ready(fin_ready), .out_data(sig_head),
      .count    ()
    );
    assign fin_head = '{signal: sig_head, data: '0};
  end

  // ---------------- execution ----------------
  path_t tok_path, dat_path;
  word_t dat_data;
  logic  fa, fb, fc;

  dock_exec #(.IS_INPUT(IS_INPUT)) u_exec (
    .clk, .rst_n,
    .od_valid_i       (od_valid),
    .od_instr_i       (od_instr),
    .od_literal_i     (od_lit),
    .exec_done_o      (exec_done),
    .olc_zero_o       (olc_zero),
    .unseal_o         (unseal),
    .torpedo_i        (torpedo),
    .torpedo_take_o   (torpedo_take),
    .fab_in_valid_i   (fin_valid),
    .fab_in_ready_o   (fin_ready),
    .fab_in_signal_i  (fin_head.signal),
    .fab_in_data_i    (fin_head.data),
    .ship_in_valid_i  (ship_in_valid_i),
    .ship_in_ready_o  (ship_in_ready_o),
    .ship_in_data_i   (ship_in_data_i),
    .ship_in_c_i      (ship_in_c_i),
    .ship_out_valid_o (ship_out_valid_o),
    .ship_out_ready_i (ship_out_ready_i),
    .ship_out_data_o  (ship_out_data_o),
    .tok_valid_o      (tok_valid_o),
    .tok_ready_i      (tok_ready_i),
    .tok_path_o       (tok_path),
    .dat_valid_o      (dat_valid_o),
    .dat_ready_i      (dat_ready_i),
    .dat_path_o       (dat_path),
    .dat_data_o       (dat_data),
    .olc_o            (olc_o),
    .ilc_o            (ilc_o),
    .flag_a_o         (fa),
    .flag_b_o         (fb),
    .flag_c_o         (fc),
    .data_latch_o     (data_latch_o),
    .path_o           (path_o),
    .tapl_o           (tapl_o),
    .ev_torpedo_o     (ev_torpedo_o),
    .ev_iter_o        (ev_iter_o),
    .ev_ignored_o     (ev_ignored_o)
  );

  assign flags_o   = {fa, fb, fc};
  assign tok_pkt_o = '{path: tok_path, token: 1'b1, data: '0};
  assign dat_pkt_o = '{path: dat_path, token: 1'b0, data: dat_data};

endmodule
