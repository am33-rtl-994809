// dock_pump: the instruction side of a FleetTwo dock.
//
// Instructions arriving at the dock's instruction destination enter the
// epilogue fifo (EF). A token arriving there is a torpedo: it does not enter
// EF but waits in a one-place waiting area until the on-deck execution
// consumes it. Between EF and the instruction fifo (IF) sits the hatch, a
// two-input mux with a sealed/unsealed state:
//   * unsealed (the state after reset): the head of EF may move on. A tail
//     instruction at the head seals the hatch and is dropped; any other
//     instruction enters IF.
//   * sealed: EF is held, and the only input to IF is the requeue path from
//     the on-deck stage. The hatch is unsealed by the execution unit whenever
//     the outer loop counter is written with zero (unseal_i).
// The head of IF moves to the on-deck stage (OD), where a literal latch is
// loaded with the instruction's literal at the same time. While an
// instruction is on deck two processes run, and the next instruction comes on
// deck only when both have finished:
//   * requeue: nothing if OLC = 0 or the instruction is one-shot, otherwise
//     wait for the hatch to be sealed (and for IF to have room) and enqueue a
//     copy of the instruction into IF. The OLC test is repeated every cycle,
//     so a requeue still waiting when OLC reaches zero ends without a copy.
//   * execution: done by dock_exec, which raises exec_done_i in the cycle it
//     finishes. od_exec_valid_o is high while execution is pending.
//
// Timing: an instruction accepted from the fabric in cycle t is at the head of
// EF in t+1, in IF in t+2 and on deck in t+3 at the earliest. An
// instruction whose execution and requeue end in cycle t leaves OD at the
// end of t; the next one can be on deck in t+1.
//
// From the document: EF, IF, OD, the hatch and its sealing rules, torpedoes
// and the waiting area, the on-deck processes and the literal latch. This
// design's choices: fifo depths, a one-place waiting area, a torpedo being
// accepted even when EF is full, and a tail waiting in EF while the hatch is
// sealed like every other instruction.
module dock_pump
  import fleet_pkg::*;
#(
  parameter int unsigned EF_DEPTH = 2,
  parameter int unsigned IF_DEPTH = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  // instruction destination (from the switch fabric)
  input  logic   ins_valid_i,
  output logic   ins_ready_o,
  input  logic   ins_token_i,      // token => torpedo
  input  instr_t ins_instr_i,
  // on-deck stage towards the execution unit
  output logic   od_exec_valid_o,  // instruction on deck, execution pending
  output instr_t od_instr_o,
  output word_t  od_literal_o,     // literal latch
  input  logic   exec_done_i,      // execution finishes this cycle
  // loop/hatch control from the execution unit
  input  logic   olc_zero_i,
  input  logic   unseal_i,
  // torpedo waiting area
  output logic   torpedo_o,
  input  logic   torpedo_take_i,
  // status
  output logic   sealed_o,
  output logic   requeue_o,        // a copy is requeued this cycle
  output logic   tail_o            // a tail seals the hatch this cycle
);

  // ---------------- epilogue fifo and torpedo waiting area ----------------
  logic   ef_in_valid, ef_in_ready, ef_out_valid, ef_out_ready;
  instr_t ef_out;
  logic   torp_q;

  assign ef_in_valid = ins_valid_i && !ins_token_i;
  assign ins_ready_o = ins_token_i ? !torp_q : ef_in_ready;

  sync_fifo #(.T(instr_t), .DEPTH(EF_DEPTH)) u_ef (
    .clk, .rst_n,
    .in_valid (ef_in_valid), .in_ready (ef_in_ready), .in_data (ins_instr_i),
    .out_valid(ef_out_valid), .out_ready(ef_out_ready), .out_data(ef_out),
    .count    ()
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)                                   torp_q <= 1'b0;
    else if (ins_valid_i && ins_token_i && !torp_q) torp_q <= 1'b1;
    else if (torpedo_take_i)                      torp_q <= 1'b0;
  end
  assign torpedo_o = torp_q;

  // ---------------- hatch ----------------
  logic sealed_q;
  logic ef_is_tail;
  logic if_in_valid, if_in_ready, if_out_valid, if_out_ready;
  instr_t if_in;

  assign ef_is_tail = (instr_op(ef_out) == OP_TAIL);
  assign tail_o     = !sealed_q && ef_out_valid && ef_is_tail;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)        sealed_q <= 1'b0;
    else if (tail_o)   sealed_q <= 1'b1;
    else if (unseal_i) sealed_q <= 1'b0;
  end
  assign sealed_o = sealed_q;

  // ---------------- on deck ----------------
  logic   od_valid_q, rq_done_q, ex_done_q;
  instr_t od_instr_q;
  word_t  od_lit_q;
  logic   rq_want, rq_complete, ex_complete, od_free;

  assign rq_want     = od_valid_q && !rq_done_q && !olc_zero_i && !instr_os(od_instr_q);
  assign requeue_o   = rq_want && sealed_q && if_in_ready;
  assign rq_complete = rq_done_q || !rq_want || requeue_o;
  assign ex_complete = ex_done_q || exec_done_i;
  assign od_free     = !od_valid_q || (rq_complete && ex_complete);

  // IF input mux: EF when unsealed, requeued copy when sealed
  assign ef_out_ready = !sealed_q && (ef_is_tail || if_in_ready);
  assign if_in_valid  = sealed_q ? requeue_o : (ef_out_valid && !ef_is_tail);
  assign if_in        = sealed_q ? od_instr_q : ef_out;

  instr_t if_out;
  sync_fifo #(.T(instr_t), .DEPTH(IF_DEPTH)) u_if (
    .clk, .rst_n,
    .in_valid (if_in_valid), .in_ready (if_in_ready), .in_data (if_in),
    .out_valid(if_out_valid), .out_ready(if_out_ready), .out_data(if_out),
    .count    ()
  );
  assign if_out_ready = od_free;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      od_valid_q <= 1'b0;
      rq_done_q  <= 1'b0;
      ex_done_q  <= 1'b0;
      od_instr_q <= '0;
      od_lit_q   <= '0;
    end else if (od_free) begin
      od_valid_q <= if_out_valid;
      rq_done_q  <= 1'b0;
      ex_done_q  <= 1'b0;
      if (if_out_valid) begin
        od_instr_q <= if_out;
        od_lit_q   <= literal_of(if_out);
      end
    end else begin
      rq_done_q <= rq_complete;
      ex_done_q <= ex_complete;
    end
  end

  assign od_exec_valid_o = od_valid_q && !ex_done_q;
  assign od_instr_o      = od_instr_q;
  assign od_literal_o    = od_lit_q;

  // The requeue path only ever feeds IF while the hatch is sealed.
  a_requeue_sealed: assert property (@(posedge clk) disable iff (!rst_n)
    requeue_o |-> sealed_q);
  a_no_tail_in_if: assert property (@(posedge clk) disable iff (!rst_n)
    if_in_valid && if_in_ready |-> instr_op(if_in) != OP_TAIL);

endmodule
