// dock_exec: the execution process of the on-deck stage of a FleetTwo dock,
// with the dock's architected state: outer loop counter (OLC), inner loop
// counter (ILC, 0..MAX_ILC or infinity), flags A, B and C, the data latch,
// the path latch and the torpedo acknowledgment path latch (TAPL).
//
// For the instruction on deck (od_valid_i) it works through, in order:
//   1. the predicate (bits 24:22) against OLC and the flags; if it fails the
//      instruction is ignored;
//   2. for an interruptible move (I = 1) with a torpedo waiting: consume the
//      torpedo, OLC <= 0, ILC <= 1, unseal the hatch and send a token along
//      TAPL;
//   3. a move with ILC = 0 does nothing; other instructions execute.
// set and shift take one cycle. A move runs ILC iterations (forever for
// ILC = infinity, until a torpedo), and ILC is 1 again afterwards. One
// iteration happens in a cycle where all it needs is there:
//   Ti  wait for a token from the fabric       (both dock kinds)
//   Di  wait for a datum: from the fabric on an input dock, from the ship
//       on an output dock
//   Dc  capture the datum of Di into the data latch
//   Do  output the data latch (or the datum just captured): to the ship on
//       an input dock, as a packet along the path on an output dock
//   To  send a token along the path
// The path latch is updated first: moveto loads the 13-bit immediate,
// dispatch loads bits 37:25 of the data predecessor (the word arriving for
// Di), plain move keeps it. The C flag is loaded from what the iteration
// received: the signal bit of a fabric packet, or, for Di on an output dock
// without Ti, the ship's flag input.
//
// Interface: the fabric inbound head (fab_in_*), the ship-side input (ship_in_*,
// output dock) and output (ship_out_*, input dock), and two packet sources
// into the fabric, one for tokens and one for data (output dock). All three
// outputs come from holding registers, so no valid depends on a ready; an
// iteration may refill a register in the cycle it drains. exec_done_o is
// combinational and tells the pump that execution ended this cycle.
//
// From the document: the predicate table, the on-deck execution order, the
// loop counter rules, the set and shift encodings and effects, flag update,
// TAPL and torpedo handling. The move fields are named by the document but
// their detailed rules are this design's reading of the names: which side
// each field talks to, that Dc captures only the Di datum, that C is loaded
// on every iteration that receives something, that I = 1 means
// interruptible and only moves can be interrupted, that OLC-1 at zero stays
// zero, that the unused predicates 100 and 101 never execute, and the reset
// values (OLC 0, ILC 1, flags 0, latches 0).
module dock_exec
  import fleet_pkg::*;
#(
  parameter bit IS_INPUT = 1'b1   // 1: input dock (fabric -> ship), 0: output dock
) (
  input  logic   clk,
  input  logic   rst_n,
  // on-deck instruction from the pump
  input  logic   od_valid_i,
  input  instr_t od_instr_i,
  input  word_t  od_literal_i,
  output logic   exec_done_o,
  output logic   olc_zero_o,
  output logic   unseal_o,
  input  logic   torpedo_i,
  output logic   torpedo_take_o,
  // inbound head from the fabric (input dock: data buffer; output dock: token store)
  input  logic   fab_in_valid_i,
  output logic   fab_in_ready_o,
  input  logic   fab_in_signal_i,
  input  word_t  fab_in_data_i,
  // ship -> dock (output dock)
  input  logic   ship_in_valid_i,
  output logic   ship_in_ready_o,
  input  word_t  ship_in_data_i,
  input  logic   ship_in_c_i,
  // dock -> ship (input dock)
  output logic   ship_out_valid_o,
  input  logic   ship_out_ready_i,
  output word_t  ship_out_data_o,
  // token source into the fabric
  output logic   tok_valid_o,
  input  logic   tok_ready_i,
  output path_t  tok_path_o,
  // data source into the fabric (output dock)
  output logic   dat_valid_o,
  input  logic   dat_ready_i,
  output path_t  dat_path_o,
  output word_t  dat_data_o,
  // architected state, for observation
  output logic [CNT_W-1:0] olc_o,
  output ilc_t   ilc_o,
  output logic   flag_a_o,
  output logic   flag_b_o,
  output logic   flag_c_o,
  output word_t  data_latch_o,
  output path_t  path_o,
  output path_t  tapl_o,
  // events, one cycle each
  output logic   ev_torpedo_o,
  output logic   ev_iter_o,
  output logic   ev_ignored_o
);

  logic [CNT_W-1:0] olc_q;
  ilc_t             ilc_q;
  logic             a_q, b_q, c_q;
  word_t            dl_q;
  path_t            path_q, tapl_q;
  logic             started_q;

  // output holding registers
  logic  tok_v_q, dat_v_q, sho_v_q;
  path_t tok_p_q, dat_p_q;
  word_t dat_d_q, sho_d_q;
  logic  tok_free, dat_free, sho_free;
  assign tok_free = !tok_v_q || tok_ready_i;
  assign dat_free = !dat_v_q || dat_ready_i;
  assign sho_free = !sho_v_q || ship_out_ready_i;

  // ---------------- decode ----------------
  op_e   op;
  pred_e pred;
  logic  ti, di, dc, dout, to, is_moveto, is_dispatch;
  assign op          = instr_op(od_instr_i);
  assign pred        = instr_pred(od_instr_i);
  assign ti          = mv_ti(od_instr_i);
  assign di          = mv_di(od_instr_i);
  assign dc          = mv_dc(od_instr_i);
  assign dout        = mv_do(od_instr_i);
  assign to          = mv_to(od_instr_i);
  assign is_moveto   = od_instr_i[13];
  assign is_dispatch = !od_instr_i[13] && od_instr_i[12];

  logic olc_nz, pred_ok;
  assign olc_nz = (olc_q != '0);
  always_comb begin
    unique case (pred)
      PRED_A0:     pred_ok = olc_nz && !a_q;
      PRED_A1:     pred_ok = olc_nz &&  a_q;
      PRED_B0:     pred_ok = olc_nz && !b_q;
      PRED_B1:     pred_ok = olc_nz &&  b_q;
      PRED_OLCNZ:  pred_ok = olc_nz;
      PRED_ALWAYS: pred_ok = 1'b1;
      default:     pred_ok = 1'b0;   // 100 and 101 are unused
    endcase
  end

  // ---------------- move iteration readiness ----------------
  // Sources of the iteration's inputs, by dock kind.
  logic  need_fab, need_ship, need_pred, pred_valid;
  word_t pred_word;
  always_comb begin
    if (IS_INPUT) begin
      need_fab   = ti || di;
      need_ship  = 1'b0;
      pred_word  = fab_in_data_i;
      pred_valid = fab_in_valid_i;
    end else begin
      need_fab   = ti;
      need_ship  = di;
      pred_word  = ship_in_data_i;
      pred_valid = ship_in_valid_i;
    end
    need_pred = is_dispatch;
  end

  logic can_fire;
  always_comb begin
    can_fire = (!need_fab  || fab_in_valid_i)
            && (!need_ship || ship_in_valid_i)
            && (!need_pred || pred_valid)
            && (!to || tok_free);
    if (IS_INPUT) can_fire = can_fire && (!dout || sho_free);
    else          can_fire = can_fire && (!dout || dat_free);
  end

  // ---------------- control ----------------
  logic go, is_move, torp_now, skip_move, fire, move_last, do_setshift;
  assign go          = od_valid_i && (started_q || pred_ok);
  assign is_move     = (op == OP_MOVE);
  assign torp_now    = go && is_move && instr_i(od_instr_i) && torpedo_i;
  assign skip_move   = go && is_move && !torp_now && !started_q
                       && !ilc_q.inf && (ilc_q.n == '0);
  assign fire        = go && is_move && !torp_now && !skip_move && can_fire;
  assign move_last   = !ilc_q.inf && (ilc_q.n <= CNT_W'(1));
  assign do_setshift = go && !is_move;

  assign torpedo_take_o = torp_now && tok_free;
  assign exec_done_o    = od_valid_i && (!go || do_setshift || skip_move
                                         || torpedo_take_o || (fire && move_last));
  assign fab_in_ready_o  = fire && need_fab;
  assign ship_in_ready_o = fire && need_ship;

  // path for this iteration
  path_t path_next;
  always_comb begin
    path_next = path_q;
    if (is_moveto)        path_next = od_instr_i[PATH_W-1:0];
    else if (is_dispatch) path_next = pred_word[WORD_W-1 -: PATH_W];
  end

  // datum captured / sent this iteration
  word_t in_word, out_word;
  assign in_word  = IS_INPUT ? fab_in_data_i : ship_in_data_i;
  assign out_word = (di && dc) ? in_word : dl_q;

  // ---------------- set decode ----------------
  logic [18:0] body;
  assign body = od_instr_i[18:0];
  logic set_olc, set_ilc, set_dl, set_flags, set_tapl_imm, set_tapl_dl;
  assign set_olc   = (op == OP_SET) && (body[18:14] == 5'b10000);
  assign set_ilc   = (op == OP_SET) && (body[18:14] == 5'b01000);
  assign set_dl    = (op == OP_SET) && (body[18:14] == 5'b00100);
  assign set_flags = (op == OP_SET) && (body[18:14] == 5'b00010);
  // the two TAPL variants use a 6-bit destination field, bits 19:14
  assign set_tapl_imm = (op == OP_SET) && (body[18:13] == 6'b000010);
  assign set_tapl_dl  = (op == OP_SET) && (body[18:13] == 6'b000001);

  logic [5:0] flag_in;
  assign flag_in = {a_q, !a_q, b_q, !b_q, c_q, !c_q};

  // new OLC value, and whether OLC is written this cycle
  logic             olc_we;
  logic [CNT_W-1:0] olc_d;
  always_comb begin
    olc_we = 1'b0;
    olc_d  = olc_q;
    if (torpedo_take_o) begin
      olc_we = 1'b1;
      olc_d  = '0;
    end else if (do_setshift && set_olc) begin
      unique case (body[13:11])
        3'b100: begin olc_we = 1'b1; olc_d = od_literal_i[CNT_W-1:0]; end
        3'b010: begin olc_we = 1'b1; olc_d = dl_q[CNT_W-1:0]; end
        3'b001: begin olc_we = 1'b1; olc_d = olc_nz ? olc_q - 1'b1 : '0; end
        default: ;
      endcase
    end
  end
  assign unseal_o   = olc_we && (olc_d == '0);
  assign olc_zero_o = !olc_nz;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      olc_q     <= '0;
      ilc_q     <= '{inf: 1'b0, n: CNT_W'(1)};
      a_q       <= 1'b0;
      b_q       <= 1'b0;
      c_q       <= 1'b0;
      dl_q      <= '0;
      path_q    <= '0;
      tapl_q    <= '0;
      started_q <= 1'b0;
    end else begin
      if (olc_we) olc_q <= olc_d;

      if (torpedo_take_o || skip_move) begin
        ilc_q     <= '{inf: 1'b0, n: CNT_W'(1)};
        started_q <= 1'b0;
      end else if (fire) begin
        if (move_last) begin
          ilc_q     <= '{inf: 1'b0, n: CNT_W'(1)};
          started_q <= 1'b0;
        end else begin
          started_q <= 1'b1;
          if (!ilc_q.inf) ilc_q.n <= ilc_q.n - 1'b1;
        end
        path_q <= path_next;
        if (di && dc) dl_q <= in_word;
        if (need_fab)       c_q <= fab_in_signal_i;
        else if (need_ship) c_q <= ship_in_c_i;
      end else if (go && is_move) begin
        started_q <= 1'b1;   // predicate passed; keep it while waiting
      end

      if (do_setshift) begin
        if (op == OP_SHIFT)
          dl_q <= {dl_q[WORD_W-SHIFT_W-1:0], od_literal_i[SHIFT_W-1:0]};
        if (set_ilc) begin
          unique case (body[13:11])
            3'b100:  ilc_q <= body[6] ? '{inf: 1'b1, n: '0}
                                      : '{inf: 1'b0, n: od_literal_i[CNT_W-1:0]};
            3'b010:  ilc_q <= '{inf: 1'b0, n: dl_q[CNT_W-1:0]};
            default: ;
          endcase
        end
        if (set_dl) dl_q <= od_literal_i;
        if (set_flags) begin
          a_q <= |(body[11:6] & flag_in);
          b_q <= |(body[5:0]  & flag_in);
        end
        if (set_tapl_imm) tapl_q <= od_literal_i[PATH_W-1:0];
        if (set_tapl_dl)  tapl_q <= dl_q[PATH_W-1:0];
      end
    end
  end

  // ---------------- output holding registers ----------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tok_v_q <= 1'b0; tok_p_q <= '0;
      dat_v_q <= 1'b0; dat_p_q <= '0; dat_d_q <= '0;
      sho_v_q <= 1'b0; sho_d_q <= '0;
    end else begin
      if (torpedo_take_o) begin
        tok_v_q <= 1'b1; tok_p_q <= tapl_q;
      end else if (fire && to) begin
        tok_v_q <= 1'b1; tok_p_q <= path_next;
      end else if (tok_ready_i) begin
        tok_v_q <= 1'b0;
      end

      if (!IS_INPUT && fire && dout) begin
        dat_v_q <= 1'b1; dat_p_q <= path_next; dat_d_q <= out_word;
      end else if (dat_ready_i) begin
        dat_v_q <= 1'b0;
      end

      if (IS_INPUT && fire && dout) begin
        sho_v_q <= 1'b1; sho_d_q <= out_word;
      end else if (ship_out_ready_i) begin
        sho_v_q <= 1'b0;
      end
    end
  end

  assign tok_valid_o      = tok_v_q;
  assign tok_path_o       = tok_p_q;
  assign dat_valid_o      = dat_v_q;
  assign dat_path_o       = dat_p_q;
  assign dat_data_o       = dat_d_q;
  assign ship_out_valid_o = sho_v_q;
  assign ship_out_data_o  = sho_d_q;

  assign olc_o        = olc_q;
  assign ilc_o        = ilc_q;
  assign flag_a_o     = a_q;
  assign flag_b_o     = b_q;
  assign flag_c_o     = c_q;
  assign data_latch_o = dl_q;
  assign path_o       = path_q;
  assign tapl_o       = tapl_q;

  assign ev_torpedo_o = torpedo_take_o;
  assign ev_iter_o    = fire;
  assign ev_ignored_o = od_valid_i && !go;

  // tail never reaches the on-deck stage
  a_no_tail_on_deck: assert property (@(posedge clk) disable iff (!rst_n)
    od_valid_i |-> op != OP_TAIL);

endmodule
