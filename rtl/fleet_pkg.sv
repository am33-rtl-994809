// fleet_pkg: widths, packet and instruction types, and decode helpers shared
// by the FleetTwo dock, the switch fabric and the top level.
//
// Bit numbering: the instruction format numbers bits 26 (left) down to 1.
// Here bit n of that numbering is index n-1 of a [25:0] vector, so the
// opcode bits 21:20 are instr[20:19], the set destination 19:15 is
// instr[18:14], and so on. Machine words are 37 bits ([36:0]); a word holds
// an instruction in its low 26 bits and, for dispatch, a path in bits 37:25
// of the 1-based numbering, i.e. word[36:24].
//
// Instruction classes (bits 21:20): 00 shift, 10 set, 01 move, 11 tail.
// The code for tail is this design's choice: it is the one pair left.
package fleet_pkg;

  localparam int unsigned INSTR_W = 26;   // instruction width
  localparam int unsigned WORD_W  = 37;   // machine word: 26-bit instruction + path bits
  localparam int unsigned PATH_W  = 13;   // path latch / TAPL width (13-bit path immediates)
  localparam int unsigned CNT_W   = 6;    // OLC and ILC immediates are 6 bits wide
  localparam int unsigned SHIFT_W = 19;   // shift immediate
  localparam int unsigned LIT_W   = 13;   // set data-latch / TAPL immediate

  typedef logic [INSTR_W-1:0] instr_t;
  typedef logic [WORD_W-1:0]  word_t;
  typedef logic [PATH_W-1:0]  path_t;

  // A packet in the switch fabric: a path and one word. Tokens carry no
  // meaningful payload. path[0] is the signal bit, path[PATH_W-1:1] selects
  // the destination.
  typedef struct packed {
    path_t path;
    logic  token;
    word_t data;
  } packet_t;

  typedef enum logic [1:0] {
    OP_SHIFT = 2'b00,
    OP_MOVE  = 2'b01,
    OP_SET   = 2'b10,
    OP_TAIL  = 2'b11
  } op_e;

  // Predicate codes (bits 24:22).
  typedef enum logic [2:0] {
    PRED_A0     = 3'b000,
    PRED_A1     = 3'b001,
    PRED_B0     = 3'b010,
    PRED_B1     = 3'b011,
    PRED_RSV4   = 3'b100,
    PRED_RSV5   = 3'b101,
    PRED_OLCNZ  = 3'b110,
    PRED_ALWAYS = 3'b111
  } pred_e;

  // Inner loop counter: a count 0..MAX_ILC or infinity.
  typedef struct packed {
    logic             inf;
    logic [CNT_W-1:0] n;
  } ilc_t;

  function automatic op_e instr_op(instr_t i);
    return op_e'(i[20:19]);
  endfunction

  function automatic logic instr_i(instr_t i);   // interruptible (move only)
    return i[25];
  endfunction

  function automatic logic instr_os(instr_t i);  // one-shot
    return i[24];
  endfunction

  function automatic pred_e instr_pred(instr_t i);
    return pred_e'(i[23:21]);
  endfunction

  // Move flags, bits 19..15: Ti Di Dc Do To.
  function automatic logic mv_ti(instr_t i); return i[18]; endfunction
  function automatic logic mv_di(instr_t i); return i[17]; endfunction
  function automatic logic mv_dc(instr_t i); return i[16]; endfunction
  function automatic logic mv_do(instr_t i); return i[15]; endfunction
  function automatic logic mv_to(instr_t i); return i[14]; endfunction

  // Literal latch contents for shift and set, worked out when the
  // instruction comes on deck.
  //   shift: the 19-bit immediate (bits 19:1)
  //   set data latch: 13-bit immediate (bits 13:1) extended with bit 14
  //   anything else: the 13-bit immediate (bits 13:1), zero-extended
  function automatic word_t literal_of(instr_t i);
    word_t w;
    if (instr_op(i) == OP_SHIFT)
      w = word_t'(i[SHIFT_W-1:0]);
    else if (instr_op(i) == OP_SET && i[18:14] == 5'b00100)
      w = {{(WORD_W-LIT_W){i[13]}}, i[LIT_W-1:0]};
    else
      w = word_t'(i[LIT_W-1:0]);
    return w;
  endfunction

  // Build instructions (used by testbenches and documentation).
  function automatic instr_t mk_shift(logic os, pred_e p, logic [SHIFT_W-1:0] imm);
    return {1'b0, os, p, 2'b00, imm};
  endfunction

  function automatic instr_t mk_set(logic os, pred_e p, logic [18:0] body);
    return {1'b0, os, p, 2'b10, body};
  endfunction

  function automatic instr_t mk_tail();
    return {1'b0, 1'b0, PRED_ALWAYS, 2'b11, 19'd0};
  endfunction

  // pathsel: 2'b00 keep path, 2'b01 dispatch, 2'b1x moveto (immediate)
  function automatic instr_t mk_move(logic irq, logic os, pred_e p,
                                     logic ti, logic di, logic dc, logic dout, logic to,
                                     logic [1:0] pathsel, path_t imm);
    logic [13:0] low;
    if (pathsel[1]) low = {1'b1, imm};
    else            low = {1'b0, pathsel[0], 12'd0};
    return {irq, os, p, 2'b01, ti, di, dc, dout, to, low};
  endfunction

endpackage
