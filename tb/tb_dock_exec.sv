// tb_dock_exec: self-checking test of the on-deck execution unit, one input
// dock instance (ui) and one output dock instance (uo). The test presents
// instructions as the pump would and plays the fabric and the ship with
// arrays read and written through nonblocking index updates. Expected values
// are worked out here from the instruction set: predicate table, set
// variants, shift, flag update, move iterations with ILC counts, path
// selection, C flag sources, torpedo handling, and one iteration per cycle
// when nothing stalls.
module tb_dock_exec;
  import fleet_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int cycle = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cycle <= cycle + 1;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ------------------------------------------------------------------
  // signals of one instance
  // ------------------------------------------------------------------
  typedef struct {
    logic od_valid; instr_t od_instr; word_t od_lit;
    logic torpedo;
    logic sho_ready, tok_ready, dat_ready;
    logic ship_c;
  } drive_t;

  drive_t di_, do_;   // drives of ui and uo

  // outputs
  logic i_done, i_olcz, i_unseal, i_take, i_fin_ready, i_shin_ready, i_sho_v, i_tok_v, i_dat_v;
  logic o_done, o_olcz, o_unseal, o_take, o_fin_ready, o_shin_ready, o_sho_v, o_tok_v, o_dat_v;
  word_t i_sho_d, o_sho_d, i_dat_d, o_dat_d, i_dl, o_dl;
  path_t i_tok_p, o_tok_p, i_dat_p, o_dat_p, i_path, o_path, i_tapl, o_tapl;
  logic [CNT_W-1:0] i_olc, o_olc;
  ilc_t i_ilc, o_ilc;
  logic i_a, i_b, i_c, o_a, o_b, o_c;
  logic i_evt, i_evi, i_evg, o_evt, o_evi, o_evg;

  // fabric inbound arrays (signal bit, data)
  word_t i_fin_mem [64]; logic i_fin_sig [64]; int i_fin_wr = 0, i_fin_rd = 0;
  logic  o_fin_sig [64]; int o_fin_wr = 0, o_fin_rd = 0;
  // ship inbound for uo
  word_t o_shin_mem [64]; int o_shin_wr = 0, o_shin_rd = 0;
  // sinks
  word_t i_sho_got [64]; int i_sho_n = 0;
  path_t i_tok_got [64]; int i_tok_n = 0;
  path_t o_tok_got [64]; int o_tok_n = 0;
  path_t o_dat_pg [64]; word_t o_dat_dg [64]; int o_dat_n = 0;
  int i_iter_n = 0, o_iter_n = 0, i_unseal_n = 0, o_unseal_n = 0;

  dock_exec #(.IS_INPUT(1'b1)) ui (
    .clk, .rst_n,
    .od_valid_i (di_.od_valid), .od_instr_i (di_.od_instr), .od_literal_i (di_.od_lit),
    .exec_done_o (i_done), .olc_zero_o (i_olcz), .unseal_o (i_unseal),
    .torpedo_i (di_.torpedo), .torpedo_take_o (i_take),
    .fab_in_valid_i (i_fin_rd < i_fin_wr), .fab_in_ready_o (i_fin_ready),
    .fab_in_signal_i (i_fin_sig[i_fin_rd % 64]), .fab_in_data_i (i_fin_mem[i_fin_rd % 64]),
    .ship_in_valid_i (1'b0), .ship_in_ready_o (i_shin_ready), .ship_in_data_i ('0), .ship_in_c_i (1'b0),
    .ship_out_valid_o (i_sho_v), .ship_out_ready_i (di_.sho_ready), .ship_out_data_o (i_sho_d),
    .tok_valid_o (i_tok_v), .tok_ready_i (di_.tok_ready), .tok_path_o (i_tok_p),
    .dat_valid_o (i_dat_v), .dat_ready_i (di_.dat_ready), .dat_path_o (i_dat_p), .dat_data_o (i_dat_d),
    .olc_o (i_olc), .ilc_o (i_ilc), .flag_a_o (i_a), .flag_b_o (i_b), .flag_c_o (i_c),
    .data_latch_o (i_dl), .path_o (i_path), .tapl_o (i_tapl),
    .ev_torpedo_o (i_evt), .ev_iter_o (i_evi), .ev_ignored_o (i_evg)
  );

  dock_exec #(.IS_INPUT(1'b0)) uo (
    .clk, .rst_n,
    .od_valid_i (do_.od_valid), .od_instr_i (do_.od_instr), .od_literal_i (do_.od_lit),
    .exec_done_o (o_done), .olc_zero_o (o_olcz), .unseal_o (o_unseal),
    .torpedo_i (do_.torpedo), .torpedo_take_o (o_take),
    .fab_in_valid_i (o_fin_rd < o_fin_wr), .fab_in_ready_o (o_fin_ready),
    .fab_in_signal_i (o_fin_sig[o_fin_rd % 64]), .fab_in_data_i ('0),
    .ship_in_valid_i (o_shin_rd < o_shin_wr), .ship_in_ready_o (o_shin_ready),
    .ship_in_data_i (o_shin_mem[o_shin_rd % 64]), .ship_in_c_i (do_.ship_c),
    .ship_out_valid_o (o_sho_v), .ship_out_ready_i (do_.sho_ready), .ship_out_data_o (o_sho_d),
    .tok_valid_o (o_tok_v), .tok_ready_i (do_.tok_ready), .tok_path_o (o_tok_p),
    .dat_valid_o (o_dat_v), .dat_ready_i (do_.dat_ready), .dat_path_o (o_dat_p), .dat_data_o (o_dat_d),
    .olc_o (o_olc), .ilc_o (o_ilc), .flag_a_o (o_a), .flag_b_o (o_b), .flag_c_o (o_c),
    .data_latch_o (o_dl), .path_o (o_path), .tapl_o (o_tapl),
    .ev_torpedo_o (o_evt), .ev_iter_o (o_evi), .ev_ignored_o (o_evg)
  );

  // environment: pops and sink captures at the clock edge, via nonblocking updates
  always @(posedge clk) if (rst_n) begin
    if (i_fin_ready) i_fin_rd <= i_fin_rd + 1;
    if (o_fin_ready) o_fin_rd <= o_fin_rd + 1;
    if (o_shin_ready) o_shin_rd <= o_shin_rd + 1;
    if (i_sho_v && di_.sho_ready) begin i_sho_got[i_sho_n] <= i_sho_d; i_sho_n <= i_sho_n + 1; end
    if (i_tok_v && di_.tok_ready) begin i_tok_got[i_tok_n] <= i_tok_p; i_tok_n <= i_tok_n + 1; end
    if (o_tok_v && do_.tok_ready) begin o_tok_got[o_tok_n] <= o_tok_p; o_tok_n <= o_tok_n + 1; end
    if (o_dat_v && do_.dat_ready) begin
      o_dat_pg[o_dat_n] <= o_dat_p; o_dat_dg[o_dat_n] <= o_dat_d; o_dat_n <= o_dat_n + 1;
    end
    if (i_evi) i_iter_n <= i_iter_n + 1;
    if (o_evi) o_iter_n <= o_iter_n + 1;
    if (i_unseal) i_unseal_n <= i_unseal_n + 1;
    if (o_unseal) o_unseal_n <= o_unseal_n + 1;
    check(!(i_dat_v), "an input dock sends no data packets");
    check(!(o_sho_v), "an output dock hands nothing to a ship");
  end

  // run one instruction on the input dock instance; returns cycles taken
  task automatic run_i(instr_t ins, output int cyc);
    int t0;
    di_.od_valid = 1; di_.od_instr = ins; di_.od_lit = literal_of(ins);
    t0 = cycle;
    #1;
    while (!i_done) begin @(negedge clk); #1; if (cycle - t0 > 200) break; end
    cyc = cycle - t0 + 1;
    @(negedge clk);
    di_.od_valid = 0;
  endtask

  task automatic run_o(instr_t ins, output int cyc);
    int t0;
    do_.od_valid = 1; do_.od_instr = ins; do_.od_lit = literal_of(ins);
    t0 = cycle;
    #1;
    while (!o_done) begin @(negedge clk); #1; if (cycle - t0 > 200) break; end
    cyc = cycle - t0 + 1;
    @(negedge clk);
    do_.od_valid = 0;
  endtask

  // instruction builders for set
  function automatic instr_t s_olc_imm(int v, pred_e p = PRED_ALWAYS);
    return mk_set(1, p, {5'b10000, 3'b100, 5'd0, 6'(v)});
  endfunction
  function automatic instr_t s_olc_dec();   return mk_set(1, PRED_ALWAYS, {5'b10000, 3'b001, 11'd0}); endfunction
  function automatic instr_t s_olc_dl();    return mk_set(1, PRED_ALWAYS, {5'b10000, 3'b010, 11'd0}); endfunction
  function automatic instr_t s_ilc_imm(int v); return mk_set(1, PRED_ALWAYS, {5'b01000, 3'b100, 4'd0, 1'b0, 6'(v)}); endfunction
  function automatic instr_t s_ilc_inf();   return mk_set(1, PRED_ALWAYS, {5'b01000, 3'b100, 4'd0, 1'b1, 6'd0}); endfunction
  function automatic instr_t s_ilc_dl();    return mk_set(1, PRED_ALWAYS, {5'b01000, 3'b010, 11'd0}); endfunction
  function automatic instr_t s_dl(bit ext, int v, pred_e p = PRED_ALWAYS);
    return mk_set(1, p, {5'b00100, ext, 13'(v)});
  endfunction
  function automatic instr_t s_flags(logic [5:0] na, logic [5:0] nb);
    return mk_set(1, PRED_ALWAYS, {5'b00010, 2'b00, na, nb});
  endfunction
  function automatic instr_t s_tapl_imm(int v) ; return mk_set(1, PRED_ALWAYS, {6'b000010, 13'(v)}); endfunction
  function automatic instr_t s_tapl_dl();       return mk_set(1, PRED_ALWAYS, {6'b000001, 13'd0}); endfunction

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int c;
    word_t exp_dl;
    di_ = '{od_valid: 0, od_instr: '0, od_lit: '0, torpedo: 0, sho_ready: 1, tok_ready: 1, dat_ready: 1, ship_c: 0};
    do_ = di_;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(i_olc == 0 && i_ilc == '{inf: 1'b0, n: 6'd1} && !i_a && !i_b && !i_c && i_dl == '0,
          "reset state: OLC 0, ILC 1, flags clear");

    // ---------------- predicate table ----------------
    for (int olc = 0; olc < 2; olc++)
      for (int a = 0; a < 2; a++)
        for (int b = 0; b < 2; b++)
          for (int p = 0; p < 8; p++) begin
            bit exp;
            run_i(s_olc_imm(olc ? 5 : 0), c);
            run_i(s_flags(a ? 6'b110000 : 6'b000000, b ? 6'b001100 : 6'b000000), c);
            check(i_a == a && i_b == b, "flags set for predicate test");
            run_i(s_dl(0, 0), c);
            unique case (p)
              0: exp = olc && !a;
              1: exp = olc && a;
              2: exp = olc && !b;
              3: exp = olc && b;
              6: exp = olc;
              7: exp = 1;
              default: exp = 0;
            endcase
            run_i(s_dl(0, 77, pred_e'(p)), c);
            check(c == 1, "set takes one cycle");
            check((i_dl == 37'd77) == exp, $sformatf("predicate %0d olc=%0d a=%0d b=%0d", p, olc, a, b));
          end

    // ---------------- OLC ----------------
    run_i(s_olc_imm(3), c);
    check(i_olc == 3, "OLC <- immediate");
    begin
      int u0;
      u0 = i_unseal_n;
      run_i(s_olc_dec(), c); check(i_olc == 2, "OLC-1");
      run_i(s_olc_dec(), c); check(i_olc == 1, "OLC-1");
      check(i_unseal_n == u0, "no unseal while OLC stays non-zero");
      run_i(s_olc_dec(), c); check(i_olc == 0, "OLC-1 to zero");
      @(negedge clk);
      check(i_unseal_n == u0 + 1, "OLC reaching zero unseals the hatch");
      check(i_olcz, "OLC zero reported");
    end
    run_i(s_dl(0, 37'h2A, PRED_ALWAYS), c);
    run_i(s_olc_dl(), c); check(i_olc == 6'h2A, "OLC <- data latch");

    // ---------------- ILC ----------------
    run_i(s_ilc_imm(9), c);  check(i_ilc == '{inf: 1'b0, n: 6'd9}, "ILC <- immediate");
    run_i(s_ilc_inf(), c);   check(i_ilc.inf, "ILC <- infinity");
    run_i(s_ilc_dl(), c);    check(i_ilc == '{inf: 1'b0, n: 6'h2A}, "ILC <- data latch");
    run_i(s_ilc_imm(1), c);

    // ---------------- data latch: set and shift ----------------
    run_i(s_dl(0, 13'h1ABC, PRED_ALWAYS), c);
    check(i_dl == 37'h1ABC, "0-extended immediate");
    run_i(s_dl(1, 13'h0123, PRED_ALWAYS), c);
    exp_dl = {{24{1'b1}}, 13'h0123};
    check(i_dl == exp_dl, "1-extended immediate");
    run_i(mk_shift(1, PRED_ALWAYS, 19'h5A5A5), c);
    exp_dl = {exp_dl[17:0], 19'h5A5A5};
    check(i_dl == exp_dl && c == 1, "shift");
    run_i(mk_shift(1, PRED_ALWAYS, 19'h00FFF), c);
    exp_dl = {exp_dl[17:0], 19'h00FFF};
    check(i_dl == exp_dl, "second shift");

    // ---------------- flags ----------------
    run_i(s_flags(6'b110000, 6'b000000), c);         // A=1, B=0
    check(i_a && !i_b, "A <- A|~A, B <- 0");
    run_i(s_flags(6'b000100, 6'b100000), c);         // A <- ~B = 1, B <- A = 1
    check(i_a && i_b, "flags read old values");
    // field bits 6..1 are A, ~A, B, ~B, C, ~C: 6'b000100 selects ~B, 6'b010000 selects ~A
    run_i(s_flags(6'b000100, 6'b010000), c);
    check(!i_a && !i_b, "A <- ~B, B <- ~A");
    run_i(s_flags(6'b000001, 6'b000010), c);         // A <- ~C = 1, B <- C = 0
    check(i_a && !i_b, "C flag as input");
    run_i(s_flags(6'b100000, 6'b001000), c);         // nop: each flag to itself
    check(i_a && !i_b, "flags nop");

    // ---------------- TAPL ----------------
    run_i(s_tapl_imm(13'h0A5), c); check(i_tapl == 13'h0A5, "TAPL <- immediate");
    run_i(s_dl(0, 13'h1F0F, PRED_ALWAYS), c);
    run_i(s_tapl_dl(), c);       check(i_tapl == 13'h1F0F, "TAPL <- data latch");

    // ---------------- move on the input dock ----------------
    // three words arrive; ILC=3 move Di Dc Do moveto(path 0x123)
    for (int k = 0; k < 3; k++) begin
      i_fin_mem[i_fin_wr % 64] = 37'h100 + k;
      i_fin_sig[i_fin_wr % 64] = (k == 2);
      i_fin_wr++;
    end
    run_i(s_ilc_imm(3), c);
    run_i(mk_move(0, 1, PRED_ALWAYS, 0, 1, 1, 1, 0, 2'b10, 13'h123), c);
    check(c == 3, "three iterations in three cycles");
    @(negedge clk);
    check(i_sho_n == 3 && i_sho_got[0] == 37'h100 && i_sho_got[1] == 37'h101 && i_sho_got[2] == 37'h102,
          "words delivered to the ship in order");
    check(i_dl == 37'h102, "data latch holds the last word captured");
    check(i_path == 13'h123, "moveto loads the path");
    check(i_c, "C takes the signal bit of the packet");
    check(i_ilc == '{inf: 1'b0, n: 6'd1}, "ILC back to 1 after the move");

    // ILC = 0: move ignored
    run_i(s_ilc_imm(0), c);
    begin
      int n0;
      n0 = i_iter_n;
      run_i(mk_move(0, 1, PRED_ALWAYS, 0, 0, 0, 1, 0, 2'b00, '0), c);
      check(i_iter_n == n0 && c == 1, "ILC = 0: move executes zero times");
      check(i_ilc.n == 1, "ILC reset to 1 after the ignored move");
    end

    // Ti + To: wait for a token, send a token along the path (plain move keeps path)
    begin
      int t0;
      t0 = i_tok_n;
      fork
        run_i(mk_move(0, 1, PRED_ALWAYS, 1, 0, 0, 0, 1, 2'b00, '0), c);
        begin
          repeat (4) @(negedge clk);
          i_fin_mem[i_fin_wr % 64] = 37'h7; i_fin_sig[i_fin_wr % 64] = 0; i_fin_wr++;
        end
      join
      check(c >= 5, "Ti waits for the token");
      @(negedge clk);
      check(i_tok_n == t0 + 1 && i_tok_got[t0] == 13'h123, "To sends a token along the path");
      check(!i_c, "C from the token's signal bit");
      check(i_dl == 37'h102, "Ti without Di/Dc leaves the data latch");
    end

    // stall: ship not ready holds the iteration
    di_.sho_ready = 0;
    i_fin_mem[i_fin_wr % 64] = 37'h55; i_fin_sig[i_fin_wr % 64] = 0; i_fin_wr++;
    i_fin_mem[i_fin_wr % 64] = 37'h66; i_fin_sig[i_fin_wr % 64] = 0; i_fin_wr++;
    run_i(s_ilc_imm(2), c);
    fork
      run_i(mk_move(0, 1, PRED_ALWAYS, 0, 1, 1, 1, 0, 2'b00, '0), c);
      begin repeat (6) @(negedge clk); di_.sho_ready = 1; end
    join
    check(c >= 6, "a full ship stalls the move");
    @(negedge clk); @(negedge clk);
    check(i_sho_got[i_sho_n - 2] == 37'h55 && i_sho_got[i_sho_n - 1] == 37'h66, "stalled words delivered");

    // ---------------- torpedo ----------------
    run_i(s_tapl_imm(13'h0BB), c);
    run_i(s_olc_imm(4), c);
    run_i(s_ilc_inf(), c);
    i_fin_mem[i_fin_wr % 64] = 37'hA; i_fin_sig[i_fin_wr % 64] = 0; i_fin_wr++;
    i_fin_mem[i_fin_wr % 64] = 37'hB; i_fin_sig[i_fin_wr % 64] = 0; i_fin_wr++;
    begin
      int n0, t0, u0;
      n0 = i_iter_n; t0 = i_tok_n; u0 = i_unseal_n;
      fork
        run_i(mk_move(1, 0, PRED_OLCNZ, 0, 1, 1, 1, 0, 2'b00, '0), c);
        begin repeat (8) @(negedge clk); di_.torpedo = 1; end
      join
      di_.torpedo = 0;
      @(negedge clk);
      check(i_iter_n == n0 + 2, "infinite move runs until the torpedo");
      check(i_olc == 0 && i_ilc == '{inf: 1'b0, n: 6'd1}, "torpedo: OLC <- 0, ILC <- 1");
      check(i_unseal_n == u0 + 1, "torpedo unseals the hatch");
      check(i_tok_n == t0 + 1 && i_tok_got[t0] == 13'h0BB, "token sent along TAPL");
    end
    // non-interruptible move ignores the torpedo
    run_i(s_olc_imm(4), c);
    di_.torpedo = 1;
    i_fin_mem[i_fin_wr % 64] = 37'hC; i_fin_sig[i_fin_wr % 64] = 0; i_fin_wr++;
    run_i(mk_move(0, 1, PRED_ALWAYS, 0, 1, 1, 1, 0, 2'b00, '0), c);
    check(!i_take && i_olc == 4 && i_dl == 37'hC, "I = 0: torpedo left waiting");
    // set is never torpedoed
    run_i(s_dl(0, 5, PRED_ALWAYS), c);
    check(i_olc == 4 && i_dl == 37'd5, "set not torpedoed");
    // a failed predicate does not consume the torpedo
    run_i(s_olc_imm(0), c);
    run_i(mk_move(1, 1, PRED_OLCNZ, 0, 1, 1, 1, 0, 2'b00, '0), c);
    check(!i_take && i_olc == 0 && c == 1, "predicate false: ignored, torpedo left waiting");
    di_.torpedo = 0;

    // ---------------- output dock ----------------
    // dispatch: word with a path in bits 37:25 goes out along that path
    o_shin_mem[o_shin_wr % 64] = {13'h0456, 24'h00ABCD}; o_shin_wr++;
    do_.ship_c = 1;
    run_o(mk_move(0, 1, PRED_ALWAYS, 0, 1, 1, 1, 0, 2'b01, '0), c);
    @(negedge clk);
    check(o_dat_n == 1 && o_dat_pg[0] == 13'h0456 && o_dat_dg[0] == {13'h0456, 24'h00ABCD},
          "dispatch sends the word along its own path");
    check(o_path == 13'h0456 && o_dl == {13'h0456, 24'h00ABCD}, "path and data latch after dispatch");
    check(o_c, "C from the ship on Di");
    // Ti on an output dock: token from the fabric sets C; To and Do together
    do_.ship_c = 0;
    o_fin_sig[o_fin_wr % 64] = 1; o_fin_wr++;
    o_shin_mem[o_shin_wr % 64] = 37'h42; o_shin_wr++;
    run_o(mk_move(0, 1, PRED_ALWAYS, 1, 1, 1, 1, 1, 2'b10, 13'h0077), c);
    @(negedge clk);
    check(o_c, "C from the token's signal bit on an output dock");
    check(o_dat_n == 2 && o_dat_pg[1] == 13'h0077 && o_dat_dg[1] == 37'h42, "Do sends data along moveto path");
    check(o_tok_n == 1 && o_tok_got[0] == 13'h0077, "To sends a token too");
    // Do without Di sends the data latch
    run_o(mk_move(0, 1, PRED_ALWAYS, 0, 0, 0, 1, 0, 2'b00, '0), c);
    @(negedge clk);
    check(o_dat_n == 3 && o_dat_dg[2] == 37'h42, "Do alone sends the data latch");
    // Di without Dc discards
    o_shin_mem[o_shin_wr % 64] = 37'h99; o_shin_wr++;
    run_o(mk_move(0, 1, PRED_ALWAYS, 0, 1, 0, 0, 0, 2'b00, '0), c);
    check(o_dl == 37'h42 && o_shin_rd == o_shin_wr, "Di without Dc consumes without capture");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
