// tb_fleet_top: end-to-end test of the Fleet around the FIFO ship, at the
// top's default parameters. A host on the external fabric port programs both
// docks with instruction packets and feeds and drains data:
//   1. The input dock runs an outer loop (OLC = 2) around {ILC <- 3; move Di
//      Dc Do To}, closed by a tail: six words go into the FIFO ship and a
//      token with the signal bit set goes to the output dock for each.
//      The output dock runs one move of six iterations, Ti Di Dc Do, sending
//      each word to the host. The host accepts at random, so the fabric and
//      the docks stall.
//   2. The output dock waits in an interruptible infinite move; the host
//      torpedoes it and must get the acknowledgment token along TAPL.
//   3. A word holding a path and a set instruction goes in at the input dock,
//      through the ship, and the output dock dispatches it to the input
//      dock's instruction destination, where it executes.
//   4. shift, flag update and a predicated instruction that is ignored.
//   5. a move skipped because ILC = 0, then the same move run once.
// It counts each mechanism (requeue, tail, stall, torpedo, dispatch, C flag,
// ignored instruction, infinite move) and fails if one never happened.
module tb_fleet_top;
  import fleet_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  logic    ext_src_valid [1];
  logic    ext_src_ready [1];
  packet_t ext_src_pkt   [1];
  logic    ext_dst_valid [1];
  logic    ext_dst_ready [1];
  packet_t ext_dst_pkt   [1];
  logic [CNT_W-1:0] olc [2];
  ilc_t ilc [2];
  logic [2:0] flags [2];
  word_t data_latch [2];
  path_t path [2], tapl [2];
  logic sealed [2], ev_torpedo [2], ev_iter [2], ev_ignored [2], ev_requeue [2], ev_tail [2];

  fleet_top dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // destinations
  localparam int IN_INS = 0, IN_DAT = 1, OUT_INS = 2, OUT_DAT = 3, HOST = 4;
  function automatic path_t p(int dest, bit sig = 0);
    return {12'(dest), sig};
  endfunction

  // host sink
  packet_t got [64]; int got_n = 0;
  int n_stall = 0, n_requeue = 0, n_tail = 0, n_torpedo = 0, n_ignored = 0, n_iter = 0;
  logic host_ready_rand = 1;
  always @(posedge clk) if (rst_n) begin
    if (ext_dst_valid[0] && ext_dst_ready[0]) begin got[got_n % 64] <= ext_dst_pkt[0]; got_n <= got_n + 1; end
    if (ext_dst_valid[0] && !ext_dst_ready[0]) n_stall <= n_stall + 1;
    if (ev_requeue[0] || ev_requeue[1]) n_requeue <= n_requeue + 1;
    if (ev_tail[0] || ev_tail[1]) n_tail <= n_tail + 1;
    if (ev_torpedo[0] || ev_torpedo[1]) n_torpedo <= n_torpedo + 1;
    if (ev_ignored[0] || ev_ignored[1]) n_ignored <= n_ignored + 1;
    if (ev_iter[0] || ev_iter[1]) n_iter <= n_iter + 1;
  end
  always @(negedge clk) ext_dst_ready[0] <= host_ready_rand ? ($urandom_range(0, 2) != 0) : 1'b1;

  task automatic send(int dest, bit tok, word_t w);
    ext_src_valid[0] = 1; ext_src_pkt[0] = '{path: p(dest), token: tok, data: w};
    #1;
    while (!ext_src_ready[0]) begin @(negedge clk); #1; end
    @(negedge clk);
    ext_src_valid[0] = 0;
  endtask

  task automatic wait_until_got(int n);
    int k = 0;
    while (got_n < n && k < 2000) begin @(negedge clk); k++; end
  endtask

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int k;
    ext_src_valid[0] = 0; ext_src_pkt[0] = '0; ext_dst_ready[0] = 1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ---------------- 1. loop on the input dock, tokens to the output dock ----------------
    send(OUT_INS, 0, word_t'(mk_set(1, PRED_ALWAYS, {5'b01000, 3'b100, 4'd0, 1'b0, 6'd6})));
    send(OUT_INS, 0, word_t'(mk_move(0, 1, PRED_ALWAYS, 1, 1, 1, 1, 0, 2'b10, p(HOST))));
    send(IN_INS, 0, word_t'(mk_set(1, PRED_ALWAYS, {5'b10000, 3'b100, 5'd0, 6'd2})));
    send(IN_INS, 0, word_t'(mk_set(0, PRED_OLCNZ, {5'b01000, 3'b100, 4'd0, 1'b0, 6'd3})));
    send(IN_INS, 0, word_t'(mk_move(0, 0, PRED_OLCNZ, 0, 1, 1, 1, 1, 2'b10, p(OUT_DAT, 1))));
    send(IN_INS, 0, word_t'(mk_set(0, PRED_OLCNZ, {5'b10000, 3'b001, 11'd0})));
    send(IN_INS, 0, word_t'(mk_tail()));
    for (int i = 0; i < 6; i++) send(IN_DAT, 0, 37'h2000 + i);
    wait_until_got(6);
    check(got_n == 6, "six words reached the host");
    for (int i = 0; i < 6; i++)
      check(got[i].data == 37'h2000 + i && !got[i].token && got[i].path == p(HOST),
            "words in order, as data, along the moveto path");
    repeat (5) @(negedge clk);
    check(olc[0] == 0 && !sealed[0], "input dock loop finished, hatch unsealed");
    check(flags[1][0], "output dock C flag from the token signal bit");

    // ---------------- 2. torpedo ----------------
    send(OUT_INS, 0, word_t'(mk_set(1, PRED_ALWAYS, {6'b000010, p(HOST, 1)})));            // TAPL
    send(OUT_INS, 0, word_t'(mk_set(1, PRED_ALWAYS, {5'b01000, 3'b100, 4'd0, 1'b1, 6'd0}))); // ILC inf
    send(OUT_INS, 0, word_t'(mk_move(1, 1, PRED_ALWAYS, 1, 1, 1, 1, 0, 2'b00, '0)));
    repeat (10) @(negedge clk);
    check(ilc[1].inf, "output dock in an infinite move");
    send(OUT_INS, 1, '0);
    wait_until_got(7);
    check(got_n == 7 && got[6].token && got[6].path == p(HOST, 1), "torpedo acknowledged along TAPL");
    check(ilc[1] == '{inf: 1'b0, n: 6'd1} && olc[1] == 0, "torpedo reset the loop counters");

    // ---------------- 3. dispatch through the FIFO ship ----------------
    send(IN_INS, 0, word_t'(mk_move(0, 1, PRED_ALWAYS, 0, 1, 1, 1, 0, 2'b00, '0)));
    send(OUT_INS, 0, word_t'(mk_move(0, 1, PRED_ALWAYS, 0, 1, 1, 1, 0, 2'b01, '0)));
    // word = {path to the input dock's instruction destination, set DL <- 0x0ABC}
    send(IN_DAT, 0, {p(IN_INS), 24'd0} | word_t'(mk_set(0, PRED_ALWAYS, {5'b00100, 1'b0, 13'h0ABC})));
    k = 0;
    while (data_latch[0] != 37'h0ABC && k < 200) begin @(negedge clk); k++; end
    check(data_latch[0] == 37'h0ABC, "dispatched instruction executed at the input dock");
    check(path[1] == p(IN_INS), "output dock path loaded by dispatch");

    // ---------------- 4. shift, flags, predicate ----------------
    send(IN_INS, 0, word_t'(mk_shift(1, PRED_ALWAYS, 19'h12345)));
    send(IN_INS, 0, word_t'(mk_set(1, PRED_ALWAYS, {5'b00010, 2'b00, 6'b110000, 6'b000000}))); // A <- 1
    send(IN_INS, 0, word_t'(mk_set(1, PRED_A0, {5'b00100, 1'b0, 13'h0001})));  // ignored
    repeat (10) @(negedge clk);
    check(data_latch[0] == 37'({18'(37'h0ABC), 19'h12345}), "shift keeps the low bits, moved up");
    check(flags[0][2] && !flags[0][1], "flags A=1 B=0");

    // ---------------- 5. ILC = 0 skips a move ----------------
    k = got_n;
    send(IN_INS, 0, word_t'(mk_set(1, PRED_ALWAYS, {5'b01000, 3'b100, 4'd0, 1'b0, 6'd0})));   // ILC <- 0
    send(IN_INS, 0, word_t'(mk_move(0, 1, PRED_ALWAYS, 0, 0, 0, 0, 1, 2'b10, p(HOST))));      // skipped
    repeat (10) @(negedge clk);
    check(got_n == k && ilc[0] == '{inf: 1'b0, n: 6'd1}, "ILC = 0: move skipped, ILC back to 1");
    check(path[0] != p(HOST), "skipped move left the path alone");
    send(IN_INS, 0, word_t'(mk_move(0, 1, PRED_ALWAYS, 0, 0, 0, 0, 1, 2'b10, p(HOST))));      // runs once
    wait_until_got(k + 1);
    repeat (5) @(negedge clk);
    check(got_n == k + 1 && got[k % 64].token && got[k % 64].path == p(HOST), "next move sends one token");

    // ---------------- mechanisms ----------------
    $display("requeue=%0d tail=%0d stall=%0d torpedo=%0d ignored=%0d iterations=%0d",
             n_requeue, n_tail, n_stall, n_torpedo, n_ignored, n_iter);
    check(n_requeue > 0, "requeue happened");
    check(n_tail > 0, "tail sealed a hatch");
    check(n_stall > 0, "host back-pressure stalled the fabric");
    check(n_torpedo == 1, "one torpedo");
    check(n_ignored > 0, "an instruction was ignored by its predicate");
    check(n_iter >= 12, "move iterations");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
