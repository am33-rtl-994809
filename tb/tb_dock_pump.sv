// tb_dock_pump: self-checking test of the pump (epilogue fifo, hatch,
// instruction fifo, on-deck stage, torpedo waiting area). The test plays the
// execution unit itself: it finishes every instruction in the cycle it comes
// on deck and drives the OLC-is-zero and unseal signals. It checks
//   * with OLC = 0 instructions pass once, in order, and the first arrives
//     on deck three cycles after the fabric hands it over;
//   * the literal latch holds each instruction's literal;
//   * with OLC != 0 a loop body closed by a tail repeats while the hatch is
//     sealed, an instruction behind the tail waits in EF, and after unseal the
//     body drains once and the waiting instruction follows;
//   * a one-shot instruction is never requeued;
//   * a torpedo waits in the waiting area, blocks a second torpedo and is
//     removed when taken.
module tb_dock_pump;
  import fleet_pkg::*;

  logic clk = 0, rst_n = 0;
  logic ins_valid, ins_ready, ins_token;
  instr_t ins_instr;
  logic od_valid, exec_done, olc_zero, unseal, torpedo, torpedo_take;
  logic sealed, requeue, tail;
  instr_t od_instr;
  word_t od_lit;
  int checks = 0, failures = 0;
  instr_t seen[$];
  int t_accept, t_deck;

  dock_pump #(.EF_DEPTH(2), .IF_DEPTH(4)) dut (
    .clk, .rst_n,
    .ins_valid_i (ins_valid), .ins_ready_o (ins_ready), .ins_token_i (ins_token),
    .ins_instr_i (ins_instr),
    .od_exec_valid_o (od_valid), .od_instr_o (od_instr), .od_literal_o (od_lit),
    .exec_done_i (exec_done), .olc_zero_i (olc_zero), .unseal_i (unseal),
    .torpedo_o (torpedo), .torpedo_take_i (torpedo_take),
    .sealed_o (sealed), .requeue_o (requeue), .tail_o (tail)
  );

  always #5 clk = ~clk;
  assign exec_done = od_valid;

  int cycle = 0;
  always @(posedge clk) begin
    cycle <= cycle + 1;
    if (rst_n && od_valid) begin
      seen.push_back(od_instr);
      if (seen.size() == 1) t_deck = cycle;
      checks++;
      if (od_lit != literal_of(od_instr)) begin
        failures++; $display("FAIL literal latch");
      end
    end
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  task automatic send(bit tok, instr_t i);
    ins_valid = 1; ins_token = tok; ins_instr = i;
    #1;
    while (!ins_ready) begin @(negedge clk); #1; end
    if (seen.size() == 0 && t_accept < 0) t_accept = cycle;
    @(negedge clk);
    ins_valid = 0;
  endtask

  function automatic instr_t ins(logic os, int id);
    return mk_set(os, PRED_ALWAYS, {5'b00100, 1'b0, 13'(id)});
  endfunction

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    ins_valid = 0; ins_token = 0; ins_instr = '0;
    olc_zero = 1; unseal = 0; torpedo_take = 0;
    t_accept = -1;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!sealed, "hatch unsealed after reset");

    // ---- phase A: OLC = 0, straight-line code ----
    send(0, ins(1, 1));
    send(0, ins(0, 2));
    send(0, ins(1, 3));
    repeat (8) @(negedge clk);
    check(seen.size() == 3, "three instructions on deck once each");
    check(seen.size() == 3 && seen[0] == ins(1, 1) && seen[1] == ins(0, 2) && seen[2] == ins(1, 3),
          "order");
    check(t_deck - t_accept == 3, "EF -> IF -> OD takes three cycles");
    seen.delete();

    // ---- phase B: a loop ----
    olc_zero = 0;
    send(0, ins(0, 10));
    send(0, ins(0, 11));
    send(0, ins(1, 12));     // one-shot inside the body: runs once
    send(0, mk_tail());
    send(0, ins(0, 20));     // waits behind the hatch
    n = 0;
    while (seen.size() < 12 && n < 200) begin @(negedge clk); n++; end
    check(sealed, "tail sealed the hatch");
    check(seen.size() >= 12, "loop body repeats");
    for (int k = 0; k < 12; k++)
      if (k < 3) check(seen[k] == ins(k == 2, 10 + k), "first pass order");
      else       check(seen[k] == ins(0, 10 + (k - 3) % 2), "body repeats without the one-shot");
    foreach (seen[k]) check(seen[k] != ins(0, 20), "nothing passes a sealed hatch");
    // end the loop: OLC written with zero
    olc_zero = 1; unseal = 1;
    @(negedge clk);
    unseal = 0;
    repeat (12) @(negedge clk);
    check(!sealed, "unsealed");
    check(seen[seen.size() - 1] == ins(0, 20), "instruction behind the tail runs after the loop");
    n = 0;
    foreach (seen[k]) if (seen[k] == ins(0, 20)) n++;
    check(n == 1, "and runs once");
    n = 0;
    foreach (seen[k]) if (seen[k] == ins(1, 12)) n++;
    check(n == 1, "one-shot never requeued");
    seen.delete();

    // ---- phase C: torpedo ----
    ins_valid = 1; ins_token = 1; @(negedge clk); ins_valid = 0;
    check(torpedo, "torpedo waiting");
    ins_valid = 1; ins_token = 1; #1;
    check(!ins_ready, "second torpedo blocked");
    ins_valid = 0;
    check(seen.size() == 0, "a torpedo is not an instruction");
    torpedo_take = 1; @(negedge clk); torpedo_take = 0;
    check(!torpedo, "torpedo taken");
    check(seen.size() == 0, "still no instruction");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
