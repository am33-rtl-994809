// tb_fleet_dock: self-checking test of complete docks running small programs
// delivered through their instruction destinations.
//   Input dock:  an outer loop of three passes around {ILC <- 2; move Di Dc Do;
//                OLC-1}, closed by a tail, followed by a one-shot set that must
//                wait behind the hatch. Six words sent to the data destination
//                must reach the ship in order, and the loop must end with OLC 0
//                and the hatch unsealed.
//   Output dock: an infinite interruptible move sending tokens, stopped by a
//                torpedo, which must return a token along TAPL; then a
//                dispatch of a word from the ship along the path in its own
//                upper bits.
module tb_fleet_dock;
  import fleet_pkg::*;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  // ---------------- input dock ----------------
  logic    a_ins_v, a_ins_r, a_dst_v, a_dst_r, a_tok_v, a_dat_v, a_shin_r, a_sho_v;
  packet_t a_ins_p, a_dst_p, a_tok_p, a_dat_p;
  word_t   a_sho_d, a_dl;
  logic [CNT_W-1:0] a_olc; ilc_t a_ilc; logic [2:0] a_flags; path_t a_path, a_tapl;
  logic a_sealed, a_evt, a_evi, a_evg, a_evr, a_evtl;

  fleet_dock #(.IS_INPUT(1'b1)) ua (
    .clk, .rst_n,
    .ins_valid_i (a_ins_v), .ins_ready_o (a_ins_r), .ins_pkt_i (a_ins_p),
    .dst_valid_i (a_dst_v), .dst_ready_o (a_dst_r), .dst_pkt_i (a_dst_p),
    .tok_valid_o (a_tok_v), .tok_ready_i (1'b1), .tok_pkt_o (a_tok_p),
    .dat_valid_o (a_dat_v), .dat_ready_i (1'b1), .dat_pkt_o (a_dat_p),
    .ship_in_valid_i (1'b0), .ship_in_ready_o (a_shin_r), .ship_in_data_i ('0), .ship_in_c_i (1'b0),
    .ship_out_valid_o (a_sho_v), .ship_out_ready_i (1'b1), .ship_out_data_o (a_sho_d),
    .olc_o (a_olc), .ilc_o (a_ilc), .flags_o (a_flags), .data_latch_o (a_dl),
    .path_o (a_path), .tapl_o (a_tapl), .sealed_o (a_sealed),
    .ev_torpedo_o (a_evt), .ev_iter_o (a_evi), .ev_ignored_o (a_evg),
    .ev_requeue_o (a_evr), .ev_tail_o (a_evtl)
  );

  // ---------------- output dock ----------------
  logic    b_ins_v, b_ins_r, b_dst_v, b_dst_r, b_tok_v, b_dat_v, b_shin_r, b_sho_v;
  packet_t b_ins_p, b_dst_p, b_tok_p, b_dat_p;
  word_t   b_sho_d, b_dl;
  logic [CNT_W-1:0] b_olc; ilc_t b_ilc; logic [2:0] b_flags; path_t b_path, b_tapl;
  logic b_sealed, b_evt, b_evi, b_evg, b_evr, b_evtl;
  word_t b_shin_mem [16]; int b_shin_wr = 0, b_shin_rd = 0;

  fleet_dock #(.IS_INPUT(1'b0)) ub (
    .clk, .rst_n,
    .ins_valid_i (b_ins_v), .ins_ready_o (b_ins_r), .ins_pkt_i (b_ins_p),
    .dst_valid_i (b_dst_v), .dst_ready_o (b_dst_r), .dst_pkt_i (b_dst_p),
    .tok_valid_o (b_tok_v), .tok_ready_i (1'b1), .tok_pkt_o (b_tok_p),
    .dat_valid_o (b_dat_v), .dat_ready_i (1'b1), .dat_pkt_o (b_dat_p),
    .ship_in_valid_i (b_shin_rd < b_shin_wr), .ship_in_ready_o (b_shin_r),
    .ship_in_data_i (b_shin_mem[b_shin_rd % 16]), .ship_in_c_i (1'b0),
    .ship_out_valid_o (b_sho_v), .ship_out_ready_i (1'b1), .ship_out_data_o (b_sho_d),
    .olc_o (b_olc), .ilc_o (b_ilc), .flags_o (b_flags), .data_latch_o (b_dl),
    .path_o (b_path), .tapl_o (b_tapl), .sealed_o (b_sealed),
    .ev_torpedo_o (b_evt), .ev_iter_o (b_evi), .ev_ignored_o (b_evg),
    .ev_requeue_o (b_evr), .ev_tail_o (b_evtl)
  );

  // sinks
  word_t a_ship_got [32]; int a_ship_n = 0;
  path_t b_tok_got [256]; int b_tok_n = 0;
  packet_t b_dat_got [8]; int b_dat_n = 0;
  int a_req_n = 0, a_tail_n = 0;
  always @(posedge clk) if (rst_n) begin
    if (a_sho_v) begin a_ship_got[a_ship_n % 32] <= a_sho_d; a_ship_n <= a_ship_n + 1; end
    if (b_tok_v) begin b_tok_got[b_tok_n % 256] <= b_tok_p.path; b_tok_n <= b_tok_n + 1; end
    if (b_dat_v) begin b_dat_got[b_dat_n % 8] <= b_dat_p; b_dat_n <= b_dat_n + 1; end
    if (b_shin_r) b_shin_rd <= b_shin_rd + 1;
    if (a_evr) a_req_n <= a_req_n + 1;
    if (a_evtl) a_tail_n <= a_tail_n + 1;
    check(!a_tok_v && !a_dat_v, "input dock program sends no packets");
  end

  function automatic packet_t ipkt(instr_t i);
    return '{path: '0, token: 1'b0, data: word_t'(i)};
  endfunction

  task automatic send_a(packet_t p);
    a_ins_v = 1; a_ins_p = p; #1;
    while (!a_ins_r) begin @(negedge clk); #1; end
    @(negedge clk); a_ins_v = 0;
  endtask
  task automatic send_b(packet_t p);
    b_ins_v = 1; b_ins_p = p; #1;
    while (!b_ins_r) begin @(negedge clk); #1; end
    @(negedge clk); b_ins_v = 0;
  endtask
  task automatic data_a(word_t w);
    a_dst_v = 1; a_dst_p = '{path: 13'h2, token: 1'b0, data: w}; #1;
    while (!a_dst_r) begin @(negedge clk); #1; end
    @(negedge clk); a_dst_v = 0;
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int n;
    a_ins_v = 0; a_dst_v = 0; a_ins_p = '0; a_dst_p = '0;
    b_ins_v = 0; b_dst_v = 0; b_ins_p = '0; b_dst_p = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    @(negedge clk);

    // ================= input dock: nested loops =================
    fork
      begin
        send_a(ipkt(mk_set(1, PRED_ALWAYS, {5'b10000, 3'b100, 5'd0, 6'd3})));     // OLC <- 3
        send_a(ipkt(mk_set(0, PRED_OLCNZ,  {5'b01000, 3'b100, 4'd0, 1'b0, 6'd2}))); // ILC <- 2
        send_a(ipkt(mk_move(0, 0, PRED_OLCNZ, 0, 1, 1, 1, 0, 2'b00, '0)));       // move Di Dc Do
        send_a(ipkt(mk_set(0, PRED_OLCNZ,  {5'b10000, 3'b001, 11'd0})));          // OLC-1
        send_a(ipkt(mk_tail()));
        send_a(ipkt(mk_set(1, PRED_ALWAYS, {5'b00100, 1'b0, 13'h0777})));          // after the loop
      end
      begin
        repeat (10) @(negedge clk);
        for (int k = 0; k < 6; k++) begin
          data_a(37'h1000 + k);
          repeat ($urandom_range(0, 3)) @(negedge clk);
        end
      end
    join
    n = 0;
    while (a_dl != 37'h0777 && n < 500) begin @(negedge clk); n++; end
    repeat (3) @(negedge clk);
    check(a_ship_n == 6, "six words delivered (3 outer x 2 inner)");
    for (int k = 0; k < 6; k++) check(a_ship_got[k] == 37'h1000 + k, "words in order");
    check(a_olc == 0, "loop ended with OLC = 0");
    check(!a_sealed, "hatch unsealed after the loop");
    check(a_dl == 37'h0777, "instruction behind the tail ran after the loop");
    check(a_tail_n == 1, "tail sealed the hatch once");
    check(a_req_n >= 6, "loop body requeued");
    check(a_ilc == '{inf: 1'b0, n: 6'd1}, "ILC back at 1");

    // ================= output dock: torpedo =================
    send_b(ipkt(mk_set(1, PRED_ALWAYS, {6'b000010, 13'h00E})));                 // TAPL <- dest 7
    send_b(ipkt(mk_set(1, PRED_ALWAYS, {5'b10000, 3'b100, 5'd0, 6'd1})));      // OLC <- 1
    send_b(ipkt(mk_set(1, PRED_ALWAYS, {5'b01000, 3'b100, 4'd0, 1'b1, 6'd0}))); // ILC <- inf
    send_b(ipkt(mk_move(1, 1, PRED_OLCNZ, 0, 0, 0, 0, 1, 2'b10, 13'h00A)));    // tokens to dest 5
    repeat (20) @(negedge clk);
    check(b_tok_n >= 10, "infinite move keeps sending tokens");
    send_b('{path: '0, token: 1'b1, data: '0});                                  // torpedo
    repeat (6) @(negedge clk);
    check(b_olc == 0 && b_ilc == '{inf: 1'b0, n: 6'd1}, "torpedo: OLC 0, ILC 1");
    check(b_tok_got[(b_tok_n - 1) % 256] == 13'h00E, "last token went along TAPL");
    for (int k = 0; k < b_tok_n - 1; k++) check(b_tok_got[k % 256] == 13'h00A, "earlier tokens along the path");
    n = b_tok_n;
    repeat (5) @(negedge clk);
    check(b_tok_n == n, "move stopped");

    // ================= output dock: dispatch =================
    b_shin_mem[0] = {13'h0456, 24'h00BEEF}; b_shin_wr = 1;
    send_b(ipkt(mk_move(0, 1, PRED_ALWAYS, 0, 1, 1, 1, 0, 2'b01, '0)));
    repeat (8) @(negedge clk);
    check(b_dat_n == 1 && b_dat_got[0].path == 13'h0456 && b_dat_got[0].data == {13'h0456, 24'h00BEEF}
          && !b_dat_got[0].token, "dispatch");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
