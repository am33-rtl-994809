// tb_fifo_ship: self-checking test of the FIFO ship. Random pushes and pops
// against a queue model: every word must come out in order, the ship must
// refuse a word exactly when it holds DEPTH, the flag must mark the last
// word held, and a word must be offered one cycle after it is accepted.
module tb_fifo_ship;
  import fleet_pkg::*;
  localparam int unsigned DEPTH = 8;

  logic clk = 0, rst_n = 0;
  logic in_valid, in_ready, out_valid, out_ready, out_c;
  word_t in_data, out_data;
  int checks = 0, failures = 0;
  word_t model[$];

  fifo_ship #(.DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t", what, $time); end
  endtask

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    in_valid = 0; out_ready = 0; in_data = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    @(negedge clk);
    check(!out_valid, "empty after reset");
    // latency: push one word, visible next cycle
    in_valid = 1; in_data = 37'h12345; @(negedge clk);
    in_valid = 0;
    check(out_valid && out_data == 37'h12345 && out_c, "one-cycle latency and last-word flag");
    out_ready = 1; @(negedge clk); out_ready = 0;
    check(!out_valid, "empty again");
    // random traffic
    for (int cyc = 0; cyc < 4000; cyc++) begin
      in_valid  = ($urandom_range(0, 2) != 0);
      out_ready = ($urandom_range(0, 2) == 0) || (cyc > 3500);
      in_data   = {$urandom(), 5'($urandom())};
      #1;
      check(in_ready == (model.size() < DEPTH), "full exactly at DEPTH");
      check(out_valid == (model.size() != 0), "valid when not empty");
      if (out_valid) begin
        check(out_data == model[0], "order");
        check(out_c == (model.size() == 1), "last-word flag");
      end
      @(posedge clk);
      if (out_valid && out_ready) void'(model.pop_front());
      if (in_valid && in_ready) model.push_back(in_data);
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
