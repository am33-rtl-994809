// sync_fifo: a small synchronous first-in first-out buffer with valid/ready
// handshakes on both sides. It is the storage element behind the epilogue
// fifo, the instruction fifo, a dock's inbound data buffer, the output dock's
// token store and the FIFO ship.
//
// Interface: in_valid/in_ready/in_data enqueue; out_valid/out_ready/out_data
// dequeue from the head. A transfer happens on a rising clock edge where
// valid and ready are both high. in_ready is high whenever a slot is free; a
// full fifo does not accept a word in the same cycle as one leaves (no
// pass-through), so in_ready never depends on out_ready.
//
// Timing: a word written in cycle t is visible at the head in cycle t+1.
// DEPTH may be any value of 1 or more. Storage is a plain array indexed by
// wrapping read and write pointers.
module sync_fifo #(
  parameter type         T     = logic [7:0],
  parameter int unsigned DEPTH = 4
) (
  input  logic clk,
  input  logic rst_n,
  input  logic in_valid,
  output logic in_ready,
  input  T     in_data,
  output logic out_valid,
  input  logic out_ready,
  output T     out_data,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  T                mem [DEPTH];
  logic [AW-1:0]   rd_ptr, wr_ptr;
  logic [$clog2(DEPTH+1)-1:0] cnt;

  logic push, pop;
  assign in_ready  = (cnt != DEPTH[$clog2(DEPTH+1)-1:0]);
  assign out_valid = (cnt != '0);
  assign out_data  = mem[rd_ptr];
  assign push      = in_valid && in_ready;
  assign pop       = out_valid && out_ready;
  assign count     = cnt;

  function automatic logic [AW-1:0] next_ptr(logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + AW'(1);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_ptr <= '0;
      wr_ptr <= '0;
      cnt    <= '0;
    end else begin
      if (push) wr_ptr <= next_ptr(wr_ptr);
      if (pop)  rd_ptr <= next_ptr(rd_ptr);
      case ({push, pop})
        2'b10:   cnt <= cnt + 1'b1;
        2'b01:   cnt <= cnt - 1'b1;
        default: cnt <= cnt;
      endcase
    end
  end

  always_ff @(posedge clk) begin
    if (push) mem[wr_ptr] <= in_data;
  end

endmodule
