// fifo_ship: the FIFO ship, a ship whose function is to hold words handed to
// it by its input dock and offer them, oldest first, to its output dock.
//
// Interface: in_* is the word the input dock delivers (a move with Do on the
// input dock); out_* is the word the output dock takes (a move with Di on
// the output dock). out_c is the ship's flag towards the output dock's C
// flag; this ship reports whether the word offered is the last one it holds,
// which lets a program stop draining when the ship runs empty.
//
// Timing: a word accepted in cycle t can be taken in cycle t+1. The ship is
// full after DEPTH words and then holds in_ready low.
//
// The document names the FIFO ship and draws it between an input and an
// output dock; its depth and the meaning of its flag are this design's
// choices.
module fifo_ship
  import fleet_pkg::*;
#(
  parameter int unsigned DEPTH = 8
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  in_valid,
  output logic  in_ready,
  input  word_t in_data,
  output logic  out_valid,
  input  logic  out_ready,
  output word_t out_data,
  output logic  out_c
);
  logic [$clog2(DEPTH+1)-1:0] count;

  sync_fifo #(.T(word_t), .DEPTH(DEPTH)) u_q (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .out_valid, .out_ready, .out_data,
    .count
  );

  assign out_c = (count == 1);

endmodule
