// message_counter: test message source for the modulators.
//
// A free-running binary counter clocked by the board clock; its bit MSG_BIT
// is the message, a square wave that holds each value for 2**MSG_BIT clocks.
// The document generates the message with a simple counter on the board
// clock but gives neither its width nor which bit is used: MSG_BIT = 10
// (1024 clocks per bit, four carrier periods at phase increment 1) and the
// synchronous active-low reset to zero are this design's choices.
//
// Timing: after reset the count is 0 and message is 0; message first rises
// after 2**MSG_BIT clock edges.
module message_counter #(
  parameter int unsigned MSG_BIT = 10
) (
  input  logic clk,
  input  logic rst_n,
  output logic message
);

  logic [MSG_BIT:0] count;

  always_ff @(posedge clk) begin
    if (!rst_n) count <= '0;
    else        count <= count + 1'b1;
  end

  always_comb message = count[MSG_BIT];

endmodule
