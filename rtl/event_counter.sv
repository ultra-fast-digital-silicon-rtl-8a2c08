`timescale 1ps / 1ps
// event_counter: counts rising edges of the global timing signal, i.e. the number
// of triggering events (used to measure the dark count rate).
//
// The timing signal is the counter's clock; rst_n clears it asynchronously. The
// width (10 bits) is the design's. What happens at the top of the range is not
// specified: this counter saturates at 2^W - 1 and raises full, so a wrapped
// small value can never be mistaken for a true count.
//
// Interface: tree_out (counted edge), rst_n -> count[W-1:0], full.
module event_counter #(
  parameter int unsigned W = 10
) (
  input  logic         tree_out,
  input  logic         rst_n,
  output logic [W-1:0] count,
  output logic         full
);
  assign full = &count;

  always_ff @(posedge tree_out or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (!full) count <= count + 1'b1;
  end
endmodule
