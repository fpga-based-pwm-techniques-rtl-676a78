// up_counter: free-running N-bit binary up counter with overflow outputs.
//
// The counter advances by one on each clock where `en` is high and wraps
// from all ones to zero. Two overflow signals are given:
//   carry    - combinational, high in the cycle in which the counter holds
//              all ones and is enabled, i.e. the cycle whose clock edge wraps
//              it. Used to cascade counters and to load the next duty word.
//   overflow - registered carry: high for one cycle right after the wrap,
//              i.e. in the cycle where a new counting period starts.
// Reset (synchronous, active high) clears the count and sets `overflow`, so
// the first cycle after reset is the first cycle of a period.
//
// The document names the counter and its overflow output (Fig. 14, Fig. 19)
// but not its timing; the two overflow flavours and the reset behaviour are
// this design's choices.
module up_counter #(
  parameter int unsigned WIDTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             en,
  output logic [WIDTH-1:0] count,
  output logic             carry,
  output logic             overflow
);

  assign carry = en && (count == {WIDTH{1'b1}});

  always_ff @(posedge clk) begin
    if (rst) begin
      count    <= '0;
      overflow <= 1'b1;
    end else begin
      if (en) count <= count + 1'b1;
      overflow <= carry;
    end
  end

endmodule
