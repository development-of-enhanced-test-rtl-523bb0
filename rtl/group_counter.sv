// group_counter: the prefix / tail length counter of the ICC decoder.
//
// While the prefix of an AVR codeword arrives, the controller counts each
// prefix bit up with `inc`; the count is then the group number i, which
// is also the tail length. While the tail arrives, `dec` counts it down,
// and `rs` (count equal to one) marks the last tail bit. For a Golomb
// codeword the controller loads the fixed tail length log2(m).
// `load` has priority over `inc`, which has priority over `dec`.
//
// The decoder described for this code names this a log2(k+1)-bit counter
// with `inc`, `dec2` and `rs2`; the load input and the meaning of rs as
// "one left" are this design's own choices.
module group_counter #(
  parameter int unsigned W = 3
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,
  input  logic [W-1:0] load_val,
  input  logic         inc,
  input  logic         dec,
  output logic [W-1:0] count,
  output logic         rs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)     count <= '0;
    else if (load)  count <= load_val;
    else if (inc)   count <= count + W'(1);
    else if (dec)   count <= count - W'(1);
  end

  assign rs = (count == W'(1));

endmodule
