// run_counter: the run-length counter of the ICC decoder.
//
// The decoder shifts the bits of a codeword (leading marker, prefix
// polarity and tail) into this counter, most significant first, and then
// counts it down once per emitted run bit. `rs` tells the controller that
// the count has reached the stop value it supplies, which ends the run.
// `load` has priority over `shift`, which has priority over `dec`.
//
// The decoder described for this code names this block a (k+1)-bit
// counter loaded by `shift` and decremented by `dec1`, with `rs1` marking
// the end of the count. Its width here is a parameter; the ICC decoder
// makes it wide enough for the AVR value 1,p,tail (k+2 bits) and for the
// Golomb group size m, which is this design's own sizing.
module run_counter #(
  parameter int unsigned W = 6
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         load,      // load load_val
  input  logic [W-1:0] load_val,
  input  logic         shift,     // shift shift_bit in at the LSB
  input  logic         shift_bit,
  input  logic         dec,       // count down by one
  input  logic [W-1:0] stop_val,  // value at which rs is raised
  output logic [W-1:0] count,
  output logic         rs
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      count <= '0;
    else if (load)   count <= load_val;
    else if (shift)  count <= {count[W-2:0], shift_bit};
    else if (dec)    count <= count - W'(1);
  end

  assign rs = (count == stop_val);

endmodule
