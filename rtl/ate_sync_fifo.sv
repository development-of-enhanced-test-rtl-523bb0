// ate_sync_fifo: the synchronisation circuit between the tester clock and
// the on-chip clock of the ECC decompressor.
//
// What it does
//   The tester (ATE) sends one compressed bit per tester clock while it
//   asserts dec_en; the decompressor consumes bits on the on-chip clock,
//   which is faster but stalls while runs are being expanded. This block is
//   a small asynchronous FIFO of single bits between the two clocks. Its
//   `ack` output tells the tester that it may send (the FIFO is not full).
//
// How it works
//   A dual-clock FIFO with 2**AW one-bit entries. Write and read pointers
//   are AW+1 bits wide, kept in binary and Gray code; each Gray pointer is
//   passed to the other clock through two flip-flops. Full and empty are
//   computed from the local pointer and the synchronised remote pointer, so
//   both are conservative.
//
// Interface and timing
//   Tester side (clk_ate): data_in is written on a rising edge of clk_ate
//   when dec_en and ack are both high. On-chip side (clk_soc): rd_bit is
//   valid while rd_valid is high and is removed when rd_ready is high on a
//   rising edge of clk_soc. A written bit becomes visible on the read side
//   two to three clk_soc edges later. An assertion checks that an offered
//   bit stays offered and unchanged until it is taken.
//
// The two clocks, a synchronisation circuit and the Ack / Dec_en signals
// are named in the published decoder; their implementation as a Gray-code
// FIFO and the depth of four are this design's own choices.
module ate_sync_fifo #(
  parameter int unsigned AW = 2   // log2 of the number of entries
) (
  // tester side
  input  logic clk_ate,
  input  logic rst_ate_n,
  input  logic data_in,
  input  logic dec_en,
  output logic ack,
  // on-chip side
  input  logic clk_soc,
  input  logic rst_soc_n,
  output logic rd_bit,
  output logic rd_valid,
  input  logic rd_ready
);

  localparam int unsigned DEPTH = 1 << AW;

  logic [DEPTH-1:0] mem;
  logic [AW:0] wbin, wgray, rbin, rgray;
  logic [AW:0] rgray_w1, rgray_w2;   // read pointer in the tester domain
  logic [AW:0] wgray_r1, wgray_r2;   // write pointer in the on-chip domain
  logic        wr, rd;

  function automatic logic [AW:0] bin2gray(input logic [AW:0] b);
    return b ^ (b >> 1);
  endfunction

  // ---------------- tester clock domain ----------------
  assign ack = (wgray != {~rgray_w2[AW:AW-1], rgray_w2[AW-2:0]});
  assign wr  = dec_en && ack;

  always_ff @(posedge clk_ate or negedge rst_ate_n) begin
    if (!rst_ate_n) begin
      wbin     <= '0;
      wgray    <= '0;
      rgray_w1 <= '0;
      rgray_w2 <= '0;
    end else begin
      rgray_w1 <= rgray;
      rgray_w2 <= rgray_w1;
      if (wr) begin
        wbin  <= wbin + 1'b1;
        wgray <= bin2gray(wbin + 1'b1);
      end
    end
  end

  always_ff @(posedge clk_ate) begin
    if (wr) mem[wbin[AW-1:0]] <= data_in;
  end

  // ---------------- on-chip clock domain ----------------
  assign rd_valid = (rgray != wgray_r2);
  assign rd_bit   = mem[rbin[AW-1:0]];
  assign rd       = rd_valid && rd_ready;

  always_ff @(posedge clk_soc or negedge rst_soc_n) begin
    if (!rst_soc_n) begin
      rbin     <= '0;
      rgray    <= '0;
      wgray_r1 <= '0;
      wgray_r2 <= '0;
    end else begin
      wgray_r1 <= wgray;
      wgray_r2 <= wgray_r1;
      if (rd) begin
        rbin  <= rbin + 1'b1;
        rgray <= bin2gray(rbin + 1'b1);
      end
    end
  end

  // Read-side handshake: a bit that is offered and not taken stays offered
  // and unchanged.
  a_rd_hold: assert property (@(posedge clk_soc) disable iff (!rst_soc_n)
                              (rd_valid && !rd_ready) |=> (rd_valid && $stable(rd_bit)))
    else $error("ate_sync_fifo: offered bit withdrawn or changed");

endmodule
