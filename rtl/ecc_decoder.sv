// ecc_decoder: on-chip decompressor for the Enhanced Compression Code (ECC).
//
// What it does
//   The ECC compresses scan test data in two stages: the Integrated
//   Compression Code (ICC: AVR, Golomb m=16 and bypass codewords for
//   alternating runs of 0s and 1s), followed by the nine-coded (9C) block
//   code applied to the ICC bit stream. This decoder receives the
//   compressed stream from the tester and delivers the original test data
//   bit by bit to the scan chain of the core under test.
//
// How it works
//   data_in -> ate_sync_fifo (tester clock to on-chip clock)
//           -> ninec_decoder (removes the 9C code; its first KH_W bits set
//              the block half size K/2)
//           -> icc_decoder   (expands ICC codewords into runs)
//           -> scan_in / scan_en.
//   The ICC codeword kind (select: AVR or Golomb; bypass) is a side band
//   input sampled at the first bit of each ICC codeword; mode_take
//   acknowledges it so the source can present the next one. Each clock
//   domain has its own two-flop reset synchroniser (asynchronous assertion,
//   synchronous release).
//
// Interface and timing
//   clk_ate domain: data_in, dec_en (tester has a bit), ack (decoder can
//   take it). clk_soc domain: select, bypass, mode_take, scan_in and
//   scan_en (scan clock enable: shift scan_in into the chain on this edge),
//   and status outputs: k_half (current REG_K/2), the 9C case of each
//   recognised codeword, the current ICC run type, icc_en (low while the
//   ICC stage counts out a run and holds the 9C stage) and a codeword error.
//   The on-chip clock may be faster than the tester clock; the decoder
//   stalls the tester through ack while runs are expanded.
//
// The order of the stages (9C decoded first, ICC second), the two clocks,
// the synchronisation circuit, select/bypass, Ack and Dec_en follow the
// published decoder. The FIFO, the side-band handshake and the reset
// synchronisers are this design's own choices.
module ecc_decoder
  import ecc_pkg::*;
#(
  parameter int unsigned K    = 4,         // AVR groups in the ICC stage
  parameter int unsigned M    = GOLOMB_M,  // Golomb group size
  parameter int unsigned KH_W = 4,         // width of REG_K/2
  parameter int unsigned AW   = 2          // log2 of the sync FIFO depth
) (
  input  logic            clk_ate,
  input  logic            clk_soc,
  input  logic            rst_n,
  // tester interface (clk_ate)
  input  logic            data_in,
  input  logic            dec_en,
  output logic            ack,
  // ICC codeword kind side band (clk_soc)
  input  logic            select,
  input  logic            bypass,
  output logic            mode_take,
  // scan chain (clk_soc)
  output logic            scan_in,
  output logic            scan_en,
  // status (clk_soc)
  output logic [KH_W-1:0] k_half,
  output ninec_case_e     blk_case,        // 9C case just recognised
  output logic            blk_case_valid,
  output logic            run_type,        // current ICC run type
  output logic            icc_en,          // ICC stage can take a bit
  output logic            icc_err
);

  // reset synchronisers
  logic [1:0] rst_ate_q, rst_soc_q;
  logic       rst_ate_n, rst_soc_n;

  always_ff @(posedge clk_ate or negedge rst_n) begin
    if (!rst_n) rst_ate_q <= '0;
    else        rst_ate_q <= {rst_ate_q[0], 1'b1};
  end
  always_ff @(posedge clk_soc or negedge rst_n) begin
    if (!rst_n) rst_soc_q <= '0;
    else        rst_soc_q <= {rst_soc_q[0], 1'b1};
  end
  assign rst_ate_n = rst_ate_q[1];
  assign rst_soc_n = rst_soc_q[1];

  // tester -> on-chip clock
  logic f_bit, f_valid, f_ready;

  ate_sync_fifo #(.AW(AW)) u_sync (
    .clk_ate  (clk_ate),
    .rst_ate_n(rst_ate_n),
    .data_in  (data_in),
    .dec_en   (dec_en),
    .ack      (ack),
    .clk_soc  (clk_soc),
    .rst_soc_n(rst_soc_n),
    .rd_bit   (f_bit),
    .rd_valid (f_valid),
    .rd_ready (f_ready)
  );

  // stage 1: 9C
  logic        c_bit, c_valid, c_ready;   // Data_in_1

  assign icc_en = c_ready;

  ninec_decoder #(.KH_W(KH_W)) u_ninec (
    .clk           (clk_soc),
    .rst_n         (rst_soc_n),
    .in_bit        (f_bit),
    .in_valid      (f_valid),
    .in_ready      (f_ready),
    .out_bit       (c_bit),
    .out_valid     (c_valid),
    .out_ready     (c_ready),
    .k_half        (k_half),
    .blk_case      (blk_case),
    .blk_case_valid(blk_case_valid)
  );

  // stage 2: ICC

  icc_decoder #(.K(K), .M(M)) u_icc (
    .clk      (clk_soc),
    .rst_n    (rst_soc_n),
    .in_bit   (c_bit),
    .in_valid (c_valid),
    .in_ready (c_ready),
    .select   (select),
    .bypass   (bypass),
    .mode_take(mode_take),
    .out_bit  (scan_in),
    .out_valid(scan_en),
    .run_type (run_type),
    .err      (icc_err)
  );

endmodule
