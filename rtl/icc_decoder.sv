// icc_decoder: decoder of the Integrated Compression Code (ICC).
//
// What it does
//   The test data is treated as alternating runs. A run of type a is L bits
//   equal to a followed by one terminating bit ~a; after each terminator the
//   run type toggles. A T flip-flop holds the current type a, and every scan
//   bit is formed as a XOR fout, where fout is what the FSM emits (0 for a
//   run bit, 1 for the terminator, which also toggles the flip-flop).
//   Each run is sent as one of three codeword kinds, named by the side-band
//   inputs `select` and `bypass` that are sampled with the first bit of the
//   codeword (`mode_take` pulses then):
//     bypass=1            one raw bit b: scan bit a^b, toggle when b=1.
//                         Used for runs of length 0 and 1.
//     bypass=0, select=0  AVR codeword: group i (1..K) is i prefix bits of
//                         polarity p, one separator ~p and an i-bit tail j.
//                         L = 2^(i+1) - 3 + p*2^i + j  (1,2,3,4 in group 1,
//                         5..12 in group 2, 13..28 in group 3 ...).
//     bypass=0, select=1  Golomb codeword, m = GOLOMB_M: q ones, a zero and
//                         a log2(m)-bit tail r; L = q*m + r.
//
// How it works
//   States S0..S6: S0 is the start and bypass state; S1/S2 take an AVR
//   prefix of 0s/1s; S3 emits the m run bits of one Golomb prefix 1; S4
//   takes the Golomb prefix; S5 shifts the tail into the run counter while
//   the group counter counts the tail length down; S6 emits the run and
//   then the terminator. For an AVR codeword the run counter is loaded with
//   the binary number 1,p,tail and counted down to 3, which yields exactly
//   L run bits; for a Golomb tail it is counted down to 0.
//
// Interface and timing
//   One input bit is taken per clock when in_valid and in_ready (in_ready is
//   the decoder's `en`: low while a run is being counted out). One scan bit
//   is produced per clock when out_valid (the scan clock enable `v`).
//   A bypass bit is passed to the output in the cycle it is taken. An AVR
//   codeword of group i takes 2i+1 input cycles and then L+1 output cycles;
//   a Golomb codeword takes q+1+log2(m) input cycles, q*m output cycles
//   interleaved with its prefix, and r+1 output cycles after the tail.
//
// The codeword tables, m = 16, the bypass mode, the select/bypass inputs,
// the two counters, the T flip-flop with XOR and the seven states S0..S6
// follow the published decoder. The run convention (terminator included),
// the meaning of a bypass bit, the side-band handshake through mode_take,
// the state roles in detail and the group count K = 4 are this design's
// own choices.
module icc_decoder
  import ecc_pkg::*;
#(
  parameter int unsigned K        = 4,         // number of AVR groups
  parameter int unsigned M        = GOLOMB_M   // Golomb group size
) (
  input  logic clk,
  input  logic rst_n,
  // compressed ICC bit stream
  input  logic in_bit,
  input  logic in_valid,
  output logic in_ready,
  // codeword kind of the next codeword, sampled when mode_take is high
  input  logic select,
  input  logic bypass,
  output logic mode_take,
  // decoded scan data
  output logic out_bit,
  output logic out_valid,
  // status
  output logic run_type,   // current run type a (T flip-flop)
  output logic err         // sticky: AVR prefix longer than K groups
);

  localparam int unsigned GLOG = $clog2(M);
  localparam int unsigned CW   = (K + 2 > GLOG + 1) ? K + 2 : GLOG + 1;
  localparam int unsigned GW_A = $clog2(K + 1);
  localparam int unsigned GW_G = $clog2(GLOG + 1);
  localparam int unsigned GW   = (GW_A > GW_G) ? GW_A : GW_G;

  typedef enum logic [2:0] {
    S0 = 3'd0,  // start / bypass
    S1 = 3'd1,  // AVR prefix of 0s
    S2 = 3'd2,  // AVR prefix of 1s
    S3 = 3'd3,  // Golomb: emit m run bits for one prefix 1
    S4 = 3'd4,  // Golomb prefix
    S5 = 3'd5,  // tail shift
    S6 = 3'd6   // emit run, then terminator
  } state_e;

  state_e state, state_n;
  logic   golomb, golomb_n;   // codeword in progress is a Golomb codeword
  logic   t_q;                // T flip-flop: run type a
  logic   err_q;

  // FSM control outputs to the counters (names after the block diagram)
  logic          shift, dec1, ld1;
  logic [CW-1:0] ld1_val;
  logic          inc, dec2, ld2;
  logic [GW-1:0] ld2_val;
  logic [CW-1:0] cnt1;
  logic [GW-1:0] cnt2;
  logic          rs1, rs2;
  logic          fout, tog;
  logic          take;

  run_counter #(.W(CW)) u_run_counter (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (ld1),
    .load_val (ld1_val),
    .shift    (shift),
    .shift_bit(in_bit),
    .dec      (dec1),
    .stop_val (golomb ? CW'(0) : CW'(3)),
    .count    (cnt1),
    .rs       (rs1)
  );

  group_counter #(.W(GW)) u_group_counter (
    .clk      (clk),
    .rst_n    (rst_n),
    .load     (ld2),
    .load_val (ld2_val),
    .inc      (inc),
    .dec      (dec2),
    .count    (cnt2),
    .rs       (rs2)
  );

  assign in_ready  = (state == S0) || (state == S1) || (state == S2) ||
                     (state == S4) || (state == S5);
  assign take      = in_valid && in_ready;
  assign mode_take = take && (state == S0);

  always_comb begin
    state_n   = state;
    golomb_n  = golomb;
    shift     = 1'b0;
    dec1      = 1'b0;
    ld1       = 1'b0;
    ld1_val   = '0;
    inc       = 1'b0;
    dec2      = 1'b0;
    ld2       = 1'b0;
    ld2_val   = '0;
    fout      = 1'b0;
    tog       = 1'b0;
    out_valid = 1'b0;

    unique case (state)
      S0: if (take) begin
        if (bypass) begin
          out_valid = 1'b1;
          fout      = in_bit;
          tog       = in_bit;
        end else if (select) begin
          golomb_n = 1'b1;
          if (in_bit) begin
            ld1 = 1'b1; ld1_val = CW'(M);
            state_n = S3;
          end else begin
            ld1 = 1'b1; ld1_val = '0;
            ld2 = 1'b1; ld2_val = GW'(GLOG);
            state_n = S5;
          end
        end else begin
          golomb_n = 1'b0;
          ld1 = 1'b1; ld1_val = CW'({1'b1, in_bit});
          ld2 = 1'b1; ld2_val = GW'(1);
          state_n = in_bit ? S2 : S1;
        end
      end
      S1, S2: if (take) begin
        if (in_bit == (state == S2)) begin
          inc = 1'b1;                 // one more prefix bit
        end else begin
          state_n = S5;               // separator: tail of cnt2 bits follows
        end
      end
      S3: begin
        out_valid = 1'b1;
        dec1      = 1'b1;
        if (cnt1 == CW'(1)) state_n = S4;
      end
      S4: if (take) begin
        if (in_bit) begin
          ld1 = 1'b1; ld1_val = CW'(M);
          state_n = S3;
        end else begin
          ld1 = 1'b1; ld1_val = '0;
          ld2 = 1'b1; ld2_val = GW'(GLOG);
          state_n = S5;
        end
      end
      S5: if (take) begin
        shift = 1'b1;
        dec2  = 1'b1;
        if (rs2) state_n = S6;
      end
      S6: begin
        out_valid = 1'b1;
        if (rs1) begin
          fout    = 1'b1;             // terminator
          tog     = 1'b1;
          state_n = S0;
        end else begin
          dec1 = 1'b1;
        end
      end
      default: state_n = S0;
    endcase
  end

  assign out_bit  = t_q ^ fout;
  assign run_type = t_q;
  assign err      = err_q;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state  <= S0;
      golomb <= 1'b0;
      t_q    <= 1'b0;
      err_q  <= 1'b0;
    end else begin
      state  <= state_n;
      golomb <= golomb_n;
      if (tog) t_q <= ~t_q;
      if (inc && cnt2 == GW'(K)) err_q <= 1'b1;
    end
  end

  // An AVR prefix may not be longer than the number of groups.
  a_prefix_len: assert property (@(posedge clk) disable iff (!rst_n)
                                 !(inc && cnt2 == GW'(K)))
    else $error("icc_decoder: AVR prefix longer than %0d groups", K);

endmodule
