// ninec_decoder: the nine-coded (9C) stage of the ECC decompressor.
//
// What it does
//   The 9C code cuts a bit stream into K-bit blocks and each block into two
//   K/2 halves. A half is "0" (all zeros), "1" (all ones) or "U" (mixed).
//   Nine prefix-free codewords name the pair of half kinds:
//     0 -> 00   10 -> 11   11000 -> 01   11001 -> 10
//     11010 -> 1U   11011 -> U1   11100 -> 0U   11101 -> U0   1111 -> UU
//   and every U half follows its codeword verbatim (left half first).
//   This block expands such a stream; in the ECC decoder its output is the
//   ICC bit stream fed to icc_decoder.
//
// How it works
//   After reset the first KH_W bits of the stream (most significant first)
//   are loaded into REG_K/2; that value K/2 holds for the whole test set.
//   The FSM then reads codeword bits until the case is known, sets the
//   2-bit select of the output multiplexer (constant 0, constant 1 or the
//   data input) for the left and the right half, and lets Counter 1,
//   loaded from REG_K/2, count out K/2 output bits per half.
//
// Interface and timing
//   Input and output are bit-serial valid/ready streams. A uniform half
//   produces one bit per clock without taking input; a U half passes one
//   input bit per clock straight through the multiplexer (out_valid follows
//   in_valid and in_ready follows out_ready in the same cycle). Each
//   codeword bit takes one clock. `blk_case` pulses with `blk_case_valid`
//   when a codeword has been recognised.
//
// The codeword table, the half structure, REG_K/2 loaded from the head of
// the stream, Counter 1 and the three-input multiplexer follow the
// published 9C decoder. The ready/valid handshakes, the header width
// KH_W = 4 and the left-half-first order are this design's own choices.
module ninec_decoder
  import ecc_pkg::*;
#(
  parameter int unsigned KH_W = 4   // width of REG_K/2
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            in_bit,
  input  logic            in_valid,
  output logic            in_ready,
  output logic            out_bit,
  output logic            out_valid,
  input  logic            out_ready,
  output logic [KH_W-1:0] k_half,          // REG_K/2
  output ninec_case_e     blk_case,
  output logic            blk_case_valid
);

  typedef enum logic [1:0] {
    LOAD_K = 2'd0,   // shifting the K/2 header into REG_K/2
    CODE   = 2'd1,   // reading a codeword
    HALF   = 2'd2    // producing the two halves of a block
  } state_e;

  state_e          state;
  logic [KH_W-1:0] reg_kh;
  logic [KH_W-1:0] hdr_cnt;
  logic [KH_W-1:0] cnt1;          // Counter 1
  logic [3:0]      pre;           // codeword bits read so far
  logic [2:0]      pre_n;         // how many
  logic            half_idx;      // 0: left, 1: right
  half_sel_e       sel_l, sel_r, sel;

  // decode of the codeword so far, including the bit now on in_bit
  logic [4:0]  cw;
  logic [2:0]  cw_n;
  logic        cw_done;
  ninec_case_e cw_case;
  half_sel_e   cw_l, cw_r;

  assign cw   = {pre, in_bit};
  assign cw_n = pre_n + 3'd1;

  always_comb begin
    cw_done = 1'b0;
    cw_case = C9_NONE;
    cw_l    = HALF_ZERO;
    cw_r    = HALF_ZERO;
    unique case (cw_n)
      3'd1: if (cw[0] == 1'b0) begin
        cw_done = 1'b1; cw_case = C9_ALL0; cw_l = HALF_ZERO; cw_r = HALF_ZERO;
      end
      3'd2: if (cw[1:0] == 2'b10) begin
        cw_done = 1'b1; cw_case = C9_ALL1; cw_l = HALF_ONE; cw_r = HALF_ONE;
      end
      3'd4: if (cw[3:0] == 4'b1111) begin
        cw_done = 1'b1; cw_case = C9_U_U; cw_l = HALF_DATA; cw_r = HALF_DATA;
      end
      3'd5: begin
        cw_done = 1'b1;
        unique case (cw[4:0])
          5'b11000: begin cw_case = C9_0_1; cw_l = HALF_ZERO; cw_r = HALF_ONE;  end
          5'b11001: begin cw_case = C9_1_0; cw_l = HALF_ONE;  cw_r = HALF_ZERO; end
          5'b11010: begin cw_case = C9_1_U; cw_l = HALF_ONE;  cw_r = HALF_DATA; end
          5'b11011: begin cw_case = C9_U_1; cw_l = HALF_DATA; cw_r = HALF_ONE;  end
          5'b11100: begin cw_case = C9_0_U; cw_l = HALF_ZERO; cw_r = HALF_DATA; end
          default:  begin cw_case = C9_U_0; cw_l = HALF_DATA; cw_r = HALF_ZERO; end
        endcase
      end
      default: ;
    endcase
  end

  assign sel = half_idx ? sel_r : sel_l;

  // output multiplexer and handshakes
  always_comb begin
    out_bit   = 1'b0;
    out_valid = 1'b0;
    in_ready  = 1'b0;
    unique case (state)
      LOAD_K, CODE: in_ready = 1'b1;
      HALF: begin
        unique case (sel)
          HALF_ZERO: begin out_bit = 1'b0;   out_valid = 1'b1;     end
          HALF_ONE:  begin out_bit = 1'b1;   out_valid = 1'b1;     end
          default:   begin out_bit = in_bit; out_valid = in_valid;
                           in_ready = out_ready;                   end
        endcase
      end
      default: ;
    endcase
  end

  logic adv;   // one output bit of the current half is delivered
  assign adv = (state == HALF) && out_valid && out_ready;

  assign blk_case_valid = (state == CODE) && in_valid && cw_done;
  assign blk_case       = blk_case_valid ? cw_case : C9_NONE;
  assign k_half         = reg_kh;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= LOAD_K;
      reg_kh   <= '0;
      hdr_cnt  <= '0;
      cnt1     <= '0;
      pre      <= '0;
      pre_n    <= '0;
      half_idx <= 1'b0;
      sel_l    <= HALF_ZERO;
      sel_r    <= HALF_ZERO;
    end else begin
      unique case (state)
        LOAD_K: if (in_valid) begin
          reg_kh  <= {reg_kh[KH_W-2:0], in_bit};
          hdr_cnt <= hdr_cnt + 1'b1;
          if (hdr_cnt == KH_W'(KH_W - 1)) state <= CODE;
        end
        CODE: if (in_valid) begin
          if (cw_done) begin
            pre      <= '0;
            pre_n    <= '0;
            sel_l    <= cw_l;
            sel_r    <= cw_r;
            half_idx <= 1'b0;
            cnt1     <= reg_kh;
            state    <= HALF;
          end else begin
            pre   <= cw[3:0];
            pre_n <= cw_n;
          end
        end
        HALF: if (adv) begin
          if (cnt1 == KH_W'(1)) begin
            if (half_idx) begin
              state <= CODE;
            end else begin
              half_idx <= 1'b1;
              cnt1     <= reg_kh;
            end
          end else begin
            cnt1 <= cnt1 - 1'b1;
          end
        end
        default: state <= LOAD_K;
      endcase
    end
  end

  // K/2 must be at least one bit.
  a_khalf: assert property (@(posedge clk) disable iff (!rst_n)
                            (state == HALF) |-> (reg_kh != '0))
    else $error("ninec_decoder: REG_K/2 holds zero");

endmodule
