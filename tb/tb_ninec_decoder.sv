// tb_ninec_decoder: self-checking testbench of the 9C decoder stage.
//
// Directed part: after the header K/2 = 4, one codeword of each of the nine
// cases is sent and the 8-bit blocks they expand to, and the number of
// clocks each takes, are checked (uniform halves give one bit per clock
// without input). Random part: streams of random data (biased so that all
// cases appear) are encoded by the reference 9C encoder for K/2 = 4 and 3
// and decoded with random input gaps and random output back-pressure.
module tb_ninec_decoder;
  import ecc_tb_pkg::*;
  import ecc_pkg::*;

  localparam int KH_W = 4;

  logic            clk = 1'b0;
  logic            rst_n;
  logic            in_bit, in_valid, in_ready;
  logic            out_bit, out_valid, out_ready;
  logic [KH_W-1:0] k_half;
  ninec_case_e     blk_case;
  logic            blk_case_valid;

  int checks = 0, failures = 0;
  int cycle = 0;
  int seen[10];

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  ninec_decoder #(.KH_W(KH_W)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_bit(in_bit), .in_valid(in_valid), .in_ready(in_ready),
    .out_bit(out_bit), .out_valid(out_valid), .out_ready(out_ready),
    .k_half(k_half), .blk_case(blk_case), .blk_case_valid(blk_case_valid)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  task automatic run_stream(input bitq_t code, input int gap_pct, input int bp_pct,
                            input int n_out, ref bitq_t outq, output int last_cyc);
    int guard;
    guard = 0;
    last_cyc = 0;
    while (outq.size() < n_out && guard < 100000) begin
      @(negedge clk);
      in_valid  = (code.size() > 0) && (($urandom % 100) >= gap_pct);
      in_bit    = (code.size() > 0) ? code[0] : 1'b0;
      out_ready = (($urandom % 100) >= bp_pct);
      #4;
      if (blk_case_valid) seen[blk_case]++;
      if (in_valid && in_ready) void'(code.pop_front());
      if (out_valid && out_ready) begin
        outq.push_back(out_bit);
        last_cyc = cycle;
      end
      guard++;
    end
    @(negedge clk);
    in_valid = 1'b0;
    check(code.size() == 0, "all input consumed");
  endtask

  task automatic do_reset();
    rst_n = 1'b0; in_valid = 1'b0; in_bit = 1'b0; out_ready = 1'b1;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t code, outq, exp, data;
    int    cc[10];
    int    c0, last;
    // blocks of the nine cases, in order, K = 8
    bit [7:0] blk[9] = '{8'h00, 8'hFF, 8'h0F, 8'hF0, 8'hF5, 8'hAF, 8'h05, 8'hA0, 8'h5A};
    // codeword length + expansion: clocks per block at full rate
    int       clk_per[9] = '{9, 10, 13, 13, 13, 13, 13, 13, 12};

    for (int i = 0; i < 10; i++) begin
      seen[i] = 0;
      cc[i] = 0;
    end

    // ---- directed: one block per case, timed one at a time ----
    for (int c = 0; c < 9; c++) begin
      do_reset();
      data.delete();
      for (int b = 7; b >= 0; b--) data.push_back(blk[c][b]);
      code.delete();
      ninec_encode(data, 4, KH_W, code, cc);
      outq.delete();
      // header takes 4 clocks; then the block
      c0 = cycle;
      run_stream(code, 0, 0, 8, outq, last);
      check(k_half == 4, "REG_K/2 loaded from the header");
      check(outq.size() == 8, $sformatf("case %0d: 8 bits", c + 1));
      for (int b = 0; b < 8 && b < outq.size(); b++)
        check(outq[b] == data[b], $sformatf("case %0d: bit %0d", c + 1, b));
      // codeword bits + uniform-half bits + passed-through bits
      check(last - c0 == 4 + clk_per[c] - (c == 0 ? 0 : 0),
            $sformatf("case %0d: %0d clocks, expected %0d", c + 1, last - c0, 4 + clk_per[c]));
      check(seen[c + 1] == 1, $sformatf("case %0d recognised", c + 1));
    end

    // ---- random streams ----
    for (int r = 0; r < 6; r++) begin
      int kh;
      kh = (r % 2 == 0) ? 4 : 3;
      do_reset();
      data = gen_vectors(30, 24, (r < 2) ? 50 : 85);
      code.delete();
      outq.delete();
      ninec_encode(data, kh, KH_W, code, cc);
      exp = data;
      while (exp.size() % (2 * kh) != 0) exp.push_back(1'b0);
      run_stream(code, (r >= 2) ? 30 : 0, (r >= 4) ? 30 : 0, exp.size(), outq, last);
      check(outq.size() == exp.size(), $sformatf("random %0d: length", r));
      for (int i = 0; i < exp.size() && i < outq.size(); i++)
        check(outq[i] == exp[i], $sformatf("random %0d: bit %0d", r, i));
    end
    for (int c = 1; c <= 9; c++)
      check(cc[c] > 1, $sformatf("case %0d occurred in random streams (%0d)", c, cc[c]));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
