// tb_icc_decoder: self-checking testbench of the ICC decoder.
//
// Directed part: one AVR codeword (run of 12, codeword 11011) and one
// Golomb codeword (run of 37: 1 1 0 0101) are decoded after reset, and the
// output bits and their exact clock cycles are checked against the timing
// of the codeword (one input bit per clock, then L+1 output bits, Golomb
// prefix ones expanding to m bits each).
// Random part: synthetic data is encoded by the reference ICC encoder and
// fed with random gaps in in_valid; the decoded bits must equal the data.
// Every codeword kind (bypass, AVR on 0s and on 1s, Golomb with and without
// prefix ones) must occur.
module tb_icc_decoder;
  import ecc_tb_pkg::*;

  localparam int K = 4;
  localparam int M = 16;

  logic clk = 1'b0;
  logic rst_n;
  logic in_bit, in_valid, in_ready;
  logic select, bypass, mode_take;
  logic out_bit, out_valid, run_type, err;

  int checks = 0, failures = 0;
  int cycle = 0;

  always #5 clk = ~clk;
  always @(posedge clk) cycle++;

  icc_decoder #(.K(K), .M(M)) dut (
    .clk(clk), .rst_n(rst_n),
    .in_bit(in_bit), .in_valid(in_valid), .in_ready(in_ready),
    .select(select), .bypass(bypass), .mode_take(mode_take),
    .out_bit(out_bit), .out_valid(out_valid),
    .run_type(run_type), .err(err)
  );

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Drive a code stream; return the decoded bits and the cycle of each.
  task automatic run_stream(input bitq_t code, input bit [1:0] modes[$],
                            input int gap_pct, input int max_out,
                            ref bitq_t outq, ref int out_cyc[$]);
    int idle;
    idle = 0;
    while ((code.size() > 0 || idle < 80) && outq.size() < max_out) begin
      @(negedge clk);
      in_valid = (code.size() > 0) && (($urandom % 100) >= gap_pct);
      in_bit   = (code.size() > 0) ? code[0] : 1'b0;
      {bypass, select} = (modes.size() > 0) ? modes[0] : 2'b00;
      #4;
      if (in_valid && in_ready) void'(code.pop_front());
      if (mode_take) void'(modes.pop_front());
      if (out_valid) begin
        outq.push_back(out_bit);
        out_cyc.push_back(cycle);
      end
      if (code.size() == 0) idle++;
    end
    @(negedge clk);
    in_valid = 1'b0;
  endtask

  task automatic do_reset();
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_bit   = 1'b0;
    select   = 1'b0;
    bypass   = 1'b0;
    repeat (3) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bitq_t      code, outq, data;
    bit [1:0]   modes[$];
    int         out_cyc[$];
    int         c0;
    icc_stats_t st;

    // ---- directed: AVR, run of twelve 0s then terminator 1 ----
    do_reset();
    code  = '{1, 1, 0, 1, 1};
    modes = '{MODE_AVR};
    c0    = cycle;
    run_stream(code, modes, 0, 13, outq, out_cyc);
    check(outq.size() == 13, "AVR: 13 output bits");
    for (int i = 0; i < 13 && i < outq.size(); i++) begin
      check(outq[i] == (i == 12), $sformatf("AVR: bit %0d", i));
      // codeword takes 5 clocks, first output in the clock after
      check(out_cyc[i] - c0 == 6 + i, $sformatf("AVR: bit %0d at cycle %0d", i, out_cyc[i] - c0));
    end
    check(run_type == 1'b1, "AVR: run type toggled to 1");

    // ---- directed: Golomb, run of 37 zeros: 1 1 0 0101 ----
    do_reset();
    code  = '{1, 1, 0, 0, 1, 0, 1};
    modes = '{MODE_GOLOMB};
    outq.delete();
    out_cyc.delete();
    c0 = cycle;
    run_stream(code, modes, 0, 38, outq, out_cyc);
    check(outq.size() == 38, "Golomb: 38 output bits");
    for (int i = 0; i < 38 && i < outq.size(); i++)
      check(outq[i] == (i == 37), $sformatf("Golomb: bit %0d", i));
    // 1 input + 16 out + 1 input + 16 out + 5 input + 6 out = 45 clocks
    if (out_cyc.size() == 38) begin
      check(out_cyc[0] - c0 == 2,   "Golomb: first group starts after one input bit");
      check(out_cyc[16] - c0 == 19, "Golomb: second group after the second prefix bit");
      check(out_cyc[37] - c0 == 45, "Golomb: terminator in the 45th clock");
    end

    // ---- directed: bypass bits 0 0 1 1 -> 0 0 1 0 ----
    do_reset();
    code  = '{0, 0, 1, 1};
    modes = '{MODE_BYPASS, MODE_BYPASS, MODE_BYPASS, MODE_BYPASS};
    outq.delete();
    out_cyc.delete();
    run_stream(code, modes, 0, 4, outq, out_cyc);
    check(outq.size() == 4 && outq[0] == 0 && outq[1] == 0 && outq[2] == 1 && outq[3] == 0,
          "bypass: transition-coded bits");

    // ---- random streams ----
    st = '{default: 0};
    for (int r = 0; r < 6; r++) begin
      do_reset();
      data = gen_vectors(20, 32, (r % 3 == 0) ? 60 : (r % 3 == 1) ? 90 : 97);
      code.delete();
      modes.delete();
      outq.delete();
      out_cyc.delete();
      icc_encode(data, K, M, code, modes, st);
      run_stream(code, modes, (r < 3) ? 0 : 40, data.size(), outq, out_cyc);
      check(outq.size() == data.size(), $sformatf("random %0d: length %0d/%0d", r, outq.size(), data.size()));
      for (int i = 0; i < data.size() && i < outq.size(); i++)
        check(outq[i] == data[i], $sformatf("random %0d: bit %0d", r, i));
      check(!err, "no codeword error");
    end
    $display("codewords: bypass=%0d avr=%0d (on 1s %0d) golomb=%0d (q>=1 %0d)",
             st.n_bypass, st.n_avr, st.n_avr_ones, st.n_golomb, st.n_golomb_multi);
    check(st.n_bypass > 0, "bypass codewords occurred");
    check(st.n_avr_ones > 0, "AVR codewords on 1s occurred");
    check(st.n_golomb > 0, "Golomb codewords occurred");
    check(st.n_golomb_multi > 0, "Golomb codewords with q>=1 occurred");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule
