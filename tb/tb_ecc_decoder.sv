// tb_ecc_decoder: end-to-end testbench of the ECC decompressor at its
// default parameters (K = 4 AVR groups, m = 16, 4-bit REG_K/2, 4-entry
// synchronisation FIFO).
//
// For each of four scan-data sets, shaped like the test sets of the ISCAS'89
// circuits s298, s400, s1494 and s1196 (17, 24, 14 and 32 scan bits per
// vector), synthetic vectors are generated, compressed by the reference ICC
// encoder and then by the reference 9C encoder (K/2 = 4), and streamed in on
// a tester clock three times slower than the on-chip clock. The codeword
// kinds go in on the select/bypass side band. Every bit shifted into the
// scan chain is compared with the original data, and the number of on-chip
// clocks is checked against a lower bound (one clock per output bit). The
// compression efficiency (original - compressed) / original is printed.
//
// A fifth, hand-made set of long runs is aligned so that the two 9C cases
// that the random sets rarely produce (all ones, and 0s then 1s) occur.
//
// Mechanisms that must each happen at least once: every one of the nine 9C
// cases, bypass, AVR and Golomb codewords, Golomb codewords with prefix
// ones, the tester being held off by ack, and the ICC stage holding off the
// 9C stage while it expands a run.
module tb_ecc_decoder;
  import ecc_tb_pkg::*;
  import ecc_pkg::*;

  localparam int K    = 4;
  localparam int M    = 16;
  localparam int KH   = 4;
  localparam int KH_W = 4;

  logic        clk_ate = 1'b0, clk_soc = 1'b0;
  logic        rst_n;
  logic        data_in, dec_en, ack;
  logic        select, bypass, mode_take;
  logic        scan_in, scan_en;
  logic [3:0]  k_half;
  ninec_case_e blk_case;
  logic        blk_case_valid, run_type, icc_en, icc_err;

  always #15 clk_ate = ~clk_ate;
  always #5  clk_soc = ~clk_soc;

  ecc_decoder dut (
    .clk_ate(clk_ate), .clk_soc(clk_soc), .rst_n(rst_n),
    .data_in(data_in), .dec_en(dec_en), .ack(ack),
    .select(select), .bypass(bypass), .mode_take(mode_take),
    .scan_in(scan_in), .scan_en(scan_en),
    .k_half(k_half), .blk_case(blk_case), .blk_case_valid(blk_case_valid),
    .run_type(run_type), .icc_en(icc_en), .icc_err(icc_err)
  );

  int checks = 0, failures = 0;

  // stimulus / response state shared by the clock-domain processes
  bitq_t    ate_q;          // compressed bits still to send
  bit [1:0] mode_q[$];      // codeword kinds still to present
  bitq_t    scan_q;         // bits shifted into the scan chain
  int       soc_cycles;
  bit       running = 1'b0;

  // mechanism counters
  int n_case[10];
  int n_mode[4];
  int n_ack_stall = 0, n_icc_stall = 0, n_golomb_group = 0;

  task automatic check(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin : watchdog
    #50000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tester: one bit per tester clock when ack allows
  initial begin
    dec_en = 1'b0; data_in = 1'b0;
    forever begin
      @(negedge clk_ate);
      dec_en  = running && ate_q.size() > 0;
      data_in = (ate_q.size() > 0) ? ate_q[0] : 1'b0;
      @(posedge clk_ate);
      if (dec_en && ack)  void'(ate_q.pop_front());
      if (dec_en && !ack) n_ack_stall++;
    end
  end

  // on-chip side: side band, scan capture, mechanism counts
  initial begin
    select = 1'b0; bypass = 1'b1;
    forever begin
      @(negedge clk_soc);
      // after the last codeword, trailing padding bits pass as bypass bits
      {bypass, select} = (mode_q.size() > 0) ? mode_q[0] : MODE_BYPASS;
      #4;
      if (running) begin
        soc_cycles++;
        if (mode_take) begin
          n_mode[{bypass, select}]++;
          if (mode_q.size() > 0) void'(mode_q.pop_front());
        end
        if (scan_en) scan_q.push_back(scan_in);
        if (blk_case_valid) n_case[blk_case]++;
        if (!icc_en) n_icc_stall++;
      end
    end
  end

  task automatic run_set(input string name, input int width, input int nvec, input int keep);
    run_data(name, width, nvec, gen_vectors(nvec, width, keep));
  endtask

  task automatic run_data(input string name, input int width, input int nvec, input bitq_t data);
    bitq_t      icc, cmp;
    bit [1:0]   modes[$];
    icc_stats_t st;
    int         cc[10];
    real        eff_icc, eff_ecc;

    st = '{default: 0};
    for (int i = 0; i < 10; i++) cc[i] = 0;
    icc_encode(data, K, M, icc, modes, st);
    ninec_encode(icc, KH, KH_W, cmp, cc);

    rst_n = 1'b0;
    running = 1'b0;
    #100;
    scan_q.delete();
    ate_q  = cmp;
    mode_q = modes;
    soc_cycles = 0;
    @(negedge clk_ate);
    rst_n = 1'b1;
    #200;
    running = 1'b1;
    wait (scan_q.size() >= data.size());
    running = 1'b0;

    for (int i = 0; i < data.size(); i++)
      check(scan_q[i] == data[i], $sformatf("%s: scan bit %0d", name, i));
    check(k_half == 4'(KH), $sformatf("%s: REG_K/2 = %0d", name, k_half));
    check(!icc_err, $sformatf("%s: no ICC codeword error", name));
    check(soc_cycles >= data.size(), $sformatf("%s: at most one scan bit per clock", name));
    eff_icc = 100.0 * (data.size() - icc.size()) / data.size();
    eff_ecc = 100.0 * (data.size() - (cmp.size() - KH_W)) / data.size();
    n_golomb_group += st.n_golomb_multi;
    $display("%s: %0d vectors x %0d bits = %0d bits; ICC %0d bits (%.1f%%), ECC %0d bits (%.1f%%); %0d on-chip clocks",
             name, nvec, width, data.size(), icc.size(), eff_icc, cmp.size() - KH_W, eff_ecc,
             soc_cycles);
  endtask

  initial begin
    for (int i = 0; i < 10; i++) n_case[i] = 0;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    rst_n = 1'b0;
    run_set("s298-like",  17, 100, 88);
    run_set("s400-like",  24, 100, 90);
    run_set("s1494-like", 14, 100, 80);
    run_set("s1196-like", 32, 100, 93);
    // long runs: 112 zeros (Golomb, q = 7), 45 ones (AVR group 4),
    // 256 zeros (Golomb, q = 16). Their codewords line up with the 9C
    // blocks so that the rarer cases 2 (all ones) and 3 (0s then 1s) occur.
    begin
      bitq_t lr;
      repeat (112) lr.push_back(1'b0);
      repeat (46)  lr.push_back(1'b1);
      repeat (257) lr.push_back(1'b0);
      lr.push_back(1'b1);
      run_data("long-runs", 1, lr.size(), lr);
    end

    for (int c = 1; c <= 9; c++)
      check(n_case[c] > 0, $sformatf("9C case %0d happened (%0d)", c, n_case[c]));
    check(n_mode[MODE_BYPASS] > 0, $sformatf("bypass codewords (%0d)", n_mode[MODE_BYPASS]));
    check(n_mode[MODE_AVR] > 0,    $sformatf("AVR codewords (%0d)", n_mode[MODE_AVR]));
    check(n_mode[MODE_GOLOMB] > 0, $sformatf("Golomb codewords (%0d)", n_mode[MODE_GOLOMB]));
    check(n_golomb_group > 0, $sformatf("Golomb codewords with prefix ones (%0d)", n_golomb_group));
    check(n_ack_stall > 0, $sformatf("tester held off by ack (%0d)", n_ack_stall));
    check(n_icc_stall > 0, $sformatf("ICC stage held off the 9C stage (%0d)", n_icc_stall));
    $display("9C cases: %0d %0d %0d %0d %0d %0d %0d %0d %0d", n_case[1], n_case[2], n_case[3],
             n_case[4], n_case[5], n_case[6], n_case[7], n_case[8], n_case[9]);
    $display("ICC codewords: bypass %0d, AVR %0d, Golomb %0d; tester stalls %0d, ICC stalls %0d",
             n_mode[MODE_BYPASS], n_mode[MODE_AVR], n_mode[MODE_GOLOMB], n_ack_stall, n_icc_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
