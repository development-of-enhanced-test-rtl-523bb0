// tb_ecc_workloads: the evaluation workloads of the ECC decompressor.
//
// For each scan width of the ISCAS'89 circuits s298, s400, s1494 and s1196
// (17, 24, 14 and 32 scan bits per vector), a set of synthetic test cubes
// with 25% specified bits is generated, and each of the four don't-care
// fills is applied: column-wise bit stuffing (CBSTD), bit stuffing followed
// by difference vectors (CBSTDDIFF), zero fill and minimum-transition fill
// (MTFILL). Each filled set is checked against its cubes, compressed with
// the reference ICC and 9C encoders, streamed through the decoder at its
// default parameters, and every bit reaching the scan chain is compared
// with the filled data (for CBSTDDIFF, with the difference vectors). The
// testbench prints, per set, the compression efficiency
// (original - compressed) / original of ICC and of ECC, and the average and
// peak weighted transition metric of the scan vectors. A directed 20-bit
// cube first checks the zero and minimum-transition fills and their WTM.
module tb_ecc_workloads;
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

  task automatic run_fills(input string circ, input int w, input int nvec);
    cubes_t cb;
    bitq_t  t[4];
    string  fname[4] = '{"CBSTD", "CBSTDDIFF", "ZEROFILL", "MTFILL"};
    cb   = gen_cubes(nvec, w, 25);
    t[0] = fill_cbs(cb);
    t[1] = diff_vectors(t[0], w);
    t[2] = fill_zero(cb);
    t[3] = fill_mt(cb);
    check(fill_ok(cb, t[0]) && fill_ok(cb, t[2]) && fill_ok(cb, t[3]),
          $sformatf("%s: fills keep every specified bit", circ));
    for (int f = 0; f < 4; f++) begin
      int sum, peak;
      sum = 0;
      peak = 0;
      for (int v = 0; v < nvec; v++) begin
        int x;
        x = wtm(t[f], v, w);
        sum += x;
        if (x > peak) peak = x;
      end
      $display("%s %s: WTM average %.2f peak %0d", circ, fname[f], real'(sum) / nvec, peak);
      run_data($sformatf("%s %s", circ, fname[f]), w, nvec, t[f]);
    end
  endtask

  // bits of a string of '0', '1' and 'x'
  function automatic bitq_t str_bits(string s, bit care);
    bitq_t q;
    for (int i = 0; i < s.len(); i++)
      q.push_back(care ? (s[i] != "x") : (s[i] == "1"));
    return q;
  endfunction

  // Directed fill example: one 20-bit cube, its zero fill and its
  // minimum-transition fill, and their WTM: sum of (t - i) over every
  // transition between positions i and i+1 of a t-bit vector.
  task automatic fill_example();
    cubes_t cb;
    bitq_t  z, mt;
    string  cube = "0000110xxxx1001xxxx0";
    cb.n    = 1;
    cb.w    = 20;
    cb.val  = str_bits(cube, 1'b0);
    cb.care = str_bits(cube, 1'b1);
    z  = fill_zero(cb);
    mt = fill_mt(cb);
    check(z == str_bits("00001100000100100000", 1'b0), "example: zero fill");
    check(mt == str_bits("00001100000100111110", 1'b0), "example: minimum-transition fill");
    check(wtm(z, 0, 20) == 58, $sformatf("example: zero-fill WTM %0d", wtm(z, 0, 20)));
    check(wtm(mt, 0, 20) == 54, $sformatf("example: MT-fill WTM %0d", wtm(mt, 0, 20)));
  endtask

  initial begin
    fill_example();
    for (int i = 0; i < 10; i++) n_case[i] = 0;
    for (int i = 0; i < 4; i++) n_mode[i] = 0;
    rst_n = 1'b0;
    run_fills("s298",  17, 60);
    run_fills("s400",  24, 60);
    run_fills("s1494", 14, 60);
    run_fills("s1196", 32, 60);
    check(n_mode[MODE_BYPASS] > 0, $sformatf("bypass codewords (%0d)", n_mode[MODE_BYPASS]));
    check(n_mode[MODE_AVR] > 0,    $sformatf("AVR codewords (%0d)", n_mode[MODE_AVR]));
    check(n_mode[MODE_GOLOMB] > 0, $sformatf("Golomb codewords (%0d)", n_mode[MODE_GOLOMB]));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
