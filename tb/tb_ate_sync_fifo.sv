// tb_ate_sync_fifo: self-checking testbench of the tester-to-chip
// synchronisation FIFO.
// The tester side (period 30) sends a random bit sequence whenever ack
// allows; the chip side (period 10 or 70) reads with random ready. The bits
// read must be exactly the bits written, in order. Both the full condition
// (ack low while the tester has data) and the empty condition must occur.
module tb_ate_sync_fifo;
  logic clk_ate = 1'b0, clk_soc = 1'b0;
  logic rst_n;
  logic data_in, dec_en, ack;
  logic rd_bit, rd_valid, rd_ready;
  int   soc_half = 5;
  int   checks = 0, failures = 0;
  bit   sent[$], got[$];
  int   n_full = 0, n_empty = 0;
  int   total;
  int   rd_pct;

  always #15 clk_ate = ~clk_ate;
  always #(soc_half) clk_soc = ~clk_soc;

  ate_sync_fifo #(.AW(2)) dut (
    .clk_ate(clk_ate), .rst_ate_n(rst_n), .data_in(data_in), .dec_en(dec_en), .ack(ack),
    .clk_soc(clk_soc), .rst_soc_n(rst_n), .rd_bit(rd_bit), .rd_valid(rd_valid), .rd_ready(rd_ready)
  );

  initial begin : watchdog
    #2000000;
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // tester
  initial begin
    dec_en = 1'b0; data_in = 1'b0;
    wait (rst_n);
    forever begin
      @(negedge clk_ate);
      if (sent.size() < total) begin
        dec_en  = ($urandom % 4) != 0;
        data_in = $urandom;
      end else dec_en = 1'b0;
      @(posedge clk_ate);
      if (dec_en && !ack) n_full++;
      if (dec_en && ack) sent.push_back(data_in);
    end
  end

  // chip side
  initial begin
    rd_ready = 1'b0;
    wait (rst_n);
    forever begin
      @(negedge clk_soc);
      rd_ready = ($urandom % 100) < rd_pct;
      @(posedge clk_soc);
      if (!rd_valid) n_empty++;
      if (rd_valid && rd_ready) got.push_back(rd_bit);
    end
  end

  // wait until the tester has sent `total` bits and the reader has caught
  // up, or a generous time has passed
  task automatic drain();
    wait (sent.size() == total);
    fork
      wait (got.size() >= sent.size());
      #50000;
    join_any
    disable fork;
    #1000;
  endtask

  initial begin
    total = 0;
    rd_pct = 100;
    rst_n = 1'b0;
    #100 rst_n = 1'b1;
    // phase 1: fast chip clock
    total = 300;
    drain();
    // phase 2: slow chip clock, rarely ready -> FIFO fills
    soc_half = 35;
    rd_pct   = 30;
    total    = 600;
    drain();
    checks++;
    if (got.size() != sent.size()) begin
      failures++;
      $display("FAIL: sent %0d got %0d", sent.size(), got.size());
    end
    for (int i = 0; i < got.size() && i < sent.size(); i++) begin
      checks++;
      if (got[i] != sent[i]) begin
        failures++;
        $display("FAIL: bit %0d", i);
      end
    end
    checks += 2;
    if (n_full == 0)  begin failures++; $display("FAIL: FIFO never full"); end
    if (n_empty == 0) begin failures++; $display("FAIL: FIFO never empty"); end
    $display("full=%0d empty=%0d", n_full, n_empty);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
