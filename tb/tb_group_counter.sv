// tb_group_counter: self-checking testbench of the group counter.
// A prefix of three bits is counted up, the tail is counted down and the
// "last tail bit" flag must rise exactly on the third tail bit; then random
// load / inc / dec operations are compared with a model.
module tb_group_counter;
  localparam int W = 3;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         load, inc, dec;
  logic [W-1:0] load_val, count;
  logic         rs;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  group_counter #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(load_val),
    .inc(inc), .dec(dec), .count(count), .rs(rs)
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 0; inc = 0; dec = 0; load_val = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    checks++; if (count != 0) begin failures++; $display("FAIL: reset"); end
    inc = 1; repeat (3) @(negedge clk); inc = 0;
    checks++; if (count != 3) begin failures++; $display("FAIL: prefix count %0d", count); end
    for (int i = 0; i < 3; i++) begin
      checks++;
      if (rs != (i == 2)) begin failures++; $display("FAIL: rs on tail bit %0d", i); end
      dec = 1; @(negedge clk); dec = 0;
    end
    model = count;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load     = ($urandom % 6) == 0;
      inc      = ($urandom % 2) == 0;
      dec      = ($urandom % 2) == 0;
      load_val = $urandom;
      if (load)     model = load_val;
      else if (inc) model = model + 1;
      else if (dec) model = model - 1;
      @(posedge clk); #1;
      checks += 2;
      if (count != model) begin failures++; $display("FAIL: count %0d exp %0d", count, model); end
      if (rs != (model == 1)) begin failures++; $display("FAIL: rs"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
