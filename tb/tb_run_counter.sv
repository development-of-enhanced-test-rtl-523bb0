// tb_run_counter: self-checking testbench of the run counter.
// Random load / shift / decrement operations are applied and the count and
// the stop flag are compared every clock with a model kept in the
// testbench (priority load > shift > dec).
module tb_run_counter;
  localparam int W = 6;

  logic         clk = 1'b0;
  logic         rst_n;
  logic         load, shift, shift_bit, dec;
  logic [W-1:0] load_val, stop_val, count;
  logic         rs;
  logic [W-1:0] model;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  run_counter #(.W(W)) dut (
    .clk(clk), .rst_n(rst_n), .load(load), .load_val(load_val),
    .shift(shift), .shift_bit(shift_bit), .dec(dec), .stop_val(stop_val),
    .count(count), .rs(rs)
  );

  initial begin : watchdog
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rst_n = 1'b0; load = 0; shift = 0; shift_bit = 0; dec = 0;
    load_val = '0; stop_val = '0; model = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    // directed: shift in 1,0,1 then count down to 3 -> two decrements
    load = 1; load_val = 6'd1; @(negedge clk); load = 0;
    shift = 1; shift_bit = 0; @(negedge clk);
    shift_bit = 1; @(negedge clk); shift = 0;
    stop_val = 6'd3;
    checks++; if (count != 6'd5 || rs) begin failures++; $display("FAIL: shift value %0d", count); end
    dec = 1; @(negedge clk);
    checks++; if (count != 6'd4 || rs) begin failures++; $display("FAIL: dec 1"); end
    @(negedge clk); dec = 0;
    checks++; if (count != 6'd3 || !rs) begin failures++; $display("FAIL: rs at stop"); end
    model = count;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      load      = ($urandom % 8) == 0;
      shift     = ($urandom % 3) == 0;
      dec       = ($urandom % 2) == 0;
      shift_bit = $urandom;
      load_val  = $urandom;
      stop_val  = $urandom % 4;
      if (load)       model = load_val;
      else if (shift) model = {model[W-2:0], shift_bit};
      else if (dec)   model = model - 1;
      #1;
      checks++;
      if (rs != (count == stop_val)) begin failures++; $display("FAIL: rs"); end
      @(posedge clk); #1;
      checks++;
      if (count != model) begin failures++; $display("FAIL: count %0d exp %0d", count, model); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
