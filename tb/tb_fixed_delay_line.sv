// tb_fixed_delay_line: runs the default 1920-word delay line. First a
// continuous stream, where a word entering in cycle n must leave in cycle
// n + 1920 (checked cycle by cycle, including out_valid staying low while the
// array fills), then a stream with random gaps, where each output must equal
// the input accepted 1920 words earlier. The wrap-around write of the last
// row's final word through the row-0 decoding is exercised many times.
module tb_fixed_delay_line;
  localparam int D = 1920;
  int checks = 0, failures = 0, wraps = 0;

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n;
  logic in_valid, out_valid;
  logic [7:0] in_data, out_data;

  fixed_delay_line dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  logic [7:0] hist [$];
  int         accepted = 0, cyc = 0, first_out = -1;
  logic       exp_v;
  logic [7:0] exp_d;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic step(input bit v);
    @(negedge clk);
    check(out_valid == exp_v, $sformatf("out_valid at cycle %0d", cyc));
    if (exp_v) check(out_data == exp_d, $sformatf("word at cycle %0d", cyc));
    if (out_valid && first_out < 0) first_out = cyc;
    in_valid = v;
    in_data  = 8'($urandom);
    exp_v = 1'b0;
    if (v) begin
      hist.push_back(in_data);
      if (accepted >= D - 1) begin exp_v = 1'b1; exp_d = hist[accepted - (D - 1)]; end
      accepted++;
      if (accepted % D == 0) wraps++;
    end
    cyc++;
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_data = 0; exp_v = 0; exp_d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    // continuous stream: input of cycle 0 must come out in cycle D
    for (int i = 0; i < 3 * D; i++) step(1'b1);
    check(first_out == D, $sformatf("latency %0d cycles, expected %0d", first_out, D));
    // stream with gaps
    for (int i = 0; i < 3 * D; i++) step($urandom_range(2) != 0);
    step(1'b0);
    check(wraps >= 4, "array wrapped");
    $display("latency=%0d wraps=%0d", first_out, wraps);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
