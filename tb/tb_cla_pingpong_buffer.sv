// tb_cla_pingpong_buffer: streams random words with random gaps through the
// default 4-row, column-multiplexing-4 buffer. Each output word must equal the
// input accepted HALF = 8 words earlier, and must appear exactly one clock
// after the accepting edge. The halves must swap at least a few times.
module tb_cla_pingpong_buffer;
  localparam int HALF = 8;
  int checks = 0, failures = 0, swaps = 0, n_out = 0;

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n;
  logic in_valid, out_valid;
  logic [7:0] in_data, out_data;

  cla_pingpong_buffer dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data);

  logic [7:0] hist [$];
  int         accepted = 0;
  logic       exp_v;
  logic [7:0] exp_d;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    rst_n = 0; in_valid = 0; in_data = 0; exp_v = 0; exp_d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    repeat (400) begin
      @(negedge clk);
      check(out_valid == exp_v, "out_valid timing");
      if (exp_v) begin
        check(out_data == exp_d, $sformatf("word %0d", n_out));
        n_out++;
      end
      in_valid = ($urandom_range(3) != 0);
      in_data  = 8'($urandom);
      exp_v = 1'b0;
      if (in_valid) begin
        hist.push_back(in_data);
        if (accepted >= HALF) begin exp_v = 1'b1; exp_d = hist[accepted - HALF]; end
        accepted++;
        if (accepted % HALF == 0) swaps++;
      end
    end
    @(negedge clk);
    check(out_valid == exp_v, "out_valid timing");
    if (exp_v) check(out_data == exp_d, "last word");
    check(swaps > 4, "halves swapped");
    check(n_out > 100, "enough output words");
    $display("swaps=%0d outputs=%0d", swaps, n_out);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
