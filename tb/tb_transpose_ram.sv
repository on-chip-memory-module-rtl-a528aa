// tb_transpose_ram: feeds six random 8 x 8 blocks (row-major, with random
// input gaps) into the transposition memory. From the second block on, the
// output stream must be the previous block in column-major order, one word per
// accepted input and one clock after it. The scan order must alternate.
module tb_transpose_ram;
  localparam int N = 8, NB = 6;
  int checks = 0, failures = 0, order_flips = 0;

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n;
  logic in_valid, out_valid, order, order_d;
  logic [15:0] in_data, out_data;

  transpose_ram dut (.clk, .rst_n, .in_valid, .in_data, .out_valid, .out_data, .order);

  logic [15:0] blk [NB][N][N];
  int          k = 0;            // accepted words
  logic        exp_v;
  logic [15:0] exp_d;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < N; i++)
        for (int j = 0; j < N; j++)
          blk[b][i][j] = 16'($urandom);
    rst_n = 0; in_valid = 0; in_data = 0; exp_v = 0; exp_d = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    order_d = 0;
    while (k < NB * N * N) begin
      @(negedge clk);
      check(out_valid == exp_v, "out_valid timing");
      if (exp_v) check(out_data == exp_d, $sformatf("word %0d", k));
      if (order != order_d) order_flips++;
      order_d = order;
      in_valid = ($urandom_range(4) != 0);
      exp_v = 1'b0;
      if (in_valid) begin
        int b, t;
        b = k / (N * N); t = k % (N * N);
        in_data = blk[b][t / N][t % N];
        if (b > 0) begin
          // previous block, column-major: element (row t%N, column t/N)
          exp_v = 1'b1;
          exp_d = blk[b - 1][t % N][t / N];
        end
        k++;
      end
    end
    @(negedge clk);
    in_valid = 0;
    check(out_valid == exp_v, "out_valid timing");
    if (exp_v) check(out_data == exp_d, "last word");
    check(order_flips == NB - 1, "scan order alternates once per block");
    $display("order flips=%0d", order_flips);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
