// tb_ba_address_calc: configures random block parameters and checks the
// bit-serial adder: busy lasts AW = 8 clocks after configuration (size pass)
// and 2*AW clocks after next_req, after which the multiplexer shows
// start = end + distance and end = start + (end - start) on its output.
// Repeated next_req walks several blocks ahead. The random address input must
// pass through when selected.
module tb_ba_address_calc;
  localparam int AW = 8, SW = 9;
  int checks = 0, failures = 0;

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n, cfg_we, next_req, busy;
  logic [AW-1:0] cfg_start, cfg_end, cfg_dist, rand_addr, addr;
  logic signed [SW-1:0] cfg_step, step;
  logic [1:0] sel;

  ba_address_calc dut (.clk, .rst_n, .cfg_we, .cfg_start, .cfg_end, .cfg_dist, .cfg_step,
                       .next_req, .sel, .rand_addr, .addr, .step, .busy);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  task automatic wait_busy(input int expect_cycles, input string what);
    int n = 0;
    while (busy) begin @(negedge clk); n++; end
    check(n == expect_cycles, $sformatf("%s took %0d clocks, expected %0d", what, n, expect_cycles));
  endtask

  initial begin
    logic [AW-1:0] s, e, d, sz;
    rst_n = 0; cfg_we = 0; next_req = 0; sel = 0; rand_addr = 0;
    cfg_start = 0; cfg_end = 0; cfg_dist = 0; cfg_step = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    repeat (50) begin
      s = AW'($urandom); e = AW'($urandom); d = AW'($urandom);
      cfg_we = 1; cfg_start = s; cfg_end = e; cfg_dist = d; cfg_step = SW'($urandom);
      @(negedge clk);
      cfg_we = 0;
      check(step == cfg_step, "step register");
      wait_busy(AW, "size pass");
      sz = e - s;
      sel = 2'd1; #1 check(addr == s, "start kept");
      sel = 2'd2; #1 check(addr == e, "end kept");
      repeat (3) begin
        next_req = 1;
        @(negedge clk);
        next_req = 0;
        wait_busy(2 * AW, "next-block passes");
        s = e + d; e = s + sz;
        sel = 2'd1; #1 check(addr == s, $sformatf("next start %0h got %0h", s, addr));
        sel = 2'd2; #1 check(addr == e, $sformatf("next end %0h got %0h", e, addr));
      end
      sel = 2'd0; rand_addr = AW'($urandom);
      #1 check(addr == rand_addr, "random address through the multiplexer");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
