// tb_cla_memory: random two-port traffic on the default 2K x 8 concurrent
// line-access memory against a behavioural model. Every cycle both ports use
// one random row; each port independently reads, writes or idles on a random
// column. Reads are checked one clock later. Same-word read/write pairs must
// return the old word. A second instance with four ports checks that up to
// MUX ports can work on one row at once.
module tb_cla_memory;
  localparam int ROWS = 512, MUX = 4, WIDTH = 8;
  int checks = 0, failures = 0;
  int n_rr = 0, n_ww = 0, n_rw = 0, n_same = 0;

  logic clk = 0;
  always #5 clk = !clk;

  logic [8:0]       row;
  logic [1:0]       en, we;
  logic [1:0]       col   [2];
  logic [WIDTH-1:0] wdata [2];
  logic [WIDTH-1:0] rdata [2];

  cla_memory dut (.clk, .row, .en, .we, .col, .wdata, .rdata);

  // four-port instance, small
  logic [2:0]       row4;
  logic [3:0]       en4, we4;
  logic [1:0]       col4   [4];
  logic [WIDTH-1:0] wdata4 [4];
  logic [WIDTH-1:0] rdata4 [4];
  cla_memory #(.ROWS(8), .MUX(4), .WIDTH(8), .PORTS(4)) dut4 (
    .clk, .row(row4), .en(en4), .we(we4), .col(col4), .wdata(wdata4), .rdata(rdata4));

  logic [WIDTH-1:0] model [ROWS][MUX];
  logic [WIDTH-1:0] exp_q [2];
  logic [1:0]       chk_q;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  initial begin
    en = '0; we = '0; row = '0; col[0] = 0; col[1] = 0; wdata[0] = 0; wdata[1] = 0;
    en4 = '0; we4 = '0; row4 = '0;
    for (int p = 0; p < 4; p++) begin col4[p] = 0; wdata4[p] = 0; end
    // initialise all words through port 0 and port 1 together
    for (int r = 0; r < ROWS; r++) begin
      for (int c = 0; c < MUX; c += 2) begin
        @(negedge clk);
        row = 9'(r); en = 2'b11; we = 2'b11;
        col[0] = 2'(c); col[1] = 2'(c + 1);
        wdata[0] = 8'(r * 7 + c); wdata[1] = 8'(r * 7 + c + 1);
        model[r][c] = wdata[0]; model[r][c+1] = wdata[1];
      end
    end
    @(negedge clk); en = '0;
    chk_q = '0;
    repeat (20000) begin
      @(negedge clk);
      // check reads issued in the previous cycle
      for (int p = 0; p < 2; p++)
        if (chk_q[p]) check(rdata[p] == exp_q[p], $sformatf("port %0d read", p));
      row = 9'($urandom_range(ROWS - 1));
      for (int p = 0; p < 2; p++) begin
        en[p] = ($urandom_range(3) != 0);
        we[p] = $urandom_range(1);
        col[p] = 2'($urandom_range(MUX - 1));
        wdata[p] = 8'($urandom);
      end
      if ($urandom_range(7) == 0) col[1] = col[0];
      if (en == 2'b11 && we == 2'b11 && col[0] == col[1]) we[1] = 1'b0;
      // expected values: reads see the line before this cycle's writes
      chk_q = '0;
      for (int p = 0; p < 2; p++) begin
        if (en[p] && !we[p]) begin chk_q[p] = 1'b1; exp_q[p] = model[row][col[p]]; end
      end
      if (en == 2'b11) begin
        if (we == 2'b00) n_rr++;
        else if (we == 2'b11) n_ww++;
        else begin
          n_rw++;
          if (col[0] == col[1]) n_same++;
        end
      end
      for (int p = 0; p < 2; p++)
        if (en[p] && we[p]) model[row][col[p]] = wdata[p];
    end
    @(negedge clk);
    for (int p = 0; p < 2; p++)
      if (chk_q[p]) check(rdata[p] == exp_q[p], $sformatf("port %0d read", p));
    en = '0;
    check(n_rr > 0 && n_ww > 0 && n_rw > 0 && n_same > 0, "all port combinations exercised");

    // four ports: write a row through all four, read it back through all four
    @(negedge clk);
    row4 = 3'd5; en4 = 4'hf; we4 = 4'hf;
    for (int p = 0; p < 4; p++) begin col4[p] = 2'(3 - p); wdata4[p] = 8'(8'h30 + p); end
    @(negedge clk);
    we4 = 4'h0;
    for (int p = 0; p < 4; p++) col4[p] = 2'(p);
    @(negedge clk);
    en4 = 4'h0;
    for (int p = 0; p < 4; p++) check(rdata4[p] == 8'(8'h30 + 3 - p), $sformatf("4-port read %0d", p));

    $display("combinations: RR=%0d WW=%0d RW=%0d same-word RW=%0d", n_rr, n_ww, n_rw, n_same);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
