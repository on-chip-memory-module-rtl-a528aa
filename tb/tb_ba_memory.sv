// tb_ba_memory: exercises the default 256 x 32-bit block-access memory.
//  - default mode: random writes and reads against a model;
//  - block-access reads: row scan of four 64-word blocks, column scan of a
//    16 x 16 image (step 16), backward scan (step -1), and short 8-word row
//    segments of an image (blocks shorter than the serial adder needs, so
//    the memory must stall);
//  - block-access writes, read back in default mode;
//  - a scan with random gaps in the access requests.
// The address sequence expected from each parameter set is worked out here
// from start, end, distance and step. For the long blocks the whole scan
// must take exactly one set-up clock plus one clock per word: block changes
// cost no cycle.
module tb_ba_memory;
  import vmem_pkg::*;
  localparam int W = 256, AW = 8, SW = 9;
  int checks = 0, failures = 0;
  int n_stall = 0, n_block_end = 0, n_fwd = 0, n_bwd = 0, n_col = 0;

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n;
  logic cfg_we, cfg_busy, ba_go, ba_stop;
  logic [AW-1:0] cfg_start, cfg_end, cfg_dist, acc_addr;
  logic signed [SW-1:0] cfg_step;
  logic [15:0] cfg_count;
  logic acc_en, acc_we, rvalid, ready, block_end, stall;
  logic [31:0] acc_wdata, rdata;
  ba_state_e state;
  logic [3:0] shift1;

  ba_memory dut (.clk, .rst_n, .cfg_we, .cfg_start, .cfg_end, .cfg_dist, .cfg_step, .cfg_count,
                 .cfg_busy, .ba_go, .ba_stop, .acc_en, .acc_we, .acc_addr, .acc_wdata,
                 .rdata, .rvalid, .ready, .block_end, .stall, .state, .shift1);

  logic [31:0] model [W];
  int          seq [$];

  always @(posedge clk) begin
    if (stall) n_stall++;
    if (block_end) n_block_end++;
  end

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  // Expected word sequence of a block scan.
  task automatic make_seq(input int s, input int e, input int d, input int st, input int cnt);
    int p, sz;
    seq.delete();
    sz = (e - s) & 255;
    for (int b = 0; b < cnt; b++) begin
      p = s;
      for (int n = 0; n < W; n++) begin
        seq.push_back(p);
        if (p == e) break;
        p = (p + st) & 255;
      end
      s = (e + d) & 255;
      e = (s + sz) & 255;
    end
  endtask

  task automatic default_write(input int a, input logic [31:0] v);
    @(negedge clk);
    acc_en = 1; acc_we = 1; acc_addr = AW'(a); acc_wdata = v;
    model[a] = v;
    @(negedge clk);
    acc_en = 0; acc_we = 0;
  endtask

  task automatic default_read_check(input int a);
    @(negedge clk);
    acc_en = 1; acc_we = 0; acc_addr = AW'(a);
    @(negedge clk);
    acc_en = 0;
    check(rvalid && rdata == model[a], $sformatf("default read %0d", a));
  endtask

  // Runs one block-access scan; returns the number of clocks from ba_go to
  // the clock of the last access.
  task automatic scan(input int s, input int e, input int d, input int st, input int cnt,
                      input bit wr, input bit gaps, output int clocks);
    int i, n_pend, exp_a;
    bit pend;
    make_seq(s, e, d, st, cnt);
    @(negedge clk);
    cfg_we = 1; cfg_start = AW'(s); cfg_end = AW'(e); cfg_dist = AW'(d);
    cfg_step = SW'(st); cfg_count = 16'(cnt);
    @(negedge clk);
    cfg_we = 0;
    while (cfg_busy) @(negedge clk);
    ba_go = 1;
    @(negedge clk);
    ba_go = 0;
    clocks = 1;
    i = 0; pend = 0;
    while (i < seq.size()) begin
      check(!pend || (rvalid && rdata == model[exp_a]),
            $sformatf("block read %0d, word %0d", i - 1, exp_a));
      pend = 0;
      acc_en = gaps ? ($urandom_range(2) != 0) : 1'b1;
      acc_we = wr;
      acc_wdata = 32'($urandom);
      #1;
      if (acc_en && ready) begin
        exp_a = seq[i];
        if (wr) model[exp_a] = acc_wdata;
        else pend = 1;
        i++;
      end
      @(negedge clk);
      clocks++;
      if (clocks > 5000) break;
    end
    acc_en = 0; acc_we = 0;
    check(!pend || (rvalid && rdata == model[exp_a]), "last block read");
    check(state == BA_DONE, "done after the programmed blocks");
  endtask

  initial begin
    int clocks, e0;
    rst_n = 0; cfg_we = 0; ba_go = 0; ba_stop = 0; acc_en = 0; acc_we = 0;
    cfg_start = 0; cfg_end = 0; cfg_dist = 0; cfg_step = 1; cfg_count = 1;
    acc_addr = 0; acc_wdata = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    // default mode
    for (int a = 0; a < W; a++) default_write(a, {8'(a), 8'(~a), 16'($urandom)});
    for (int k = 0; k < 64; k++) default_read_check($urandom_range(W - 1));

    // row scan: four 64-word blocks, next start = end + 1
    scan(0, 63, 1, 1, 4, 0, 0, clocks);
    check(clocks == 1 + 256, $sformatf("row scan took %0d clocks, expected 257", clocks));
    n_fwd++;
    // column scan of an 8-wide, 32-row image: each block is one column
    e0 = n_stall;
    scan(0, 248, 9, 8, 8, 0, 0, clocks);
    check(n_stall == e0, "no stall for 32-word columns");
    check(clocks == 1 + 256, $sformatf("column scan took %0d clocks, expected 257", clocks));
    n_col++;
    // backward scan: 255 down to 0 in four blocks
    scan(255, 192, 255, -1, 4, 0, 0, clocks);
    check(clocks == 1 + 256, $sformatf("backward scan took %0d clocks", clocks));
    n_bwd++;
    // 8-word row segments of a 16-wide image: 8 rows of the top-left 8 x 8 block
    e0 = n_stall;
    scan(0, 7, 9, 1, 8, 0, 0, clocks);
    check(n_stall > e0, "short blocks stall while the next addresses are formed");
    check(clocks > 1 + 64, "stall cycles added");
    // block-access writes: an 8 x 8 block at (row 4, column 8) written column by column
    scan(72, 184, 145, 16, 8, 1, 0, clocks);
    for (int a = 0; a < W; a++) default_read_check(a);
    // gaps in the requests, full-search style: block shifted one column
    scan(1, 8, 8, 1, 8, 0, 1, clocks);
    // stop in the middle of a scan returns to default mode
    @(negedge clk);
    cfg_we = 1; cfg_start = 0; cfg_end = 255; cfg_dist = 1; cfg_step = 1; cfg_count = 1;
    @(negedge clk); cfg_we = 0;
    while (cfg_busy) @(negedge clk);
    ba_go = 1; @(negedge clk); ba_go = 0;
    acc_en = 1; repeat (5) @(negedge clk); acc_en = 0;
    ba_stop = 1; @(negedge clk); ba_stop = 0;
    check(state == BA_IDLE, "stop returns to default mode");
    default_read_check(77);

    check(n_block_end == 40, "one block end per programmed block");
    $display("stall clocks=%0d block ends=%0d", n_stall, n_block_end);
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
