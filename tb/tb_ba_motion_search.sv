// tb_ba_motion_search: block-matching motion estimation run through the
// block-access memory at its default size (256 x 32 bit).
//
// The memory holds a 16 x 16-pixel search window, row-major, one pixel in the
// low byte of each word. An 8 x 8 reference block is cut from the window at
// (3, 5), so that position has a sum of absolute differences (SAD) of zero.
// Each candidate position (py, px), 0..8 in both directions, is read as one
// block-access scan: eight 8-pixel row segments, start = py*16 + px,
// end = start + 7, step 1, distance 9 (to the next row of the window).
//  - Full search: all 81 positions, row scan of each block, the block shifted
//    by one column between candidates. The minimum must be found at (3, 5).
//  - Three-step search: step sizes 4, 2, 1 around the best point so far,
//    nine locations per step (those outside the window skipped). The chosen
//    vector must match a direct model of the same search.
// Each SAD formed from the memory's read data is compared with the SAD
// computed directly from the window.
module tb_ba_motion_search;
  import vmem_pkg::*;
  localparam int X = 16, B = 8, PY0 = 3, PX0 = 5;
  int checks = 0, failures = 0, positions = 0, scan_clocks = 0, stalls = 0;

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n;
  logic cfg_we, cfg_busy, ba_go, ba_stop;
  logic [7:0] cfg_start, cfg_end, cfg_dist, acc_addr;
  logic signed [8:0] cfg_step;
  logic [15:0] cfg_count;
  logic acc_en, acc_we, rvalid, ready, block_end, stall;
  logic [31:0] acc_wdata, rdata;
  ba_state_e state;
  logic [3:0] shift1;

  ba_memory dut (.clk, .rst_n, .cfg_we, .cfg_start, .cfg_end, .cfg_dist, .cfg_step, .cfg_count,
                 .cfg_busy, .ba_go, .ba_stop, .acc_en, .acc_we, .acc_addr, .acc_wdata,
                 .rdata, .rvalid, .ready, .block_end, .stall, .state, .shift1);

  logic [7:0] win [X][X];
  logic [7:0] ref_blk [B][B];

  always @(posedge clk) if (stall) stalls++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  function automatic int direct_sad(input int py, input int px);
    int s = 0;
    for (int i = 0; i < B; i++)
      for (int j = 0; j < B; j++) begin
        int d = int'(win[py + i][px + j]) - int'(ref_blk[i][j]);
        s += (d < 0) ? -d : d;
      end
    return s;
  endfunction

  // SAD of one candidate, with the block read through block-access mode.
  task automatic mem_sad(input int py, input int px, output int sad);
    int n = 0, c = 0;
    bit pend = 0;
    sad = 0;
    @(negedge clk);
    cfg_we = 1; cfg_start = 8'(py * X + px); cfg_end = 8'(py * X + px + B - 1);
    cfg_dist = 8'(X - B + 1); cfg_step = 9'sd1; cfg_count = 16'(B);
    @(negedge clk); cfg_we = 0;
    while (cfg_busy) @(negedge clk);
    ba_go = 1; @(negedge clk); ba_go = 0;
    while (n < B * B || pend) begin
      if (pend) begin
        int d = int'(rdata[7:0]) - int'(ref_blk[(n - 1) / B][(n - 1) % B]);
        sad += (d < 0) ? -d : d;
        pend = 0;
      end
      acc_en = (n < B * B); acc_we = 0;
      #1;
      if (acc_en && ready) begin pend = 1; n++; end
      @(negedge clk);
      c++;
      if (c > 1000) break;
    end
    acc_en = 0;
    scan_clocks += c + 1;
    positions++;
    check(state == BA_DONE, $sformatf("scan of (%0d,%0d) completed", py, px));
    check(sad == direct_sad(py, px), $sformatf("SAD at (%0d,%0d)", py, px));
  endtask

  initial begin
    int best, by, bx, sad, cy, cx, mby, mbx, mbest;
    rst_n = 0; cfg_we = 0; ba_go = 0; ba_stop = 0; acc_en = 0; acc_we = 0;
    cfg_start = 0; cfg_end = 0; cfg_dist = 0; cfg_step = 1; cfg_count = 1;
    acc_addr = 0; acc_wdata = 0;
    for (int y = 0; y < X; y++) for (int x = 0; x < X; x++) win[y][x] = 8'($urandom);
    for (int i = 0; i < B; i++) for (int j = 0; j < B; j++) ref_blk[i][j] = win[PY0 + i][PX0 + j];
    repeat (2) @(negedge clk);
    rst_n = 1;
    // load the search window in default mode
    for (int a = 0; a < X * X; a++) begin
      @(negedge clk);
      acc_en = 1; acc_we = 1; acc_addr = 8'(a);
      acc_wdata = {24'($urandom), win[a / X][a % X]};
    end
    @(negedge clk); acc_en = 0; acc_we = 0;

    // full search
    best = 1 << 30; by = -1; bx = -1;
    for (int py = 0; py <= X - B; py++)
      for (int px = 0; px <= X - B; px++) begin
        mem_sad(py, px, sad);
        if (sad < best) begin best = sad; by = py; bx = px; end
      end
    check(best == 0 && by == PY0 && bx == PX0,
          $sformatf("full search vector (%0d,%0d) SAD %0d", by, bx, best));
    $display("full search: vector (%0d,%0d), %0d positions", by, bx, positions);

    // three-step search through the memory ...
    cy = 4; cx = 4;
    mem_sad(cy, cx, best);
    for (int s = 4; s >= 1; s /= 2) begin
      by = cy; bx = cx;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++) begin
          int py = cy + dy * s, px = cx + dx * s;
          if ((dy != 0 || dx != 0) && py >= 0 && px >= 0 && py <= X - B && px <= X - B) begin
            mem_sad(py, px, sad);
            if (sad < best) begin best = sad; by = py; bx = px; end
          end
        end
      cy = by; cx = bx;
    end
    // ... and directly
    mby = 4; mbx = 4; mbest = direct_sad(4, 4);
    for (int s = 4; s >= 1; s /= 2) begin
      int ty = mby, tx = mbx;
      for (int dy = -1; dy <= 1; dy++)
        for (int dx = -1; dx <= 1; dx++) begin
          int py = ty + dy * s, px = tx + dx * s;
          if ((dy != 0 || dx != 0) && py >= 0 && px >= 0 && py <= X - B && px <= X - B)
            if (direct_sad(py, px) < mbest) begin mbest = direct_sad(py, px); mby = py; mbx = px; end
        end
    end
    check(cy == mby && cx == mbx && best == mbest,
          $sformatf("three-step vector (%0d,%0d) expected (%0d,%0d)", cy, cx, mby, mbx));
    check(stalls > 0, "8-pixel row segments stall for the serial adder");
    $display("three-step search: vector (%0d,%0d) SAD %0d", cy, cx, best);
    $display("positions=%0d clocks in scans=%0d (%0d per position), stall clocks=%0d",
             positions, scan_clocks, scan_clocks / positions, stalls);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
