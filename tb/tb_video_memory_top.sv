// tb_video_memory_top: end-to-end test of video_memory_top at its default
// sizes (2K x 8 two-port CLA memory, 16-word 1R1W buffer, 8 x 8 transposition
// memory, 1920-word delay line, 256 x 32 block-access memory). Five threads
// run side by side, one per design, each against its own model:
//   - CLA memory: fills all 2K words two at a time, then random two-port
//     traffic (two reads, two writes, read + write, same-word read + write);
//   - 1R1W buffer: output equals input 8 words earlier, halves swap;
//   - transposition memory: a 2-D row-column flow, output blocks are the
//     input blocks transposed, scan order alternates;
//   - delay line: 1920-clock latency, wrap-around through the row-0 decode;
//   - block-access memory: default mode, row scan, column scan, backward scan,
//     short blocks that stall, block-mode writes, stop.
// Every mechanism is counted; one that never happens is a failure.
module tb_video_memory_top;
  import vmem_pkg::*;
  int checks = 0, failures = 0;
  // mechanism counters
  int m_rr = 0, m_ww = 0, m_rw = 0, m_same = 0;
  int m_pp_swap = 0, m_tr_flip = 0, m_dl_wrap = 0, m_dl_fill = 0;
  int m_ba_default = 0, m_ba_row = 0, m_ba_col = 0, m_ba_bwd = 0, m_ba_write = 0;
  int m_ba_end = 0, m_ba_stall = 0, m_ba_stop = 0;
  int m_shift1 [4] = '{0, 0, 0, 0};

  logic clk = 0;
  always #5 clk = !clk;
  logic rst_n;

  // CLA
  logic [8:0] cla_row;
  logic [1:0] cla_en, cla_we;
  logic [1:0] cla_col [2];
  logic [7:0] cla_wdata [2], cla_rdata [2];
  // buffer
  logic pp_in_valid, pp_out_valid;
  logic [7:0] pp_in_data, pp_out_data;
  // transposition
  logic tr_in_valid, tr_out_valid, tr_order;
  logic [15:0] tr_in_data, tr_out_data;
  // delay line
  logic dl_in_valid, dl_out_valid;
  logic [7:0] dl_in_data, dl_out_data;
  // block access
  logic ba_cfg_we, ba_cfg_busy, ba_go, ba_stop;
  logic [7:0] ba_cfg_start, ba_cfg_end, ba_cfg_dist, ba_acc_addr;
  logic signed [8:0] ba_cfg_step;
  logic [15:0] ba_cfg_count;
  logic ba_acc_en, ba_acc_we, ba_rvalid, ba_ready, ba_block_end, ba_stall;
  logic [31:0] ba_acc_wdata, ba_rdata;
  ba_state_e ba_state;
  logic [3:0] ba_shift1;

  video_memory_top dut (.*);

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (ba_block_end) m_ba_end++;
    if (ba_stall) m_ba_stall++;
    for (int k = 0; k < 4; k++) if (ba_shift1[k]) m_shift1[k]++;
  end

  // ---------------- CLA memory ----------------
  logic [7:0] cla_model [512][4];
  task automatic run_cla();
    logic [7:0] exp_q [2];
    logic [1:0] chk;
    for (int r = 0; r < 512; r++)
      for (int c = 0; c < 4; c += 2) begin
        @(negedge clk);
        cla_row = 9'(r); cla_en = 2'b11; cla_we = 2'b11;
        cla_col[0] = 2'(c); cla_col[1] = 2'(c + 1);
        cla_wdata[0] = 8'($urandom); cla_wdata[1] = 8'($urandom);
        cla_model[r][c] = cla_wdata[0]; cla_model[r][c + 1] = cla_wdata[1];
      end
    chk = '0;
    repeat (6000) begin
      @(negedge clk);
      for (int p = 0; p < 2; p++)
        if (chk[p]) check(cla_rdata[p] == exp_q[p], "CLA read");
      cla_row = 9'($urandom_range(511));
      for (int p = 0; p < 2; p++) begin
        cla_en[p] = ($urandom_range(3) != 0); cla_we[p] = $urandom_range(1);
        cla_col[p] = 2'($urandom_range(3)); cla_wdata[p] = 8'($urandom);
      end
      if ($urandom_range(7) == 0) cla_col[1] = cla_col[0];
      if (cla_en == 2'b11 && cla_we == 2'b11 && cla_col[0] == cla_col[1]) cla_we[1] = 0;
      chk = '0;
      for (int p = 0; p < 2; p++)
        if (cla_en[p] && !cla_we[p]) begin chk[p] = 1; exp_q[p] = cla_model[cla_row][cla_col[p]]; end
      if (cla_en == 2'b11) begin
        if (cla_we == 2'b00) m_rr++;
        else if (cla_we == 2'b11) m_ww++;
        else begin m_rw++; if (cla_col[0] == cla_col[1]) m_same++; end
      end
      for (int p = 0; p < 2; p++)
        if (cla_en[p] && cla_we[p]) cla_model[cla_row][cla_col[p]] = cla_wdata[p];
    end
    @(negedge clk);
    for (int p = 0; p < 2; p++)
      if (chk[p]) check(cla_rdata[p] == exp_q[p], "CLA read");
    cla_en = '0;
  endtask

  // ---------------- 1R1W buffer ----------------
  task automatic run_pp();
    logic [7:0] hist [$];
    int acc = 0;
    logic ev = 0;
    logic [7:0] ed = 0;
    repeat (3000) begin
      @(negedge clk);
      check(pp_out_valid == ev, "buffer valid");
      if (ev) check(pp_out_data == ed, "buffer word");
      pp_in_valid = ($urandom_range(3) != 0); pp_in_data = 8'($urandom);
      ev = 0;
      if (pp_in_valid) begin
        hist.push_back(pp_in_data);
        if (acc >= 8) begin ev = 1; ed = hist[acc - 8]; end
        acc++;
        if (acc % 8 == 0) m_pp_swap++;
      end
    end
    @(negedge clk); pp_in_valid = 0;
    check(pp_out_valid == ev, "buffer valid");
    if (ev) check(pp_out_data == ed, "buffer word");
  endtask

  // ---------------- transposition memory ----------------
  task automatic run_tr();
    localparam int NB = 12;
    logic [15:0] blk [NB][8][8];
    int k = 0;
    logic ev = 0, od = 0;
    logic [15:0] ed = 0;
    for (int b = 0; b < NB; b++)
      for (int i = 0; i < 8; i++)
        for (int j = 0; j < 8; j++) blk[b][i][j] = 16'($urandom);
    while (k < NB * 64) begin
      @(negedge clk);
      check(tr_out_valid == ev, "transpose valid");
      if (ev) check(tr_out_data == ed, "transpose word");
      if (tr_order != od) m_tr_flip++;
      od = tr_order;
      tr_in_valid = ($urandom_range(4) != 0);
      ev = 0;
      if (tr_in_valid) begin
        int b, t;
        b = k / 64; t = k % 64;
        tr_in_data = blk[b][t / 8][t % 8];
        if (b > 0) begin ev = 1; ed = blk[b - 1][t % 8][t / 8]; end
        k++;
      end
    end
    @(negedge clk); tr_in_valid = 0;
    check(tr_out_valid == ev, "transpose valid");
    if (ev) check(tr_out_data == ed, "transpose word");
  endtask

  // ---------------- delay line ----------------
  task automatic run_dl();
    logic [7:0] hist [$];
    int acc = 0, cyc = 0, first = -1;
    logic ev = 0;
    logic [7:0] ed = 0;
    repeat (8000) begin
      @(negedge clk);
      check(dl_out_valid == ev, "delay valid");
      if (ev) check(dl_out_data == ed, "delay word");
      if (dl_out_valid && first < 0) first = cyc;
      dl_in_valid = (cyc < 4000) ? 1'b1 : ($urandom_range(3) != 0);
      dl_in_data = 8'($urandom);
      ev = 0;
      if (dl_in_valid) begin
        hist.push_back(dl_in_data);
        if (acc >= 1919) begin ev = 1; ed = hist[acc - 1919]; end
        acc++;
        if (acc % 1920 == 0) m_dl_wrap++;
        if (acc == 1920) m_dl_fill++;
      end
      cyc++;
    end
    @(negedge clk); dl_in_valid = 0;
    check(first == 1920, $sformatf("delay latency %0d", first));
  endtask

  // ---------------- block-access memory ----------------
  logic [31:0] ba_model [256];
  int seq [$];

  task automatic ba_scan(input int s, input int e, input int d, input int st, input int cnt,
                         input bit wr);
    int i, sz, p, ea;
    bit pend;
    seq.delete();
    sz = (e - s) & 255;
    begin
      int ss = s, ee = e;
      for (int b = 0; b < cnt; b++) begin
        p = ss;
        for (int n = 0; n < 256; n++) begin seq.push_back(p); if (p == ee) break; p = (p + st) & 255; end
        ss = (ee + d) & 255; ee = (ss + sz) & 255;
      end
    end
    @(negedge clk);
    ba_cfg_we = 1; ba_cfg_start = 8'(s); ba_cfg_end = 8'(e); ba_cfg_dist = 8'(d);
    ba_cfg_step = 9'(st); ba_cfg_count = 16'(cnt);
    @(negedge clk); ba_cfg_we = 0;
    while (ba_cfg_busy) @(negedge clk);
    ba_go = 1; @(negedge clk); ba_go = 0;
    i = 0; pend = 0;
    for (int guard = 0; guard < 4000 && i < seq.size(); guard++) begin
      if (pend) check(ba_rvalid && ba_rdata == ba_model[ea], "block read");
      pend = 0;
      ba_acc_en = 1; ba_acc_we = wr; ba_acc_wdata = 32'($urandom);
      #1;
      if (ba_ready) begin
        ea = seq[i];
        if (wr) ba_model[ea] = ba_acc_wdata; else pend = 1;
        i++;
      end
      @(negedge clk);
    end
    ba_acc_en = 0; ba_acc_we = 0;
    if (pend) check(ba_rvalid && ba_rdata == ba_model[ea], "block read");
    check(i == seq.size() && ba_state == BA_DONE, "block scan completed");
  endtask

  task automatic ba_read_check(input int a);
    @(negedge clk);
    ba_acc_en = 1; ba_acc_we = 0; ba_acc_addr = 8'(a);
    @(negedge clk);
    ba_acc_en = 0;
    check(ba_rvalid && ba_rdata == ba_model[a], "default-mode read");
    m_ba_default++;
  endtask

  task automatic run_ba();
    for (int a = 0; a < 256; a++) begin
      @(negedge clk);
      ba_acc_en = 1; ba_acc_we = 1; ba_acc_addr = 8'(a); ba_acc_wdata = 32'($urandom);
      ba_model[a] = ba_acc_wdata;
    end
    @(negedge clk); ba_acc_en = 0; ba_acc_we = 0;
    for (int k = 0; k < 32; k++) ba_read_check($urandom_range(255));
    ba_scan(0, 63, 1, 1, 4, 0);      m_ba_row++;
    ba_scan(0, 248, 9, 8, 8, 0);     m_ba_col++;
    ba_scan(255, 192, 255, -1, 4, 0); m_ba_bwd++;
    ba_scan(0, 7, 9, 1, 8, 0);        // short row segments: stalls
    ba_scan(72, 184, 145, 16, 8, 1);  m_ba_write++;
    for (int a = 0; a < 256; a++) ba_read_check(a);
    // stop during a scan
    @(negedge clk);
    ba_cfg_we = 1; ba_cfg_start = 0; ba_cfg_end = 255; ba_cfg_dist = 1; ba_cfg_step = 1; ba_cfg_count = 1;
    @(negedge clk); ba_cfg_we = 0;
    while (ba_cfg_busy) @(negedge clk);
    ba_go = 1; @(negedge clk); ba_go = 0;
    ba_acc_en = 1; repeat (4) @(negedge clk); ba_acc_en = 0;
    ba_stop = 1; @(negedge clk); ba_stop = 0;
    check(ba_state == BA_IDLE, "stop");
    m_ba_stop++;
    ba_read_check(3);
  endtask

  initial begin
    rst_n = 0;
    cla_row = 0; cla_en = 0; cla_we = 0;
    for (int p = 0; p < 2; p++) begin cla_col[p] = 0; cla_wdata[p] = 0; end
    pp_in_valid = 0; pp_in_data = 0; tr_in_valid = 0; tr_in_data = 0;
    dl_in_valid = 0; dl_in_data = 0;
    ba_cfg_we = 0; ba_cfg_start = 0; ba_cfg_end = 0; ba_cfg_dist = 0; ba_cfg_step = 1;
    ba_cfg_count = 1; ba_go = 0; ba_stop = 0; ba_acc_en = 0; ba_acc_we = 0;
    ba_acc_addr = 0; ba_acc_wdata = 0;
    repeat (3) @(negedge clk);
    rst_n = 1;
    fork
      run_cla();
      run_pp();
      run_tr();
      run_dl();
      run_ba();
    join
    // every mechanism must have happened
    check(m_rr > 0,   "CLA two reads on one row");
    check(m_ww > 0,   "CLA two writes on one row");
    check(m_rw > 0,   "CLA read and write on one row");
    check(m_same > 0, "CLA read of a word written in the same cycle");
    check(m_pp_swap > 1, "buffer halves swapped");
    check(m_tr_flip > 1, "transposition scan order alternated");
    check(m_dl_fill > 0 && m_dl_wrap > 1, "delay line filled and wrapped");
    check(m_ba_default > 0, "block-access memory default mode");
    check(m_ba_row > 0 && m_ba_col > 0 && m_ba_bwd > 0, "row, column and backward scans");
    check(m_ba_write > 0, "block-mode writes");
    check(m_ba_end == 32, $sformatf("boundary resets %0d, expected 32", m_ba_end));
    check(m_ba_stall > 0, "stall while the next addresses are formed");
    check(m_ba_stop > 0, "stop");
    for (int k = 0; k < 4; k++) check(m_shift1[k] > 0, $sformatf("local shift_1 of cluster %0d", k));
    $display("CLA RR=%0d WW=%0d RW=%0d sameRW=%0d | swaps=%0d flips=%0d dl wraps=%0d",
             m_rr, m_ww, m_rw, m_same, m_pp_swap, m_tr_flip, m_dl_wrap);
    $display("BA default=%0d block ends=%0d stall clocks=%0d shift1=%0d/%0d/%0d/%0d",
             m_ba_default, m_ba_end, m_ba_stall, m_shift1[0], m_shift1[1], m_shift1[2], m_shift1[3]);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (50000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
