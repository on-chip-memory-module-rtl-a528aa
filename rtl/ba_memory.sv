// ba_memory: memory with block-access mode, in which the address generator
// and the address decoder are merged.
//
// In default mode the memory is an ordinary random-access memory: the
// address goes through the predecoders (level-one index and level-two
// select) and their AND selects the word line. In block-access mode the word
// lines come straight from a two-level shift-register chain (sr_chain_2level)
// that holds the current location; every access moves it by the programmed
// step, so no address has to be generated and decoded per access.
//
// A block is the run of locations from its start address to its end address
// taken with the programmed step: step 1 scans a row, step = image width
// scans a column, a negative step scans backwards. At the start of a block
// the start address is decoded and loaded into the chain; in the next cycle
// the end address is decoded and kept, and each access compares it with the
// chain (the block-end detection). The access at the end address is the last
// of the block: it resets the chain to the start of the next block at the same
// clock edge, so no cycle is lost. Meanwhile the serial adder of
// ba_address_calc, started when the chain was loaded, has formed the next
// start (end + block distance) and end (start + size) in 2*AW clocks. If it
// is not finished when the block ends (blocks of 2*AW accesses or fewer) the
// memory stalls in BA_WAIT until it is. After cfg_count blocks the memory enters BA_DONE, where it again works
// in default mode.
//
// Interface: cfg_we and the cfg_* fields set the block parameters
// (cfg_busy is high for AW clocks after that); ba_go starts block access and
// ba_stop ends it. acc_en/acc_we/acc_addr/acc_wdata make one access per clock;
// acc_addr is used only in default mode, and in block-access mode an access is
// taken only when ready is high. rdata is registered, rvalid marks it.
// block_end pulses with the last access of each block; stall is high in
// BA_WAIT.
//
// From the source design: the merged decoder and shift-register chain, the
// 256 x 32-bit size, the start/end/distance parameters, the serial next-address
// calculation, reset of the chain by the end detection, the default and
// block-access modes. Own choices: the block count, the step register, the
// stall when the next addresses are late, registered read data.
module ba_memory
  import vmem_pkg::*;
#(
  parameter int unsigned W     = 256,
  parameter int unsigned WIDTH = 32,
  parameter int unsigned R1    = 16,
  parameter int unsigned S     = 4,
  localparam int unsigned AW   = $clog2(W),
  localparam int unsigned SW   = AW + 1,
  localparam int unsigned NL1  = W / S,
  localparam int unsigned L1W  = (NL1 > 1) ? $clog2(NL1) : 1,
  localparam int unsigned SB   = (S > 1) ? $clog2(S) : 1,
  localparam int unsigned C    = W / (R1 * S)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  // block parameters
  input  logic                 cfg_we,
  input  logic [AW-1:0]        cfg_start,
  input  logic [AW-1:0]        cfg_end,
  input  logic [AW-1:0]        cfg_dist,
  input  logic signed [SW-1:0] cfg_step,
  input  logic [15:0]          cfg_count,
  output logic                 cfg_busy,
  // mode control
  input  logic                 ba_go,
  input  logic                 ba_stop,
  // access
  input  logic                 acc_en,
  input  logic                 acc_we,
  input  logic [AW-1:0]        acc_addr,
  input  logic [WIDTH-1:0]     acc_wdata,
  output logic [WIDTH-1:0]     rdata,
  output logic                 rvalid,
  // status
  output logic                 ready,
  output logic                 block_end,
  output logic                 stall,
  output ba_state_e            state,
  output logic [C-1:0]         shift1
);

  logic [15:0]          count_r, blk_cnt;
  logic                 latch_end;      // first cycle of a block: keep the end decode
  logic [1:0]           mux_sel;
  logic [AW-1:0]        dec_addr;
  logic signed [SW-1:0] step;
  logic                 calc_busy, next_req;
  logic [NL1-1:0]       dec_l1, end_l1, end_l1_eff;
  logic [S-1:0]         dec_l2, end_l2, end_l2_eff;
  logic                 chain_load, chain_shift;
  logic [W-1:0]         chain_wl, wl;
  logic                 blk_mode, access, end_hit, next_ready;

  ba_address_calc #(.AW(AW), .SW(SW)) u_calc (
    .clk, .rst_n,
    .cfg_we, .cfg_start, .cfg_end, .cfg_dist, .cfg_step,
    .next_req,
    .sel       (mux_sel),
    .rand_addr (acc_addr),
    .addr      (dec_addr),
    .step,
    .busy      (calc_busy)
  );

  // Predecoders: level-one index and level-two select of the address.
  addr_decoder #(.N(NL1), .AW(L1W)) u_dec_l1 (
    .en (1'b1), .addr (dec_addr[AW-1:SB]), .sel (dec_l1)
  );
  addr_decoder #(.N(S), .AW(SB)) u_dec_l2 (
    .en (1'b1), .addr (dec_addr[SB-1:0]), .sel (dec_l2)
  );

  sr_chain_2level #(.W(W), .R1(R1), .S(S), .SW(SW)) u_chain (
    .clk, .rst_n,
    .load    (chain_load),
    .load_l1 (dec_l1),
    .load_l2 (dec_l2),
    .shift   (chain_shift),
    .step,
    .wl      (chain_wl),
    .shift1
  );

  assign blk_mode   = (state == BA_RUN);
  assign ready      = blk_mode;
  assign stall      = (state == BA_WAIT);
  assign cfg_busy   = calc_busy;
  assign next_ready = !calc_busy && !latch_end;

  // Block-end detection against the kept end decode (or against the decoder
  // itself in the cycle the decode is being kept).
  assign end_l1_eff = latch_end ? dec_l1 : end_l1;
  assign end_l2_eff = latch_end ? dec_l2 : end_l2;
  always_comb begin
    end_hit = 1'b0;
    for (int w = 0; w < W; w++) begin
      if (chain_wl[w] && end_l1_eff[w / S] && end_l2_eff[w % S]) end_hit = 1'b1;
    end
  end

  // Sequencing.
  always_comb begin
    access      = acc_en && (blk_mode || ((state == BA_IDLE || state == BA_DONE) && !ba_go));
    mux_sel     = 2'd0;
    chain_load  = 1'b0;
    chain_shift = 1'b0;
    next_req    = 1'b0;
    block_end   = 1'b0;
    unique case (state)
      BA_IDLE, BA_DONE: begin
        mux_sel = ba_go ? 2'd1 : 2'd0;
        if (ba_go) chain_load = 1'b1;
      end
      BA_RUN: begin
        // The decoder shows the end address in the first cycle of a block
        // and the (next) start address after that.
        mux_sel  = latch_end ? 2'd2 : 2'd1;
        if (access) begin
          if (end_hit) begin
            block_end = 1'b1;
            if (blk_cnt + 16'd1 != count_r && next_ready) chain_load = 1'b1;
          end else begin
            chain_shift = 1'b1;
          end
        end
      end
      BA_WAIT: begin
        mux_sel = 2'd1;
        if (!calc_busy) chain_load = 1'b1;
      end
      default: ;
    endcase
    // The serial adder starts on the next block as soon as the start
    // register has been loaded into the chain; it overwrites the end
    // register only AW clocks later, after the end decode has been kept.
    next_req = chain_load;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state     <= BA_IDLE;
      count_r   <= 16'd1;
      blk_cnt   <= '0;
      latch_end <= 1'b0;
      end_l1    <= '0;
      end_l2    <= '0;
    end else begin
      if (cfg_we) count_r <= cfg_count;
      if (latch_end) begin
        end_l1    <= dec_l1;
        end_l2    <= dec_l2;
        latch_end <= 1'b0;
      end
      if (chain_load) latch_end <= 1'b1;
      if (ba_stop) begin
        state <= BA_IDLE;
      end else begin
        unique case (state)
          BA_IDLE, BA_DONE: if (ba_go) begin
            state   <= BA_RUN;
            blk_cnt <= '0;
          end
          BA_RUN: if (access && end_hit) begin
            blk_cnt <= blk_cnt + 16'd1;
            if (blk_cnt + 16'd1 == count_r) state <= BA_DONE;
            else if (!next_ready)           state <= BA_WAIT;
          end
          BA_WAIT: if (!calc_busy) state <= BA_RUN;
          default: state <= BA_IDLE;
        endcase
      end
    end
  end

  // Word lines: the chain in block-access mode, the decoders otherwise.
  always_comb begin
    for (int w = 0; w < W; w++) begin
      wl[w] = blk_mode ? chain_wl[w] : (dec_l1[w / S] && dec_l2[w % S]);
    end
  end

  // Cell array.
  logic [WIDTH-1:0] cells [W];

  always_ff @(posedge clk) begin
    for (int w = 0; w < W; w++) begin
      if (access && acc_we && wl[w]) cells[w] <= acc_wdata;
    end
  end

  always_ff @(posedge clk) begin
    if (access && !acc_we) begin
      for (int w = 0; w < W; w++) begin
        if (wl[w]) rdata <= cells[w];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) rvalid <= 1'b0;
    else        rvalid <= access && !acc_we;
  end

  a_go_when_ready : assert property (@(posedge clk) disable iff (!rst_n)
    !(ba_go && calc_busy))
    else $error("ba_memory: ba_go while the block parameters are being computed");
  a_onehot_chain : assert property (@(posedge clk) disable iff (!rst_n)
    blk_mode |-> $onehot(chain_wl))
    else $error("ba_memory: shift-register chain left the array");

endmodule
