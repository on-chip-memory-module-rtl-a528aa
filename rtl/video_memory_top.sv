// video_memory_top: the two on-chip memory designs for video processing,
// side by side.
//
// Concurrent line access (CLA): several ports reach one memory row per cycle
// through their own column decoders, giving multi-port behaviour on
// single-port cells. It appears here four times:
//   cla_*   a general two-port 2K x 8 CLA memory (shared row, two columns);
//   pp_*    a one-read-one-write buffer whose column halves swap roles;
//   tr_*    the transposition memory of a row-column 2-D transform;
//   dl_*    a fixed delay line of one 1920-pixel line.
// Block-access mode (ba_*): a 256 x 32-bit memory whose word lines come from
// a two-level shift-register chain loaded from programmable start / end /
// distance / step parameters, with a default random-access mode.
//
// The designs share no signals: each has its own ports, and all run on clk
// with the active-low asynchronous reset rst_n (the general CLA memory has no
// state to reset). Port timing is that of each sub-module, described in its
// own header.
module video_memory_top
  import vmem_pkg::*;
#(
  // general CLA memory: 2K x 8, two ports
  parameter int unsigned CLA_ROWS  = 512,
  parameter int unsigned CLA_MUX   = 4,
  parameter int unsigned CLA_WIDTH = 8,
  // 1R1W ping-pong buffer
  parameter int unsigned PP_ROWS   = 4,
  parameter int unsigned PP_MUX    = 4,
  parameter int unsigned PP_WIDTH  = 8,
  // transposition memory
  parameter int unsigned TR_N      = 8,
  parameter int unsigned TR_WIDTH  = 16,
  // delay line
  parameter int unsigned DL_ROWS   = 480,
  parameter int unsigned DL_COLS   = 4,
  parameter int unsigned DL_WIDTH  = 8,
  // block-access memory
  parameter int unsigned BA_W      = 256,
  parameter int unsigned BA_WIDTH  = 32,
  parameter int unsigned BA_R1     = 16,
  parameter int unsigned BA_S      = 4,
  localparam int unsigned CLA_RAW  = $clog2(CLA_ROWS),
  localparam int unsigned CLA_CAW  = $clog2(CLA_MUX),
  localparam int unsigned BA_AW    = $clog2(BA_W),
  localparam int unsigned BA_C     = BA_W / (BA_R1 * BA_S)
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // general two-port CLA memory
  input  logic [CLA_RAW-1:0]        cla_row,
  input  logic [1:0]                cla_en,
  input  logic [1:0]                cla_we,
  input  logic [CLA_CAW-1:0]        cla_col   [2],
  input  logic [CLA_WIDTH-1:0]      cla_wdata [2],
  output logic [CLA_WIDTH-1:0]      cla_rdata [2],
  // 1R1W buffer
  input  logic                      pp_in_valid,
  input  logic [PP_WIDTH-1:0]       pp_in_data,
  output logic                      pp_out_valid,
  output logic [PP_WIDTH-1:0]       pp_out_data,
  // transposition memory
  input  logic                      tr_in_valid,
  input  logic [TR_WIDTH-1:0]       tr_in_data,
  output logic                      tr_out_valid,
  output logic [TR_WIDTH-1:0]       tr_out_data,
  output logic                      tr_order,
  // delay line
  input  logic                      dl_in_valid,
  input  logic [DL_WIDTH-1:0]       dl_in_data,
  output logic                      dl_out_valid,
  output logic [DL_WIDTH-1:0]       dl_out_data,
  // block-access memory
  input  logic                      ba_cfg_we,
  input  logic [BA_AW-1:0]          ba_cfg_start,
  input  logic [BA_AW-1:0]          ba_cfg_end,
  input  logic [BA_AW-1:0]          ba_cfg_dist,
  input  logic signed [BA_AW:0]     ba_cfg_step,
  input  logic [15:0]               ba_cfg_count,
  output logic                      ba_cfg_busy,
  input  logic                      ba_go,
  input  logic                      ba_stop,
  input  logic                      ba_acc_en,
  input  logic                      ba_acc_we,
  input  logic [BA_AW-1:0]          ba_acc_addr,
  input  logic [BA_WIDTH-1:0]       ba_acc_wdata,
  output logic [BA_WIDTH-1:0]       ba_rdata,
  output logic                      ba_rvalid,
  output logic                      ba_ready,
  output logic                      ba_block_end,
  output logic                      ba_stall,
  output ba_state_e                 ba_state,
  output logic [BA_C-1:0]           ba_shift1
);

  cla_memory #(.ROWS(CLA_ROWS), .MUX(CLA_MUX), .WIDTH(CLA_WIDTH), .PORTS(2)) u_cla (
    .clk,
    .row   (cla_row),
    .en    (cla_en),
    .we    (cla_we),
    .col   (cla_col),
    .wdata (cla_wdata),
    .rdata (cla_rdata)
  );

  cla_pingpong_buffer #(.ROWS(PP_ROWS), .MUX(PP_MUX), .WIDTH(PP_WIDTH)) u_pp (
    .clk, .rst_n,
    .in_valid  (pp_in_valid),
    .in_data   (pp_in_data),
    .out_valid (pp_out_valid),
    .out_data  (pp_out_data)
  );

  transpose_ram #(.N(TR_N), .WIDTH(TR_WIDTH)) u_tr (
    .clk, .rst_n,
    .in_valid  (tr_in_valid),
    .in_data   (tr_in_data),
    .out_valid (tr_out_valid),
    .out_data  (tr_out_data),
    .order     (tr_order)
  );

  fixed_delay_line #(.ROWS(DL_ROWS), .COLS(DL_COLS), .WIDTH(DL_WIDTH)) u_dl (
    .clk, .rst_n,
    .in_valid  (dl_in_valid),
    .in_data   (dl_in_data),
    .out_valid (dl_out_valid),
    .out_data  (dl_out_data)
  );

  ba_memory #(.W(BA_W), .WIDTH(BA_WIDTH), .R1(BA_R1), .S(BA_S)) u_ba (
    .clk, .rst_n,
    .cfg_we    (ba_cfg_we),
    .cfg_start (ba_cfg_start),
    .cfg_end   (ba_cfg_end),
    .cfg_dist  (ba_cfg_dist),
    .cfg_step  (ba_cfg_step),
    .cfg_count (ba_cfg_count),
    .cfg_busy  (ba_cfg_busy),
    .ba_go, .ba_stop,
    .acc_en    (ba_acc_en),
    .acc_we    (ba_acc_we),
    .acc_addr  (ba_acc_addr),
    .acc_wdata (ba_acc_wdata),
    .rdata     (ba_rdata),
    .rvalid    (ba_rvalid),
    .ready     (ba_ready),
    .block_end (ba_block_end),
    .stall     (ba_stall),
    .state     (ba_state),
    .shift1    (ba_shift1)
  );

endmodule
