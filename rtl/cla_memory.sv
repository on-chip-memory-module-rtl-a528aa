// cla_memory: concurrent line-access memory.
//
// A single-port cell array whose rows each hold MUX words. One row decoder
// strobes one word line per cycle, and every port owns a column decoder that
// picks one of the MUX words of that strobed row. The ports therefore work
// like the ports of a multi-port memory, with one rule: all ports use the same
// row address in a cycle. Port 0 is given row and column; ports 1..PORTS-1
// give only a column (their row is forced to port 0's). Each port can read or
// write, so two reads, two writes or one read plus one write are all allowed.
// With MUX:1 column selection at most MUX ports make sense.
//
// Interface (per port p): en[p], we[p], col[p], wdata[p]; rdata[p] is
// registered and valid in the cycle after the access. row is shared.
//
// Timing: one access per port per clock. If a port reads the word another
// port writes in the same cycle, the read returns the old word (the read
// happens before the write, as a buffer needs when a location is reused right
// after it has been read). Two ports writing the same word in one cycle is
// illegal and is flagged by an assertion.
//
// From the source design: the shared row address, the per-port column
// decoders, the single-port cells and the default size 2K x 8 bit, two ports.
// Own choices: the split of 2K words into 512 rows x 4 columns (column
// multiplexing 4 as in the published 1R1W organisation example), registered
// read data, read-before-write for a same-word read/write pair.
module cla_memory #(
  parameter int unsigned ROWS  = 512,
  parameter int unsigned MUX   = 4,
  parameter int unsigned WIDTH = 8,
  parameter int unsigned PORTS = 2,
  localparam int unsigned RAW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CAW  = (MUX > 1) ? $clog2(MUX) : 1
) (
  input  logic                  clk,
  input  logic [RAW-1:0]        row,
  input  logic [PORTS-1:0]      en,
  input  logic [PORTS-1:0]      we,
  input  logic [CAW-1:0]        col   [PORTS],
  input  logic [WIDTH-1:0]      wdata [PORTS],
  output logic [WIDTH-1:0]      rdata [PORTS]
);

  // Cell array: one entry per word line, MUX words side by side.
  logic [MUX*WIDTH-1:0] cells [ROWS];

  // Column selections, one decoder per port.
  logic [MUX-1:0] csel [PORTS];

  for (genvar p = 0; p < PORTS; p++) begin : g_coldec
    addr_decoder #(.N(MUX), .AW(CAW)) u_coldec (
      .en   (en[p]),
      .addr (col[p]),
      .sel  (csel[p])
    );
  end

  // The strobed line, as seen by all column decoders.
  logic [MUX*WIDTH-1:0] line;
  assign line = cells[row];

  // Read through each port's column selection.
  always_ff @(posedge clk) begin
    for (int p = 0; p < PORTS; p++) begin
      if (en[p] && !we[p]) begin
        for (int c = 0; c < MUX; c++) begin
          if (csel[p][c]) rdata[p] <= line[c*WIDTH +: WIDTH];
        end
      end
    end
  end

  // Write through each port's column selection into the strobed line.
  always_ff @(posedge clk) begin
    for (int p = 0; p < PORTS; p++) begin
      if (en[p] && we[p]) begin
        for (int c = 0; c < MUX; c++) begin
          if (csel[p][c]) cells[row][c*WIDTH +: WIDTH] <= wdata[p];
        end
      end
    end
  end

  // With MUX:1 column selection at most MUX ports can be emulated.
  initial begin
    assert (PORTS >= 1 && PORTS <= MUX)
      else $error("cla_memory: PORTS must be between 1 and MUX");
  end

  // Two ports may not write the same word of the line in one cycle.
  for (genvar p = 0; p < PORTS; p++) begin : g_chk_p
    for (genvar q = p + 1; q < PORTS; q++) begin : g_chk_q
      a_no_write_clash : assert property (@(posedge clk)
        !(en[p] && we[p] && en[q] && we[q] && col[p] == col[q]))
        else $error("cla_memory: ports %0d and %0d write the same word", p, q);
    end
  end

endmodule
