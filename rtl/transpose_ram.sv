// transpose_ram: transposition memory between the two 1-D passes of a
// row-column 2-D transform (for example the 2-D DCT).
//
// The N x N intermediate block is held in a concurrent line-access array of
// N rows with N words per row. Blocks arrive as a stream, each in its own
// row-major order. The array is scanned alternately in row order and in column
// order, one block per scan. At each step the read port takes the word of the
// previous block at the current location and the write port stores the new
// word into that same location, so one N x N array is enough. Because a word
// of the previous block is read in the order in which the new block is
// written, the output stream is the previous block transposed. Read and write
// always sit on the same row (they use the same location), so one row decode
// serves both ports.
//
// Interface: in_valid/in_data take one word per clock (block after block,
// each row-major). out_valid/out_data give the transposed previous block,
// one word per accepted input, one clock later. out_valid is low during the
// first block. order shows the scan order in use (0 = row, 1 = column).
//
// From the source design: in-place storage, alternating row/column scan per
// block, concurrent read and write on one row. Own choices: N = 8 (the usual
// transform size), 16-bit words, the valid flags.
module transpose_ram #(
  parameter int unsigned N     = 8,
  parameter int unsigned WIDTH = 16,
  localparam int unsigned AW   = (N > 1) ? $clog2(N) : 1,
  localparam int unsigned TW   = $clog2(N * N)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data,
  output logic             order
);

  logic [TW-1:0] t;        // step inside the block scan
  logic          primed;   // array holds a complete block
  logic [AW-1:0] major, minor;

  logic [AW-1:0]    row;
  logic [1:0]       en, we;
  logic [AW-1:0]    col   [2];
  logic [WIDTH-1:0] wdata [2];
  logic [WIDTH-1:0] rdata [2];

  assign major = AW'(t / N);
  assign minor = AW'(t % N);

  // Row order: (major, minor). Column order: (minor, major).
  always_comb begin
    row      = order ? minor : major;
    col[0]   = order ? major : minor;
    col[1]   = col[0];
    en       = {in_valid && primed, in_valid};
    we       = 2'b01;
    wdata[0] = in_data;
    wdata[1] = '0;
  end

  cla_memory #(.ROWS(N), .MUX(N), .WIDTH(WIDTH), .PORTS(2)) u_mem (
    .clk, .row, .en, .we, .col, .wdata, .rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      t         <= '0;
      order     <= 1'b0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && primed;
      if (in_valid) begin
        if (t == TW'(N * N - 1)) begin
          t      <= '0;
          order  <= !order;
          primed <= 1'b1;
        end else begin
          t <= t + 1'b1;
        end
      end
    end
  end

  assign out_data = rdata[1];

endmodule
