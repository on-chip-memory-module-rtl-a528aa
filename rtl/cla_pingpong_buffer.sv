// cla_pingpong_buffer: one-read-one-write buffer on a concurrent line-access
// array.
//
// The columns of the array are split into two halves. One half takes the
// incoming words (write half) while the other half gives out the words stored
// on the previous pass (read half). Both ports step through their half in the
// same order, so in every cycle they sit on the same row, which is exactly what
// concurrent line access allows: one row decode, two column selections. When
// the read half holds no more new data (and so the write half is full) the two
// halves swap roles. The result is a buffer whose output repeats its input
// HALF = ROWS*MUX/2 words later, counted in accepted words.
//
// Word k of a half sits in row k/(MUX/2), column k%(MUX/2) of that half, so
// consecutive words fill a row of the half before moving to the next row.
//
// Interface: in_valid/in_data accept one word per clock. out_valid/out_data
// give the word read for that input, one clock later; out_valid stays low
// until the first half has been filled once.
//
// From the source design: the half/half split of the columns between the read
// and the write port, the swap when the read half is exhausted, and the
// default 4 rows with column multiplexing 4. Own choices: data width 8, the
// order of words inside a half, the valid flags.
module cla_pingpong_buffer #(
  parameter int unsigned ROWS  = 4,
  parameter int unsigned MUX   = 4,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned HCOLS = MUX / 2,
  localparam int unsigned HALF  = ROWS * HCOLS,
  localparam int unsigned RAW   = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CAW   = (MUX > 1) ? $clog2(MUX) : 1,
  localparam int unsigned IW    = (HALF > 1) ? $clog2(HALF) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  logic [IW-1:0] idx;      // position inside the half
  logic          wbank;    // half that is written: 0 = low columns
  logic          primed;   // read half holds a full pass

  logic [RAW-1:0]   row;
  logic [1:0]       en, we;
  logic [CAW-1:0]   col   [2];
  logic [WIDTH-1:0] wdata [2];
  logic [WIDTH-1:0] rdata [2];

  // Port 0 writes, port 1 reads; both on the same row.
  always_comb begin
    row      = RAW'(32'(idx) / HCOLS);
    en       = {in_valid && primed, in_valid};
    we       = 2'b01;
    col[0]   = CAW'(32'(wbank) * HCOLS + 32'(idx) % HCOLS);
    col[1]   = CAW'(32'(!wbank) * HCOLS + 32'(idx) % HCOLS);
    wdata[0] = in_data;
    wdata[1] = '0;
  end

  cla_memory #(.ROWS(ROWS), .MUX(MUX), .WIDTH(WIDTH), .PORTS(2)) u_mem (
    .clk, .row, .en, .we, .col, .wdata, .rdata
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      idx       <= '0;
      wbank     <= 1'b0;
      primed    <= 1'b0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && primed;
      if (in_valid) begin
        if (idx == IW'(HALF - 1)) begin
          idx    <= '0;
          wbank  <= !wbank;   // swap read and write halves
          primed <= 1'b1;
        end else begin
          idx <= idx + 1'b1;
        end
      end
    end
  end

  assign out_data = rdata[1];

  initial begin
    assert (MUX >= 2 && MUX % 2 == 0)
      else $error("cla_pingpong_buffer: MUX must be even");
  end

endmodule
