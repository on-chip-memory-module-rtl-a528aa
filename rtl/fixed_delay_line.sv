// fixed_delay_line: digital delay line built on concurrent line access.
//
// The array has ROWS rows of COLS words; its size is the delay length
// D = ROWS*COLS. A pointer (row r, column c) walks through the array in
// row-major order, one step per accepted word. In each step the read port
// takes word (r, c), and the write port stores the incoming word into the
// location read one step earlier, so the stored word is read again exactly D
// steps later. Within a row that location is (r, c-1) on the same word line.
// At the first step of a row it is the last word of the previous row, whose
// word line is no longer selected. That last word is therefore a two-port cell
// whose second word line is the word line of the next row, so it can be
// written while the next row is being read. The second word line of the last
// row's final word follows row 0, with its own copy of the row-0 decoding.
//
// Interface: in_valid/in_data take one word per clock; out_valid/out_data give
// the word that entered D accepted words earlier (one clock after the step
// that reads it). out_valid stays low until the array has been filled.
//
// Timing: with in_valid held high, a word entering in cycle n leaves in
// cycle n + D.
//
// From the source design: concurrent read and write on one row, the two-port
// last word per row written through the next row's word line, the separate
// row-0 decoding for the wrap-around. Own choices: D = 1920 (one HDTV line of
// 1920 pixels, as 480 rows x 4 words), 8-bit pixels, the valid flags.
module fixed_delay_line #(
  parameter int unsigned ROWS  = 480,
  parameter int unsigned COLS  = 4,
  parameter int unsigned WIDTH = 8,
  localparam int unsigned D    = ROWS * COLS,
  localparam int unsigned RAW  = (ROWS > 1) ? $clog2(ROWS) : 1,
  localparam int unsigned CAW  = (COLS > 1) ? $clog2(COLS) : 1,
  localparam int unsigned FW   = $clog2(D + 1)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             in_valid,
  input  logic [WIDTH-1:0] in_data,
  output logic             out_valid,
  output logic [WIDTH-1:0] out_data
);

  // Single-port words: columns 0 .. COLS-2 of every row.
  logic [(COLS-1)*WIDTH-1:0] body [ROWS];
  // Two-port words: column COLS-1 of every row.
  logic [WIDTH-1:0]          last [ROWS];

  logic [RAW-1:0] r;
  logic [CAW-1:0] c;
  logic [FW-1:0]  fill;     // accepted words, saturating at D-1
  logic           filled;

  // Duplicated decoding of row 0: drives the second word line of the last
  // word of the final row.
  logic           row0_hit;
  logic [RAW-1:0] r_prev;   // row whose last word the second port reaches

  assign row0_hit = (r == '0);
  assign r_prev   = row0_hit ? RAW'(ROWS - 1) : r - 1'b1;
  assign filled   = (fill == FW'(D - 1));

  // Read port: word (r, c) of the selected row.
  always_ff @(posedge clk) begin
    if (in_valid) begin
      if (c == CAW'(COLS - 1)) out_data <= last[r];
      else                     out_data <= body[r][c*WIDTH +: WIDTH];
    end
  end

  // Write port, single-port words: (r, c-1) on the selected word line.
  always_ff @(posedge clk) begin
    if (in_valid && c != '0) begin
      body[r][32'(c - 1'b1)*WIDTH +: WIDTH] <= in_data;
    end
  end

  // Write port, second port of the two-port words: reached through the word
  // line of the next row, that is while row r is selected, the last word of
  // row r-1 (of the final row when r is 0).
  always_ff @(posedge clk) begin
    if (in_valid && c == '0) begin
      last[r_prev] <= in_data;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r         <= '0;
      c         <= '0;
      fill      <= '0;
      out_valid <= 1'b0;
    end else begin
      out_valid <= in_valid && filled;
      if (in_valid) begin
        if (!filled) fill <= fill + 1'b1;
        if (c == CAW'(COLS - 1)) begin
          c <= '0;
          r <= (r == RAW'(ROWS - 1)) ? '0 : r + 1'b1;
        end else begin
          c <= c + 1'b1;
        end
      end
    end
  end

  initial begin
    assert (COLS >= 2) else $error("fixed_delay_line: COLS must be at least 2");
  end

endmodule
