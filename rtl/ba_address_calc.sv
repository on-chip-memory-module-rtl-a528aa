// ba_address_calc: address-calculation part of the block-access mode.
//
// Holds the block parameters in registers: start address, end address, block
// distance, block size and the shift step. A single bit-serial adder, one bit
// per clock, produces the addresses of the next block while the current block
// is being scanned:
//   after configuration : size  <= end - start
//   on next_req         : start <= end + distance     (next block's start)
//                         then end <= start + size    (next block's end)
// Each pass takes AW clocks; the adder writes its sum bit by bit into the
// destination register, whose old bit is no longer needed by then. A
// multiplexer puts the start register, the end register or the random-access
// address on the decoder input.
//
// Interface: cfg_we loads start/end/distance/step and starts the size pass.
// next_req starts the two next-block passes. busy is high while any pass is
// running. sel chooses the multiplexer input; addr is the multiplexer output.
//
// From the source design: start and end registers, the serial adder that adds
// the block distance to the end address to form the next start address, the
// multiplexer in front of the decoder, and the block size as a block
// parameter. Own choices: the size register and how it is formed, the end
// address of the next block as start + size, the step register, the random
// address as a third multiplexer input, the pass order.
module ba_address_calc
  import vmem_pkg::*;
#(
  parameter int unsigned AW = 8,
  parameter int unsigned SW = 9
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 cfg_we,
  input  logic [AW-1:0]        cfg_start,
  input  logic [AW-1:0]        cfg_end,
  input  logic [AW-1:0]        cfg_dist,
  input  logic signed [SW-1:0] cfg_step,
  input  logic                 next_req,
  input  logic [1:0]           sel,        // 0 random, 1 start, 2 end
  input  logic [AW-1:0]        rand_addr,
  output logic [AW-1:0]        addr,
  output logic signed [SW-1:0] step,
  output logic                 busy
);

  localparam int unsigned BW = (AW > 1) ? $clog2(AW) : 1;

  logic [AW-1:0] start_r, end_r, dist_r, size_r;
  sa_pass_e      pass;
  logic [BW-1:0] bit_i;
  logic          carry;
  logic          a_bit, b_bit, s_bit, c_out;

  // Operands of the running pass.
  always_comb begin
    unique case (pass)
      SA_SIZE:  begin a_bit = end_r[bit_i];   b_bit = !start_r[bit_i]; end
      SA_START: begin a_bit = end_r[bit_i];   b_bit = dist_r[bit_i];   end
      SA_END:   begin a_bit = start_r[bit_i]; b_bit = size_r[bit_i];   end
      default:  begin a_bit = 1'b0;           b_bit = 1'b0;            end
    endcase
    s_bit = a_bit ^ b_bit ^ carry;
    c_out = (a_bit & b_bit) | (a_bit & carry) | (b_bit & carry);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      start_r <= '0;
      end_r   <= '0;
      dist_r  <= '0;
      size_r  <= '0;
      step    <= SW'(1);
      pass    <= SA_NONE;
      bit_i   <= '0;
      carry   <= 1'b0;
    end else if (cfg_we) begin
      start_r <= cfg_start;
      end_r   <= cfg_end;
      dist_r  <= cfg_dist;
      step    <= cfg_step;
      pass    <= SA_SIZE;
      bit_i   <= '0;
      carry   <= 1'b1;              // two's complement of start
    end else if (pass == SA_NONE) begin
      if (next_req) begin
        pass  <= SA_START;
        bit_i <= '0;
        carry <= 1'b0;
      end
    end else begin
      unique case (pass)
        SA_SIZE:  size_r[bit_i]  <= s_bit;
        SA_START: start_r[bit_i] <= s_bit;
        SA_END:   end_r[bit_i]   <= s_bit;
        default:  ;
      endcase
      if (bit_i == BW'(AW - 1)) begin
        bit_i <= '0;
        carry <= 1'b0;
        pass  <= (pass == SA_START) ? SA_END : SA_NONE;
      end else begin
        bit_i <= bit_i + 1'b1;
        carry <= c_out;
      end
    end
  end

  assign busy = (pass != SA_NONE);

  always_comb begin
    unique case (sel)
      2'd1:    addr = start_r;
      2'd2:    addr = end_r;
      default: addr = rand_addr;
    endcase
  end

  a_no_req_when_busy : assert property (@(posedge clk) disable iff (!rst_n)
    !(next_req && busy))
    else $error("ba_address_calc: next_req while the serial adder is busy");

endmodule
