// fifo: synchronous (single-clock) first-in first-out buffer.
//
// Storage is a circular buffer of FIFO_DEPTH words addressed by a write
// pointer and a read pointer, as in the common-clock FIFO structure of a
// memory with a write counter, a read counter and flag logic. Reset (synchronous)
// sets both pointers to zero, which empties the FIFO.
//
// Write: with wr_en high at a rising edge and full low, din is stored at the
//   write pointer and the pointer advances. A write while full is ignored.
// Read: with rd_en high at a rising edge and empty low, the word at the read
//   pointer is registered onto dout, so it is valid from the cycle after the
//   rd_en edge, and the pointer advances. dout holds its value until the next
//   read. A read while empty is ignored.
// Flags: full and empty come from an occupancy counter of ADDR_WIDTH+1 bits
//   (this design's way of telling a full buffer from an empty one, where the
//   two pointers are equal). Both flags are registered-state functions and
//   change in the cycle after the write or read that changes them. A read and
//   a write in the same cycle keep the count unchanged. Any depth is allowed.
module fifo #(
  parameter int unsigned DATA_WIDTH = 8,
  parameter int unsigned FIFO_DEPTH = 16,
  parameter int unsigned ADDR_WIDTH = $clog2(FIFO_DEPTH)
) (
  input  logic                  clk,
  input  logic                  rst,
  // write interface
  input  logic                  wr_en,
  input  logic [DATA_WIDTH-1:0] din,
  output logic                  full,
  // read interface
  input  logic                  rd_en,
  output logic [DATA_WIDTH-1:0] dout,
  output logic                  empty
);
  logic [DATA_WIDTH-1:0] mem [FIFO_DEPTH];
  logic [ADDR_WIDTH-1:0] wr_ptr, rd_ptr;
  logic [ADDR_WIDTH:0]   count;
  logic                  do_write, do_read;

  assign full     = (count == (ADDR_WIDTH+1)'(FIFO_DEPTH));
  assign empty    = (count == '0);
  assign do_write = wr_en && !full;
  assign do_read  = rd_en && !empty;

  function automatic logic [ADDR_WIDTH-1:0] next_ptr(input logic [ADDR_WIDTH-1:0] p);
    return (p == ADDR_WIDTH'(FIFO_DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_write) mem[wr_ptr] <= din;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
      dout   <= '0;
    end else begin
      if (do_write) wr_ptr <= next_ptr(wr_ptr);
      if (do_read) begin
        rd_ptr <= next_ptr(rd_ptr);
        dout   <= mem[rd_ptr];
      end
      case ({do_write, do_read})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end
endmodule
