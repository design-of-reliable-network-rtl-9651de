// noc_fifo: synchronous first-in first-out buffer, one per router port and
// direction (input buffering and output buffering).
//
// Write: data_in is stored on the rising clock edge when write_enable is high
// and the FIFO is not full. Read: on the rising edge with read_enable high and
// the FIFO not empty, the oldest word is moved into the data_out register,
// where it stays until the next read. A read and a write may happen in the
// same cycle; a write while full is ignored even if a read comes with it. full is
// high when all DEPTH locations hold data, empty when none does. The storage is
// a circular array addressed by a write and a read pointer with an occupancy
// counter; reset (synchronous, active high) empties it and clears data_out.
//
// The port list, the three operations and the flag meanings follow the
// document; the depth and the registered data_out are this design's own
// choices.
module noc_fifo #(
  parameter int unsigned WIDTH = 16,
  parameter int unsigned DEPTH = 4
) (
  input  logic             clk,
  input  logic             rst,
  input  logic             write_enable,
  input  logic             read_enable,
  input  logic [WIDTH-1:0] data_in,
  output logic             full,
  output logic             empty,
  output logic [WIDTH-1:0] data_out
);

  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic [AW:0]      count;
  logic             do_wr, do_rd;

  assign full  = (count == (AW+1)'(DEPTH));
  assign empty = (count == '0);
  assign do_rd = read_enable && !empty;
  assign do_wr = write_enable && !full;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH-1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= data_in;
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      wr_ptr   <= '0;
      rd_ptr   <= '0;
      count    <= '0;
      data_out <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) begin
        rd_ptr   <= next_ptr(rd_ptr);
        data_out <= mem[rd_ptr];
      end
      case ({do_wr, do_rd})
        2'b10:   count <= count + 1'b1;
        2'b01:   count <= count - 1'b1;
        default: count <= count;
      endcase
    end
  end

  // An accepted write never overflows and a read never underflows.
  a_no_overflow: assert property (@(posedge clk) disable iff (rst) count <= (AW+1)'(DEPTH));

endmodule
