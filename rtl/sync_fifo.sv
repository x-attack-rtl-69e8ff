// sync_fifo: single-clock first-in first-out buffer between the fabric and
// the host processor.
//
// DEPTH entries of WIDTH bits in a memory array with read and write
// pointers and an occupancy counter. Show-ahead read: rd_data holds the
// oldest entry whenever empty is low, and rd_en removes it at the next
// clock edge. A write and a read may happen in the same cycle. Writes when
// full and reads when empty are ignored (and flagged by assertions).
// The attack set-up keeps plaintexts, ciphertexts and sensor samples in
// such buffers and lets software drain them; the single clock, the
// show-ahead read and the overflow rule are this design's choices.
module sync_fifo #(
  parameter int unsigned WIDTH = 128,
  parameter int unsigned DEPTH = 4096
) (
  input  logic                     clk,
  input  logic                     rst,       // asynchronous, active high
  input  logic                     wr_en,
  input  logic [WIDTH-1:0]         wr_data,
  input  logic                     rd_en,
  output logic [WIDTH-1:0]         rd_data,
  output logic                     full,
  output logic                     empty,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  localparam int unsigned CW = $clog2(DEPTH + 1);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [AW-1:0]    wr_ptr, rd_ptr;
  logic             do_wr, do_rd;

  assign full  = (count == CW'(DEPTH));
  assign empty = (count == '0);
  assign do_wr = wr_en && !full;
  assign do_rd = rd_en && !empty;

  function automatic logic [AW-1:0] next_ptr(input logic [AW-1:0] p);
    return (p == AW'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk) begin
    if (do_wr) mem[wr_ptr] <= wr_data;
  end

  always_ff @(posedge clk or posedge rst) begin
    if (rst) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (do_wr) wr_ptr <= next_ptr(wr_ptr);
      if (do_rd) rd_ptr <= next_ptr(rd_ptr);
      count <= count + CW'(do_wr) - CW'(do_rd);
    end
  end

  assign rd_data = mem[rd_ptr];

  a_no_overflow:  assert property (@(posedge clk) disable iff (rst) !(wr_en && full));
  a_no_underflow: assert property (@(posedge clk) disable iff (rst) !(rd_en && empty));
endmodule
