// Router input buffer: a first-in first-out queue of flits.
//
// Every flit that reaches a router input is written here before the router
// processes it. The storage is a circular array with read and write
// pointers; the flit at the head is visible on rd_data whenever not empty.
// The depth is this design's choice. Writing into a full buffer cannot
// happen under credit flow control and is flagged by an assertion.
//
// Interface: wr_en writes wr_data; rd_en pops the head flit. A flit written
// at cycle t is readable at cycle t+1.
module flit_fifo #(
  parameter int unsigned WIDTH = 34,
  parameter int unsigned DEPTH = 4,
  localparam int unsigned PTR_W = (DEPTH > 1) ? $clog2(DEPTH) : 1
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             wr_en,
  input  logic [WIDTH-1:0] wr_data,
  input  logic             rd_en,
  output logic [WIDTH-1:0] rd_data,
  output logic             empty,
  output logic             full
);

  logic [WIDTH-1:0] mem [DEPTH];
  logic [PTR_W-1:0] wr_ptr, rd_ptr;
  logic [PTR_W:0]   count;

  assign empty   = (count == '0);
  assign full    = (count == (PTR_W+1)'(DEPTH));
  assign rd_data = mem[rd_ptr];

  function automatic logic [PTR_W-1:0] next_ptr(logic [PTR_W-1:0] p);
    return (p == PTR_W'(DEPTH - 1)) ? '0 : p + 1'b1;
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wr_ptr <= '0;
      rd_ptr <= '0;
      count  <= '0;
    end else begin
      if (wr_en)          wr_ptr <= next_ptr(wr_ptr);
      if (rd_en && !empty) rd_ptr <= next_ptr(rd_ptr);
      count <= count + (PTR_W+1)'(wr_en) - (PTR_W+1)'(rd_en && !empty);
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[wr_ptr] <= wr_data;
  end

  a_no_overflow: assert property (@(posedge clk) disable iff (!rst_n) !(wr_en && full && !rd_en))
    else $error("write into a full input buffer");

endmodule
