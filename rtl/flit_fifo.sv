// flit_fifo: synchronous first-in first-out buffer of noc_pkg flits, used in
// front of units that cannot always take a flit in the cycle it arrives.
// push/pop with full/empty flags; the head is readable combinationally.
// With DEPTH entries behind a credit interface, the upstream holds DEPTH
// credits and gets one back for every pop.
module flit_fifo
  import noc_pkg::*;
#(
  parameter int unsigned DEPTH = 17
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  push,
  input  flit_t din,
  input  logic  pop,
  output flit_t dout,
  output logic  empty,
  output logic  full,
  output logic [$clog2(DEPTH+1)-1:0] count
);
  localparam int unsigned AW = (DEPTH > 1) ? $clog2(DEPTH) : 1;
  flit_t         mem [DEPTH];
  logic [AW-1:0] rd, wr;

  assign dout  = mem[rd];
  assign empty = (count == 0);
  assign full  = (count == ($clog2(DEPTH+1))'(DEPTH));

  always_ff @(posedge clk)
    if (push && !full) mem[wr] <= din;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd <= '0;
      wr <= '0;
      count <= '0;
    end else begin
      if (push && !full) wr <= (wr == AW'(DEPTH - 1)) ? '0 : wr + 1'b1;
      if (pop && !empty) rd <= (rd == AW'(DEPTH - 1)) ? '0 : rd + 1'b1;
      count <= count + ($clog2(DEPTH+1))'(push && !full) - ($clog2(DEPTH+1))'(pop && !empty);
    end
  end

  a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n) push |-> !full || pop)
    else $error("flit_fifo: overflow");
endmodule
