// gpio_if: narrow, slow host interface of the chip. The host (an FPGA) and
// the chip exchange NoC flits over two GPIO_W-bit ready/valid channels that
// advance once per period of gpio_clk, an on-chip clock divided by DIV.
// A flit is sent as ceil(66/GPIO_W) beats, least significant beat first.
//   host -> chip: beats are assembled into flits in a 17-flit packet buffer;
//                 a packet enters the network only when it is complete, so a
//                 slow host never holds a router path open.
//   chip -> host: the network writes flits at full speed into a 17-flit
//                 buffer (credit interface) and they are drained beat by beat.
// Everything runs on the core clock; the host channels change only in cycles
// where the divider enable is set, with gpio_clk high in the second half of
// each period. The published interface names the divided clock, the
// ready/valid protocol and full-packet buffering; the width, the divider and
// the beat order are this design's choices.
module gpio_if
  import noc_pkg::*;
#(
  parameter int unsigned GPIO_W = 16,
  parameter int unsigned DIV    = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  output logic              gpio_clk,
  // host to chip
  input  logic [GPIO_W-1:0] h2c_data,
  input  logic              h2c_valid,
  output logic              h2c_ready,
  // chip to host
  output logic [GPIO_W-1:0] c2h_data,
  output logic              c2h_valid,
  input  logic              c2h_ready,
  // network port
  output flit_t             out_flit,
  output logic              out_valid,
  input  logic              out_credit,
  input  flit_t             in_flit,
  input  logic              in_valid,
  output logic              in_credit
);
  localparam int unsigned NB = (66 + GPIO_W - 1) / GPIO_W;
  localparam int unsigned BW = $clog2(NB + 1);
  localparam int unsigned DW = (DIV > 1) ? $clog2(DIV) : 1;

  logic [DW-1:0] div_cnt;
  logic          tick;
  assign tick     = (div_cnt == DW'(DIV - 1));
  assign gpio_clk = (div_cnt >= DW'(DIV / 2));

  // ---------------- host to chip ----------------
  logic [NB*GPIO_W-1:0] asm_q;     // beats received so far (last one is not stored)
  logic [BW-1:0]        asm_n;
  flit_t                ib_head;
  logic                 ib_empty, ib_full, ib_pop, ib_push;
  logic [4:0]           ib_cnt, tails;
  logic                 in_pkt;
  logic [4:0]           credits;

  flit_t asm_flit;
  logic [NB*GPIO_W-1:0] asm_all;
  assign asm_all   = {h2c_data, asm_q[(NB-1)*GPIO_W-1:0]};
  assign asm_flit  = flit_t'(asm_all[65:0]);
  assign h2c_ready = !ib_full;
  assign ib_push   = tick && h2c_valid && h2c_ready && (asm_n == BW'(NB - 1));
  assign ib_pop    = !ib_empty && (in_pkt || tails != 0) && credits != 0;

  flit_fifo #(.DEPTH(17)) u_ib (
    .clk, .rst_n, .push(ib_push),
    .din(asm_flit),
    .pop(ib_pop), .dout(ib_head), .empty(ib_empty), .full(ib_full), .count(ib_cnt));

  // ---------------- chip to host ----------------
  flit_t         ob_head;
  logic          ob_empty, ob_full, ob_pop;
  logic [4:0]    ob_cnt;
  logic [BW-1:0] beat;
  logic [NB*GPIO_W-1:0] ob_bits;

  flit_fifo #(.DEPTH(17)) u_ob (
    .clk, .rst_n, .push(in_valid), .din(in_flit), .pop(ob_pop),
    .dout(ob_head), .empty(ob_empty), .full(ob_full), .count(ob_cnt));

  assign ob_bits   = (NB*GPIO_W)'(ob_head);
  assign c2h_valid = !ob_empty;
  assign c2h_data  = ob_bits[beat*GPIO_W +: GPIO_W];
  assign ob_pop    = tick && c2h_valid && c2h_ready && (beat == BW'(NB - 1));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      div_cnt   <= '0;
      asm_q     <= '0;
      asm_n     <= '0;
      tails     <= '0;
      in_pkt    <= 1'b0;
      credits   <= 5'd17;
      out_valid <= 1'b0;
      out_flit  <= '0;
      beat      <= '0;
      in_credit <= 1'b0;
    end else begin
      div_cnt <= tick ? '0 : div_cnt + 1'b1;
      if (tick && h2c_valid && h2c_ready) begin
        asm_q[asm_n*GPIO_W +: GPIO_W] <= h2c_data;
        asm_n <= (asm_n == BW'(NB - 1)) ? '0 : asm_n + 1'b1;
      end
      tails <= tails + 5'(ib_push && asm_flit.tail) - 5'(ib_pop && ib_head.tail);
      out_valid <= ib_pop;
      if (ib_pop) begin
        out_flit <= ib_head;
        in_pkt   <= !ib_head.tail;
      end
      credits <= credits - 5'(ib_pop) + 5'(out_credit);
      if (tick && c2h_valid && c2h_ready) beat <= (beat == BW'(NB - 1)) ? '0 : beat + 1'b1;
      in_credit <= ob_pop;
    end
  end
endmodule
