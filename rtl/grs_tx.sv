// grs_tx: digital side of one chip-to-chip ground-referenced-signaling
// transmitter (4 data wires plus a forwarded clock).
//
// Data path
//   1. A 17-flit packet buffer takes flits from the NoP router (credit
//      interface). A packet is passed on only once it is complete, so a packet
//      never stalls half way across the link.
//   2. A 1920-bit memory is written as 15 words of 128 bits in the router clock
//      domain (one flit per word, zero padded) and read as 32 chunks of 60 bits
//      in the link clock domain: the same memory crosses the clock domains and
//      cuts the stream into 60-bit chunks.
//   3. Each chunk gets a 4-bit header {valid, partial, credit[1:0]} and the
//      64-bit word is serialized 16:1 onto the 4 wires, bit i of wire w being
//      word[w*16+i]. Data change on the rising edge of bclk; tx_clk is bclk,
//      held low until the transmitter leaves reset so that the receiver can
//      count word boundaries from its first edge.
// Chunk rules: a chunk is sent "valid" when all 60 of its bits are written; if
// only its beginning is written (up to a 128-bit word boundary), it is sent
// "partial" and sent again once complete, so a short packet does not wait for
// the next one. Chunks are sent only while the far receiver has a free chunk
// slot (32 slots, credits counted by cred_rcvd, returned by the far receiver).
// Each word also returns up to 3 credits for chunk slots freed by the local
// receiver of the opposite direction (rx_freed).
// The pointer copies exchanged between the two clock domains go through
// cdc_count_sync. All counters are absolute and wrap together: 960 words =
// 2048 chunks = 122880 bits.
// Following the published link: 15x128-bit write / 32x60-bit read FIFO used
// for clock crossing and word splitting, 4 header bits for valid / partially
// valid / credits, 16:1 serializers on 4 wires, forwarded clock, credit return
// over the opposite link. Header encoding, padding of flits to 128 bits and the
// partial-chunk rule are this design's choices. The link clock here is the bit
// clock with a word every 16 cycles rather than a separate word clock.
module grs_tx
  import noc_pkg::*;
(
  // router side
  input  logic        clk,
  input  logic        rst_n,
  input  flit_t       in_flit,
  input  logic        in_valid,
  output logic        in_credit,
  // link side
  input  logic        bclk,
  input  logic        brst_n,
  input  logic [10:0] cred_rcvd,   // chunk credits received from the far end (bclk domain)
  input  logic [10:0] rx_freed,    // chunk slots freed by the local receiver (bclk domain)
  output logic [3:0]  tx_data,
  output logic        tx_clk
);
  localparam int unsigned NW = 15, NC = 32, WMOD = 960, BMOD = 122880;

  // ---------------- router domain ----------------
  flit_t       pb_head;
  logic        pb_empty, pb_full, pb_pop;
  logic [4:0]  pb_cnt;
  logic [4:0]  tails;          // complete packets in the packet buffer
  logic        in_pkt;         // a packet is being moved to the link memory
  logic [9:0]  wcnt;           // words written, mod 960
  logic [9:0]  rwords_sync;    // words fully read by the link side, mod 960
  logic [1919:0] ring;
  logic [9:0]  used;

  flit_fifo #(.DEPTH(17)) u_pb (
    .clk, .rst_n, .push(in_valid), .din(in_flit), .pop(pb_pop),
    .dout(pb_head), .empty(pb_empty), .full(pb_full), .count(pb_cnt));

  always_comb begin
    used   = (wcnt >= rwords_sync) ? wcnt - rwords_sync : wcnt + 10'(WMOD) - rwords_sync;
    pb_pop = !pb_empty && (in_pkt || tails != 0) && (used < 10'(NW));
  end

  always_ff @(posedge clk)
    if (pb_pop) ring[(wcnt % 10'(NW)) * 128 +: 128] <= {62'd0, pb_head};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tails     <= '0;
      in_pkt    <= 1'b0;
      wcnt      <= '0;
      in_credit <= 1'b0;
    end else begin
      in_credit <= pb_pop;
      tails <= tails + 5'(in_valid && in_flit.tail) - 5'(pb_pop && pb_head.tail);
      if (pb_pop) begin
        in_pkt <= !pb_head.tail;
        wcnt   <= (wcnt == 10'(WMOD - 1)) ? '0 : wcnt + 1'b1;
      end
    end
  end

  // ---------------- link domain ----------------
  logic [9:0]  wcnt_sync;
  logic [10:0] rcnt;           // chunks fully sent, mod 2048
  logic [10:0] cred_sent;      // credits returned so far, mod 2048
  logic [16:0] wbits, rbits, avail;
  logic [3:0]  bc;
  logic        run;
  logic [63:0] sh, cur_word;
  logic [1:0]  cred_now;
  logic        link_room;
  logic [9:0]  rwords;

  cdc_count_sync #(.W(10)) u_wsync (.src_clk(clk), .src_rst_n(rst_n), .src_val(wcnt),
                                    .dst_clk(bclk), .dst_rst_n(brst_n), .dst_val(wcnt_sync));
  cdc_count_sync #(.W(10)) u_rsync (.src_clk(bclk), .src_rst_n(brst_n), .src_val(rwords),
                                    .dst_clk(clk), .dst_rst_n(rst_n), .dst_val(rwords_sync));

  always_comb begin
    logic [10:0] pend;
    logic [59:0] chunk;
    logic [10:0] slot;
    wbits = 17'(wcnt_sync) * 17'd128;
    rbits = 17'(rcnt) * 17'd60;
    avail = (wbits >= rbits) ? wbits - rbits : wbits + 17'(BMOD) - rbits;
    // words whose last bit has been sent: floor(rbits / 128)
    rwords = 10'(rbits >> 7);
    slot   = 11'(rcnt % 11'(NC)) * 11'd60;
    chunk  = ring[slot +: 60];
    link_room = (11'(rcnt - cred_rcvd) < 11'(NC));
    pend     = rx_freed - cred_sent;
    cred_now = (pend > 11'd3) ? 2'd3 : 2'(pend);
    cur_word = '0;
    cur_word[61:60] = cred_now;
    if (link_room && avail >= 17'd60) begin
      cur_word[63] = 1'b1;
      cur_word[59:0] = chunk;
    end else if (link_room && avail != 0) begin
      cur_word[63] = 1'b1;
      cur_word[62] = 1'b1;
      cur_word[59:0] = chunk;
    end
  end

  always_ff @(negedge bclk or negedge brst_n)
    if (!brst_n) run <= 1'b0;
    else         run <= 1'b1;

  assign tx_clk = bclk & run;

  always_ff @(posedge bclk or negedge brst_n) begin
    if (!brst_n) begin
      rcnt      <= '0;
      cred_sent <= '0;
      bc        <= '0;
      sh        <= '0;
      tx_data   <= '0;
    end else if (run) begin
      bc <= bc + 1'b1;
      if (bc == 4'd0) begin
        sh <= cur_word;
        for (int w = 0; w < 4; w++) tx_data[w] <= cur_word[w*16];
        cred_sent <= cred_sent + 11'(cred_now);
        if (cur_word[63] && !cur_word[62]) rcnt <= rcnt + 1'b1;
      end else begin
        for (int w = 0; w < 4; w++) tx_data[w] <= sh[w*16 + int'(bc)];
      end
    end
  end
endmodule
