// grs_rx: digital side of one ground-referenced-signaling receiver; the
// mirror image of grs_tx.
//   1. Deserializer, clocked by the forwarded clock rx_clk: the 4 wires are
//      sampled on its falling edge (middle of the bit) and every 16 bits per
//      wire form one 64-bit word {valid, partial, credit[1:0], chunk[59:0]}.
//      The first rx_clk edge after reset is the first bit of a word.
//   2. Valid and partial chunks are written into a 1920-bit memory as 32
//      chunks of 60 bits; the credit field is added to cred_rcvd, which the
//      local transmitter of the opposite direction uses as its link credits.
//      A partial chunk makes its bits valid up to the 128-bit word boundary it
//      contains; the complete chunk later overwrites the same slot.
//   3. In the router clock domain the memory is read as 15 words of 128 bits;
//      each complete word carries one flit (bits 65:0), which is sent to the
//      NoP router under its credits (17-flit router input buffer).
//      rx_freed counts chunk slots whose bits have all been read; the local
//      transmitter returns them as credits to the far end.
// The count of valid bits crosses from the link clock to the router clock
// through cdc_count_sync. Counters wrap together (960 words = 2048 chunks =
// 122880 bits).
module grs_rx
  import noc_pkg::*;
(
  // link side
  input  logic        rx_clk,
  input  logic        rx_rst_n,
  input  logic [3:0]  rx_data,
  output logic [10:0] cred_rcvd,     // rx_clk domain
  // router side
  input  logic        clk,
  input  logic        rst_n,
  output flit_t       out_flit,
  output logic        out_valid,
  input  logic        out_credit,
  output logic [10:0] rx_freed       // clk domain
);
  localparam int unsigned NW = 15, NC = 32, WMOD = 960, BMOD = 122880;

  // ---------------- link clock domain ----------------
  logic [3:0]  bc;
  logic [63:0] sr;
  logic [63:0] word;
  logic [10:0] wc;             // chunks written completely, mod 2048
  logic [16:0] vbits;          // bits valid, mod 122880
  logic [1919:0] ring;

  always_comb begin
    word = sr;
    for (int w = 0; w < 4; w++) word[w*16 + 15] = rx_data[w];
  end

  always_ff @(negedge rx_clk)
    if (bc == 4'd15 && word[63]) ring[11'(wc % 11'(NC)) * 11'd60 +: 60] <= word[59:0];

  always_ff @(negedge rx_clk or negedge rx_rst_n) begin
    if (!rx_rst_n) begin
      bc        <= '0;
      sr        <= '0;
      wc        <= '0;
      vbits     <= '0;
      cred_rcvd <= '0;
    end else begin
      bc <= bc + 1'b1;
      for (int w = 0; w < 4; w++) sr[w*16 + int'(bc)] <= rx_data[w];
      if (bc == 4'd15) begin
        cred_rcvd <= cred_rcvd + 11'(word[61:60]);
        if (word[63]) begin
          logic [16:0] start, bnd;
          start = 17'(wc) * 17'd60;
          if (!word[62]) begin
            wc    <= wc + 1'b1;
            vbits <= (start + 17'd60 >= 17'(BMOD)) ? start + 17'd60 - 17'(BMOD) : start + 17'd60;
          end else begin
            // valid up to the 128-bit boundary inside this chunk
            bnd   = ((start + 17'd60) >> 7) << 7;
            vbits <= (bnd >= 17'(BMOD)) ? bnd - 17'(BMOD) : bnd;
          end
        end
      end
    end
  end

  // ---------------- router clock domain ----------------
  logic [16:0] vbits_sync;
  logic [9:0]  rw;             // words read, mod 960
  logic [9:0]  vw;             // words valid
  logic [4:0]  credits;
  logic        have, send;

  cdc_count_sync #(.W(17)) u_vsync (.src_clk(rx_clk), .src_rst_n(rx_rst_n), .src_val(vbits),
                                    .dst_clk(clk), .dst_rst_n(rst_n), .dst_val(vbits_sync));

  always_comb begin
    logic [16:0] rb;
    vw   = 10'(vbits_sync >> 7);
    have = (vw != rw);
    send = have && (credits != 0);
    rb   = 17'(rw) * 17'd128;
    // chunk slots whose 60 bits lie below the read position: floor(rb / 60)
    rx_freed = 11'(rb / 17'd60);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rw        <= '0;
      credits   <= 5'd17;
      out_valid <= 1'b0;
      out_flit  <= '0;
    end else begin
      out_valid <= send;
      if (send) begin
        out_flit <= flit_t'(ring[11'(rw % 10'(NW)) * 11'd128 +: 66]);
        rw       <= (rw == 10'(WMOD - 1)) ? '0 : rw + 1'b1;
      end
      credits <= credits - 5'(send) + 5'(out_credit);
    end
  end
endmodule
