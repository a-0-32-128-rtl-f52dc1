// pe: processing element. Eight lanes, each an 8-wide 8-bit vector MAC, give
// 64 MACs per cycle. Every lane works on its own output channel (K) with its
// own weights; all lanes share the same 8-channel input-activation vector (C).
//
// Storage (one entry read per cycle each):
//   weight buffer        WBUF_DEPTH x (8 lanes x 8 x 8 bit) = 512 x 512 b (32 KB)
//   input buffer         IBUF_DEPTH x 64 b (one 8-channel vector per entry)
//   accumulation buffer  ABUF_DEPTH x (8 lanes x 24 bit) = 192 b per entry
//
// Operation. After a go command the loop controller waits until the expected
// number of input vectors (and, when partial sums come from another PE, the
// expected partial-sum rows) have arrived, then runs
//   for r < R, s < S, cv < CV          -- one weight row, reused P*Q times
//     for p < P, q < Q                 -- one accumulator row per cycle
//       acc[p*Q+q][k] += sum_c in[((p*STR+r)*W + q*STR+s)*CV + cv][c] * w[(r*S+s)*CV+cv][k][c]
// taking exactly R*S*CV*P*Q cycles. The first step starts from zero, or from
// the partial sums received from the router. Then either the raw 24-bit
// partial sums are sent to the next PE of a cross-PE reduction (3 flits per
// accumulator row), or the outputs are post-processed (optional 2x2 max
// pooling, bias, scaling, ReLU, saturation to 8 bits) and sent as one 64-bit
// output vector per position to the global buffer. Finally an interrupt packet
// tells the RISC-V processor that the layer is done.
//
// Network interface: one router port, noc_pkg flits, credits. Incoming flits
// are always consumed at once (a credit is returned the next cycle).
//   AXI writes (word addresses): 0x0_0000+n config register n, 0x1_0000+w
//   weight word w (entry w/8, lane w%8), 0x2_0000+i input-buffer entry i.
//   AXI reads of config registers and weight words return a response packet
//   to the requester. Streams: op WRITE fills the input buffer, op PSUM fills
//   the accumulation buffer (3 flits per row).
// Config registers: 0 go (write 1) | 1 {CV,S,R,Q,P} bytes/nibbles | 2 {in_base,
// STR, W} | 3 {w_base, keep, final, relu, pool} | 4 {output base, output
// destination} | 7 interrupt destination and line | 5 {shift, scale} | 6 {expected psum rows, expected
// input vectors} | 8..15 per-lane bias.
// What follows the published PE: 8 lanes, 8-wide vector MAC, the three
// buffers, 192-bit accumulation writes every cycle, weight reuse over P*Q,
// cross-PE accumulation through the router, the post-processing functions,
// completion interrupts. The buffer depths, register map, loop order details
// and packet formats are this design's own.
module pe
  import noc_pkg::*;
#(
  parameter int unsigned LANES      = 8,
  parameter int unsigned VEC        = 8,
  parameter int unsigned WBUF_DEPTH = 512,
  parameter int unsigned IBUF_DEPTH = 256,
  parameter int unsigned ABUF_DEPTH = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CHIP_ID_W-1:0] my_chip,
  input  logic [4:0]           my_noc,
  input  flit_t                in_flit,
  input  logic                 in_valid,
  output logic                 in_credit,
  output flit_t                out_flit,
  output logic                 out_valid,
  input  logic                 out_credit,
  output logic                 busy
);
  localparam int unsigned ACC_W = 24;
  localparam int unsigned WAW = $clog2(WBUF_DEPTH);
  localparam int unsigned IAW = $clog2(IBUF_DEPTH);
  localparam int unsigned AAW = $clog2(ABUF_DEPTH);

  typedef logic signed [7:0]        wvec_t [VEC];
  typedef logic [LANES*VEC*8-1:0]   wrow_t;
  typedef logic [LANES*ACC_W-1:0]   arow_t;

  wrow_t       wbuf [WBUF_DEPTH];
  logic [63:0] ibuf [IBUF_DEPTH];
  arow_t       abuf [ABUF_DEPTH];
  logic [31:0] cfg  [16];

  // ---------------- configuration fields ----------------
  logic [7:0]  c_p, c_q, c_cv, c_w;
  logic [3:0]  c_r, c_s, c_str;
  logic [15:0] c_in_base, c_w_base, c_exp_in, c_exp_ps;
  logic        c_keep, c_final, c_relu, c_pool;
  logic [5:0]  c_out_chip, c_irq_chip;
  logic [4:0]  c_out_noc, c_irq_noc, c_shift;
  logic [15:0] c_out_base;
  logic [6:0]  c_irq_line;
  logic [7:0]  c_scale;
  always_comb begin
    {c_cv, c_s, c_r, c_q, c_p} = {cfg[1][31:24], cfg[1][23:20], cfg[1][19:16], cfg[1][15:8], cfg[1][7:0]};
    c_w       = cfg[2][7:0];
    c_str     = cfg[2][11:8];
    c_in_base = cfg[2][31:16];
    c_w_base  = cfg[3][15:0];
    c_keep    = cfg[3][16];
    c_final   = cfg[3][17];
    c_relu    = cfg[3][18];
    c_pool    = cfg[3][19];
    c_out_chip = cfg[4][5:0];
    c_out_noc  = cfg[4][10:6];
    c_out_base = {5'd0, cfg[4][21:11]};
    c_irq_chip = cfg[7][5:0];
    c_irq_noc  = cfg[7][10:6];
    c_irq_line = cfg[7][17:11];
    c_scale   = cfg[5][7:0];
    c_shift   = cfg[5][12:8];
    c_exp_in  = cfg[6][15:0];
    c_exp_ps  = cfg[6][31:16];
  end

  // ---------------- receive side ----------------
  typedef enum logic [1:0] {RX_HDR, RX_META, RX_DATA} rx_state_e;
  rx_state_e   rx_state;
  hdr_t        rx_hdr;
  meta_t       rx_meta;
  logic [31:0] rx_addr;
  logic [1:0]  rx_part;            // flit index within a partial-sum row
  arow_t       rx_psum;
  logic [15:0] in_cnt, ps_cnt;
  logic        go_pend;
  // pending AXI read request
  logic        rd_pend;
  meta_t       rd_meta;
  logic [5:0]  rd_chip;
  logic [4:0]  rd_noc;

  meta_t       in_meta;
  assign in_meta = meta_t'(in_flit.data);

  // compute-side accumulation write (declared here, driven below)
  logic        mac_we;
  logic [AAW-1:0] mac_addr;
  arow_t       mac_row;
  logic        clr_cnt;            // layer finished: clear counters
  logic        rd_clear;           // pending read request taken

  always_ff @(posedge clk) begin
    if (in_valid && rx_state == RX_DATA && rx_hdr.ptype == PT_AXI && rx_meta.op == OP_WRITE) begin
      if (rx_addr[19:16] == 4'h1)
        wbuf[rx_addr[WAW+2:3]][rx_addr[2:0]*64 +: 64] <= in_flit.data;
      else if (rx_addr[19:16] == 4'h2)
        ibuf[rx_addr[IAW-1:0]] <= in_flit.data;
    end else if (in_valid && rx_state == RX_DATA && rx_hdr.ptype == PT_STREAM && rx_meta.op == OP_WRITE) begin
      ibuf[rx_addr[IAW-1:0]] <= in_flit.data;
    end
    if (mac_we)
      abuf[mac_addr] <= mac_row;
    else if (in_valid && rx_state == RX_DATA && rx_hdr.ptype == PT_STREAM && rx_meta.op == OP_PSUM && rx_part == 2'd2)
      abuf[rx_addr[AAW-1:0]] <= {in_flit.data, rx_psum[127:0]};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_state  <= RX_HDR;
      rx_hdr    <= '0;
      rx_meta   <= '0;
      rx_addr   <= '0;
      rx_part   <= '0;
      rx_psum   <= '0;
      in_cnt    <= '0;
      ps_cnt    <= '0;
      go_pend   <= 1'b0;
      rd_pend   <= 1'b0;
      rd_meta   <= '0;
      rd_chip   <= '0;
      rd_noc    <= '0;
      in_credit <= 1'b0;
      for (int i = 0; i < 16; i++) cfg[i] <= '0;
    end else begin
      in_credit <= in_valid;
      if (clr_cnt) begin
        in_cnt  <= '0;
        ps_cnt  <= '0;
        go_pend <= 1'b0;
      end
      if (in_valid) begin
        case (rx_state)
          RX_HDR: begin
            rx_hdr <= hdr_t'(in_flit.data);
            if (!in_flit.tail) rx_state <= RX_META;
          end
          RX_META: begin
            rx_meta  <= meta_t'(in_flit.data);
            rx_addr  <= in_meta.addr;
            rx_part  <= '0;
            rx_state <= in_flit.tail ? RX_HDR : RX_DATA;
            if (rx_hdr.ptype == PT_AXI && in_meta.op == OP_READ) begin
              rd_pend <= 1'b1;
              rd_meta <= meta_t'(in_flit.data);
              rd_chip <= rx_hdr.dest[21:16];
              rd_noc  <= rx_hdr.dest[15:11];
            end
          end
          default: begin  // RX_DATA
            if (rx_hdr.ptype == PT_AXI && rx_meta.op == OP_WRITE) begin
              if (rx_addr[19:16] == 4'h0) begin
                if (rx_addr[3:0] == 4'd0) go_pend <= in_flit.data[0];
                else cfg[rx_addr[3:0]] <= in_flit.data[31:0];
              end
              rx_addr <= rx_addr + 1;
            end else if (rx_hdr.ptype == PT_STREAM && rx_meta.op == OP_WRITE) begin
              rx_addr <= rx_addr + 1;
              in_cnt  <= in_cnt + 1'b1;
            end else if (rx_hdr.ptype == PT_STREAM && rx_meta.op == OP_PSUM) begin
              rx_psum[rx_part*64 +: 64] <= in_flit.data;
              if (rx_part == 2'd2) begin
                rx_part <= '0;
                rx_addr <= rx_addr + 1;
                ps_cnt  <= ps_cnt + 1'b1;
              end else begin
                rx_part <= rx_part + 1'b1;
              end
            end
            if (in_flit.tail) rx_state <= RX_HDR;
          end
        endcase
      end
      if (rd_clear) rd_pend <= 1'b0;
    end
  end

  // ---------------- loop controller and datapath ----------------
  typedef enum logic [2:0] {S_IDLE, S_WAIT, S_MAC, S_SEND, S_IRQ, S_RESP} state_e;
  state_e      state;
  logic [7:0]  lp, lq, lcv;
  logic [3:0]  lr, ls;
  logic [15:0] in_idx, w_idx;
  always_comb begin
    in_idx = c_in_base + (16'(lp) * 16'(c_str) + 16'(lr)) * 16'(c_w) * 16'(c_cv)
           + (16'(lq) * 16'(c_str) + 16'(ls)) * 16'(c_cv) + 16'(lcv);
    w_idx  = c_w_base + (16'(lr) * 16'(c_s) + 16'(ls)) * 16'(c_cv) + 16'(lcv);
  end

  logic [63:0]  act_word;
  wrow_t        w_row;
  arow_t        a_row;
  logic         first_step;
  always_comb begin
    act_word   = ibuf[in_idx[IAW-1:0]];
    w_row      = wbuf[w_idx[WAW-1:0]];
    mac_addr   = AAW'(16'(lp) * 16'(c_q) + 16'(lq));
    a_row      = abuf[mac_addr];
    first_step = (lr == 0) && (ls == 0) && (lcv == 0) && !c_keep;
    mac_we     = (state == S_MAC);
  end

  for (genvar k = 0; k < LANES; k++) begin : g_lane
    logic signed [7:0] act [VEC];
    logic signed [7:0] wt  [VEC];
    logic signed [ACC_W-1:0] acc_o;
    for (genvar c = 0; c < VEC; c++) begin : g_el
      assign act[c] = act_word[c*8 +: 8];
      assign wt[c]  = w_row[(k*VEC + c)*8 +: 8];
    end
    pe_vector_mac #(.VEC(VEC), .DW(8), .ACC_W(ACC_W)) u_mac (
      .act(act), .wt(wt), .acc_in(a_row[k*ACC_W +: ACC_W]), .clear(first_step), .acc_out(acc_o));
    assign mac_row[k*ACC_W +: ACC_W] = acc_o;
  end

  // ---------------- output side ----------------
  // Output position counters (pooled grid when pooling), window counter.
  logic [7:0]  op_p, op_q;
  logic [1:0]  win;
  arow_t       mx;            // running max over the pooling window
  logic [7:0]  np_p, np_q;    // output grid
  logic [AAW-1:0] win_addr;
  arow_t       win_row;
  arow_t       mx_next;
  logic [63:0] out_vec;
  flit_t       pkt [10];
  logic [3:0]  pkt_n, pkt_i;  // flits in packet, next flit to send
  logic        pkt_busy;
  logic [4:0]  credits;
  logic [AAW-1:0] ps_idx;

  always_comb begin
    np_p = c_pool ? (c_p >> 1) : c_p;
    np_q = c_pool ? (c_q >> 1) : c_q;
    if (c_pool)
      win_addr = AAW'((16'(op_p) * 2 + 16'(win[1])) * 16'(c_q) + 16'(op_q) * 2 + 16'(win[0]));
    else
      win_addr = AAW'(16'(op_p) * 16'(c_q) + 16'(op_q));
    win_row = abuf[c_final ? win_addr : ps_idx];
    for (int k = 0; k < LANES; k++) begin
      logic signed [ACC_W-1:0] a, m;
      a = win_row[k*ACC_W +: ACC_W];
      m = mx[k*ACC_W +: ACC_W];
      mx_next[k*ACC_W +: ACC_W] = (win == 0 || a > m) ? a : m;
    end
  end

  for (genvar k = 0; k < LANES; k++) begin : g_post
    logic signed [7:0] y;
    pe_postproc #(.ACC_W(ACC_W), .DW(8)) u_pp (
      .acc(mx_next[k*ACC_W +: ACC_W]), .bias(cfg[8 + (k % 8)][ACC_W-1:0]),
      .scale(c_scale), .shift(c_shift), .relu(c_relu), .y(y));
    assign out_vec[(k%8)*8 +: 8] = y;
  end

  // AXI read data
  function automatic logic [63:0] rd_word(logic [31:0] a);
    if (a[19:16] == 4'h0) return {32'd0, cfg[a[3:0]]};
    if (a[19:16] == 4'h1) return wbuf[a[WAW+2:3]][a[2:0]*64 +: 64];
    if (a[19:16] == 4'h2) return ibuf[a[IAW-1:0]];
    return abuf[a[AAW-1:0]][63:0];
  endfunction

  logic pkt_last;
  assign pkt_last = pkt_busy && (pkt_i == pkt_n - 1'b1) && (credits != 0);
  assign busy     = (state != S_IDLE);
  assign clr_cnt  = (state == S_IRQ) && !pkt_busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      {lp, lq, lcv, lr, ls} <= '0;
      {op_p, op_q, win} <= '0;
      mx       <= '0;
      ps_idx   <= '0;
      pkt_n    <= '0;
      pkt_i    <= '0;
      pkt_busy <= 1'b0;
      credits  <= 5'd17;
      out_valid <= 1'b0;
      out_flit <= '0;
      rd_clear <= 1'b0;
      for (int i = 0; i < 10; i++) pkt[i] <= '0;
    end else begin
      rd_clear  <= 1'b0;
      out_valid <= 1'b0;
      // flit sender
      if (pkt_busy && credits != 0) begin
        out_flit  <= pkt[pkt_i];
        out_valid <= 1'b1;
        pkt_i     <= pkt_i + 1'b1;
        if (pkt_last) pkt_busy <= 1'b0;
      end
      credits <= credits - 5'((pkt_busy && credits != 0) ? 1 : 0) + 5'(out_credit);

      case (state)
        S_IDLE: begin
          if (rd_pend && !rd_clear) begin
            pkt[0] <= '{head: 1'b1, tail: 1'b0,
                        data: 64'(mk_ucast(PT_AXI, 5'(rd_meta.burst_m1) + 5'd2, rd_chip, rd_noc, my_chip, my_noc, 7'd0))};
            pkt[1] <= '{head: 1'b0, tail: 1'b0, data: 64'(mk_meta(OP_RESP, rd_meta.burst_m1, rd_meta.addr))};
            for (int i = 0; i < 8; i++)
              pkt[2+i] <= '{head: 1'b0, tail: (i == int'(rd_meta.burst_m1)), data: rd_word(rd_meta.addr + 32'(i))};
            pkt_n    <= 4'(rd_meta.burst_m1) + 4'd3;
            pkt_i    <= '0;
            pkt_busy <= 1'b1;
            rd_clear <= 1'b1;
            state    <= S_RESP;
          end else if (go_pend) begin
            state <= S_WAIT;
          end
        end
        S_RESP: if (!pkt_busy) state <= S_IDLE;
        S_WAIT: begin
          if (in_cnt >= c_exp_in && (!c_keep || ps_cnt >= c_exp_ps)) begin
            {lp, lq, lcv, lr, ls} <= '0;
            state <= S_MAC;
          end
        end
        S_MAC: begin
          // innermost q, then p, then cv, s, r
          if (lq != c_q - 1) lq <= lq + 1'b1;
          else begin
            lq <= '0;
            if (lp != c_p - 1) lp <= lp + 1'b1;
            else begin
              lp <= '0;
              if (lcv != c_cv - 1) lcv <= lcv + 1'b1;
              else begin
                lcv <= '0;
                if (ls != c_s - 1) ls <= ls + 1'b1;
                else begin
                  ls <= '0;
                  if (lr != c_r - 1) lr <= lr + 1'b1;
                  else begin
                    lr <= '0;
                    state <= S_SEND;
                    {op_p, op_q, win} <= '0;
                    ps_idx <= '0;
                  end
                end
              end
            end
          end
        end
        S_SEND: begin
          if (!pkt_busy || pkt_last) begin
            if (c_final) begin
              mx <= mx_next;
              if (!c_pool || win == 2'd3) begin
                pkt[0] <= '{head: 1'b1, tail: 1'b0,
                            data: 64'(mk_ucast(PT_STREAM, 5'd2, c_out_chip, c_out_noc, my_chip, my_noc, 7'd0))};
                pkt[1] <= '{head: 1'b0, tail: 1'b0,
                            data: 64'(mk_meta(OP_WRITE, 3'd0, 32'(c_out_base) + 32'(16'(op_p) * 16'(np_q)) + 32'(op_q)))};
                pkt[2] <= '{head: 1'b0, tail: 1'b1, data: out_vec};
                pkt_n    <= 4'd3;
                pkt_i    <= '0;
                pkt_busy <= 1'b1;
                win      <= '0;
                if (op_q != np_q - 1) op_q <= op_q + 1'b1;
                else begin
                  op_q <= '0;
                  if (op_p != np_p - 1) op_p <= op_p + 1'b1;
                  else state <= S_IRQ;
                end
              end else begin
                win <= win + 1'b1;
              end
            end else begin
              pkt[0] <= '{head: 1'b1, tail: 1'b0,
                          data: 64'(mk_ucast(PT_STREAM, 5'd4, c_out_chip, c_out_noc, my_chip, my_noc, 7'd0))};
              pkt[1] <= '{head: 1'b0, tail: 1'b0,
                          data: 64'(mk_meta(OP_PSUM, 3'd0, 32'(c_out_base) + 32'(ps_idx)))};
              pkt[2] <= '{head: 1'b0, tail: 1'b0, data: win_row[63:0]};
              pkt[3] <= '{head: 1'b0, tail: 1'b0, data: win_row[127:64]};
              pkt[4] <= '{head: 1'b0, tail: 1'b1, data: win_row[191:128]};
              pkt_n    <= 4'd5;
              pkt_i    <= '0;
              pkt_busy <= 1'b1;
              if (32'(ps_idx) == 32'(c_p) * 32'(c_q) - 1) state <= S_IRQ;
              ps_idx <= ps_idx + 1'b1;
            end
          end
        end
        S_IRQ: begin
          if (!pkt_busy) begin
            pkt[0] <= '{head: 1'b1, tail: 1'b1,
                        data: 64'(mk_ucast(PT_INTR, 5'd0, c_irq_chip, c_irq_noc, my_chip, my_noc, c_irq_line))};
            pkt_n    <= 4'd1;
            pkt_i    <= '0;
            pkt_busy <= 1'b1;
            state    <= S_RESP;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  a_out_credit : assert property (@(posedge clk) disable iff (!rst_n) !(out_valid && credits > 5'd17))
    else $error("pe: credit counter out of range");
endmodule
