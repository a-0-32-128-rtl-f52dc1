// global_buffer: second level of the activation memory hierarchy.
// Four banks of BANK_WORDS x 64 bit (16 KB each by default) form one word-
// addressed space; bank = address / BANK_WORDS. Input and output activations
// may be placed anywhere in it, so the split between them is set only by the
// base addresses software chooses.
//
// The unit has NPORTS (3) network ports. Every port has a 17-flit input
// buffer; packets from the ports are parsed independently and their writes are
// granted per bank, so writes to different banks proceed in parallel and a
// bank conflict only delays one port by a cycle.
// Packets accepted: AXI writes/reads (memory at 0x0_0000+word, registers at
// 0x1_0000+n), and stream writes of output activations. Counted stream words
// raise an interrupt once the expected number has arrived.
// Engines (started by writing register 0, run one at a time):
//   bit0 stream-out: sends COUNT words from SRC to the destination held in
//        register 2 (unicast or multicast header), at DST, in packets of up
//        to 15 words, one flit per cycle; used to send input activations to
//        the PEs, locally or across the package
//   bit1 element-wise add: D[i] = sat8(A[i] + B[i]) lane by lane (8 signed
//        bytes per word), one word per cycle
// Each engine sends an interrupt to the RISC-V processor when done.
// Registers: 1 {DST[63:32], COUNT[31:16], SRC[15:0]} | 2 header {mcast[56],
// dest[55:0]} | 3 {irq line[33:27], irq noc[26:22], irq chip[21:16],
// expected stream words[15:0]} | 4 {N[63:48], D[47:32], B[31:16], A[15:0]}.
// Interrupt lines: base+0 stream-in complete, +1 stream-out done, +2 add done.
// Outgoing packets leave on port 0.
// Following the published GB: four 16 KB banks, flexible input/output
// partition, three network ports, multicast of inputs to PEs, element-wise
// computation. Register map, packet sizes and the interrupt scheme are this
// design's own.
module global_buffer
  import noc_pkg::*;
#(
  parameter int unsigned NBANKS     = 4,
  parameter int unsigned BANK_WORDS = 2048,
  parameter int unsigned NPORTS     = 3
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CHIP_ID_W-1:0] my_chip,
  input  logic [4:0]           my_noc,
  input  flit_t                in_flit   [NPORTS],
  input  logic [NPORTS-1:0]    in_valid,
  output logic [NPORTS-1:0]    in_credit,
  output flit_t                out_flit  [NPORTS],
  output logic [NPORTS-1:0]    out_valid,
  input  logic [NPORTS-1:0]    out_credit,
  output logic                 busy
);
  localparam int unsigned BW = $clog2(BANK_WORDS);
  localparam int unsigned SW = $clog2(NBANKS);
  localparam int unsigned AW = BW + SW;

  logic [63:0] mem [NBANKS][BANK_WORDS];
  logic [63:0] cfg [5];

  function automatic logic [63:0] rd_mem(logic [31:0] a);
    return mem[a[AW-1:BW]][a[BW-1:0]];
  endfunction

  // ---------------- engines and sender ----------------
  typedef enum logic [2:0] {E_IDLE, E_RESP, E_SOUT, E_EW, E_IRQ} eng_e;
  eng_e        eng;
  logic        rd_pend;
  logic [31:0] rd_addr;
  logic [2:0]  rd_bm1;
  logic [5:0]  rd_chip;
  logic [4:0]  rd_noc;
  logic [15:0] in_words;
  logic        in_done_irq;    // stream-in complete interrupt pending
  logic [6:0]  irq_line_q;

  // element-wise
  logic        ew_we;
  logic [AW-1:0] ew_waddr;
  logic [63:0] ew_wdata;
  logic [15:0] ew_i;

  // sender: one packet at a time on port 0
  typedef enum logic [1:0] {T_HDR, T_META, T_DATA} tx_e;
  tx_e         tx;
  logic [4:0]  credits;
  logic [15:0] so_i;           // words sent by the stream-out engine
  logic [3:0]  pk_left;        // data words left in the current packet
  logic [31:0] pk_src;         // memory address of the next data word
  logic        can_send;

  logic [15:0] so_src, so_cnt, ew_a, ew_b, ew_d, ew_n, exp_words;
  logic [31:0] so_dst;
  logic [5:0]  irq_chip;
  logic [4:0]  irq_noc;
  logic [6:0]  irq_base;
  // ---------------- per-port receive ----------------
  typedef enum logic [1:0] {RX_HDR, RX_META, RX_DATA} rx_state_e;
  flit_t       head   [NPORTS];
  logic [NPORTS-1:0] empty, pop;
  rx_state_e   rx_state [NPORTS];
  logic [1:0]  rx_type  [NPORTS];
  logic [5:0]  rx_src_chip [NPORTS];
  logic [4:0]  rx_src_noc  [NPORTS];
  logic [1:0]  rx_op    [NPORTS];
  logic [31:0] rx_addr  [NPORTS];

  for (genvar i = 0; i < NPORTS; i++) begin : g_in
    logic [$clog2(18)-1:0] cnt;
    logic                  full;
    flit_fifo #(.DEPTH(17)) u_fifo (
      .clk, .rst_n, .push(in_valid[i]), .din(in_flit[i]), .pop(pop[i]),
      .dout(head[i]), .empty(empty[i]), .full(full), .count(cnt));
  end

  // write requests from ports (data flits of writes), granted per bank
  logic [NPORTS-1:0] wreq, mem_w_port;
  logic [NPORTS-1:0] want_pop;
  always_comb begin
    logic [NBANKS-1:0] bank_busy;
    bank_busy = '0;
    for (int i = 0; i < NPORTS; i++) begin
      wreq[i] = !empty[i] && rx_state[i] == RX_DATA &&
                ((rx_type[i] == PT_AXI && rx_op[i] == OP_WRITE && rx_addr[i][19:16] == 4'h0) ||
                 (rx_type[i] == PT_STREAM && rx_op[i] == OP_WRITE));
    end
    // element-wise engine write has the first claim on its bank
    if (ew_we) bank_busy[ew_waddr[AW-1:BW]] = 1'b1;
    for (int i = 0; i < NPORTS; i++) begin
      mem_w_port[i] = 1'b0;
      if (wreq[i] && !bank_busy[rx_addr[i][AW-1:BW]]) begin
        mem_w_port[i] = 1'b1;
        bank_busy[rx_addr[i][AW-1:BW]] = 1'b1;
      end
      // a read request waits while another read response is pending
      want_pop[i] = !empty[i] && (!wreq[i] || mem_w_port[i]);
      if (!empty[i] && rx_state[i] == RX_META && head[i].data[63:62] == OP_READ &&
          rx_type[i] == PT_AXI && (rd_pend || (i > 0 && rd_req_port_lower(i))))
        want_pop[i] = 1'b0;
    end
    pop = want_pop;
  end

  // true if a lower-numbered port also presents a read request this cycle
  function automatic logic rd_req_port_lower(int i);
    logic r;
    r = 1'b0;
    for (int j = 0; j < NPORTS; j++)
      if (j < i && !empty[j] && rx_state[j] == RX_META && rx_type[j] == PT_AXI &&
          head[j].data[63:62] == OP_READ && !rd_pend)
        r = 1'b1;
    return r;
  endfunction

  always_comb begin
    so_src   = cfg[1][15:0];
    so_cnt   = cfg[1][31:16];
    so_dst   = cfg[1][63:32];
    exp_words = cfg[3][15:0];
    irq_chip = cfg[3][21:16];
    irq_noc  = cfg[3][26:22];
    irq_base = cfg[3][33:27];
    ew_a = cfg[4][15:0];
    ew_b = cfg[4][31:16];
    ew_d = cfg[4][47:32];
    ew_n = cfg[4][63:48];
    can_send = (credits != 0);
    ew_we    = (eng == E_EW);
    ew_waddr = AW'(ew_d + ew_i);
    for (int k = 0; k < 8; k++) begin
      logic signed [8:0] s;
      s = 9'($signed(rd_mem(32'(ew_a + ew_i))[k*8 +: 8])) + 9'($signed(rd_mem(32'(ew_b + ew_i))[k*8 +: 8]));
      ew_wdata[k*8 +: 8] = (s > 9'sd127) ? 8'sd127 : (s < -9'sd128) ? -8'sd128 : s[7:0];
    end
  end

  // memory writes
  always_ff @(posedge clk) begin
    if (ew_we) mem[ew_waddr[AW-1:BW]][ew_waddr[BW-1:0]] <= ew_wdata;
    for (int i = 0; i < NPORTS; i++)
      if (mem_w_port[i]) mem[rx_addr[i][AW-1:BW]][rx_addr[i][BW-1:0]] <= head[i].data;
  end

  logic [NPORTS-1:0] stream_word;
  always_comb
    for (int i = 0; i < NPORTS; i++)
      stream_word[i] = mem_w_port[i] && rx_type[i] == PT_STREAM;

  logic cfg_go_sout, cfg_go_ew;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        rx_state[i] <= RX_HDR;
        rx_type[i]  <= '0;
        rx_src_chip[i] <= '0;
        rx_src_noc[i]  <= '0;
        rx_op[i]    <= '0;
        rx_addr[i]  <= '0;
        out_flit[i] <= '0;
      end
      for (int i = 0; i < 5; i++) cfg[i] <= '0;
      in_credit  <= '0;
      out_valid  <= '0;
      cfg_go_sout <= 1'b0;
      cfg_go_ew   <= 1'b0;
      eng        <= E_IDLE;
      rd_pend    <= 1'b0;
      rd_addr    <= '0;
      rd_bm1     <= '0;
      rd_chip    <= '0;
      rd_noc     <= '0;
      in_words   <= '0;
      in_done_irq <= 1'b0;
      irq_line_q <= '0;
      ew_i       <= '0;
      tx         <= T_HDR;
      credits    <= 5'd17;
      so_i       <= '0;
      pk_left    <= '0;
      pk_src     <= '0;
    end else begin
      in_credit <= pop;
      out_valid <= '0;
      // ---- receive parsing ----
      for (int i = 0; i < NPORTS; i++) begin
        if (pop[i]) begin
          case (rx_state[i])
            RX_HDR: begin
              rx_type[i]     <= head[i].data[62:61];
              rx_src_chip[i] <= head[i].data[21:16];
              rx_src_noc[i]  <= head[i].data[15:11];
              if (!head[i].tail) rx_state[i] <= RX_META;
            end
            RX_META: begin
              rx_op[i]    <= head[i].data[63:62];
              rx_addr[i]  <= head[i].data[31:0];
              rx_state[i] <= head[i].tail ? RX_HDR : RX_DATA;
              if (rx_type[i] == PT_AXI && head[i].data[63:62] == OP_READ) begin
                rd_pend <= 1'b1;
                rd_addr <= head[i].data[31:0];
                rd_bm1  <= head[i].data[61:59];
                rd_chip <= rx_src_chip[i];
                rd_noc  <= rx_src_noc[i];
              end
            end
            default: begin
              if (rx_type[i] == PT_AXI && rx_op[i] == OP_WRITE && rx_addr[i][19:16] == 4'h1) begin
                if (rx_addr[i][2:0] == 3'd0) begin
                  cfg_go_sout <= cfg_go_sout | head[i].data[0];
                  cfg_go_ew   <= cfg_go_ew   | head[i].data[1];
                end else if (rx_addr[i][2:0] < 3'd5) begin
                  cfg[rx_addr[i][2:0]] <= head[i].data;
                end
              end
              rx_addr[i] <= rx_addr[i] + 1;
              if (head[i].tail) rx_state[i] <= RX_HDR;
            end
          endcase
        end
      end
      // ---- stream-in counting ----
      begin
        logic [15:0] w;
        w = in_words;
        for (int i = 0; i < NPORTS; i++) if (stream_word[i]) w = w + 1'b1;
        if (exp_words != 0 && w >= exp_words) begin
          w = '0;
          in_done_irq <= 1'b1;
        end
        in_words <= w;
      end

      // ---- engines / sender ----
      credits <= credits - 5'(out_valid_next(eng, can_send)) + 5'(out_credit[0]);
      case (eng)
        E_IDLE: begin
          tx <= T_HDR;
          if (rd_pend) begin
            eng <= E_RESP;
            pk_src  <= rd_addr;
            pk_left <= 4'(rd_bm1) + 1'b1;
          end else if (in_done_irq) begin
            in_done_irq <= 1'b0;
            irq_line_q  <= irq_base;
            eng <= E_IRQ;
          end else if (cfg_go_sout) begin
            cfg_go_sout <= 1'b0;
            so_i   <= '0;
            pk_src <= 32'(so_src);
            eng    <= E_SOUT;
          end else if (cfg_go_ew) begin
            cfg_go_ew <= 1'b0;
            ew_i <= '0;
            eng  <= E_EW;
          end
        end
        E_RESP: if (can_send) begin
          out_valid[0] <= 1'b1;
          case (tx)
            T_HDR: begin
              out_flit[0] <= '{head: 1'b1, tail: 1'b0,
                               data: 64'(mk_ucast(PT_AXI, 5'(rd_bm1) + 5'd2, rd_chip, rd_noc, my_chip, my_noc, 7'd0))};
              tx <= T_META;
            end
            T_META: begin
              out_flit[0] <= '{head: 1'b0, tail: 1'b0, data: 64'(mk_meta(OP_RESP, rd_bm1, rd_addr))};
              tx <= T_DATA;
            end
            default: begin
              out_flit[0] <= '{head: 1'b0, tail: (pk_left == 1), data: rd_mem(pk_src)};
              pk_src  <= pk_src + 1;
              pk_left <= pk_left - 1'b1;
              if (pk_left == 1) begin
                rd_pend <= 1'b0;
                eng <= E_IDLE;
              end
            end
          endcase
        end
        E_SOUT: if (can_send) begin
          out_valid[0] <= 1'b1;
          case (tx)
            T_HDR: begin
              logic [15:0] n;
              hdr_t        h;
              n = so_cnt - so_i;
              if (n > 16'd15) n = 16'd15;
              h = '0;
              h.mcast = cfg[2][56];
              h.ptype = PT_STREAM;
              h.len   = 5'(n) + 5'd1;
              h.dest  = cfg[2][55:0];
              if (!h.mcast) begin
                h.dest[21:16] = my_chip;
                h.dest[15:11] = my_noc;
              end
              out_flit[0] <= '{head: 1'b1, tail: 1'b0, data: 64'(h)};
              pk_left <= 4'(n);
              tx <= T_META;
            end
            T_META: begin
              out_flit[0] <= '{head: 1'b0, tail: 1'b0, data: 64'(mk_meta(OP_WRITE, 3'd0, so_dst + 32'(so_i)))};
              tx <= T_DATA;
            end
            default: begin
              out_flit[0] <= '{head: 1'b0, tail: (pk_left == 1), data: rd_mem(pk_src)};
              pk_src  <= pk_src + 1;
              pk_left <= pk_left - 1'b1;
              so_i    <= so_i + 1'b1;
              if (pk_left == 1) begin
                tx <= T_HDR;
                if (so_i + 1'b1 == so_cnt) begin
                  eng <= E_IRQ;
                  irq_line_q <= irq_base + 7'd1;
                end
              end
            end
          endcase
        end
        E_EW: begin
          ew_i <= ew_i + 1'b1;
          if (ew_i + 1'b1 == ew_n) begin
            eng <= E_IRQ;
            irq_line_q <= irq_base + 7'd2;
          end
        end
        E_IRQ: if (can_send) begin
          out_valid[0] <= 1'b1;
          out_flit[0]  <= '{head: 1'b1, tail: 1'b1,
                            data: 64'(mk_ucast(PT_INTR, 5'd0, irq_chip, irq_noc, my_chip, my_noc, irq_line_q))};
          eng <= E_IDLE;
        end
        default: eng <= E_IDLE;
      endcase
    end
  end

  function automatic logic out_valid_next(eng_e e, logic cs);
    return cs && (e == E_RESP || e == E_SOUT || e == E_IRQ);
  endfunction

  assign busy = (eng != E_IDLE);
endmodule
