// tb_layer_body.svh: body shared by the end-to-end testbenches (one chip, a
// small package, the full package). The including module declares NCH (number
// of chips), clk/rst_n, the chip-0 processor-port and GPIO signals, g_tick (the
// GPIO beat strobe), the monitors that bump the mechanism counters declared
// here, and the macro EXTRA_CHECKS; this body acts as the lead RISC-V
// processor and the host.
//
// Layer: 3x3 convolution, 32 input channels, 32 output channels, 4x4 outputs
// per chip (6x6 inputs per chip), stride 1, bias + scale + ReLU.
// Mapping: inside a chip input channels are split over the PE rows (8 per
// row) and output channels over the PE columns (8 per column); partial sums
// flow down each column PE to PE, and the bottom row writes the outputs to the
// chip's global buffer. Across chips the output rows are split: chip c
// computes output rows 4c..4c+3, with the weights replicated on every chip.
// Steps: multicast configuration and weights to all chips, load input
// activations into every global buffer (chip 0 group 0 through the GPIO host
// interface), multicast the go command, have each global buffer multicast its
// input-channel groups to the PE rows, wait for all completion interrupts,
// then read every output back with AXI reads and compare with a reference.

  localparam int P = 4, Q = 4, R = 3, S = 3, H = P + R - 1, WD = Q + S - 1;
  localparam int OUT_BASE = 512;

  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL: %s", msg); end
  endtask

  logic signed [7:0]  act [NCH][H][WD][4][8];     // [chip][h][w][group][c]
  logic signed [7:0]  wt  [R][S][4][4][8][8];     // [r][s][cgroup][kgroup][lane][c]
  logic signed [23:0] bias [4][8];
  localparam int SCALE = 5, SHIFT = 13;

  function automatic flit_t F(bit h, bit t, logic [63:0] d);
    flit_t f; f.head = h; f.tail = t; f.data = d; return f;
  endfunction

  // ---------- processor port: sender with credits, receiver ----------
  flit_t txq[$];
  int    tx_cred = 17;
  always @(posedge clk) begin
    if (rvp_tx_credit0) tx_cred++;
    rvp_tx_valid0 <= 1'b0;
    if (rst_n && txq.size() > 0 && tx_cred > 0) begin
      rvp_tx_flit0  <= txq.pop_front();
      rvp_tx_valid0 <= 1'b1;
      tx_cred--;
    end
  end
  flit_t rxq[$];
  int n_intr = 0, n_pe_intr = 0, n_gb_in_intr = 0, n_gb_out_intr = 0;
  always @(posedge clk) begin
    rvp_rx_credit0 <= rvp_rx_valid0;
    if (rvp_rx_valid0) begin
      if (rvp_rx_flit0.head && rvp_rx_flit0.data[62:61] == PT_INTR) begin
        n_intr++;
        if (rvp_rx_flit0.data[28:22] == 7'd1)  n_pe_intr++;
        if (rvp_rx_flit0.data[28:22] == 7'd32) n_gb_in_intr++;
        if (rvp_rx_flit0.data[28:22] == 7'd33) n_gb_out_intr++;
      end else begin
        rxq.push_back(rvp_rx_flit0);
      end
    end
  end

  // ---------- host: flits over GPIO, 5 beats of 16 bits ----------
  flit_t gq[$];
  int    gbeat = 0, n_gpio_flits = 0;
  always @(posedge clk) begin
    if (g_tick && h2c_valid && h2c_ready) begin
      gbeat++;
      if (gbeat == 5) begin gbeat = 0; void'(gq.pop_front()); n_gpio_flits++; end
    end
  end
  always_comb begin
    logic [79:0] b;
    b = (gq.size() > 0) ? 80'(gq[0]) : '0;
    h2c_data  = b[gbeat*16 +: 16];
    h2c_valid = (gq.size() > 0);
  end
  assign c2h_ready = 1'b1;

  function automatic logic [63:0] H_U(ptype_e t, int len, int chip_id, int noc);
    return 64'(mk_ucast(t, 5'(len), 6'(chip_id), 5'(noc), 6'd0, 5'd19, 7'd0));
  endfunction
  function automatic logic [35:0] all_chips();
    logic [35:0] m;
    m = '0;
    for (int c = 0; c < NCH; c++) m[c] = 1'b1;
    return m;
  endfunction
  task automatic put(ref flit_t q[$], input logic [63:0] hdr, input logic [31:0] addr, input logic [63:0] w[$]);
    q.push_back(F(1, 0, hdr));
    q.push_back(F(0, 0, 64'(mk_meta(OP_WRITE, 3'(w.size() - 1), addr))));
    foreach (w[i]) q.push_back(F(0, i == w.size() - 1, w[i]));
  endtask
  task automatic wr_u(int chip_id, int noc, logic [31:0] addr, logic [63:0] v);
    logic [63:0] w[$];
    w = {};
    w.push_back(v);
    put(txq, H_U(PT_AXI, 2, chip_id, noc), addr, w);
  endtask
  // A multicast that names the sender's own chip and other chips is sent as
  // two packets, one for chip 0 and one for the rest (see the router notes).
  task automatic mput(logic [35:0] chips, logic [19:0] nocs, logic [31:0] addr, logic [63:0] w[$]);
    logic [35:0] others;
    others = chips & ~36'd1;
    if (chips[0])       put(txq, 64'(mk_mcast(PT_AXI, 5'(w.size() + 1), 36'd1, nocs)), addr, w);
    if (others != '0) put(txq, 64'(mk_mcast(PT_AXI, 5'(w.size() + 1), others, nocs)), addr, w);
  endtask
  task automatic wr_m(logic [35:0] chips, logic [19:0] nocs, logic [31:0] addr, logic [63:0] v);
    logic [63:0] w[$];
    w = {};
    w.push_back(v);
    mput(chips, nocs, addr, w);
  endtask

  function automatic logic signed [7:0] ref_out(int c, int p, int q, int k);
    longint a, v;
    a = 0;
    for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int g = 0; g < 4; g++)
      for (int i = 0; i < 8; i++) a += act[c][p + r][q + s][g][i] * wt[r][s][g][k / 8][k % 8][i];
    a = longint'(24'(a));
    a = longint'($signed(24'(a)));
    v = ((a + bias[k / 8][k % 8]) * SCALE) >>> SHIFT;
    if (v < 0) v = 0;
    if (v > 127) v = 127;
    return 8'(v);
  endfunction

  function automatic logic [19:0] row_mask(int g);
    logic [19:0] m;
    m = '0;
    for (int j = 0; j < 4; j++) m[g * 4 + j] = 1'b1;
    return m;
  endfunction
  function automatic logic [19:0] col_mask(int j);
    logic [19:0] m;
    m = '0;
    for (int g = 0; g < 4; g++) m[g * 4 + j] = 1'b1;
    return m;
  endfunction

  // ---------- mechanism counters ----------
  int n_mcast_hops = 0, n_psum_pkts = 0, n_credit_holds = 0, n_bank_conflicts = 0;
  int mac_cycles_pe0 = 0;
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  task automatic wait_until(ref int v, input int target, input int max_cycles, input string what);
    int t;
    for (t = 0; t < max_cycles && v < target; t++) @(posedge clk);
    check(v >= target, $sformatf("%s: %0d of %0d", what, v, target));
  endtask

  initial begin : main
    logic [63:0] w[$];
    longint t_go, t_done;
    for (int c = 0; c < NCH; c++) for (int h = 0; h < H; h++) for (int x = 0; x < WD; x++)
      for (int g = 0; g < 4; g++) for (int i = 0; i < 8; i++) act[c][h][x][g][i] = 8'($urandom_range(0, 255));
    for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int g = 0; g < 4; g++)
      for (int j = 0; j < 4; j++) for (int l = 0; l < 8; l++) for (int i = 0; i < 8; i++)
        wt[r][s][g][j][l][i] = 8'($urandom_range(0, 255));
    for (int j = 0; j < 4; j++) for (int l = 0; l < 8; l++) bias[j][l] = 24'($signed($urandom_range(0, 60000)) - 30000);
    rvp_tx_flit0 = '0;
    repeat (4) @(posedge clk); rst_n = 1; repeat (4) @(posedge clk);

    // ---- PE configuration: common registers by multicast to every chip ----
    wr_m(all_chips(), 20'hFFFF, 32'd1, 64'({8'd1, 4'(S), 4'(R), 8'(Q), 8'(P)}));
    wr_m(all_chips(), 20'hFFFF, 32'd2, 64'({16'd0, 4'd0, 4'd1, 8'(WD)}));
    wr_m(all_chips(), 20'hFFFF, 32'd5, 64'({19'd0, 5'(SHIFT), 8'(SCALE)}));
    wr_m(all_chips(), 20'hFFFF, 32'd6, 64'({16'(P * Q), 16'(H * WD)}));
    wr_m(all_chips(), 20'hFFFF, 32'd7, 64'({14'd0, 7'd1, 5'd19, 6'd0}));
    for (int g = 0; g < 4; g++)   // keep / final / relu per PE row
      wr_m(all_chips(), row_mask(g), 32'd3, 64'({12'd0, 1'b0, 1'(g == 3), 1'(g == 3), 1'(g > 0), 16'd0}));
    for (int j = 0; j < 4; j++)
      for (int l = 0; l < 8; l++) wr_m(all_chips(), col_mask(j), 32'd8 + 32'(l), 64'(bias[j][l]));
    // per-PE destination: next PE down the column, the bottom row to the GB
    for (int c = 0; c < NCH; c++)
      for (int g = 0; g < 4; g++) for (int j = 0; j < 4; j++)
        wr_u(c, g * 4 + j, 32'd4, (g < 3) ? 64'({10'd0, 11'd0, 5'((g + 1) * 4 + j), 6'(c)})
                                          : 64'({10'd0, 11'(OUT_BASE + j * 16), 5'd16, 6'(c)}));
    // ---- weights: one multicast per PE position, replicated on all chips ----
    for (int g = 0; g < 4; g++) for (int j = 0; j < 4; j++) begin
      logic [19:0] m;
      m = '0; m[g * 4 + j] = 1'b1;
      for (int e = 0; e < R * S; e++) begin
        w = {};
        for (int l = 0; l < 8; l++) begin
          logic [63:0] d;
          for (int i = 0; i < 8; i++) d[i*8 +: 8] = wt[e / S][e % S][g][j][l][i];
          w.push_back(d);
        end
        mput(all_chips(), m, 32'h1_0000 + 32'(e * 8), w);
      end
    end
    // ---- global buffers: expected output words and interrupt target ----
    wr_m(all_chips(), 20'h10000, 32'h1_0003, {30'd0, 7'd32, 5'd19, 6'd0, 16'(4 * P * Q)});
    // ---- input activations: group g of chip c at GB address g*64 + h*WD + w ----
    for (int c = 0; c < NCH; c++) for (int g = 0; g < 4; g++)
      for (int b = 0; b < H * WD; b += 8) begin
        int n;
        n = (H * WD - b > 8) ? 8 : H * WD - b;
        w = {};
        for (int i = 0; i < n; i++) begin
          logic [63:0] d;
          for (int k = 0; k < 8; k++) d[k*8 +: 8] = act[c][(b + i) / WD][(b + i) % WD][g][k];
          w.push_back(d);
        end
        if (c == 0 && g == 0) put(gq, H_U(PT_AXI, n + 1, 0, 16), 32'(g * 64 + b), w);
        else                  put(txq, H_U(PT_AXI, n + 1, c, 16), 32'(g * 64 + b), w);
      end
    for (int t = 0; t < 200000 && (txq.size() > 0 || gq.size() > 0); t++) @(posedge clk);
    check(txq.size() == 0 && gq.size() == 0, "configuration and data loaded");
    repeat (50) @(posedge clk);

    // ---- go: multicast start to every PE ----
    t_go = cyc;
    wr_m(all_chips(), 20'hFFFF, 32'd0, 64'd1);
    // ---- each GB multicasts input group g to PE row g of its own chip ----
    for (int g = 0; g < 4; g++) begin
      for (int c = 0; c < NCH; c++) begin
        logic [35:0] cm;
        cm = '0; cm[c] = 1'b1;
        wr_u(c, 16, 32'h1_0001, {32'd0, 16'(H * WD), 16'(g * 64)});
        wr_u(c, 16, 32'h1_0002, {7'd0, 1'b1, cm, row_mask(g)});
        wr_u(c, 16, 32'h1_0000, 64'd1);
      end
      wait_until(n_gb_out_intr, NCH * (g + 1), 20000, "GB stream-out done");
    end
    wait_until(n_pe_intr, 16 * NCH, 50000, "PE completion interrupts");
    wait_until(n_gb_in_intr, NCH, 20000, "GB stream-in interrupts");
    t_done = cyc;
    $display("layer on %0d chip(s): %0d cycles from go to last interrupt", NCH, t_done - t_go);

    // ---- read back and compare ----
    for (int c = 0; c < NCH; c++) for (int j = 0; j < 4; j++) for (int b = 0; b < 16; b += 8) begin
      rxq = {};
      txq.push_back(F(1, 0, H_U(PT_AXI, 1, c, 16)));
      txq.push_back(F(0, 1, 64'(mk_meta(OP_READ, 3'd7, 32'(OUT_BASE + j * 16 + b)))));
      for (int t = 0; t < 5000 && rxq.size() < 10; t++) @(posedge clk);
      check(rxq.size() == 10, $sformatf("read response chip %0d", c));
      if (rxq.size() == 10)
        for (int i = 0; i < 8; i++) begin
          int p, q;
          p = (b + i) / Q; q = (b + i) % Q;
          for (int l = 0; l < 8; l++) begin
            logic signed [7:0] gv, ev;
            gv = rxq[2 + i].data[l*8 +: 8];
            ev = ref_out(c, p, q, j * 8 + l);
            check(gv == ev, $sformatf("chip %0d out p%0d q%0d k%0d: %0d vs %0d", c, p, q, j*8+l, gv, ev));
          end
        end
    end

    // ---- mechanisms ----
    $display("mechanisms: multicast hops %0d, psum packets %0d, credit holds %0d, bank conflicts %0d, GPIO flits %0d, interrupts %0d, MAC cycles PE0 %0d",
             n_mcast_hops, n_psum_pkts, n_credit_holds, n_bank_conflicts, n_gpio_flits, n_intr, mac_cycles_pe0);
    check(n_mcast_hops > 0, "multicast used");
    check(n_psum_pkts == NCH * 3 * 4 * P * Q, "cross-PE partial-sum packets");
    check(n_credit_holds > 0, "cut-through credit hold happened");
    check(n_gpio_flits > 0, "GPIO host path used");
    check(mac_cycles_pe0 == R * S * P * Q, $sformatf("PE MAC phase %0d cycles, expected R*S*CV*P*Q = %0d", mac_cycles_pe0, R * S * P * Q));
    `EXTRA_CHECKS
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
