// tb_pe: self-checking test of one processing element driven through its
// network port. Loads configuration, weights and input activations with
// packets, runs three layers and compares every output packet with a
// reference computed here:
//   1. final layer, bias/scale/ReLU, outputs to a global-buffer address;
//      the MAC phase must take exactly R*S*CV*P*Q cycles
//   2. same weights, partial sums sent out raw (cross-PE reduction source)
//   3. accumulation continued from received partial sums, 2x2 max pooling
// It also checks the completion interrupt and an AXI read-back.
module tb_pe;
  import noc_pkg::*;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t in_flit, out_flit;
  logic  in_valid, in_credit, out_valid, out_credit;
  logic  busy;
  pe dut (.clk, .rst_n, .my_chip(6'd0), .my_noc(5'd3), .in_flit, .in_valid, .in_credit,
          .out_flit, .out_valid, .out_credit, .busy);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // ---------- sender with credits ----------
  flit_t txq[$];
  int    cred = 17;
  always @(posedge clk) begin
    if (in_credit) cred++;
    in_valid <= 1'b0;
    if (rst_n && txq.size() > 0 && cred > 0) begin
      in_flit  <= txq.pop_front();
      in_valid <= 1'b1;
      cred--;
    end
  end
  flit_t rxq[$];
  always @(posedge clk) begin
    out_credit <= out_valid;
    if (out_valid) rxq.push_back(out_flit);
  end

  function automatic flit_t F(bit h, bit t, logic [63:0] d);
    flit_t f; f.head = h; f.tail = t; f.data = d; return f;
  endfunction
  task automatic axi_write(logic [31:0] addr, logic [63:0] words[$]);
    txq.push_back(F(1, 0, 64'(mk_ucast(PT_AXI, 5'(words.size() + 1), 0, 3, 0, 19, 0))));
    txq.push_back(F(0, 0, 64'(mk_meta(OP_WRITE, 3'(words.size() - 1), addr))));
    foreach (words[i]) txq.push_back(F(0, i == words.size() - 1, words[i]));
  endtask
  task automatic wr1(logic [31:0] addr, logic [63:0] w);
    logic [63:0] q[$]; q = {}; q.push_back(w); axi_write(addr, q);
  endtask

  // ---------- layer parameters and data ----------
  localparam int P = 4, Q = 4, R = 2, S = 2, CV = 2, STR = 1, W = Q + S - 1, H = P + R - 1;
  logic signed [7:0] act [H][W][CV][8];
  logic signed [7:0] wt  [R][S][CV][8][8];    // [r][s][cv][lane][c]
  logic signed [23:0] bias [8];
  int scale = 3, shift = 12;

  function automatic logic signed [23:0] ref_acc(int p, int q, int k);
    logic signed [23:0] a = 0;
    for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int cv = 0; cv < CV; cv++)
      for (int c = 0; c < 8; c++) a += act[p*STR+r][q*STR+s][cv][c] * wt[r][s][cv][k][c];
    return a;
  endfunction
  function automatic logic signed [7:0] post(longint a, int k, bit relu);
    longint v = ((a + bias[k]) * scale) >>> shift;
    if (relu && v < 0) v = 0;
    if (v > 127) v = 127;
    if (v < -128) v = -128;
    return 8'(v);
  endfunction

  task automatic cfg_layer(bit keep, bit final_, bit relu, bit pool, int exp_ps);
    wr1(32'd1, 64'({8'(CV), 4'(S), 4'(R), 8'(Q), 8'(P)}));
    wr1(32'd2, 64'({16'd0, 4'd0, 4'(STR), 8'(W)}));
    wr1(32'd3, 64'({12'd0, pool, relu, final_, keep, 16'd0}));
    wr1(32'd4, 64'({10'd0, 11'd100, 5'd16, 6'd0}));    // outputs to GB (noc 16), base 100
    wr1(32'd7, 64'({14'd0, 7'd5, 5'd19, 6'd0}));       // interrupt line 5 to RVP (noc 19)
    wr1(32'd5, 64'({19'd0, 5'(shift), 8'(scale)}));
    wr1(32'd6, 64'({16'(exp_ps), 16'(H * W * CV)}));
  endtask
  task automatic send_inputs();
    // two stream packets carrying all H*W*CV input vectors
    int n, base;
    n = H * W * CV;
    base = 0;
    while (base < n) begin
      int m;
      m = (n - base > 15) ? 15 : n - base;
      txq.push_back(F(1, 0, 64'(mk_ucast(PT_STREAM, 5'(m + 1), 0, 3, 0, 16, 0))));
      txq.push_back(F(0, 0, 64'(mk_meta(OP_WRITE, 0, 32'(base)))));
      for (int i = 0; i < m; i++) begin
        int idx, h, w, cv;
        logic [63:0] d;
        idx = base + i; h = idx / (W * CV); w = (idx / CV) % W; cv = idx % CV;
        for (int c = 0; c < 8; c++) d[c*8 +: 8] = act[h][w][cv][c];
        txq.push_back(F(0, i == m - 1, d));
      end
      base += m;
    end
  endtask

  int mac_cycles;
  always @(posedge clk) if (dut.state == 3'd2) mac_cycles++;

  task automatic wait_irq(output bit got);
    got = 0;
    for (int t = 0; t < 4000 && !got; t++) begin
      @(posedge clk);
      foreach (rxq[i]) if (rxq[i].head && rxq[i].data[62:61] == PT_INTR) got = 1;
    end
    repeat (3) @(posedge clk);
  endtask

  initial begin
    #400000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic signed [23:0] psum [P*Q][8];

  initial begin
    bit got;
    for (int h = 0; h < H; h++) for (int w = 0; w < W; w++) for (int cv = 0; cv < CV; cv++)
      for (int c = 0; c < 8; c++) act[h][w][cv][c] = 8'($urandom_range(0, 255));
    for (int r = 0; r < R; r++) for (int s = 0; s < S; s++) for (int cv = 0; cv < CV; cv++)
      for (int k = 0; k < 8; k++) for (int c = 0; c < 8; c++) wt[r][s][cv][k][c] = 8'($urandom_range(0, 255));
    for (int k = 0; k < 8; k++) bias[k] = 24'($signed($urandom_range(0, 4000)) - 2000);
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);

    // weights: entry (r*S+s)*CV+cv, lane k at word entry*8+k (burst of 8)
    for (int e = 0; e < R * S * CV; e++) begin
      logic [63:0] q[$];
      q = {};
      for (int k = 0; k < 8; k++) begin
        logic [63:0] d;
        for (int c = 0; c < 8; c++) d[c*8 +: 8] = wt[e / (S*CV)][(e / CV) % S][e % CV][k][c];
        q.push_back(d);
      end
      axi_write(32'h1_0000 + 32'(e * 8), q);
    end
    for (int k = 0; k < 8; k++) wr1(32'd8 + 32'(k), 64'(bias[k]));

    // ---- layer 1: final outputs with ReLU ----
    cfg_layer(0, 1, 1, 0, 0);
    wr1(32'd0, 64'd1);
    send_inputs();
    mac_cycles = 0;
    wait_irq(got);
    check(got, "layer 1 interrupt");
    check(mac_cycles == R * S * CV * P * Q, $sformatf("MAC phase %0d cycles, expected %0d", mac_cycles, R*S*CV*P*Q));
    for (int o = 0; o < P * Q; o++) begin
      flit_t h, m, d;
      check(rxq.size() >= 3, "layer 1 output packet");
      if (rxq.size() < 3) break;
      h = rxq.pop_front(); m = rxq.pop_front(); d = rxq.pop_front();
      check(h.data[4:0] == 5'd16 && m.data[31:0] == 32'(100 + o), "layer 1 output address");
      for (int k = 0; k < 8; k++) begin
        logic signed [7:0] g, e;
        g = d.data[k*8 +: 8];
        e = post(ref_acc(o / Q, o % Q, k), k, 1);
        check(g == e, $sformatf("L1 out %0d lane %0d: %0d vs %0d", o, k, g, e));
      end
    end
    begin
      flit_t i;
      hdr_t hi;
      i = rxq.pop_front();
      hi = hdr_t'(i.data);
      check(i.head && i.tail && hi.ptype == PT_INTR && hi.dest[4:0] == 5'd19 && hi.dest[28:22] == 7'd5, "interrupt packet");
    end

    // ---- layer 2: raw partial sums ----
    cfg_layer(0, 0, 0, 0, 0);
    wr1(32'd0, 64'd1);
    send_inputs();
    wait_irq(got);
    check(got, "layer 2 interrupt");
    for (int o = 0; o < P * Q; o++) begin
      flit_t h, m, d0, d1, d2;
      logic [191:0] row;
      check(rxq.size() >= 5, "layer 2 psum packet");
      if (rxq.size() < 5) break;
      h = rxq.pop_front(); m = rxq.pop_front(); d0 = rxq.pop_front(); d1 = rxq.pop_front(); d2 = rxq.pop_front();
      row = {d2.data, d1.data, d0.data};
      check(m.data[63:62] == OP_PSUM && m.data[31:0] == 32'(100 + o), "psum address");
      for (int k = 0; k < 8; k++) begin
        psum[o][k] = row[k*24 +: 24];
        check(psum[o][k] == ref_acc(o / Q, o % Q, k), $sformatf("L2 psum %0d lane %0d", o, k));
      end
    end
    void'(rxq.pop_front());

    // ---- layer 3: continue from received psums (doubling them), pooled ----
    cfg_layer(1, 1, 0, 1, P * Q);
    for (int o = 0; o < P * Q; o++) begin
      logic [191:0] row;
      for (int k = 0; k < 8; k++) row[k*24 +: 24] = psum[o][k];
      txq.push_back(F(1, 0, 64'(mk_ucast(PT_STREAM, 5'd4, 0, 3, 0, 7, 0))));
      txq.push_back(F(0, 0, 64'(mk_meta(OP_PSUM, 0, 32'(o)))));
      txq.push_back(F(0, 0, row[63:0]));
      txq.push_back(F(0, 0, row[127:64]));
      txq.push_back(F(0, 1, row[191:128]));
    end
    wr1(32'd0, 64'd1);
    send_inputs();
    wait_irq(got);
    check(got, "layer 3 interrupt");
    for (int o = 0; o < (P / 2) * (Q / 2); o++) begin
      flit_t h, m, d;
      int pp, qq;
      pp = o / (Q / 2);
      qq = o % (Q / 2);
      check(rxq.size() >= 3, "layer 3 output packet");
      if (rxq.size() < 3) break;
      h = rxq.pop_front(); m = rxq.pop_front(); d = rxq.pop_front();
      for (int k = 0; k < 8; k++) begin
        longint mx, v;
        mx = -(64'sd1 << 40);
        for (int i = 0; i < 4; i++) begin
          v = 2 * longint'(ref_acc(2*pp + i/2, 2*qq + i%2, k));
          if (v > mx) mx = v;
        end
        begin
          logic signed [7:0] g, e;
          g = d.data[k*8 +: 8];
          e = post(mx, k, 0);
          check(g == e, $sformatf("L3 pooled out %0d lane %0d: %0d vs %0d", o, k, g, e));
        end
      end
    end
    void'(rxq.pop_front());

    // ---- AXI read of config register 5 ----
    txq.push_back(F(1, 0, 64'(mk_ucast(PT_AXI, 5'd1, 0, 3, 0, 19, 0))));
    txq.push_back(F(0, 1, 64'(mk_meta(OP_READ, 3'd0, 32'd5))));
    repeat (30) @(posedge clk);
    check(rxq.size() == 3 && rxq[2].data[31:0] == {19'd0, 5'(shift), 8'(scale)}, "AXI read response");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
