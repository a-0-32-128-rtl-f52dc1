// tb_grs_link: two GRS transmitter/receiver pairs wired as a bidirectional
// chip-to-chip link (A->B and B->A), with different link clocks on the two
// sides and a slower router clock. Random packets of 1 to 17 flits are sent
// both ways; every flit must arrive once, in order and unchanged. Also checks
// that credits flow back over the opposite link, that partially valid chunks
// are used (a lone short packet is delivered without waiting for more data)
// and the sustained rate of the link.
`timescale 1ps/1ps
module tb_grs_link;
  import noc_pkg::*;
  logic clk = 0, bclk_a = 0, bclk_b = 0;
  logic rst_n = 1;
  initial #1 rst_n = 0;
  always #500 clk = ~clk;       // 1 GHz router clock
  always #20 bclk_a = ~bclk_a;  // 25 GHz bit clock
  always #21 bclk_b = ~bclk_b;  // slightly different far-end clock
  int checks = 0, failures = 0;

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  // side A transmitter -> side B receiver, and back
  flit_t in_a, in_b, out_a, out_b;
  logic  iv_a, iv_b, ic_a, ic_b, ov_a, ov_b;
  logic [3:0] d_ab, d_ba;
  logic  fclk_ab, fclk_ba;
  logic [10:0] cr_rx_a, cr_rx_b, fr_a, fr_b;          // native domains
  logic [10:0] cr_tx_a, cr_tx_b, fr_tx_a, fr_tx_b;    // synchronized to the TX link clock

  grs_tx u_tx_a (.clk, .rst_n, .in_flit(in_a), .in_valid(iv_a), .in_credit(ic_a),
                 .bclk(bclk_a), .brst_n(rst_n), .cred_rcvd(cr_tx_a), .rx_freed(fr_tx_a),
                 .tx_data(d_ab), .tx_clk(fclk_ab));
  grs_rx u_rx_b (.rx_clk(fclk_ab), .rx_rst_n(rst_n), .rx_data(d_ab), .cred_rcvd(cr_rx_b),
                 .clk, .rst_n, .out_flit(out_b), .out_valid(ov_b), .out_credit(ov_b_q), .rx_freed(fr_b));
  grs_tx u_tx_b (.clk, .rst_n, .in_flit(in_b), .in_valid(iv_b), .in_credit(ic_b),
                 .bclk(bclk_b), .brst_n(rst_n), .cred_rcvd(cr_tx_b), .rx_freed(fr_tx_b),
                 .tx_data(d_ba), .tx_clk(fclk_ba));
  grs_rx u_rx_a (.rx_clk(fclk_ba), .rx_rst_n(rst_n), .rx_data(d_ba), .cred_rcvd(cr_rx_a),
                 .clk, .rst_n, .out_flit(out_a), .out_valid(ov_a), .out_credit(ov_a_q), .rx_freed(fr_a));
  // credits received on side A's receiver belong to side A's transmitter
  cdc_count_sync #(.W(11)) s1 (.src_clk(fclk_ba), .src_rst_n(rst_n), .src_val(cr_rx_a), .dst_clk(bclk_a), .dst_rst_n(rst_n), .dst_val(cr_tx_a));
  cdc_count_sync #(.W(11)) s2 (.src_clk(fclk_ab), .src_rst_n(rst_n), .src_val(cr_rx_b), .dst_clk(bclk_b), .dst_rst_n(rst_n), .dst_val(cr_tx_b));
  cdc_count_sync #(.W(11)) s3 (.src_clk(clk), .src_rst_n(rst_n), .src_val(fr_a), .dst_clk(bclk_a), .dst_rst_n(rst_n), .dst_val(fr_tx_a));
  cdc_count_sync #(.W(11)) s4 (.src_clk(clk), .src_rst_n(rst_n), .src_val(fr_b), .dst_clk(bclk_b), .dst_rst_n(rst_n), .dst_val(fr_tx_b));

  logic ov_a_q, ov_b_q;
  always @(posedge clk) begin ov_a_q <= ov_a; ov_b_q <= ov_b; end

  // senders with credits
  flit_t q_a[$], q_b[$], exp_a[$], exp_b[$];
  int c_a = 17, c_b = 17;
  always @(posedge clk) begin
    if (ic_a) c_a++;
    if (ic_b) c_b++;
    iv_a <= 0; iv_b <= 0;
    if (rst_n && q_a.size() > 0 && c_a > 0) begin in_a <= q_a.pop_front(); iv_a <= 1; c_a--; end
    if (rst_n && q_b.size() > 0 && c_b > 0) begin in_b <= q_b.pop_front(); iv_b <= 1; c_b--; end
  end
  int got_a = 0, got_b = 0, partials = 0;
  time t_last_b;
  always @(posedge clk) begin
    if (ov_b) begin
      check(exp_b.size() > 0 && out_b == exp_b[0], $sformatf("A->B flit %0d", got_b));
      if (exp_b.size() > 0) void'(exp_b.pop_front());
      got_b++;
      t_last_b = $time;
    end
    if (ov_a) begin
      check(exp_a.size() > 0 && out_a == exp_a[0], $sformatf("B->A flit %0d", got_a));
      if (exp_a.size() > 0) void'(exp_a.pop_front());
      got_a++;
    end
  end
  always @(posedge bclk_a) if (u_tx_a.bc == 0 && u_tx_a.run && u_tx_a.cur_word[62]) partials++;

  task automatic make_pkt(ref flit_t q[$], ref flit_t e[$], input int n);
    for (int k = 0; k < n; k++) begin
      flit_t f;
      f.head = (k == 0); f.tail = (k == n - 1); f.data = {$urandom, $urandom};
      q.push_back(f); e.push_back(f);
    end
  endtask

  initial begin
    #20000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    int total;
    time t0;
    in_a = '0; in_b = '0;
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);
    // one lone 2-flit packet: must arrive through partial chunks
    make_pkt(q_a, exp_b, 2);
    repeat (40) @(posedge clk);
    check(got_b == 2, "lone short packet delivered");
    check(partials > 0, "partially valid chunks used");
    // random traffic both ways
    total = 0;
    for (int i = 0; i < 60; i++) begin
      int n;
      n = $urandom_range(1, 17);
      total += n;
      make_pkt(q_a, exp_b, n);
      make_pkt(q_b, exp_a, $urandom_range(1, 17));
    end
    t0 = $time;
    for (int t = 0; t < 20000 && (exp_a.size() > 0 || exp_b.size() > 0); t++) @(posedge clk);
    check(exp_a.size() == 0 && exp_b.size() == 0, "all flits delivered");
    // each flit takes 128 bits of the link memory; a 64-bit word carries 60 of
    // them per 16 bit times (40 ps): 128/60*16*40 ps = 1.37 ns per flit
    begin
      real ns_per_flit;
      ns_per_flit = real'(t_last_b - t0) / 1000.0 / real'(total);
      $display("A->B: %0d flits, %0.2f ns per flit", total, ns_per_flit);
      check(ns_per_flit < 1.37 * 1.15, "sustained link rate");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
