// tb_gpio_if: self-checking test of the host interface. The host side sends
// packets beat by beat (with random pauses) and reads packets beat by beat
// (with random back-pressure); flits must cross unchanged in both directions.
// Also checks full-packet buffering (no flit of a packet enters the network
// before its last beat has arrived) and the beat rate (one beat per DIV cycles).
module tb_gpio_if;
  import noc_pkg::*;
  localparam int W = 16, NB = 5, DIV = 4;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;
  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  logic gpio_clk;
  logic [W-1:0] h2c_data, c2h_data;
  logic h2c_valid, h2c_ready, c2h_valid, c2h_ready;
  flit_t out_flit, in_flit;
  logic out_valid, out_credit, in_valid, in_credit;
  gpio_if #(.GPIO_W(W), .DIV(DIV)) dut (.*);

  flit_t h2c_q[$], h2c_exp[$], c2h_exp[$];
  longint cyc = 0, last_beat_cyc = 0, first_out_cyc = -1;
  int beats_in = 0, beats_out = 0;
  always @(posedge clk) cyc <= cyc + 1;

  // host: drive one beat per gpio_clk period, on the divider tick
  logic [NB*W-1:0] cur;
  int bi = 0;
  always @(posedge clk) begin
    if (dut.tick && h2c_valid && h2c_ready) begin
      beats_in++;
      bi++;
      if (bi == NB) begin bi = 0; void'(h2c_q.pop_front()); last_beat_cyc = cyc; end
    end
    if (dut.tick) begin
      h2c_valid <= (h2c_q.size() > 0) && ($urandom_range(0, 3) != 0);
      cur = (NB*W)'(h2c_q.size() > 0 ? h2c_q[0] : '0);
      if (dut.tick && h2c_valid && h2c_ready && bi == 0) cur = (NB*W)'(h2c_q.size() > 0 ? h2c_q[0] : '0);
    end
  end
  always_comb h2c_data = cur[bi*W +: W];

  // network sink
  always @(posedge clk) begin
    out_credit <= out_valid;
    if (out_valid) begin
      if (first_out_cyc < 0) first_out_cyc = cyc;
      check(h2c_exp.size() > 0 && out_flit == h2c_exp[0], "host-to-chip flit");
      if (h2c_exp.size() > 0) void'(h2c_exp.pop_front());
    end
  end

  // host reader
  logic [NB*W-1:0] rd_acc;
  int rb = 0;
  always @(posedge clk) begin
    if (dut.tick) c2h_ready <= ($urandom_range(0, 2) != 0);
    if (dut.tick && c2h_valid && c2h_ready) begin
      beats_out++;
      rd_acc[rb*W +: W] = c2h_data;
      rb++;
      if (rb == NB) begin
        rb = 0;
        check(c2h_exp.size() > 0 && flit_t'(rd_acc[65:0]) == c2h_exp[0], "chip-to-host flit");
        if (c2h_exp.size() > 0) void'(c2h_exp.pop_front());
      end
    end
  end

  // network source with credits
  flit_t net_q[$];
  int cred = 17;
  always @(posedge clk) begin
    if (in_credit) cred++;
    in_valid <= 1'b0;
    if (rst_n && net_q.size() > 0 && cred > 0) begin in_flit <= net_q.pop_front(); in_valid <= 1'b1; cred--; end
  end

  initial begin
    #2000000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    longint t0;
    h2c_valid = 0; c2h_ready = 0; in_valid = 0; in_flit = '0; cur = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // one 4-flit packet: first flit must leave after the last beat
    for (int k = 0; k < 4; k++) begin
      flit_t f;
      f.head = (k == 0); f.tail = (k == 3); f.data = {$urandom, $urandom};
      h2c_q.push_back(f); h2c_exp.push_back(f);
    end
    for (int t = 0; t < 2000 && h2c_exp.size() > 0; t++) @(posedge clk);
    check(h2c_exp.size() == 0, "packet delivered");
    check(first_out_cyc > last_beat_cyc, "whole packet buffered before entering the network");
    // more traffic both ways
    for (int p = 0; p < 6; p++) begin
      int n;
      n = $urandom_range(1, 17);
      for (int k = 0; k < n; k++) begin
        flit_t f;
        f.head = (k == 0); f.tail = (k == n - 1); f.data = {$urandom, $urandom};
        h2c_q.push_back(f); h2c_exp.push_back(f);
      end
      n = $urandom_range(1, 17);
      for (int k = 0; k < n; k++) begin
        flit_t f;
        f.head = (k == 0); f.tail = (k == n - 1); f.data = {$urandom, $urandom};
        net_q.push_back(f); c2h_exp.push_back(f);
      end
    end
    t0 = cyc;
    for (int t = 0; t < 40000 && (h2c_exp.size() > 0 || c2h_exp.size() > 0); t++) @(posedge clk);
    check(h2c_exp.size() == 0 && c2h_exp.size() == 0, "all traffic delivered");
    check((beats_in + beats_out) * DIV <= 2 * (cyc - t0) + 2 * DIV * NB * 20, "beat rate bounded by divided clock");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
