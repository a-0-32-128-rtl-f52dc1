// tb_noc_router: self-checking test of noc_router with 5 ports.
// Checks unicast delivery and the 2-cycle latency, multicast forking with
// per-port header pruning, packet atomicity under contention, full throughput
// and cut-through credit holding (a packet waits until the downstream buffer
// can take all of it).
module tb_noc_router;
  import noc_pkg::*;
  localparam int NP = 5;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  logic [CHIP_ID_W-1:0] my_chip = 6'd0;
  logic [PORT_ID_W-1:0] chip_route [NCHIP_MAX];
  logic [PORT_ID_W-1:0] noc_route  [32];
  flit_t in_flit [NP];
  logic [NP-1:0] in_valid, in_credit, out_valid;
  logic [NP-1:0] out_credit;
  flit_t out_flit [NP];

  noc_router #(.NPORTS(NP)) dut (.*);

  logic iv [NP];
  always_comb for (int p = 0; p < NP; p++) in_valid[p] = iv[p];
  int up_cred [NP];
  logic [NP-1:0] sink_en;
  flit_t rxq [NP][$];
  longint rx_time [NP][$];
  longint cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (in_credit[p]) up_cred[p]++;
      if (out_valid[p]) begin rxq[p].push_back(out_flit[p]); rx_time[p].push_back(cyc); end
    end
  end
  // downstream returns one credit per received flit when enabled
  int pend [NP];
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (out_valid[p]) pend[p]++;
      out_credit[p] <= 1'b0;
      if (sink_en[p] && pend[p] > 0) begin out_credit[p] <= 1'b1; pend[p]--; end
    end
  end

  task automatic send(int port, hdr_t h, int n, longint tag);
    for (int k = 0; k <= n; k++) begin
      if (up_cred[port] == 0) begin
        iv[port] <= 1'b0;
        while (up_cred[port] == 0) @(posedge clk);
      end
      in_flit[port].head <= (k == 0);
      in_flit[port].tail <= (k == n);
      in_flit[port].data <= (k == 0) ? 64'(h) : 64'(tag + k);
      iv[port] <= 1'b1;
      up_cred[port]--;
      @(posedge clk);
    end
    iv[port] <= 1'b0;
  endtask

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic expect_pkt(int p, hdr_t h, int n, longint tag);
    flit_t f;
    check(rxq[p].size() >= n + 1, $sformatf("port %0d packet missing (%0d flits)", p, rxq[p].size()));
    if (rxq[p].size() < n + 1) return;
    for (int k = 0; k <= n; k++) begin
      f = rxq[p].pop_front();
      void'(rx_time[p].pop_front());
      check(f.head == (k == 0) && f.tail == (k == n), $sformatf("port %0d flit %0d id bits", p, k));
      check(f.data == ((k == 0) ? 64'(h) : 64'(tag + k)), $sformatf("port %0d flit %0d data %h", p, k, f.data));
    end
  endtask

  initial begin
    #200000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    hdr_t h, hm, e;
    longint t0;
    for (int c = 0; c < NCHIP_MAX; c++) chip_route[c] = 4'd4;
    for (int d = 0; d < 32; d++) noc_route[d] = PORT_ID_W'(d % 4);
    sink_en = '1;
    for (int p = 0; p < NP; p++) begin in_flit[p] = '0; iv[p] = 1'b0; up_cred[p] = 17; pend[p] = 0; end
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);

    // 1. unicast, latency
    h = mk_ucast(PT_STREAM, 5'd3, 6'd0, 5'd2, 6'd0, 5'd0, 7'd0);
    t0 = cyc;
    send(0, h, 3, 100);
    repeat (6) @(posedge clk);
    check(rx_time[2].size() > 0 && rx_time[2][0] - t0 == 3, $sformatf("unicast latency is 2 cycles (%0d)", rx_time[2][0] - t0 - 1));
    check(rx_time[2].size() == 4 && rx_time[2][3] - rx_time[2][0] == 3, "one flit per cycle");
    expect_pkt(2, h, 3, 100);

    // 2. unicast to a remote chip goes to the chip port
    h = mk_ucast(PT_AXI, 5'd1, 6'd7, 5'd2, 6'd0, 5'd0, 7'd0);
    send(1, h, 1, 200);
    repeat (6) @(posedge clk);
    expect_pkt(4, h, 1, 200);

    // 3. multicast to this chip's NoC 0,1,5 (ports 0,1,1) and chips 3,9 (port 4)
    hm = mk_mcast(PT_STREAM, 5'd2, 36'h200000209, 20'h00023);
    send(2, hm, 2, 300);
    repeat (8) @(posedge clk);
    e = hm; e.dest[55:20] = 36'h1; e.dest[19:0] = 20'h00001; expect_pkt(0, e, 2, 300);
    e = hm; e.dest[55:20] = 36'h1; e.dest[19:0] = 20'h00022; expect_pkt(1, e, 2, 300);
    e = hm; e.dest[55:20] = 36'h200000208;                 expect_pkt(4, e, 2, 300);
    check(rxq[2].size() == 0 && rxq[3].size() == 0, "no copy on unused ports");

    // 4. contention: inputs 0 and 3 both to NoC dest 1 -> no interleaving
    h = mk_ucast(PT_STREAM, 5'd4, 6'd0, 5'd1, 6'd0, 5'd0, 7'd0);
    fork
      send(0, h, 4, 400);
      send(3, h, 4, 500);
    join
    repeat (10) @(posedge clk);
    begin
      longint first;
      first = rxq[1][1].data;
      if (first == 401) begin expect_pkt(1, h, 4, 400); expect_pkt(1, h, 4, 500); end
      else begin expect_pkt(1, h, 4, 500); expect_pkt(1, h, 4, 400); end
    end

    // 5. cut-through: with no credits returned, a 10-flit packet after a
    //    10-flit packet must wait until the whole packet fits downstream
    sink_en[3] = 1'b0;
    h = mk_ucast(PT_STREAM, 5'd9, 6'd0, 5'd3, 6'd0, 5'd0, 7'd0);
    send(0, h, 9, 600);
    send(1, h, 9, 700);
    repeat (20) @(posedge clk);
    check(rxq[3].size() == 10, $sformatf("second packet held back (%0d flits out)", rxq[3].size()));
    sink_en[3] = 1'b1;
    repeat (40) @(posedge clk);
    expect_pkt(3, h, 9, 600);
    expect_pkt(3, h, 9, 700);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
