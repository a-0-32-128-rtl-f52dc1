// tb_global_buffer: self-checking test of the global buffer through its three
// network ports: AXI burst writes and read-back, stream-out of activations in
// packets of up to 15 words at one flit per cycle, stream-in on two ports into
// two banks in the same cycles with the completion interrupt, and the
// element-wise saturating add engine.
module tb_global_buffer;
  import noc_pkg::*;
  localparam int NP = 3;
  logic clk = 0, rst_n = 1;
  initial #1 rst_n = 0;
  always #5 clk = ~clk;
  int checks = 0, failures = 0;

  flit_t in_flit [NP], out_flit [NP];
  logic [NP-1:0] in_valid, in_credit, out_valid, out_credit;
  logic busy;
  global_buffer dut (.clk, .rst_n, .my_chip(6'd0), .my_noc(5'd16), .in_flit, .in_valid, .in_credit,
                     .out_flit, .out_valid, .out_credit, .busy);

  task automatic check(bit c, string msg);
    checks++;
    if (!c) begin failures++; $display("FAIL: %s", msg); end
  endtask

  flit_t txq [NP][$];
  int    cred [NP];
  always @(posedge clk) begin
    for (int p = 0; p < NP; p++) begin
      if (in_credit[p]) cred[p]++;
      in_valid[p] <= 1'b0;
      if (rst_n && txq[p].size() > 0 && cred[p] > 0) begin
        in_flit[p]  <= txq[p].pop_front();
        in_valid[p] <= 1'b1;
        cred[p]--;
      end
    end
  end
  flit_t  rxq[$];
  longint rxt[$];
  longint cyc = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    out_credit <= out_valid;
    if (out_valid[0]) begin rxq.push_back(out_flit[0]); rxt.push_back(cyc); end
  end

  function automatic flit_t F(bit h, bit t, logic [63:0] d);
    flit_t f; f.head = h; f.tail = t; f.data = d; return f;
  endfunction
  task automatic wr(int port, ptype_e pt, logic [31:0] addr, logic [63:0] words[$]);
    txq[port].push_back(F(1, 0, 64'(mk_ucast(pt, 5'(words.size() + 1), 0, 16, 0, 19, 0))));
    txq[port].push_back(F(0, 0, 64'(mk_meta(OP_WRITE, 3'(words.size() - 1), addr))));
    foreach (words[i]) txq[port].push_back(F(0, i == words.size() - 1, words[i]));
  endtask
  task automatic rd(int port, logic [31:0] addr, int n);
    txq[port].push_back(F(1, 0, 64'(mk_ucast(PT_AXI, 5'd1, 0, 16, 0, 19, 0))));
    txq[port].push_back(F(0, 1, 64'(mk_meta(OP_READ, 3'(n - 1), addr))));
  endtask
  task automatic wait_q(int n);
    for (int t = 0; t < 2000 && rxq.size() < n; t++) @(posedge clk);
    repeat (2) @(posedge clk);
  endtask
  function automatic logic [63:0] sat_add(logic [63:0] a, logic [63:0] b);
    logic [63:0] r;
    for (int k = 0; k < 8; k++) begin
      int s;
      s = int'($signed(a[k*8 +: 8])) + int'($signed(b[k*8 +: 8]));
      if (s > 127) s = 127;
      if (s < -128) s = -128;
      r[k*8 +: 8] = 8'(s);
    end
    return r;
  endfunction

  initial begin
    #300000; failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  logic [63:0] data [24];
  initial begin
    logic [63:0] q[$];
    flit_t f;
    for (int p = 0; p < NP; p++) begin cred[p] = 17; in_flit[p] = '0; end
    for (int i = 0; i < 24; i++) data[i] = {$urandom, $urandom};
    repeat (3) @(posedge clk); rst_n = 1; @(posedge clk);

    // AXI writes of 24 words at 0x100 in bursts of 8 through port 1
    for (int b = 0; b < 3; b++) begin
      q = {};
      for (int i = 0; i < 8; i++) q.push_back(data[b*8 + i]);
      wr(1, PT_AXI, 32'h100 + 32'(b*8), q);
    end
    // registers: irq to RVP (noc 19) line 40, expect 6 stream words
    q = {}; q.push_back({30'd0, 7'd40, 5'd19, 6'd0, 16'd6}); wr(1, PT_AXI, 32'h1_0003, q);
    repeat (60) @(posedge clk);
    rd(2, 32'h104, 4);
    wait_q(6);
    check(rxq.size() == 6, "read response length");
    if (rxq.size() == 6) begin
      f = rxq.pop_front(); check(f.head && f.data[4:0] == 5'd19, "response header to requester");
      f = rxq.pop_front(); check(f.data[63:62] == OP_RESP, "response meta");
      for (int i = 0; i < 4; i++) begin f = rxq.pop_front(); check(f.data == data[4 + i], "read data"); end
    end
    rxq = {}; rxt = {};

    // stream-out 20 words from 0x100 to NoC 5, destination address 7
    q = {}; q.push_back({32'd7, 16'd20, 16'h100}); wr(1, PT_AXI, 32'h1_0001, q);
    q = {}; q.push_back(64'(mk_ucast(PT_STREAM, 0, 0, 5, 0, 0, 0)) & 64'h00FF_FFFF_FFFF_FFFF); wr(1, PT_AXI, 32'h1_0002, q);
    q = {}; q.push_back(64'd1); wr(1, PT_AXI, 32'h1_0000, q);
    wait_q(2 + 15 + 2 + 5 + 1);
    check(rxq.size() == 25, $sformatf("stream-out flits %0d", rxq.size()));
    if (rxq.size() == 25) begin
      check(rxt[16] - rxt[0] == 16, "stream-out one flit per cycle");
      f = rxq.pop_front(); check(f.head && f.data[4:0] == 5'd5 && f.data[60:56] == 5'd16, "packet 1 header");
      f = rxq.pop_front(); check(f.data[31:0] == 32'd7, "packet 1 address");
      for (int i = 0; i < 15; i++) begin f = rxq.pop_front(); check(f.data == data[i] && f.tail == (i == 14), "packet 1 data"); end
      f = rxq.pop_front(); check(f.head && f.data[60:56] == 5'd6, "packet 2 header");
      f = rxq.pop_front(); check(f.data[31:0] == 32'd22, "packet 2 address");
      for (int i = 0; i < 5; i++) begin f = rxq.pop_front(); check(f.data == data[15 + i], "packet 2 data"); end
      f = rxq.pop_front(); check(f.head && f.tail && f.data[62:61] == PT_INTR && f.data[28:22] == 7'd41, "stream-out interrupt");
    end
    rxq = {};

    // stream-in on ports 0 and 2 at once, banks 0 and 1
    q = {}; for (int i = 0; i < 3; i++) q.push_back(~data[i]); wr(0, PT_STREAM, 32'd40, q);
    q = {}; for (int i = 0; i < 3; i++) q.push_back(~data[3 + i]); wr(2, PT_STREAM, 32'd2048 + 32'd40, q);
    wait_q(1);
    check(rxq.size() == 1 && rxq[0].data[62:61] == PT_INTR && rxq[0].data[28:22] == 7'd40, "stream-in interrupt");
    rxq = {};
    rd(0, 32'd40, 3);
    wait_q(5);
    rd(0, 32'd2088, 3);
    wait_q(10);
    check(rxq.size() == 10, "stream-in read back");
    if (rxq.size() == 10)
      for (int i = 0; i < 3; i++) begin
        check(rxq[2 + i].data == ~data[i], "bank 0 stream data");
        check(rxq[7 + i].data == ~data[3 + i], "bank 1 stream data");
      end
    rxq = {};

    // element-wise add: D[0x200..] = A[0x100..] + B[0x108..], 4 words
    q = {}; q.push_back({16'd4, 16'h200, 16'h108, 16'h100}); wr(1, PT_AXI, 32'h1_0004, q);
    q = {}; q.push_back(64'd2); wr(1, PT_AXI, 32'h1_0000, q);
    wait_q(1);
    check(rxq.size() == 1 && rxq[0].data[28:22] == 7'd42, "add interrupt");
    rxq = {};
    rd(1, 32'h200, 4);
    wait_q(6);
    check(rxq.size() == 6, "add read back");
    if (rxq.size() == 6)
      for (int i = 0; i < 4; i++) check(rxq[2 + i].data == sat_add(data[i], data[8 + i]), "element-wise sum");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule
