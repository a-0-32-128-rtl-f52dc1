// noc_router: one router of the mesh on-chip network; the same design is used
// for the network-on-package (NoP), only with more ports.
//
// How it works
//   * Every input port has a flit buffer of BUF_DEPTH entries (default 17, one
//     maximum-length packet). Upstream senders hold one credit per free entry;
//     a credit is returned for every flit that leaves the buffer.
//   * A header flit at the head of a buffer is routed by table lookup.
//     Unicast: if the destination chip is not this chip, chip_route[chip] gives
//     the output port, otherwise noc_route[noc_dest]. Multicast: the packet is
//     sent to every port that the unicast tables would use for at least one of
//     its destinations (multicast follows the unicast paths), and the header
//     copy on each port keeps only the destinations reached through that port.
//   * Cut-through allocation: a packet is granted its output ports only when all
//     of them are free and every one of them holds credits for the whole packet
//     (header + len payload flits). The credits are taken at grant time, so once
//     a packet starts it never stalls, and multicast copies move in lock step.
//     Inputs are served round-robin.
//   * Latency is 2 cycles (buffer write, then allocate and traverse into the
//     output register) and a port passes one flit per cycle back to back.
//     A packet granted an output in the cycle the previous packet's tail
//     leaves it is sent from the next cycle on, so packets to the same output
//     follow each other without a gap.
// Routing tables are inputs so that they can be configured at boot.
// Constraint: one header carries a single node mask for all chips it names,
// so a multicast port copy cannot hold both other chips and a pruned set of
// this chip's nodes. The NoP router's ports never mix the two; inside the
// sending chip they can (remote traffic climbs a PE column), so a sender
// splits a multicast that names its own chip and others into two packets.
// An assertion flags a packet that breaks the rule.
module noc_router
  import noc_pkg::*;
#(
  parameter int unsigned NPORTS     = 5,
  parameter int unsigned BUF_DEPTH  = 17,  // flits per input buffer
  parameter int unsigned DOWN_DEPTH = 17   // flits per downstream buffer (initial credits)
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [CHIP_ID_W-1:0] my_chip,
  input  logic [PORT_ID_W-1:0] chip_route [NCHIP_MAX],
  input  logic [PORT_ID_W-1:0] noc_route  [32],
  input  flit_t                in_flit    [NPORTS],
  input  logic [NPORTS-1:0]    in_valid,
  output logic [NPORTS-1:0]    in_credit,
  output flit_t                out_flit   [NPORTS],
  output logic [NPORTS-1:0]    out_valid,
  input  logic [NPORTS-1:0]    out_credit
);
  localparam int unsigned PW = $clog2(BUF_DEPTH);
  localparam int unsigned CW = $clog2(DOWN_DEPTH + 1);
  localparam int unsigned IW = (NPORTS > 1) ? $clog2(NPORTS) : 1;

  // ---------------- input buffers ----------------
  flit_t           buf_mem [NPORTS][BUF_DEPTH];
  logic [PW-1:0]   rd_ptr  [NPORTS];
  logic [PW-1:0]   wr_ptr  [NPORTS];
  logic [PW:0]     count   [NPORTS];
  flit_t           head    [NPORTS];
  logic [NPORTS-1:0] nonempty, pop;

  always_comb begin
    for (int i = 0; i < NPORTS; i++) begin
      head[i]     = buf_mem[i][rd_ptr[i]];
      nonempty[i] = (count[i] != 0);
    end
  end

  // ---------------- route computation ----------------
  logic [NPORTS-1:0] req_mask [NPORTS];
  logic [NPORTS-1:0] mixed;                   // multicast needs one port for both
  flit_t             hdr_out  [NPORTS][NPORTS];  // [input][output] rewritten header
  logic [35:0]       port_chips [NPORTS];        // other chips reached through each port
  logic [19:0]       port_nocs  [NPORTS];        // this chip's nodes reached through each port

  // Per-port destination sets depend on the tables only, shared by all inputs.
  always_comb begin
    for (int p = 0; p < NPORTS; p++) begin
      port_chips[p] = '0;
      port_nocs[p]  = '0;
      for (int c = 0; c < NCHIP_MAX; c++)
        port_chips[p][c] = (chip_route[c] == PORT_ID_W'(p)) && (c != int'(my_chip));
      for (int d = 0; d < NNOC_MAX; d++)
        port_nocs[p][d] = (noc_route[d] == PORT_ID_W'(p));
    end
  end

  always_comb begin
    hdr_t                 h, hp;
    logic [35:0]          chips, remote;
    logic [19:0]          nocs, local_d;
    logic                 mine;
    logic [PORT_ID_W-1:0] op;
    for (int i = 0; i < NPORTS; i++) begin
      h     = hdr_t'(head[i].data);
      op    = '0;
      remote = '0;
      local_d = '0;
      hp    = h;
      chips = h.dest[55:20];
      nocs  = h.dest[19:0];
      mine  = (my_chip < CHIP_ID_W'(NCHIP_MAX)) ? chips[my_chip] : 1'b0;
      req_mask[i] = '0;
      mixed[i]    = 1'b0;
      for (int p = 0; p < NPORTS; p++) hdr_out[i][p] = head[i];
      if (!h.mcast) begin
        if (h.dest[10:5] != my_chip) op = chip_route[h.dest[10:5]];
        else                         op = noc_route[h.dest[4:0]];
        if (op < PORT_ID_W'(NPORTS)) req_mask[i][op] = 1'b1;
      end else begin
        for (int p = 0; p < NPORTS; p++) begin
          remote  = '0;
          local_d = '0;
          remote  = chips & port_chips[p];
          if (mine) local_d = nocs & port_nocs[p];
          hp = h;
          if (remote != '0) begin
            hp.dest[55:20] = remote;
          end else begin
            hp.dest[55:20] = '0;
            if (my_chip < CHIP_ID_W'(NCHIP_MAX)) hp.dest[20 + int'(my_chip)] = 1'b1;
            hp.dest[19:0] = local_d;
          end
          hdr_out[i][p].data = 64'(hp);
          req_mask[i][p] = (remote != '0) || (local_d != '0);
          if (remote != '0 && local_d != '0) mixed[i] = 1'b1;
        end
      end
    end
  end

  // ---------------- allocation ----------------
  logic [NPORTS-1:0] active;                  // input owns its outputs
  logic [NPORTS-1:0] locked;                  // output is owned
  logic [IW-1:0]     owner    [NPORTS];
  logic [CW-1:0]     credits  [NPORTS];
  logic [IW-1:0]     rr;
  logic [NPORTS-1:0] grant;
  logic [NPORTS-1:0] defer;                   // granted behind a tail leaving this cycle
  logic [NPORTS-1:0] fwd;                     // input sends a flit this cycle
  logic [NPORTS-1:0] releasing;               // output freed by a tail this cycle
  logic [NPORTS-1:0] grant_out [NPORTS];
  logic [CW-1:0]     need      [NPORTS];     // flits in the packet at the head

  always_comb
    for (int i = 0; i < NPORTS; i++) need[i] = CW'(head[i].data[60:56]) + CW'(1);

  always_comb begin
    logic [NPORTS-1:0] taken;
    for (int p = 0; p < NPORTS; p++) begin
      releasing[p] = locked[p] && nonempty[owner[p]] && head[owner[p]].tail;
    end
    taken = '0;
    grant = '0;
    defer = '0;
    for (int k = 0; k < NPORTS; k++) begin
      int unsigned i;
      logic ok;
      i = (int'(rr) + k) % NPORTS;
      grant_out[i] = '0;
      ok = nonempty[i] && head[i].head && !active[i] && (req_mask[i] != '0);
      for (int p = 0; p < NPORTS; p++)
        if (req_mask[i][p]) begin
          if (taken[p] || (locked[p] && !releasing[p])) ok = 1'b0;
          if (credits[p] < need[i]) ok = 1'b0;
        end
      if (ok) begin
        grant[i]     = 1'b1;
        defer[i]     = (req_mask[i] & releasing) != '0;
        grant_out[i] = req_mask[i];
        taken        = taken | req_mask[i];
      end
    end
    for (int i = 0; i < NPORTS; i++) begin
      fwd[i] = nonempty[i] && (active[i] || (grant[i] && !defer[i]));
      pop[i] = fwd[i];
    end
  end

  // ---------------- state ----------------
  always_ff @(posedge clk)
    for (int i = 0; i < NPORTS; i++)
      if (in_valid[i]) buf_mem[i][wr_ptr[i]] <= in_flit[i];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPORTS; i++) begin
        rd_ptr[i]   <= '0;
        wr_ptr[i]   <= '0;
        count[i]    <= '0;
        owner[i]    <= '0;
        credits[i]  <= CW'(DOWN_DEPTH);
        out_flit[i] <= '0;
      end
      active    <= '0;
      locked    <= '0;
      rr        <= '0;
      out_valid <= '0;
      in_credit <= '0;
    end else begin
      in_credit <= pop;
      if (grant != '0) rr <= IW'((int'(rr) + 1) % NPORTS);
      for (int i = 0; i < NPORTS; i++) begin
        // buffer write / read
        if (in_valid[i]) begin
          wr_ptr[i] <= (wr_ptr[i] == PW'(BUF_DEPTH - 1)) ? '0 : wr_ptr[i] + 1'b1;
        end
        if (pop[i]) rd_ptr[i] <= (rd_ptr[i] == PW'(BUF_DEPTH - 1)) ? '0 : rd_ptr[i] + 1'b1;
        count[i] <= count[i] + (PW+1)'(in_valid[i]) - (PW+1)'(pop[i]);
        // packet ownership
        if (grant[i]) begin
          active[i]   <= defer[i] || !head[i].tail;
        end else if (fwd[i] && head[i].tail) begin
          active[i] <= 1'b0;
        end
      end
      for (int p = 0; p < NPORTS; p++) begin
        logic             sent;
        logic [CW-1:0]    c;
        c    = credits[p];
        sent = 1'b0;
        if (locked[p] && fwd[owner[p]]) begin
          out_flit[p] <= head[owner[p]].head ? hdr_out[owner[p]][p] : head[owner[p]];
          sent = 1'b1;
          if (head[owner[p]].tail) locked[p] <= 1'b0;
        end
        for (int i = 0; i < NPORTS; i++) begin
          if (grant[i] && grant_out[i][p]) begin
            c = c - need[i];
            owner[p] <= IW'(i);
            if (defer[i]) begin
              locked[p] <= 1'b1;
            end else begin
              out_flit[p] <= hdr_out[i][p];
              sent = 1'b1;
              locked[p] <= !head[i].tail;
            end
          end
        end
        out_valid[p] <= sent;
        credits[p]   <= c + CW'(out_credit[p]);
      end
    end
  end

  // Source rule: a multicast never needs one output port for both other chips
  // and nodes of this chip (the sender splits such a packet in two).
  for (genvar i = 0; i < NPORTS; i++) begin : g_mix
    a_no_mixed : assert property (@(posedge clk) disable iff (!rst_n)
      !(nonempty[i] && head[i].head && head[i].data[63] && mixed[i]))
      else $error("noc_router: multicast on input %0d mixes this chip and other chips on one port", i);
  end

  // A sender never overruns an input buffer when it respects its credits.
  for (genvar i = 0; i < NPORTS; i++) begin : g_chk
    a_no_overflow : assert property (@(posedge clk) disable iff (!rst_n)
      in_valid[i] |-> (count[i] < (PW+1)'(BUF_DEPTH) || pop[i]))
      else $error("noc_router: input %0d buffer overflow", i);
  end
endmodule
